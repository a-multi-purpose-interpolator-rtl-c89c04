// operative_portion: datapath of the interpolator, driven by the CV commands.
//
// Holds the instruction address register (IAR, 12 bits) in front of the
// program ROM, the RWM (64 words x 8 excess-3 cells), the arithmetic unit, a
// 3-bit digit counter DC that walks the cells of a word, and an 8-bit staging
// register JR for indirect jumps. Since the ROM has no output register the
// instruction is read straight from the ROM output for as long as IAR holds;
// IAR changes only in the last micro-order of an instruction.
//
// RWM cell address = {word, digit}. The word comes from field L1, L2 or L3 of
// the instruction, or is the fixed location ADS_WORD whose sign selects add or
// subtract for ADS. The digit is DC, DC+1, DC-1 or the sign digit 7. Write
// data is register A, excess-3 0 or 9, a nibble of the 12-bit constant C (STO:
// cells 0..2, zero above) or the input-channel digit converted BCD -> excess-3.
// Output digits are converted excess-3 -> BCD; both conversions are done by
// the arithmetic unit, which sits on the input and output buses. Everything
// changes on the rising clock edge; conditioning variables are combinational.
//
// The cond vector has the 16 positions the 4-bit CD field can select; only
// nine are used, the others are tied to 0 and CD_ONE to 1. ind_wr, out_we and
// out_done are command bits passed straight on to the I/O blocks.
//
// From the source: the units and their widths, the three-address format, the
// ROM and RWM sizes, BCD <-> excess-3 conversion in the I/O instructions and
// indirect jumps through a RWM word. This design's choices: field placement,
// the fixed ADS location (parameter ADS_WORD), the digit-offset addressing and
// the JR staging register (needed because IAR may not change mid-instruction).
module operative_portion
  import interp_pkg::*;
#(
  parameter int unsigned ROM_WORDS = 4096,
  parameter logic [5:0]  ADS_WORD  = 6'd63
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cv_t           cv,
  output opcode_e       op,
  output logic [15:0]   cond,
  output logic [ROM_AW-1:0] iar,
  // indicators
  input  logic          ind_val,     // value of indicator S
  output logic [5:0]    ind_addr,    // S
  output logic          ind_wr,
  output logic          ind_wval,
  input  logic          v_clr,
  output logic          ovf,
  // input channels
  output logic [5:0]    in_ch,
  output logic [2:0]    in_idx,
  input  digit_t        in_digit,    // BCD
  // output channels
  output logic [5:0]    out_ch,
  output logic [2:0]    out_idx,
  output digit_t        out_digit,   // BCD
  output logic          out_we,
  output logic          out_done,
  // program load port
  input  logic          ld_we,
  input  logic [ROM_AW-1:0]  ld_addr,
  input  logic [INSTR_W-1:0] ld_data
);

  instr_t      ins;
  logic [INSTR_W-1:0]        rom_q;
  logic [$clog2(DIGITS)-1:0] dc, dig;
  logic [RWM_AW-1:0]         word;
  logic [RWM_AW+$clog2(DIGITS)-1:0] caddr;
  digit_t      rd, wd, a, in_ex3;
  logic [7:0]  jr;
  logic        zero;

  program_rom #(.WORDS(ROM_WORDS)) u_rom (
    .clk, .addr(iar), .data(rom_q), .ld_we, .ld_addr, .ld_data);

  assign ins = instr_t'(rom_q);
  assign op  = ins.op;

  // ---------------------------------------------------- RWM addressing
  always_comb begin
    unique case (cv.wsel)
      WS_L1:   word = ins.fa;
      WS_L2:   word = ins.fb;
      WS_L3:   word = ins.fc;
      default: word = ADS_WORD;
    endcase
    unique case (cv.doff)
      DO_DC:   dig = dc;
      DO_INC:  dig = dc + 3'd1;
      DO_DEC:  dig = dc - 3'd1;
      default: dig = 3'd7;
    endcase
    caddr = {word, dig};
  end

  always_comb begin
    unique case (cv.wdsel)
      WD_A:    wd = a;
      WD_K0:   wd = EX3_ZERO;
      WD_K9:   wd = EX3_NINE;
      WD_CNIB: wd = (dc < 3'd3) ? rom_q[4*dc +: 4] : EX3_ZERO;
      WD_IN:   wd = in_ex3;
      default: wd = EX3_ZERO;
    endcase
  end

  rwm u_rwm (.clk, .addr(caddr), .we(cv.we), .wdata(wd), .rdata(rd));

  arith_unit u_au (
    .clk, .rst_n, .rd, .dc_is7(dc == 3'd7),
    .ald(cv.ald), .comp(cv.comp), .bzero(cv.bzero), .cop(cv.cop), .vchk(cv.vchk),
    .zop(cv.zop), .v_clr, .in_bcd(in_digit), .in_ex3, .out_bcd(out_digit),
    .a, .sum(), .cout(), .carry(), .ovf, .zero);

  // ---------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iar <= '0;
      dc  <= '0;
      jr  <= '0;
    end else begin
      unique case (cv.iaop)
        IA_INC:  iar <= iar + 1'b1;
        IA_LDF:  iar <= rom_q[ROM_AW-1:0];
        IA_LDI:  iar <= {rd, jr};
        default: ;
      endcase
      unique case (cv.dcop)
        DC_LOAD: dc <= cv.k;
        DC_INC:  dc <= dc + 3'd1;
        DC_DEC:  dc <= dc - 3'd1;
        default: ;
      endcase
      if (cv.jrld) jr[4*dc[0] +: 4] <= rd;
    end
  end

  // The micro-program returns DC to 0 at the end of every instruction.
  a_dc_zero_at_fetch: assert property (@(posedge clk) disable iff (!rst_n) cv.disp |-> dc == '0)
    else $error("digit counter not 0 at fetch");

  // Spare CV bits are reserved and always 0 in the micro-program.
  a_spare_zero: assert property (@(posedge clk) disable iff (!rst_n) cv.spare == '0)
    else $error("spare CV bits set");

  // ---------------------------------------------------- conditioning variables
  always_comb begin
    cond          = '0;
    cond[CD_ZERO] = 1'b0;
    cond[CD_ONE]  = 1'b1;
    cond[CD_DCK]  = (dc == cv.k);
    cond[CD_DCN]  = (dc == ins.fc[2:0]);
    cond[CD_Z]    = zero;
    cond[CD_NEG]  = (rd == EX3_NINE);
    cond[CD_SGND] = (a == EX3_NINE) ^ (rd == EX3_NINE);
    cond[CD_IND]  = ind_val;
    cond[CD_SHR]  = ins.fb[0];
  end

  // ---------------------------------------------------- indicators and I/O
  assign ind_addr  = ins.fa;
  assign ind_wr    = cv.indwr;
  assign ind_wval  = ins.fc[0];
  assign in_ch     = ins.fb;
  assign in_idx    = dc;
  assign out_ch    = ins.fb;
  assign out_idx   = dc;
  assign out_we    = cv.outwe;
  assign out_done  = cv.outdone;

endmodule
