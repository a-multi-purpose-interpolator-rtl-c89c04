// interp_pkg: types and constants shared by the multi-purpose interpolator.
//
// The machine is a small decimal computer. Numbers are 8 decimal digits held
// as 4-bit excess-3 cells in a 64-word read-write memory; negative numbers are
// 10's complement. Instructions are 22 bits (4-bit operation code plus an
// 18-bit address field) and live in a program ROM of up to 4096 words. A
// micro-programmed control unit steps the datapath one RWM access per clock.
//
// Taken from the source description: word and field widths (8 digits, 6-bit
// RWM addresses, 12-bit ROM addresses, 4-bit op code, 22-bit instructions),
// the micro-order format CV(33) | CD(4) | B(1) | AD(6), and the instruction
// repertoire. Chosen here: the op-code numbering, the placement of the fields
// inside the 18-bit address field, the sign convention (the most significant
// digit is a sign digit, 0 or 9), the encoding of the 33 command bits and the
// whole microprogram, which is built by the function micro_program() below.
package interp_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DIGITS      = 8;   // digits per word
  localparam int unsigned RWM_AW      = 6;   // RWM word address
  localparam int unsigned ROM_AW      = 12;  // program ROM address
  localparam int unsigned INSTR_W     = 22;  // instruction width
  localparam int unsigned UADDR_W     = 6;   // micro-order address (AD field)
  localparam int unsigned CV_W        = 33;
  localparam int unsigned CD_W        = 4;
  localparam int unsigned UORDER_W    = CV_W + CD_W + 1 + UADDR_W;  // 44

  typedef logic [3:0] digit_t;               // one excess-3 (or BCD) digit

  localparam digit_t EX3_ZERO = 4'h3;        // excess-3 code of 0
  localparam digit_t EX3_NINE = 4'hC;        // excess-3 code of 9

  // ------------------------------------------------------- op codes
  typedef enum logic [3:0] {
    OP_ADD = 4'd0,   // (L3) <- (L2) + (L1)
    OP_SUB = 4'd1,   // (L3) <- (L2) - (L1)
    OP_ADS = 4'd2,   // add or subtract by the sign of the fixed location
    OP_MOD = 4'd3,   // sign digit of L3 <- sign(L1) * sign(L2)
    OP_ABS = 4'd4,   // (L2) <- |(L1)|
    OP_SHF = 4'd5,   // (L3) <- (L1) shifted one digit; L2 bit 0: 0 left (x10), 1 right (/10)
    OP_MOV = 4'd6,   // (L2) <- (L1)
    OP_STO = 4'd7,   // three low digits of L1 <- 12-bit constant C
    OP_JMP = 4'd8,   // jump to F
    OP_JMI = 4'd9,   // jump to the 12 bits held in the three low cells of L1
    OP_TZE = 4'd10,  // jump to F if (L1) = 0
    OP_TPL = 4'd11,  // jump to F if (L1) >= 0
    OP_TRS = 4'd12,  // jump to F if indicator S = 1
    OP_INP = 4'd13,  // N digits from input channel into L1 (BCD -> excess-3)
    OP_OUT = 4'd14,  // N digits of L1 to output channel (excess-3 -> BCD)
    OP_SRI = 4'd15   // set (bit 0 = 1) or reset indicator S
  } opcode_e;

  // Instruction layout: [21:18] op, [17:12] A (L1 or S), [11:6] B (L2, channel),
  // [5:0] C (L3, digit count - 1).  Jumps and STO use [11:0] as F or C.
  typedef struct packed {
    opcode_e      op;
    logic [5:0]   fa;
    logic [5:0]   fb;
    logic [5:0]   fc;
  } instr_t;

  // ------------------------------------------------------- CV commands
  typedef enum logic [1:0] {WS_L1 = 2'd0, WS_L2 = 2'd1, WS_L3 = 2'd2, WS_FIX = 2'd3} wsel_e;
  typedef enum logic [1:0] {DO_DC = 2'd0, DO_INC = 2'd1, DO_DEC = 2'd2, DO_SIGN = 2'd3} doff_e;
  typedef enum logic [2:0] {WD_A = 3'd0, WD_K0 = 3'd1, WD_K9 = 3'd2, WD_CNIB = 3'd3,
                            WD_IN = 3'd4} wdsel_e;
  typedef enum logic [1:0] {AL_HOLD = 2'd0, AL_RD = 2'd1, AL_SUM = 2'd2} ald_e;
  typedef enum logic [1:0] {C_HOLD = 2'd0, C_CLR = 2'd1, C_SET = 2'd2, C_LD = 2'd3} cop_e;
  typedef enum logic [1:0] {Z_HOLD = 2'd0, Z_SET = 2'd1, Z_ACC = 2'd2} zop_e;
  typedef enum logic [1:0] {DC_HOLD = 2'd0, DC_LOAD = 2'd1, DC_INC = 2'd2, DC_DEC = 2'd3} dcop_e;
  typedef enum logic [1:0] {IA_HOLD = 2'd0, IA_INC = 2'd1, IA_LDF = 2'd2, IA_LDI = 2'd3} iaop_e;

  // 33 command bits; 29 are used, 4 are reserved to keep the 44-bit micro-order.
  typedef struct packed {
    logic [3:0] spare;
    wsel_e      wsel;     // RWM word address source
    doff_e      doff;     // RWM digit address: DC, DC+1, DC-1, sign digit 7
    logic       we;       // write RWM cell
    wdsel_e     wdsel;    // RWM write data source
    ald_e       ald;      // A register load
    logic       comp;     // adder takes the 9's complement of A
    logic       bzero;    // adder B operand forced to excess-3 zero
    cop_e       cop;      // carry flip-flop
    logic       vchk;     // check overflow on the sign digit (DC = 7)
    zop_e       zop;      // zero flip-flop
    dcop_e      dcop;     // digit counter
    logic [2:0] k;        // digit constant for DC load and DC compare
    iaop_e      iaop;     // instruction address register
    logic       jrld;     // load indirect-jump staging nibble
    logic       disp;     // dispatch on op code (fetch micro-order)
    logic       indwr;    // write indicator S with instruction bit 0
    logic       outwe;    // write one digit to the selected output channel
    logic       outdone;  // output word complete strobe
  } cv_t;

  // Conditioning variables (CD field). Value 0 selects AD as next address.
  typedef enum logic [3:0] {
    CD_ZERO  = 4'd0,   // constant 0: unconditional jump to AD
    CD_ONE   = 4'd1,   // constant 1: next sequential (B=0) or fetch (B=1)
    CD_DCK   = 4'd2,   // DC == k
    CD_DCN   = 4'd3,   // DC == digit count - 1 of an I/O instruction
    CD_Z     = 4'd4,   // zero flip-flop
    CD_NEG   = 4'd5,   // RWM read digit is 9 (negative sign digit)
    CD_SGND  = 4'd6,   // sign of A differs from sign of the read digit
    CD_IND   = 4'd7,   // indicator S
    CD_SHR   = 4'd8    // shift instruction asks for a right shift
  } cd_e;

  typedef struct packed {
    cv_t                 cv;
    cd_e                 cd;
    logic                b;
    logic [UADDR_W-1:0]  ad;
  } uorder_t;

  // ------------------------------------------------ micro-program layout
  localparam logic [5:0] U_FETCH = 6'd0;
  localparam logic [5:0] U_INC   = 6'd1;   // IAR+1, go to fetch
  localparam logic [5:0] U_JMPF  = 6'd2;   // IAR <- F, go to fetch
  localparam logic [5:0] U_ENTRY = 6'd16;  // entry of op code n is U_ENTRY + n

  // Routine bodies.
  localparam logic [5:0] U_ADD_B = 6'd3,  U_ADD_C = 6'd4,  U_ADD_X = 6'd5;
  localparam logic [5:0] U_SUB_A = 6'd6,  U_SUB_B = 6'd7,  U_SUB_C = 6'd8,  U_SUB_X = 6'd9;
  localparam logic [5:0] U_ADS_1 = 6'd10, U_ADS_N = 6'd11;
  localparam logic [5:0] U_MOD_2 = 6'd12, U_MOD_N = 6'd13, U_MOD_P = 6'd14;
  localparam logic [5:0] U_ABS_1 = 6'd32, U_ABN_A = 6'd33, U_ABN_B = 6'd34, U_ABN_C = 6'd35,
                         U_ABN_X = 6'd36;
  localparam logic [5:0] U_SHF_2 = 6'd37, U_SHR_A = 6'd38, U_SHR_B = 6'd39, U_SHR_C = 6'd40,
                         U_SHR_D = 6'd41, U_SHL_0 = 6'd42, U_SHL_A = 6'd43, U_SHL_B = 6'd44,
                         U_SHL_C = 6'd45;
  localparam logic [5:0] U_MOV_B = 6'd46, U_MOV_X = 6'd47;
  localparam logic [5:0] U_STO_L = 6'd48, U_STO_X = 6'd49;
  localparam logic [5:0] U_JMI_2 = 6'd50, U_JMI_3 = 6'd51;
  localparam logic [5:0] U_TZE_L = 6'd52, U_TZE_2 = 6'd53, U_TZE_J = 6'd54;
  localparam logic [5:0] U_TPL_1 = 6'd55, U_TPL_X = 6'd56;
  localparam logic [5:0] U_TRS_1 = 6'd57, U_TRS_J = 6'd58;
  localparam logic [5:0] U_INP_L = 6'd59, U_INP_X = 6'd60;
  localparam logic [5:0] U_OUT_L = 6'd61, U_OUT_X = 6'd62;

  typedef logic [63:0][UORDER_W-1:0] uprog_t;

  // Helpers used to write the micro-program.
  function automatic logic [5:0] ent(opcode_e o);
    return U_ENTRY | {2'b00, o};
  endfunction

  function automatic cv_t cv_none();
    cv_t c;
    c = '0;
    return c;
  endfunction

  function automatic uorder_t uo(cv_t c, cd_e cd, logic b, logic [5:0] ad);
    uorder_t u;
    u.cv = c; u.cd = cd; u.b = b; u.ad = ad;
    return u;
  endfunction

  // Closing commands of every instruction: DC and carry back to 0.
  function automatic cv_t cv_end(iaop_e ia);
    cv_t c;
    c = '0;
    c.iaop = ia; c.dcop = DC_LOAD; c.k = 3'd0; c.cop = C_CLR;
    return c;
  endfunction

  // Read digit (wsel, doff) into A.
  function automatic cv_t cv_rd_a(wsel_e ws, doff_e d);
    cv_t c;
    c = '0;
    c.wsel = ws; c.doff = d; c.ald = AL_RD;
    return c;
  endfunction

  // Write digit (wsel, doff) from source wd.
  function automatic cv_t cv_wr(wsel_e ws, doff_e d, wdsel_e wd);
    cv_t c;
    c = '0;
    c.wsel = ws; c.doff = d; c.we = 1'b1; c.wdsel = wd;
    return c;
  endfunction

  // The micro-program. Invariant between instructions: DC = 0, carry = 0.
  function automatic uprog_t micro_program();
    uprog_t p;
    cv_t c;
    for (int i = 0; i < 64; i++) p[i] = uo(cv_none(), CD_ONE, 1'b1, U_FETCH);

    // fetch: dispatch on the op code of the word addressed by IAR
    c = cv_none(); c.disp = 1'b1;
    p[U_FETCH] = uo(c, CD_ONE, 1'b1, U_FETCH);
    p[U_INC]   = uo(cv_end(IA_INC), CD_ONE, 1'b1, U_FETCH);
    p[U_JMPF]  = uo(cv_end(IA_LDF), CD_ONE, 1'b1, U_FETCH);

    // ADD: per digit A <- L1[i]; A <- A + L2[i] + C; L3[i] <- A
    p[ent(OP_ADD)] = uo(cv_rd_a(WS_L1, DO_DC), CD_ZERO, 1'b0, U_ADD_B);
    c = cv_none(); c.wsel = WS_L2; c.ald = AL_SUM; c.cop = C_LD; c.vchk = 1'b1;
    p[U_ADD_B] = uo(c, CD_ONE, 1'b0, 6'd0);
    c = cv_wr(WS_L3, DO_DC, WD_A); c.dcop = DC_INC; c.k = 3'd7;
    p[U_ADD_C] = uo(c, CD_DCK, 1'b0, ent(OP_ADD));
    p[U_ADD_X] = uo(cv_end(IA_INC), CD_ONE, 1'b1, U_FETCH);

    // SUB: as ADD with the 9's complement of L1 and an initial carry of 1
    c = cv_none(); c.cop = C_SET;
    p[ent(OP_SUB)] = uo(c, CD_ZERO, 1'b0, U_SUB_A);
    p[U_SUB_A] = uo(cv_rd_a(WS_L1, DO_DC), CD_ONE, 1'b0, 6'd0);
    c = cv_none(); c.wsel = WS_L2; c.ald = AL_SUM; c.cop = C_LD; c.vchk = 1'b1; c.comp = 1'b1;
    p[U_SUB_B] = uo(c, CD_ONE, 1'b0, 6'd0);
    c = cv_wr(WS_L3, DO_DC, WD_A); c.dcop = DC_INC; c.k = 3'd7;
    p[U_SUB_C] = uo(c, CD_DCK, 1'b0, U_SUB_A);
    p[U_SUB_X] = uo(cv_end(IA_INC), CD_ONE, 1'b1, U_FETCH);

    // ADS: sign digit of the fixed location selects ADD (>= 0) or SUB (< 0)
    p[ent(OP_ADS)] = uo(cv_none(), CD_ZERO, 1'b0, U_ADS_1);
    c = cv_none(); c.wsel = WS_FIX; c.doff = DO_SIGN;
    p[U_ADS_1] = uo(c, CD_NEG, 1'b0, ent(OP_ADD));
    p[U_ADS_N] = uo(cv_none(), CD_ZERO, 1'b0, ent(OP_SUB));

    // MOD: sign digit of L3 <- 9 if the sign digits of L1 and L2 differ, else 0
    p[ent(OP_MOD)] = uo(cv_rd_a(WS_L1, DO_SIGN), CD_ZERO, 1'b0, U_MOD_2);
    c = cv_none(); c.wsel = WS_L2; c.doff = DO_SIGN;
    p[U_MOD_2] = uo(c, CD_SGND, 1'b0, U_MOD_P);
    c = cv_wr(WS_L3, DO_SIGN, WD_K9); c.iaop = IA_INC; c.cop = C_CLR;
    p[U_MOD_N] = uo(c, CD_ONE, 1'b1, U_FETCH);
    c = cv_wr(WS_L3, DO_SIGN, WD_K0); c.iaop = IA_INC; c.cop = C_CLR;
    p[U_MOD_P] = uo(c, CD_ONE, 1'b1, U_FETCH);

    // ABS: copy if L1 >= 0, otherwise L2 <- 0 - L1
    c = cv_none(); c.cop = C_SET;
    p[ent(OP_ABS)] = uo(c, CD_ZERO, 1'b0, U_ABS_1);
    c = cv_none(); c.wsel = WS_L1; c.doff = DO_SIGN;
    p[U_ABS_1] = uo(c, CD_NEG, 1'b0, ent(OP_MOV));
    p[U_ABN_A] = uo(cv_rd_a(WS_L1, DO_DC), CD_ONE, 1'b0, 6'd0);
    c = cv_none(); c.ald = AL_SUM; c.cop = C_LD; c.comp = 1'b1; c.bzero = 1'b1;
    p[U_ABN_B] = uo(c, CD_ONE, 1'b0, 6'd0);
    c = cv_wr(WS_L2, DO_DC, WD_A); c.dcop = DC_INC; c.k = 3'd7;
    p[U_ABN_C] = uo(c, CD_DCK, 1'b0, U_ABN_A);
    p[U_ABN_X] = uo(cv_end(IA_INC), CD_ONE, 1'b1, U_FETCH);

    // SHF: copy the sign digit, then shift the other seven digits
    p[ent(OP_SHF)] = uo(cv_rd_a(WS_L1, DO_SIGN), CD_ZERO, 1'b0, U_SHF_2);
    p[U_SHF_2] = uo(cv_wr(WS_L3, DO_SIGN, WD_A), CD_SHR, 1'b0, U_SHL_0);
    //   right (divide by 10): L3[i] <- L1[i+1], i = 0..5; L3[6] <- sign digit
    p[U_SHR_A] = uo(cv_rd_a(WS_L1, DO_INC), CD_ONE, 1'b0, 6'd0);
    c = cv_wr(WS_L3, DO_DC, WD_A); c.dcop = DC_INC; c.k = 3'd5;
    p[U_SHR_B] = uo(c, CD_DCK, 1'b0, U_SHR_A);
    p[U_SHR_C] = uo(cv_rd_a(WS_L1, DO_INC), CD_ONE, 1'b0, 6'd0);
    c = cv_wr(WS_L3, DO_DC, WD_A); c.iaop = IA_INC; c.dcop = DC_LOAD; c.k = 3'd0; c.cop = C_CLR;
    p[U_SHR_D] = uo(c, CD_ONE, 1'b1, U_FETCH);
    //   left (multiply by 10): L3[i] <- L1[i-1], i = 6..1; L3[0] <- 0
    c = cv_none(); c.dcop = DC_LOAD; c.k = 3'd6;
    p[U_SHL_0] = uo(c, CD_ONE, 1'b0, 6'd0);
    p[U_SHL_A] = uo(cv_rd_a(WS_L1, DO_DEC), CD_ONE, 1'b0, 6'd0);
    c = cv_wr(WS_L3, DO_DC, WD_A); c.dcop = DC_DEC; c.k = 3'd1;
    p[U_SHL_B] = uo(c, CD_DCK, 1'b0, U_SHL_A);
    c = cv_wr(WS_L3, DO_DC, WD_K0); c.iaop = IA_INC; c.cop = C_CLR;
    p[U_SHL_C] = uo(c, CD_ONE, 1'b1, U_FETCH);

    // MOV: L2 <- L1 (also the positive branch of ABS)
    p[ent(OP_MOV)] = uo(cv_rd_a(WS_L1, DO_DC), CD_ZERO, 1'b0, U_MOV_B);
    c = cv_wr(WS_L2, DO_DC, WD_A); c.dcop = DC_INC; c.k = 3'd7;
    p[U_MOV_B] = uo(c, CD_DCK, 1'b0, ent(OP_MOV));
    p[U_MOV_X] = uo(cv_end(IA_INC), CD_ONE, 1'b1, U_FETCH);

    // STO: digits 0..2 <- C, digits 3..7 <- 0
    p[ent(OP_STO)] = uo(cv_none(), CD_ZERO, 1'b0, U_STO_L);
    c = cv_wr(WS_L1, DO_DC, WD_CNIB); c.dcop = DC_INC; c.k = 3'd7;
    p[U_STO_L] = uo(c, CD_DCK, 1'b0, U_STO_L);
    p[U_STO_X] = uo(cv_end(IA_INC), CD_ONE, 1'b1, U_FETCH);

    // JMP
    p[ent(OP_JMP)] = uo(cv_end(IA_LDF), CD_ONE, 1'b1, U_FETCH);

    // JMI: stage cells 0 and 1 of L1, then load IAR with cell 2 and the stage
    c = cv_none(); c.wsel = WS_L1; c.jrld = 1'b1; c.dcop = DC_INC;
    p[ent(OP_JMI)] = uo(c, CD_ZERO, 1'b0, U_JMI_2);
    p[U_JMI_2] = uo(c, CD_ONE, 1'b0, 6'd0);
    c = cv_end(IA_LDI); c.wsel = WS_L1;
    p[U_JMI_3] = uo(c, CD_ONE, 1'b1, U_FETCH);

    // TZE: zero flip-flop accumulates "digit is 0" over the eight digits
    c = cv_none(); c.zop = Z_SET;
    p[ent(OP_TZE)] = uo(c, CD_ZERO, 1'b0, U_TZE_L);
    c = cv_none(); c.wsel = WS_L1; c.zop = Z_ACC; c.dcop = DC_INC; c.k = 3'd7;
    p[U_TZE_L] = uo(c, CD_DCK, 1'b0, U_TZE_L);
    p[U_TZE_2] = uo(cv_none(), CD_Z, 1'b0, U_INC);
    p[U_TZE_J] = uo(cv_end(IA_LDF), CD_ONE, 1'b1, U_FETCH);

    // TPL: jump unless the sign digit of L1 is 9
    p[ent(OP_TPL)] = uo(cv_none(), CD_ZERO, 1'b0, U_TPL_1);
    c = cv_none(); c.wsel = WS_L1; c.doff = DO_SIGN;
    p[U_TPL_1] = uo(c, CD_NEG, 1'b0, U_JMPF);
    p[U_TPL_X] = uo(cv_end(IA_INC), CD_ONE, 1'b1, U_FETCH);

    // TRS: jump if indicator S is 1
    p[ent(OP_TRS)] = uo(cv_none(), CD_ZERO, 1'b0, U_TRS_1);
    p[U_TRS_1] = uo(cv_none(), CD_IND, 1'b0, U_INC);
    p[U_TRS_J] = uo(cv_end(IA_LDF), CD_ONE, 1'b1, U_FETCH);

    // INP: N digits of the input channel, converted to excess-3, into L1
    p[ent(OP_INP)] = uo(cv_none(), CD_ZERO, 1'b0, U_INP_L);
    c = cv_wr(WS_L1, DO_DC, WD_IN); c.dcop = DC_INC;
    p[U_INP_L] = uo(c, CD_DCN, 1'b0, U_INP_L);
    p[U_INP_X] = uo(cv_end(IA_INC), CD_ONE, 1'b1, U_FETCH);

    // OUT: N digits of L1, converted to BCD, to the output channel
    p[ent(OP_OUT)] = uo(cv_none(), CD_ZERO, 1'b0, U_OUT_L);
    c = cv_none(); c.wsel = WS_L1; c.outwe = 1'b1; c.dcop = DC_INC;
    p[U_OUT_L] = uo(c, CD_DCN, 1'b0, U_OUT_L);
    c = cv_end(IA_INC); c.outdone = 1'b1;
    p[U_OUT_X] = uo(c, CD_ONE, 1'b1, U_FETCH);

    // SRI: set or reset indicator S
    c = cv_end(IA_INC); c.indwr = 1'b1;
    p[ent(OP_SRI)] = uo(c, CD_ONE, 1'b1, U_FETCH);
    return p;
  endfunction

endpackage
