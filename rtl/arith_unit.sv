// arith_unit: digit-serial excess-3 decimal arithmetic unit.
//
// One decimal digit is handled per clock. The unit holds a 4-bit register A,
// a 4-bit binary adder with excess-3 correction, and three flip-flops: the
// decimal carry C, the sticky overflow V and the zero flag Z.
//
// Adder: X is A or its 9's complement (bitwise inversion in excess-3, the
// "comp" switch), Y is the RWM read digit or excess-3 zero ("bzero" switch).
// The 5-bit binary sum X + Y + C exceeds 15 exactly when the decimal sum
// exceeds 9; the result digit is then corrected by +3, otherwise by -3, so it
// is again excess-3. Subtraction Y - X is X complemented with an initial
// carry of 1 (10's complement).
//
// Overflow: numbers carry a sign digit (0 or 9) in digit 7; when vchk is
// given while the digit counter is at 7, V is set if the result sign digit is
// neither 0 nor 9. V is cleared only by v_clr (a program reset of its
// indicator). Z is set by Z_SET and cleared by Z_ACC whenever the read digit
// is not 0; it tests a whole word for zero.
//
// The register, adder, switches and carry/overflow flip-flops follow the
// source description; the zero flip-flop, the sign-digit overflow rule and
// the correction network are this design's choices. All updates happen on
// the rising clock edge; sum and cout are combinational.
//
// The unit also sits between the RWM and the external buses: a BCD digit
// from the input bus leaves as in_ex3 (+3), and the RWM digit leaves on the
// output bus as out_bcd (-3). These conversions are combinational.
module arith_unit
  import interp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  digit_t rd,        // RWM read digit (adder Y operand, A load source)
  input  logic   dc_is7,    // digit counter at the sign digit
  input  ald_e   ald,
  input  logic   comp,
  input  logic   bzero,
  input  cop_e   cop,
  input  logic   vchk,
  input  zop_e   zop,
  input  logic   v_clr,
  input  digit_t in_bcd,    // input bus (BCD)
  output digit_t in_ex3,    // input digit converted to excess-3
  output digit_t out_bcd,   // output bus: RWM read digit converted to BCD
  output digit_t a,         // register A
  output digit_t sum,       // corrected adder output
  output logic   cout,
  output logic   carry,
  output logic   ovf,
  output logic   zero
);

  logic [4:0] raw;
  digit_t     x, y;

  always_comb begin
    x    = comp  ? ~a : a;
    y    = bzero ? EX3_ZERO : rd;
    raw  = {1'b0, x} + {1'b0, y} + {4'd0, carry};
    cout = raw[4];
    sum  = raw[4] ? (raw[3:0] + 4'd3) : (raw[3:0] - 4'd3);
  end

  assign in_ex3  = in_bcd + 4'd3;
  assign out_bcd = rd - 4'd3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a     <= EX3_ZERO;
      carry <= 1'b0;
      ovf   <= 1'b0;
      zero  <= 1'b0;
    end else begin
      unique case (ald)
        AL_RD:   a <= rd;
        AL_SUM:  a <= sum;
        default: ;
      endcase
      unique case (cop)
        C_CLR:   carry <= 1'b0;
        C_SET:   carry <= 1'b1;
        C_LD:    carry <= cout;
        default: ;
      endcase
      if (v_clr)
        ovf <= 1'b0;
      else if (vchk && dc_is7 && sum != EX3_ZERO && sum != EX3_NINE)
        ovf <= 1'b1;
      unique case (zop)
        Z_SET:   zero <= 1'b1;
        Z_ACC:   if (rd != EX3_ZERO) zero <= 1'b0;
        default: ;
      endcase
    end
  end

endmodule
