// tb_arith_unit: drives the arithmetic unit digit by digit the way the
// micro-program does (A <- first operand digit, A <- A + second digit + C)
// for random 8-digit excess-3 additions and subtractions, and for the
// negation used by ABS. Results, carries, the overflow flag and the zero flag
// are compared with integer arithmetic on the decimal values. The bus
// conversions (BCD in -> excess-3, excess-3 out -> BCD) are checked for every
// decimal digit.
module tb_arith_unit;
  import interp_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  digit_t rd = '0;
  logic   dc_is7 = 1'b0;
  ald_e   ald = AL_HOLD;
  logic   comp = 1'b0, bzero = 1'b0, vchk = 1'b0, v_clr = 1'b0;
  cop_e   cop = C_HOLD;
  zop_e   zop = Z_HOLD;
  digit_t in_bcd = '0;
  digit_t a, sum, in_ex3, out_bcd;
  logic   cout, carry, ovf, zero;

  arith_unit dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam longint M = 100000000;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic digit_t dig(longint v, int i);
    return digit_t'((v / (10 ** i)) % 10 + 3);
  endfunction

  // r = y + x (sub = 0) or y - x (sub = 1) or 0 - x (neg = 1); returns result word
  task automatic run(longint x, longint y, bit sub, bit neg, output longint r);
    r = 0;
    @(negedge clk);
    cop = sub ? C_SET : C_CLR; v_clr = 1'b1;
    @(negedge clk);
    v_clr = 1'b0;
    for (int i = 0; i < 8; i++) begin
      rd = dig(x, i); ald = AL_RD; cop = C_HOLD; dc_is7 = (i == 7);
      @(negedge clk);
      rd = dig(y, i); ald = AL_SUM; cop = C_LD; comp = sub; bzero = neg; vchk = 1'b1;
      @(negedge clk);
      ald = AL_HOLD; cop = C_HOLD; comp = 1'b0; bzero = 1'b0; vchk = 1'b0;
      r = r + longint'(a - 4'd3) * (10 ** i);
    end
  endtask

  function automatic longint sgn(longint w);
    return (w / 10000000 == 9) ? w - M : (w / 10000000 == 0 ? w : 0);
  endfunction

  initial begin
    longint x, y, r, e, s;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      x = longint'($urandom_range(0, 9999999));
      y = longint'($urandom_range(0, 9999999));
      if (t % 2) x = M - x;
      if (t % 3 == 0) y = (M - y) % M;
      if (t < 4) begin x = 9999999; y = (t < 2) ? 1 : 99999999; end
      run(x, y, 1'b0, 1'b0, r);
      e = (x + y) % M;
      check("add", r, e);
      s = sgn(x) + sgn(y);
      check("add overflow", longint'(ovf), (s >= 10000000 || s < -10000000) ? 1 : 0);
      run(x, y, 1'b1, 1'b0, r);
      check("sub", r, (y + M - x) % M);
      run(x, 0, 1'b1, 1'b1, r);
      check("negate", r, (M - x) % M);
    end
    // bus conversions
    for (int d = 0; d < 10; d++) begin
      @(negedge clk); in_bcd = digit_t'(d); rd = digit_t'(d + 3);
      #1;
      check("input bus to excess-3", longint'(in_ex3), d + 3);
      check("output bus to BCD", longint'(out_bcd), d);
    end
    // zero flag
    for (int t = 0; t < 40; t++) begin
      x = (t % 2) ? 0 : longint'($urandom_range(1, 99999999));
      @(negedge clk); zop = Z_SET;
      for (int i = 0; i < 8; i++) begin
        @(negedge clk); zop = Z_ACC; rd = dig(x, i);
      end
      @(negedge clk); zop = Z_HOLD;
      check("zero", longint'(zero), x == 0 ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
