// tb_indicator_unit: walks all 64 indicator addresses. Program flags must hold
// what was set or reset, console and external flags must read through, and
// writes to the input-flag, time-base and overflow addresses must produce the
// restart, start/stop and clear pulses and nothing else.
module tb_indicator_unit;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [5:0]  s_addr = '0;
  logic        wr = 1'b0, wval = 1'b0, val;
  logic [1:0]  in_full = '0, in_restart;
  logic        tb_elapsed = 1'b0, tb_start, tb_stop, ovf = 1'b0, v_clr;
  logic [15:0] console = '0;
  logic [31:0] flags_m;
  int checks = 0, failures = 0;

  indicator_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0d got %0d exp %0d", what, s_addr, got, exp);
    end
  endtask

  function automatic int expected(int s);
    if (s >= 32) return int'(flags_m[s - 32]);
    if (s >= 16) return int'(console[s - 16]);
    if (s == 9)  return int'(ovf);
    if (s == 8)  return int'(tb_elapsed);
    if (s < 2)   return int'(in_full[s]);
    return 0;
  endfunction

  initial begin
    flags_m = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      console = 16'($urandom); in_full = 2'($urandom); tb_elapsed = 1'($urandom);
      ovf = 1'($urandom);
      s_addr = 6'($urandom); wr = $urandom_range(0, 1) == 1; wval = 1'($urandom);
      #1;
      check("read", int'(val), expected(int'(s_addr)));
      check("restart", int'(in_restart), (wr && !wval && s_addr < 2) ? (1 << s_addr) : 0);
      check("tb start", int'(tb_start), int'(wr && wval && s_addr == 8));
      check("tb stop", int'(tb_stop), int'(wr && !wval && s_addr == 8));
      check("ovf clear", int'(v_clr), int'(wr && !wval && s_addr == 9));
      if (wr && s_addr >= 32) flags_m[s_addr - 32] = wval;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
