// tb_time_base: starts the time base and measures, at its default 6 ms period
// of 60000 clocks, the number of clocks until elapsed rises; also checks a
// restart before expiry, a stop, and that elapsed stays up until restarted.
module tb_time_base;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0;
  logic elapsed, running;
  int checks = 0, failures = 0;

  time_base dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3; t++) begin
      start = 1'b1; @(negedge clk); start = 1'b0;
      n = 0;
      while (!elapsed) begin @(negedge clk); n++; end
      check("period", n, 60000);
      repeat (10) @(negedge clk);
      check("stays elapsed", int'(elapsed), 1);
    end
    // restart in the middle of a period
    start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (1000) @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    n = 0;
    while (!elapsed) begin @(negedge clk); n++; end
    check("period after restart", n, 60000);
    // stop
    start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (100) @(negedge clk);
    stop = 1'b1; @(negedge clk); stop = 1'b0;
    repeat (70000) @(negedge clk);
    check("stopped", int'(elapsed), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
