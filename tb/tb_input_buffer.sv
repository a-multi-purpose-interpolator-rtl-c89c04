// tb_input_buffer: plays a device that offers digits at random moments. After
// a restart the buffer must take exactly eight digits, raise full, drop
// dev_run (the device stops, further offers are ignored) and present the
// digits with the first one in digit 7.
module tb_input_buffer;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       dev_valid = 1'b0, restart = 1'b0;
  logic [3:0] dev_digit = '0, rd_digit;
  logic       dev_run, full;
  logic [2:0] rd_idx = '0;
  int checks = 0, failures = 0;

  input_buffer dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [3:0] sent [8];
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("stopped after reset", int'(dev_run), 0);
    for (int w = 0; w < 50; w++) begin
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      check("run after restart", int'(dev_run), 1);
      check("flag cleared", int'(full), 0);
      n = 0;
      while (!full) begin
        dev_valid = $urandom_range(0, 2) != 0;
        dev_digit = 4'($urandom_range(0, 9));
        if (dev_valid && dev_run) begin sent[n] = dev_digit; n++; end
        @(negedge clk);
      end
      check("digits taken", n, 8);
      check("device stopped", int'(dev_run), 0);
      dev_valid = 1'b1; dev_digit = 4'hF;
      repeat (3) @(negedge clk);
      dev_valid = 1'b0;
      for (int i = 0; i < 8; i++) begin
        rd_idx = 3'(i);
        #1;
        check("digit", int'(rd_digit), int'(sent[7 - i]));
      end
      @(negedge clk);
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
