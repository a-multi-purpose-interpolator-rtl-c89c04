// tb_output_channel: writes random digits in random order into the staging
// register; q must not change until done, then shows the whole word and
// strobe pulses for exactly one clock.
module tb_output_channel;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        we = 1'b0, done = 1'b0;
  logic [2:0]  idx = '0;
  logic [3:0]  digit = '0;
  logic [31:0] q, stage_m, q_m;
  logic        strobe;
  int checks = 0, failures = 0;

  output_channel dut (.*);
  always #5 clk = ~clk;

  initial begin
    stage_m = '0; q_m = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < $urandom_range(1, 10); k++) begin
        we = 1'b1; idx = 3'($urandom); digit = 4'($urandom_range(0, 9));
        stage_m[4*idx +: 4] = digit;
        @(negedge clk);
        checks++;
        if (q !== q_m || strobe) failures++;
      end
      we = 1'b0; done = 1'b1;
      @(negedge clk);
      done = 1'b0;
      q_m = stage_m;
      checks++;
      if (q !== q_m || !strobe) begin
        failures++;
        if (failures < 10) $display("FAIL q %h exp %h strobe %b", q, q_m, strobe);
      end
      @(negedge clk);
      checks++;
      if (strobe) failures++;
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
