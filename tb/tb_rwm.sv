// tb_rwm: random writes and reads of the 512-cell RWM against an array model;
// also checks that a read does not disturb the cell (non-destructive) and that
// a write lands on the next rising edge only.
module tb_rwm;
  logic       clk = 1'b0;
  logic [8:0] addr = '0;
  logic       we = 1'b0;
  logic [3:0] wdata = '0, rdata;
  logic [3:0] model [512];
  int checks = 0, failures = 0;

  rwm dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 512; i++) model[i] = 4'h3;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      addr = 9'($urandom);
      we = $urandom_range(0, 1) == 1;
      wdata = 4'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d got %h exp %h", addr, rdata, model[addr]);
      end
      @(posedge clk);
      if (we) model[addr] = wdata;
      #1;
      checks++;
      if (rdata !== model[addr]) failures++;
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
