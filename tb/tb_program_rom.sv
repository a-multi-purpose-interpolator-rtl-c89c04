// tb_program_rom: installs random 22-bit words at random addresses of the
// 4096-word program ROM through the load port, then reads them back through
// the combinational read port and checks that unwritten words read 0.
module tb_program_rom;
  logic        clk = 1'b0;
  logic [11:0] addr = '0, ld_addr = '0;
  logic [21:0] data, ld_data = '0;
  logic        ld_we = 1'b0;
  logic [21:0] model [4096];
  int checks = 0, failures = 0;

  program_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 4096; i++) model[i] = '0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_addr = 12'($urandom); ld_data = 22'($urandom);
      model[ld_addr] = ld_data;
    end
    @(negedge clk); ld_we = 1'b0;
    for (int i = 0; i < 4096; i++) begin
      addr = 12'(i);
      #1;
      checks++;
      if (data !== model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %0d got %h exp %h", i, data, model[i]);
      end
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
