// tb_control_unit: drives random op codes and conditioning variables into the
// control unit and checks every clock that the next micro-order address obeys
// the selection rule (variable 0 -> AD; 1 and B = 0 -> next; 1 and B = 1 ->
// fetch; dispatch -> 16 + op code), using the micro-order table as reference,
// and that the commands leaving the unit are the CV field of the current word.
module tb_control_unit;
  import interp_pkg::*;
  localparam uprog_t P = micro_program();

  logic        clk = 1'b0, rst_n = 1'b0;
  opcode_e     op = OP_ADD;
  logic [15:0] cond = '0;
  cv_t         cv;
  logic [5:0]  uaddr;
  int checks = 0, failures = 0;
  int n_ad = 0, n_seq = 0, n_fetch = 0, n_disp = 0;

  control_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    uorder_t w;
    logic [5:0] exp_next;
    repeat (2) @(negedge clk);
    checks++;
    if (uaddr != U_FETCH) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      op = opcode_e'($urandom_range(0, 15));
      cond = 16'($urandom) & 16'hFFFE | 16'h0002;
      #1;
      w = uorder_t'(P[uaddr]);
      checks++;
      if (cv !== w.cv) failures++;
      if (w.cv.disp) begin exp_next = 6'(16 + op); n_disp++; end
      else if (!cond[w.cd]) begin exp_next = w.ad; n_ad++; end
      else if (w.b) begin exp_next = U_FETCH; n_fetch++; end
      else begin exp_next = uaddr + 1'b1; n_seq++; end
      @(negedge clk);
      checks++;
      if (uaddr !== exp_next) begin
        failures++;
        if (failures < 10) $display("FAIL next %0d exp %0d", uaddr, exp_next);
      end
    end
    checks++;
    if (n_ad == 0 || n_seq == 0 || n_fetch == 0 || n_disp == 0) failures++;
    $display("AD %0d seq %0d fetch %0d dispatch %0d", n_ad, n_seq, n_fetch, n_disp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
