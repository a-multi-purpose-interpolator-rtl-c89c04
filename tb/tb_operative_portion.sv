// tb_operative_portion: runs the datapath under a behavioural sequencer in the
// testbench that follows the micro-order table, so the commands are the real
// micro-program. A short program stores constants, adds, subtracts, shifts,
// takes absolute values and reads an input word, and sends every result out;
// the digits leaving on out_digit are compared with integer arithmetic, and
// the instruction address is checked after a taken and a not-taken TZE. The
// number of clocks each instruction takes is checked against the
// micro-program's timing.
module tb_operative_portion;
  import interp_pkg::*;
  localparam uprog_t P = micro_program();

  logic        clk = 1'b0, rst_n = 1'b0;
  cv_t         cv;
  opcode_e     op;
  logic [15:0] cond;
  logic [11:0] iar;
  logic        ind_val = 1'b0, v_clr = 1'b0;
  logic [5:0]  ind_addr, in_ch, out_ch;
  logic        ind_wr, ind_wval, ovf;
  logic [2:0]  in_idx, out_idx;
  digit_t      in_digit, out_digit;
  logic        out_we, out_done;
  logic        ld_we = 1'b0;
  logic [11:0] ld_addr = '0;
  logic [21:0] ld_data = '0;
  int checks = 0, failures = 0;

  operative_portion dut (.*);
  always #5 clk = ~clk;

  // behavioural sequencer
  logic [5:0] ua;
  uorder_t    w;
  assign w  = uorder_t'(P[ua]);
  assign cv = w.cv;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)           ua <= U_FETCH;
    else if (w.cv.disp)   ua <= 6'(16 + op);
    else if (!cond[w.cd]) ua <= w.ad;
    else if (w.b)         ua <= U_FETCH;
    else                  ua <= ua + 1'b1;

  // input word 90001234 (-9998766) on the input channel
  localparam logic [31:0] IN_WORD = 32'h9000_1234;
  assign in_digit = IN_WORD[4*in_idx +: 4];

  // output collector
  logic [31:0] outw = '0;
  always @(posedge clk) if (rst_n && out_we) outw[4*out_idx +: 4] <= out_digit;
  longint words[$];
  always @(negedge clk) if (out_done) begin
    longint v;
    v = 0;
    for (int i = 7; i >= 0; i--) v = v * 10 + longint'(outw[4*i +: 4]);
    words.push_back(v);
  end

  // clocks per instruction, fetch included, from the micro-program
  int lat_exp [18] = '{11, 11, 26, 11, 27, 11, 28, 11, 17, 11, 11, 11, 17, 11, 11, 12, 0, 12};
  int t_last = 0, cycn = 0, lat_checked = 0;
  logic [11:0] iar_prev = '0;
  always @(negedge clk) if (rst_n) begin
    cycn++;
    if (iar != iar_prev) begin
      if (iar_prev < 18 && iar_prev != 16 && iar_prev != 0) begin   // 0: reset release
        checks++; lat_checked++;
        if (cycn - t_last != lat_exp[iar_prev]) begin
          failures++;
          $display("FAIL clocks of instruction %0d: %0d, expected %0d", iar_prev, cycn - t_last, lat_exp[iar_prev]);
        end
      end
      t_last = cycn;
      iar_prev = iar;
    end
  end

  function automatic logic [21:0] i3(opcode_e o, int a, int b, int c);
    return {o, 6'(a), 6'(b), 6'(c)};
  endfunction
  function automatic logic [21:0] ij(opcode_e o, int s, int f);
    return {o, 6'(s), 12'(f)};
  endfunction
  function automatic int ex3c(int v);
    return (((v / 100) % 10 + 3) << 8) | (((v / 10) % 10 + 3) << 4) | (v % 10 + 3);
  endfunction

  logic [21:0] prog [32];
  longint exp_w [$];

  initial begin
    prog[0]  = ij(OP_STO, 1, ex3c(987));
    prog[1]  = ij(OP_STO, 2, ex3c(45));
    prog[2]  = i3(OP_ADD, 1, 2, 3);   prog[3]  = i3(OP_OUT, 3, 0, 7);   // 1032
    prog[4]  = i3(OP_SUB, 1, 2, 4);   prog[5]  = i3(OP_OUT, 4, 0, 7);   // 45-987
    prog[6]  = i3(OP_ABS, 4, 5, 0);   prog[7]  = i3(OP_OUT, 5, 0, 7);   // 942
    prog[8]  = i3(OP_SHF, 1, 0, 6);   prog[9]  = i3(OP_OUT, 6, 0, 7);   // 9870
    prog[10] = i3(OP_INP, 7, 0, 7);   prog[11] = i3(OP_OUT, 7, 0, 7);   // 90001234
    prog[12] = i3(OP_SHF, 7, 1, 8);   prog[13] = i3(OP_OUT, 8, 0, 7);   // 99000123
    prog[14] = ij(OP_STO, 9, ex3c(0));
    prog[15] = ij(OP_TZE, 9, 17);                                       // taken
    prog[16] = ij(OP_JMP, 0, 16);
    prog[17] = ij(OP_TZE, 1, 20);                                       // not taken
    prog[18] = ij(OP_JMP, 0, 18);                                       // stop here
    prog[19] = '0;
    for (int i = 20; i < 32; i++) prog[i] = '0;
    exp_w = '{1032, 100000000 + 45 - 987, 942, 9870, 90001234, 99000123};
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_addr = 12'(i); ld_data = prog[i];
    end
    @(negedge clk); ld_we = 1'b0;
    rst_n = 1'b1;
    wait (iar == 12'd18);
    repeat (20) @(negedge clk);
    checks++;
    if (words.size() != exp_w.size()) failures++;
    for (int i = 0; i < words.size() && i < exp_w.size(); i++) begin
      checks++;
      if (words[i] != exp_w[i]) begin
        failures++;
        $display("FAIL word %0d got %0d exp %0d", i, words[i], exp_w[i]);
      end
    end
    checks++;
    if (iar != 12'd18) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog iar %0d", iar);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
