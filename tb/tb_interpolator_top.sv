// tb_interpolator_top: end-to-end test of the interpolator at its default
// parameters.
//
// The testbench assembles a test program into the program ROM through the
// load port, then plays a tape reader on input channel 0 and the console.
// Each pass of the program reads three 8-digit numbers a, b, s (s is stored in
// the fixed ADS location) through a subroutine called with STO + JMP and left
// with an indirect jump, then exercises every instruction and writes its
// results to output channel 0 (and three digits of a to channel 2). The
// testbench keeps an independent integer model of the expected results and
// compares every output word. It also counts how often each mechanism of the
// machine happened (ADS in both directions, both branches of every
// conditional jump, overflow, the time base, the device stopping on a full
// buffer, the indirect return) and fails any that never did.
module tb_interpolator_top;
  import interp_pkg::*;

  localparam int NITER  = 16;
  localparam int W_IN   = 5;    // subroutine result word
  localparam int W_RET  = 60;   // return address word
  localparam int W_ZERO = 30, W_ONE = 31;
  localparam int SUBR   = 200;  // read subroutine

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ld_we = 1'b0;
  logic [11:0] ld_addr = '0;
  logic [21:0] ld_data = '0;
  logic [1:0]  dev_valid = '0;
  logic [1:0][3:0] dev_digit = '0;
  logic [1:0]  dev_run;
  logic [15:0] console = '0;
  logic [3:0][31:0] out_q;
  logic [3:0]  out_strobe;
  logic [11:0] iar;
  logic [5:0]  uaddr;

  interpolator_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------- assembler
  logic [21:0] prog [4096];
  int pc;
  function automatic logic [21:0] i3(opcode_e o, int a, int b, int c);
    return {o, 6'(a), 6'(b), 6'(c)};
  endfunction
  function automatic logic [21:0] ij(opcode_e o, int s, int f);
    return {o, 6'(s), 12'(f)};
  endfunction
  task automatic emit(logic [21:0] w);
    prog[pc] = w;
    pc++;
  endtask
  // excess-3 constant for STO from a 3-digit number
  function automatic int ex3c(int v);
    return (((v / 100) % 10 + 3) << 8) | (((v / 10) % 10 + 3) << 4) | (v % 10 + 3);
  endfunction

  // ---------------------------------------------------------- number model
  localparam longint M = 100000000;
  function automatic longint enc(longint v);   // signed -> 8-digit word
    return v < 0 ? M + v : v;
  endfunction
  function automatic longint dec(longint w);   // word -> signed (sign digit 9 = negative)
    return (w / 10000000 == 9) ? w - M : w;
  endfunction
  function automatic logic [31:0] bcd(longint w);
    logic [31:0] r;
    for (int i = 0; i < 8; i++) begin
      r[4*i +: 4] = 4'(w % 10);
      w = w / 10;
    end
    return r;
  endfunction

  longint exp_q[$];
  longint exp2_q[$];
  longint in_q[$];

  // ---------------------------------------------------------- the program
  task automatic call_read(int dst);
    emit(ij(OP_STO, W_RET, pc + 2));
    emit(ij(OP_JMP, 0, SUBR));
    emit(i3(OP_MOV, W_IN, dst, 0));
  endtask
  // jump if cond; outputs 1 if the jump is not taken, 0 if it is
  task automatic cond_out(opcode_e o, int s);
    emit(ij(o, s, pc + 3));
    emit(i3(OP_OUT, W_ONE, 0, 7));
    emit(ij(OP_JMP, 0, pc + 2));
    emit(i3(OP_OUT, W_ZERO, 0, 7));
  endtask

  task automatic build();
    for (int i = 0; i < 4096; i++) prog[i] = '0;
    pc = 0;
    emit(ij(OP_STO, W_ZERO, ex3c(0)));
    emit(ij(OP_STO, W_ONE, ex3c(1)));
    call_read(10);                                // a
    call_read(11);                                // b
    call_read(63);                                // s, the ADS sign location
    emit(i3(OP_SRI, 9, 0, 0));                    // clear overflow
    emit(i3(OP_ADD, 10, 11, 20)); emit(i3(OP_OUT, 20, 0, 7));
    cond_out(OP_TRS, 9);                          // overflow -> 0, else 1
    emit(i3(OP_SUB, 10, 11, 21)); emit(i3(OP_OUT, 21, 0, 7));
    emit(i3(OP_ADS, 10, 11, 22)); emit(i3(OP_OUT, 22, 0, 7));
    emit(i3(OP_MOV, 11, 23, 0));
    emit(i3(OP_MOD, 10, 11, 23)); emit(i3(OP_OUT, 23, 0, 7));
    emit(i3(OP_ABS, 10, 24, 0));  emit(i3(OP_OUT, 24, 0, 7));
    emit(i3(OP_ABS, 11, 25, 0));  emit(i3(OP_OUT, 25, 0, 7));
    emit(i3(OP_SHF, 10, 0, 26));  emit(i3(OP_OUT, 26, 0, 7));
    emit(i3(OP_SHF, 10, 1, 27));  emit(i3(OP_OUT, 27, 0, 7));
    emit(i3(OP_MOV, 11, 28, 0));                  // in-place shifts
    emit(i3(OP_SHF, 28, 1, 28));  emit(i3(OP_SHF, 28, 0, 28)); emit(i3(OP_OUT, 28, 0, 7));
    cond_out(OP_TZE, 10);                         // a = 0 -> 0
    cond_out(OP_TZE, W_ZERO);                     // always 0
    cond_out(OP_TPL, 10);                         // a >= 0 -> 0
    cond_out(OP_TRS, 16);                         // console bit 0 -> 0
    emit(i3(OP_SRI, 45, 0, 1));                   // program flag
    cond_out(OP_TRS, 45);                         // -> 0
    emit(i3(OP_SRI, 45, 0, 0));
    cond_out(OP_TRS, 45);                         // -> 1
    emit(i3(OP_SRI, 8, 0, 1));                    // start the time base
    emit(ij(OP_TRS, 8, pc + 2));
    emit(ij(OP_JMP, 0, pc - 1));
    emit(i3(OP_OUT, W_ONE, 0, 7));
    emit(i3(OP_OUT, 10, 2, 2));                   // three low digits to channel 2
    emit(ij(OP_JMP, 0, 2));
    // read subroutine: restart channel 0, wait for its flag, take the word
    pc = SUBR;
    emit(i3(OP_SRI, 0, 0, 0));
    emit(ij(OP_TRS, 0, pc + 2));
    emit(ij(OP_JMP, 0, pc - 1));
    emit(i3(OP_INP, W_IN, 0, 7));
    emit(ij(OP_JMI, W_RET, 0));
  endtask

  function automatic longint shl(longint w);
    return (w / 10000000) * 10000000 + (w % 1000000) * 10;
  endfunction
  function automatic longint shr(longint w);
    longint sg = w / 10000000;
    return sg * 10000000 + sg * 1000000 + (w % 10000000) / 10;
  endfunction

  task automatic model(longint a, longint b, longint s, logic con);
    longint sa, sb, r;
    sa = dec(a); sb = dec(b);
    exp_q.push_back((a + b) % M);
    r = sa + sb;
    exp_q.push_back((r < -10000000 || r > 9999999) ? 0 : 1);
    exp_q.push_back((b + M - a) % M);
    exp_q.push_back(dec(s) >= 0 ? (a + b) % M : (b + M - a) % M);
    exp_q.push_back((b % 10000000) + (((sa < 0) != (sb < 0)) ? 90000000 : 0));
    exp_q.push_back(sa < 0 ? (M - a) % M : a);
    exp_q.push_back(sb < 0 ? (M - b) % M : b);
    exp_q.push_back(shl(a));
    exp_q.push_back(shr(a));
    exp_q.push_back(shl(shr(b)));
    exp_q.push_back(a == 0 ? 0 : 1);
    exp_q.push_back(0);
    exp_q.push_back(sa >= 0 ? 0 : 1);
    exp_q.push_back(con ? 0 : 1);
    exp_q.push_back(0);
    exp_q.push_back(1);
    exp_q.push_back(1);
    exp2_q.push_back(a % 1000);
  endtask

  function automatic longint rnd();
    longint v;
    int sel = int'($urandom_range(0, 3));
    case (sel)
      0: v = longint'($urandom_range(0, 999));
      1: v = longint'($urandom_range(0, 9999999));
      2: v = -longint'($urandom_range(1, 9999999));
      default: v = -longint'($urandom_range(1, 999));
    endcase
    return v;
  endfunction

  // ---------------------------------------------------------- tape reader
  logic [3:0] word_digits [$];
  int words_fed = 0;
  initial begin
    longint a, b, s;
    logic con;
    for (int it = 0; it < NITER; it++) begin
      a = (it % 5 == 0) ? 0 : enc(rnd());
      b = enc(rnd());
      if (it == 3) begin a = enc(9999990); b = enc(20); end          // overflow
      if (it == 4) begin a = enc(-9999990); b = enc(-20); end        // overflow
      s = enc((it % 2 == 0) ? longint'(it) : -longint'(it));
      con = it[1];
      model(a, b, s, con);
      in_q.push_back(a); in_q.push_back(b); in_q.push_back(s);
    end
  end

  int cnt_stall = 0;
  logic acc = 1'b0;
  always @(negedge clk) begin
    if (acc) void'(word_digits.pop_front());
    if (word_digits.size() == 0 && in_q.size() > 0 && dut.in_full[0] == 1'b0 && dev_run[0]) begin
      longint w;
      w = in_q.pop_front();
      for (int i = 7; i >= 0; i--) word_digits.push_back(4'((w / (10 ** i)) % 10));
      words_fed++;
      // console bit 0 follows the pass number, set before the program reads it
      if (words_fed % 3 == 1) console[0] = ((words_fed - 1) / 3) % 4 >= 2;
    end
    dev_valid[0] = (word_digits.size() > 0) && ($urandom_range(0, 3) != 0);
    dev_digit[0] = word_digits.size() > 0 ? word_digits[0] : 4'd0;
    acc = dev_valid[0] && dev_run[0];
    if (!dev_run[0] && dut.in_full[0]) cnt_stall++;
  end

  // ---------------------------------------------------------- output checker
  int outs = 0;
  always @(negedge clk) begin
    if (out_strobe[0]) begin
      longint e;
      e = exp_q.size() > 0 ? exp_q.pop_front() : -1;
      checks++;
      if (out_q[0] !== bcd(e)) begin
        failures++;
        if (failures < 10) $display("FAIL out %0d: got %h expected %h", outs, out_q[0], bcd(e));
      end
      outs++;
    end
    if (out_strobe[2]) begin
      longint e;
      e = exp2_q.size() > 0 ? exp2_q.pop_front() : -1;
      checks++;
      if (out_q[2][11:0] !== bcd(e)[11:0]) begin
        failures++;
        $display("FAIL chan2: got %h expected %h", out_q[2][11:0], bcd(e)[11:0]);
      end
    end
  end

  // ---------------------------------------------------------- mechanism counters
  int cnt_ads_add = 0, cnt_ads_sub = 0, cnt_ovf = 0, cnt_tb = 0, cnt_jmi = 0;
  int cnt_tze_t = 0, cnt_tze_n = 0, cnt_tpl_t = 0, cnt_tpl_n = 0, cnt_trs_t = 0, cnt_trs_n = 0;
  int cnt_abs_neg = 0, cnt_shr = 0, cnt_shl = 0, cnt_mod_n = 0, cnt_mod_p = 0;
  always @(negedge clk) if (rst_n) begin
    if (uaddr == U_ADS_1) begin
      if (dut.cond[CD_NEG]) cnt_ads_sub++; else cnt_ads_add++;
    end
    if (uaddr == U_TZE_2) begin if (dut.cond[CD_Z]) cnt_tze_t++; else cnt_tze_n++; end
    if (uaddr == U_TPL_1) begin if (!dut.cond[CD_NEG]) cnt_tpl_t++; else cnt_tpl_n++; end
    if (uaddr == U_TRS_1) begin if (dut.cond[CD_IND]) cnt_trs_t++; else cnt_trs_n++; end
    if (uaddr == U_JMI_3) cnt_jmi++;
    if (uaddr == U_ABN_A) cnt_abs_neg++;
    if (uaddr == U_SHR_A) cnt_shr++;
    if (uaddr == U_SHL_A) cnt_shl++;
    if (uaddr == U_MOD_N) cnt_mod_n++;
    if (uaddr == U_MOD_P) cnt_mod_p++;
    if (dut.u_ind.v_clr && dut.ovf) cnt_ovf++;
  end

  // time-base period: from the start command to elapsed
  int tb_t0 = 0, cyc = 0;
  logic tb_prev = 1'b0;
  always @(negedge clk) begin
    cyc++;
    if (dut.u_ind.tb_start) tb_t0 = cyc;
    if (dut.u_tb.elapsed && !tb_prev) begin
      cnt_tb++;
      checks++;
      if (cyc - tb_t0 - 1 != 60000) begin   // command seen one clock before it acts
        failures++;
        $display("FAIL time base period %0d", cyc - tb_t0 - 1);
      end
    end
    tb_prev = dut.u_tb.elapsed;
  end

  task automatic need(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end else $display("  %-22s %0d", name, n);
  endtask

  initial begin
    build();
    repeat (2) @(posedge clk);
    for (int i = 0; i < 4096; i++) begin
      if (prog[i] != 0) begin
        ld_we <= 1'b1; ld_addr <= 12'(i); ld_data <= prog[i];
        @(posedge clk);
      end
    end
    ld_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    wait (outs == NITER * 17);
    repeat (5) @(posedge clk);
    need("ADS add", cnt_ads_add);
    need("ADS subtract", cnt_ads_sub);
    need("overflow", cnt_ovf);
    need("MOD sign 9", cnt_mod_n);
    need("MOD sign 0", cnt_mod_p);
    need("ABS negate", cnt_abs_neg);
    need("shift right", cnt_shr);
    need("shift left", cnt_shl);
    need("TZE taken", cnt_tze_t);
    need("TZE not taken", cnt_tze_n);
    need("TPL taken", cnt_tpl_t);
    need("TPL not taken", cnt_tpl_n);
    need("TRS taken", cnt_trs_t);
    need("TRS not taken", cnt_trs_n);
    need("indirect return", cnt_jmi);
    need("time base elapsed", cnt_tb);
    need("device stopped full", cnt_stall);
    $display("cycles %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, outputs %0d", outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
