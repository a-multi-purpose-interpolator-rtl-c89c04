// tb_circular_interp: two-axis circular interpolation in real time, run as a
// program on the complete interpolator at its default parameters.
//
// For each arc the program reads a radius R from the tape reader and moves
// the tool over a quarter circle from (R, 0) to (0, R) in 2R unit steps, paced
// by the 6 ms time base. It keeps the error function F = x*x + y*y - R*R with
// additions only (the stair-step method): if F >= 0 the point is outside or on
// the circle, so x steps down and F -= 2x - 1; otherwise y steps up and
// F += 2y + 1. Every step is sent to output channels 0 (x) and 1 (y). The
// testbench follows the same rule in integer arithmetic and checks each
// position against it, checks that each step moves one axis by one unit and
// stays within one unit of the circle (|x*x + y*y - R*R| <= 2R), checks the end
// point, and checks that positions leave the machine one time-base period
// apart (plus at most 20 clocks of polling delay).
module tb_circular_interp;
  import interp_pkg::*;

  localparam int NARCS = 3;
  localparam int W_IN = 5, W_RET = 60, W_ZERO = 30, W_ONE = 31;
  localparam int SUBR = 200;

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
  function automatic int ex3c(int v);
    return (((v / 100) % 10 + 3) << 8) | (((v / 10) % 10 + 3) << 4) | (v % 10 + 3);
  endfunction
  task automatic call_read(int dst);
    emit(ij(OP_STO, W_RET, pc + 2));
    emit(ij(OP_JMP, 0, SUBR));
    emit(i3(OP_MOV, W_IN, dst, 0));
  endtask

  // words: 10 R, 12 x, 13 y, 14 F, 15 steps left, 16 scratch
  task automatic build();
    int l_arc, l_loop, l_sx, l_wait, l_done;
    for (int i = 0; i < 4096; i++) prog[i] = '0;
    pc = 0;
    emit(ij(OP_STO, W_ZERO, ex3c(0)));
    emit(ij(OP_STO, W_ONE, ex3c(1)));
    l_arc = pc;
    call_read(10);
    emit(i3(OP_MOV, 10, 12, 0));       // x = R
    emit(ij(OP_STO, 13, ex3c(0)));     // y = 0
    emit(ij(OP_STO, 14, ex3c(0)));     // F = 0
    emit(i3(OP_ADD, 10, 10, 15));      // n = 2R
    emit(i3(OP_SRI, 8, 0, 1));         // start the first 6 ms period
    l_loop = pc;
    l_sx   = l_loop + 7;
    l_wait = l_loop + 11;
    l_done = l_loop + 18;
    emit(ij(OP_TZE, 15, l_done));
    emit(ij(OP_TPL, 14, l_sx));        // F >= 0: step x
    emit(i3(OP_ADD, 13, 13, 16));      // t = 2y
    emit(i3(OP_ADD, 16, 14, 14));      // F += t
    emit(i3(OP_ADD, W_ONE, 14, 14));   // F += 1
    emit(i3(OP_ADD, W_ONE, 13, 13));   // y += 1
    emit(ij(OP_JMP, 0, l_wait));
    if (pc != l_sx) $display("FAIL assembler label sx");
    emit(i3(OP_ADD, 12, 12, 16));      // t = 2x
    emit(i3(OP_SUB, 16, 14, 14));      // F -= t
    emit(i3(OP_ADD, W_ONE, 14, 14));   // F += 1
    emit(i3(OP_SUB, W_ONE, 12, 12));   // x -= 1
    if (pc != l_wait) $display("FAIL assembler label wait");
    emit(ij(OP_TRS, 8, pc + 2));       // wait for the time base
    emit(ij(OP_JMP, 0, pc - 1));
    emit(i3(OP_SRI, 8, 0, 1));         // next period starts at once
    emit(i3(OP_OUT, 12, 0, 7));
    emit(i3(OP_OUT, 13, 1, 7));
    emit(i3(OP_SUB, W_ONE, 15, 15));   // n -= 1
    emit(ij(OP_JMP, 0, l_loop));
    if (pc != l_done) $display("FAIL assembler label done");
    emit(i3(OP_OUT, W_ONE, 3, 7));     // arc finished marker
    emit(ij(OP_JMP, 0, l_arc));
    pc = SUBR;
    emit(i3(OP_SRI, 0, 0, 0));
    emit(ij(OP_TRS, 0, pc + 2));
    emit(ij(OP_JMP, 0, pc - 1));
    emit(i3(OP_INP, W_IN, 0, 7));
    emit(ij(OP_JMI, W_RET, 0));
  endtask

  // ------------------------------------------------------------ tape reader
  longint in_q[$];
  int     rad[NARCS];
  logic [3:0] word_digits [$];
  logic acc = 1'b0;
  always @(negedge clk) begin
    if (acc) void'(word_digits.pop_front());
    if (word_digits.size() == 0 && in_q.size() > 0 && dut.in_full[0] == 1'b0 && dev_run[0]) begin
      longint w;
      w = in_q.pop_front();
      for (int i = 7; i >= 0; i--) word_digits.push_back(4'((w / (10 ** i)) % 10));
    end
    dev_valid[0] = (word_digits.size() > 0);
    dev_digit[0] = word_digits.size() > 0 ? word_digits[0] : 4'd0;
    acc = dev_valid[0] && dev_run[0];
  end

  function automatic longint val(logic [31:0] b);
    longint v = 0;
    for (int i = 7; i >= 0; i--) v = v * 10 + longint'(b[4*i +: 4]);
    return v;
  endfunction

  // ------------------------------------------------------------ checker
  int arc = 0, step = 0, steps_total = 0, cyc = 0, last_out = -1;
  longint mx = 0, my = 0, mf = 0;   // reference point and error function
  always @(negedge clk) begin
    cyc++;
    if (out_strobe[1] && arc < NARCS) begin
      longint x, y, r;
      x = val(out_q[0]); y = val(out_q[1]);
      if (step == 0) begin mx = rad[arc]; my = 0; mf = 0; end
      if (mf >= 0) begin mf -= 2 * mx - 1; mx--; end
      else begin mf += 2 * my + 1; my++; end
      step++; steps_total++;
      r = rad[arc];
      checks++;
      if (x != mx || y != my) begin
        failures++;
        if (failures < 10) $display("FAIL arc %0d step %0d: (%0d,%0d) expected (%0d,%0d)", arc, step, x, y, mx, my);
      end
      checks++;
      if (x * x + y * y - r * r > 2 * r || r * r - x * x - y * y > 2 * r) begin
        failures++;
        if (failures < 10) $display("FAIL arc %0d step %0d: (%0d,%0d) off the circle", arc, step, x, y);
      end
      if (last_out >= 0 && step > 1) begin
        checks++;
        // one period plus the polling delay of the TRS wait loop
        if (cyc - last_out < 60000 || cyc - last_out > 60020) begin
          failures++;
          if (failures < 10) $display("FAIL step interval %0d", cyc - last_out);
        end
      end
      last_out = cyc;
    end
    if (out_strobe[3]) begin
      checks++;
      if (step != 2 * rad[arc] || val(out_q[0]) != 0 || val(out_q[1]) != rad[arc]) begin
        failures++;
        $display("FAIL arc %0d ended at step %0d (%0d,%0d)", arc, step, val(out_q[0]), val(out_q[1]));
      end
      $display("arc %0d radius %0d: %0d steps", arc, rad[arc], step);
      arc++; step = 0;
    end
  end

  initial begin
    for (int l = 0; l < NARCS; l++) begin
      rad[l] = (l == 0) ? 1 : $urandom_range(3, 15);
      in_q.push_back(longint'(rad[l]));
    end
    build();
    repeat (2) @(posedge clk);
    for (int i = 0; i < 4096; i++)
      if (prog[i] != 0) begin
        ld_we <= 1'b1; ld_addr <= 12'(i); ld_data <= prog[i];
        @(posedge clk);
      end
    ld_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    wait (arc == NARCS);
    checks++;
    if (steps_total != 2 * (rad[0] + rad[1] + rad[2])) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog at arc %0d step %0d", arc, step);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
