// tb_linear_interp: the machine's intended kind of work, two-axis linear
// interpolation in real time, run as a program on the complete interpolator at
// its default parameters.
//
// For each line the program reads the end point (X, Y), 0 <= Y <= X, from the
// tape reader, then makes X steps, paced by the 6 ms time base. Each step
// advances x by one unit, adds Y to an error term e and, when e - X >= 0,
// advances y and takes X off e (a digital differential analyser). After the
// time base has elapsed it restarts it and sends x to output channel 0 and y to channel 1, so
// the servos receive one new position every 6 ms. The testbench checks every
// position against the ideal line (|y - x*Y/X| < 1 and y = floor(x*Y/X)), the
// end point, and that consecutive positions leave the machine one time-base
// period apart (plus at most 20 clocks of polling delay).
module tb_linear_interp;
  import interp_pkg::*;

  localparam int NLINES = 3;
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

  // words: 10 X, 11 Y, 12 x, 13 y, 14 e, 15 steps left, 16 e - X
  task automatic build();
    int l_line, l_loop, l_sy, l_wait, l_done;
    for (int i = 0; i < 4096; i++) prog[i] = '0;
    pc = 0;
    emit(ij(OP_STO, W_ZERO, ex3c(0)));
    emit(ij(OP_STO, W_ONE, ex3c(1)));
    l_line = pc;
    call_read(10);
    call_read(11);
    emit(ij(OP_STO, 12, ex3c(0)));
    emit(ij(OP_STO, 13, ex3c(0)));
    emit(ij(OP_STO, 14, ex3c(0)));
    emit(i3(OP_MOV, 10, 15, 0));
    emit(i3(OP_SRI, 8, 0, 1));         // start the first 6 ms period
    l_loop = pc;                       // loop: TZE n -> line done
    l_done = l_loop + 15;
    emit(ij(OP_TZE, 15, l_done));
    emit(i3(OP_ADD, W_ONE, 12, 12));   // x += 1
    emit(i3(OP_ADD, 11, 14, 14));      // e += Y
    emit(i3(OP_SUB, 10, 14, 16));      // t = e - X
    l_sy = pc + 2;
    l_wait = pc + 4;
    emit(ij(OP_TPL, 16, l_sy));
    emit(ij(OP_JMP, 0, l_wait));
    emit(i3(OP_ADD, W_ONE, 13, 13));   // y += 1
    emit(i3(OP_MOV, 16, 14, 0));       // e = t
    emit(ij(OP_TRS, 8, pc + 2));       // wait for the time base
    emit(ij(OP_JMP, 0, pc - 1));
    emit(i3(OP_SRI, 8, 0, 1));         // next period starts at once
    emit(i3(OP_OUT, 12, 0, 7));
    emit(i3(OP_OUT, 13, 1, 7));
    emit(i3(OP_SUB, W_ONE, 15, 15));   // n -= 1
    emit(ij(OP_JMP, 0, l_loop));
    if (pc != l_done) $display("FAIL assembler label");
    emit(i3(OP_OUT, W_ONE, 3, 7));     // line finished marker
    emit(ij(OP_JMP, 0, l_line));
    pc = SUBR;
    emit(i3(OP_SRI, 0, 0, 0));
    emit(ij(OP_TRS, 0, pc + 2));
    emit(ij(OP_JMP, 0, pc - 1));
    emit(i3(OP_INP, W_IN, 0, 7));
    emit(ij(OP_JMI, W_RET, 0));
  endtask

  // ------------------------------------------------------------ tape reader
  longint in_q[$];
  int     lx[NLINES], ly[NLINES];
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
  int line = 0, step = 0, steps_total = 0, cyc = 0, last_out = -1;
  always @(negedge clk) begin
    cyc++;
    if (out_strobe[1] && line < NLINES) begin
      longint x, y;
      x = val(out_q[0]); y = val(out_q[1]);
      step++; steps_total++;
      checks++;
      if (x != step || y != (longint'(step) * ly[line]) / lx[line]) begin
        failures++;
        if (failures < 10) $display("FAIL line %0d step %0d: (%0d,%0d)", line, step, x, y);
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
      if (step != lx[line] || val(out_q[1]) != ly[line]) begin
        failures++;
        $display("FAIL line %0d ended at step %0d y %0d", line, step, val(out_q[1]));
      end
      $display("line %0d to (%0d,%0d): %0d steps", line, lx[line], ly[line], step);
      line++; step = 0;
    end
  end

  initial begin
    for (int l = 0; l < NLINES; l++) begin
      lx[l] = $urandom_range(5, 30);
      ly[l] = (l == 0) ? lx[l] : $urandom_range(0, lx[l]);
      in_q.push_back(longint'(lx[l]));
      in_q.push_back(longint'(ly[l]));
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
    wait (line == NLINES);
    checks++;
    if (steps_total != lx[0] + lx[1] + lx[2]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog at line %0d step %0d", line, step);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
