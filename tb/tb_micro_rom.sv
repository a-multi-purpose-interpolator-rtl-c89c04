// tb_micro_rom: checks the 44-bit micro-order layout CV(33) | CD(4) | B(1) |
// AD(6) bit by bit on the raw words, and the rules the micro-program must
// obey: the fetch word dispatches, every instruction address change happens in
// a word that returns to fetch (so the program ROM output is stable during an
// instruction), every jump target holds a used word, and spot values of the
// routines (ADD reads L1 into A, JMP loads F, SRI writes the indicator).
module tb_micro_rom;
  import interp_pkg::*;
  logic [5:0] addr = '0;
  uorder_t    data;
  logic [43:0] raw;
  logic        used [64];
  int checks = 0, failures = 0;

  micro_rom dut (.*);
  assign raw = data;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0d got %0d exp %0d", what, addr, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) used[i] = 1'b0;
    used[0] = 1'b1;
    for (int i = 0; i < 16; i++) used[16 + i] = 1'b1;
    // pass 1: follow every AD and every next-sequential of used words
    for (int rep = 0; rep < 64; rep++)
      for (int i = 0; i < 64; i++) begin
        addr = 6'(i); #1;
        if (used[i]) begin
          if (raw[10:7] != 4'd1) used[raw[5:0]] = 1'b1;
          if (raw[10:7] != 4'd0 && !raw[6] && !data.cv.disp) used[(i + 1) % 64] = 1'b1;
        end
      end
    for (int i = 0; i < 64; i++) begin
      addr = 6'(i); #1;
      // layout
      check("AD field", int'(raw[5:0]), int'(data.ad));
      check("B field", int'(raw[6]), int'(data.b));
      check("CD field", int'(raw[10:7]), int'(data.cd));
      check("CV field", int'(raw[43:11] == 33'(data.cv)), 1);
      if (!used[i]) continue;
      // IAR changes only in a closing word
      if (data.cv.iaop != IA_HOLD) begin
        check("closing word cd", int'(data.cd), int'(CD_ONE));
        check("closing word B", int'(data.b), 1);
      end
      if (data.cd == CD_ONE && data.b && !data.cv.disp)
        check("closing word changes IAR", int'(data.cv.iaop != IA_HOLD), 1);
    end
    addr = 6'd0; #1;
    check("fetch dispatches", int'(data.cv.disp), 1);
    addr = 6'(16 + OP_ADD); #1;
    check("ADD reads L1", int'(data.cv.wsel), int'(WS_L1));
    check("ADD loads A", int'(data.cv.ald), int'(AL_RD));
    addr = 6'(16 + OP_JMP); #1;
    check("JMP loads F", int'(data.cv.iaop), int'(IA_LDF));
    addr = 6'(16 + OP_SRI); #1;
    check("SRI writes", int'(data.cv.indwr), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
