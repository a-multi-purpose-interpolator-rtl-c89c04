// control_unit: micro-programmed sequencer of the interpolator.
//
// A 6-bit micro-order address register (uar) addresses the micro-order ROM.
// The current micro-order's CV field goes to the operative portion as the
// commands of this clock. Its CD field selects one of the conditioning
// variables coming back from the operative portion; the next address is
//   AD                      if that variable is 0,
//   uar + 1                 if it is 1 and B = 0,
//   the fetch micro-order   if it is 1 and B = 1.
// The fetch micro-order carries the dispatch command: it loads uar with the
// entry of the routine for the op code on the program ROM output (entry =
// 16 + op code). This selection rule and the micro-order format are the
// source's; the entry-address mapping and the micro-program are this design's.
// Reset puts uar on the fetch micro-order. One micro-order per clock.
module control_unit
  import interp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  opcode_e     op,        // op code of the current instruction
  input  logic [15:0] cond,      // conditioning variables, indexed by cd_e
  output cv_t         cv,        // commands for the operative portion
  output logic [UADDR_W-1:0] uaddr
);

  uorder_t uo_q;
  logic    cval;
  logic [UADDR_W-1:0] nxt;

  micro_rom u_mrom (.addr(uaddr), .data(uo_q));

  assign cv   = uo_q.cv;
  assign cval = cond[uo_q.cd];

  always_comb begin
    if (uo_q.cv.disp)      nxt = U_ENTRY | UADDR_W'(op);
    else if (!cval)        nxt = uo_q.ad;
    else if (uo_q.b)       nxt = U_FETCH;
    else                   nxt = uaddr + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) uaddr <= U_FETCH;
    else        uaddr <= nxt;

endmodule
