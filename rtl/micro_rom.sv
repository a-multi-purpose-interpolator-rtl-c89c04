// micro_rom: read-only memory of the 64 micro-orders of the control unit.
//
// Each 44-bit word is CV (33 command bits) | CD (4-bit conditioning variable
// select) | B (1 bit) | AD (6-bit next address), the format of the source
// description. The contents are the micro-program of this design, computed at
// elaboration by interp_pkg::micro_program(); read-out is combinational.
module micro_rom
  import interp_pkg::*;
(
  input  logic [UADDR_W-1:0] addr,
  output uorder_t            data
);

  localparam uprog_t UPROG = micro_program();

  assign data = uorder_t'(UPROG[addr]);

endmodule
