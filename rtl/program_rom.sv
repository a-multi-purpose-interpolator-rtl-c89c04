// program_rom: the program store that specialises the interpolator.
//
// Up to 4096 words of 22 bits, addressed by the 12-bit instruction address
// register. Read-out is combinational: no output register, so the word stays
// on the outputs for as long as the address register holds it. The program is
// the application (the source machine plugs in 64-word ROM packages); here it
// is installed before the machine runs through a load port (ld_we, ld_addr,
// ld_data), which models fitting the packages and is not used while the
// program runs. Size and width follow the source; the load port is this
// design's choice. Unwritten words read as 0. WORDS must be a multiple of 64
// (one package) and at most 4096.
module program_rom #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned AW    = 12,
  parameter int unsigned W     = 22
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  data,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [W-1:0]  ld_data
);

  logic [W-1:0] mem [WORDS];

  // Capacity comes in 64-word packages, at most 2^AW words.
  initial assert (WORDS % 64 == 0 && WORDS <= (1 << AW) && WORDS > 0)
    else $error("program ROM size must be a multiple of 64 words, at most 2^AW");

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk)
    if (ld_we) mem[ld_addr] <= ld_data;

  assign data = mem[addr];

endmodule
