// rwm: the read-write memory of the interpolator.
//
// 512 cells of 4 bits (one excess-3 digit each); a word is 8 consecutive
// cells, so the cell address is {word, digit}. Read-out is non-destructive and
// combinational, like addressing a register; a write takes effect on the
// rising clock edge. Capacity and cell organisation follow the source
// description; the single shared read/write address is this design's choice.
// No reset: the program initialises what it reads (the simulation model
// clears the array at time zero only so that runs are repeatable).
module rwm #(
  parameter int unsigned CELLS = 512,
  parameter int unsigned AW    = $clog2(CELLS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [3:0]    wdata,
  output logic [3:0]    rdata
);

  logic [3:0] mem [CELLS];

  initial for (int i = 0; i < CELLS; i++) mem[i] = 4'h3;

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
