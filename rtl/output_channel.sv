// output_channel: output register feeding the digital-analog converter of a
// servomechanism (or another output device).
//
// The output instruction writes BCD digits one per clock into a staging
// register (we, idx, digit). Its closing micro-order gives done, which copies
// the staging register into the output register q in one clock and pulses
// strobe, so the converter never sees a half-written word. The channel and the
// BCD form follow the source description; the double register and strobe are
// this design's choices.
module output_channel #(
  parameter int unsigned DIGITS = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [$clog2(DIGITS)-1:0] idx,
  input  logic [3:0]                digit,
  input  logic                      done,
  output logic [DIGITS*4-1:0]       q,
  output logic                      strobe
);

  logic [DIGITS*4-1:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage  <= '0;
      q      <= '0;
      strobe <= 1'b0;
    end else begin
      if (we) stage[4*idx +: 4] <= digit;
      strobe <= done;
      if (done) q <= stage;
    end
  end

endmodule
