// time_base: the 6 ms real-time clock of the interpolator.
//
// The program starts it by setting its indicator (start) and senses it by
// testing the indicator (elapsed). start loads a down-counter with PERIOD-1
// and clears elapsed; elapsed rises when the count reaches zero, PERIOD clocks
// after the start, and stays up until the next start or a stop. The 6 ms
// period is the source's; the clock frequency is not given, so PERIOD assumes
// a 10 MHz clock (60000 cycles).
module time_base #(
  parameter int unsigned PERIOD = 60000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic stop,
  output logic elapsed,
  output logic running
);

  logic [$clog2(PERIOD+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      elapsed <= 1'b0;
      running <= 1'b0;
    end else if (start) begin
      cnt     <= ($clog2(PERIOD+1))'(PERIOD - 1);
      elapsed <= 1'b0;
      running <= 1'b1;
    end else if (stop) begin
      elapsed <= 1'b0;
      running <= 1'b0;
    end else if (running) begin
      if (cnt == '0) begin
        elapsed <= 1'b1;
        running <= 1'b0;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
