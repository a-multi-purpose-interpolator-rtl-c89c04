// input_buffer: one-word buffer between a slow input device and the machine.
//
// The device (typically a punched-tape reader) offers BCD digits with
// dev_valid while dev_run is high. Each accepted digit is shifted in at digit
// 0, so after eight digits the first one read sits in digit 7. When the eighth
// digit is in, the full flag is raised and dev_run drops: the device stops
// itself. A restart pulse from the program (resetting the flag indicator)
// clears the flag and starts the device again. The program reads any digit
// combinationally through rd_idx/rd_digit while the flag is up.
//
// A one-word buffer, the flag and the self-stopping device follow the source
// description; the shift-in order and the handshake are this design's
// choices. After reset the device is stopped until the program restarts it.
module input_buffer #(
  parameter int unsigned DIGITS = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      dev_valid,
  input  logic [3:0]                dev_digit,
  output logic                      dev_run,
  output logic                      full,
  input  logic                      restart,
  input  logic [$clog2(DIGITS)-1:0] rd_idx,
  output logic [3:0]                rd_digit
);

  logic [3:0]                buf_q [DIGITS];
  logic [$clog2(DIGITS):0]   cnt;

  assign rd_digit = buf_q[rd_idx];

  // A full buffer always holds its device stopped.
  a_full_stops_device: assert property (@(posedge clk) disable iff (!rst_n) full |-> !dev_run)
    else $error("device running while the buffer is full");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      full    <= 1'b0;
      dev_run <= 1'b0;
      for (int i = 0; i < DIGITS; i++) buf_q[i] <= '0;
    end else if (restart) begin
      cnt     <= '0;
      full    <= 1'b0;
      dev_run <= 1'b1;
    end else if (dev_run && dev_valid) begin
      for (int i = DIGITS - 1; i > 0; i--) buf_q[i] <= buf_q[i-1];
      buf_q[0] <= dev_digit;
      cnt      <= cnt + 1'b1;
      if (cnt == ($clog2(DIGITS)+1)'(DIGITS - 1)) begin
        full    <= 1'b1;
        dev_run <= 1'b0;
      end
    end
  end

endmodule
