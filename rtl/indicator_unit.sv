// indicator_unit: the 64 single-bit indicators addressed by the 6-bit S field.
//
// Indicators are tested by TRS and written by SRI (wr with wval = 1 to set,
// 0 to reset). Map:
//   S = 0..N_IN-1  full flag of input buffer S; reset = clear flag and start
//                  the device (restart pulse), set has no effect
//   S = 8          6 ms time base; set = start it, reset = stop it,
//                  reads 1 once the period has elapsed
//   S = 9          overflow flip-flop of the arithmetic unit; reset clears it
//   S = 16..31     console signals (read only)
//   S = 32..63     program flags, set and reset freely
// other addresses read 0. Single-bit indicators for I/O flags, console and
// internal signals, and the time base as an indicator, follow the source
// description; the address map is this design's. Writes take effect on the
// rising clock edge; val is combinational.
module indicator_unit #(
  parameter int unsigned N_IN = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [5:0]      s_addr,
  input  logic            wr,
  input  logic            wval,
  output logic            val,
  input  logic [N_IN-1:0] in_full,
  output logic [N_IN-1:0] in_restart,
  input  logic            tb_elapsed,
  output logic            tb_start,
  output logic            tb_stop,
  input  logic            ovf,
  output logic            v_clr,
  input  logic [15:0]     console
);

  logic [31:0] flags;

  always_comb begin
    val = 1'b0;
    if (s_addr >= 6'd32)                          val = flags[s_addr[4:0]];
    else if (s_addr >= 6'd16)                     val = console[s_addr[3:0]];
    else if (s_addr == 6'd9)                      val = ovf;
    else if (s_addr == 6'd8)                      val = tb_elapsed;
    else
      for (int i = 0; i < N_IN; i++)
        if (32'(s_addr) == i) val = in_full[i];
  end

  always_comb begin
    in_restart = '0;
    for (int i = 0; i < N_IN; i++)
      if (wr && !wval && 32'(s_addr) == i) in_restart[i] = 1'b1;
  end

  assign tb_start = wr &&  wval && s_addr == 6'd8;
  assign tb_stop  = wr && !wval && s_addr == 6'd8;
  assign v_clr    = wr && !wval && s_addr == 6'd9;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                      flags <= '0;
    else if (wr && s_addr >= 6'd32)  flags[s_addr[4:0]] <= wval;

endmodule
