// interpolator_top: the multi-purpose interpolator computer.
//
// Two automata: the control unit (micro-order address register and micro-order
// ROM) sends commands to the operative portion (program ROM with its address
// register, RWM, arithmetic unit) and receives the conditioning variables
// back. Around them sit N_IN one-word input buffers for slow input devices,
// N_OUT output channels for the servo digital-analog converters, the indicator
// unit and the 6 ms time base. Everything runs on one clock; each micro-order
// takes one clock and an 8-digit addition takes 3 clocks per digit.
//
// The program is installed through the ld_* port while the machine is held in
// reset or before it reaches the loaded code. Output channel c presents its
// last complete word as out_q[c] (8 BCD digits) with a one-clock out_strobe[c].
// The block structure is the source's; the numbers of channels, the time-base
// period in clocks and the load port are this design's choices.
module interpolator_top
  import interp_pkg::*;
#(
  parameter int unsigned ROM_WORDS = 4096,
  parameter int unsigned N_IN      = 2,
  parameter int unsigned N_OUT     = 4,
  parameter int unsigned TB_PERIOD = 60000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // program load
  input  logic                  ld_we,
  input  logic [11:0]           ld_addr,
  input  logic [21:0]           ld_data,
  // input devices
  input  logic [N_IN-1:0]       dev_valid,
  input  logic [N_IN-1:0][3:0]  dev_digit,
  output logic [N_IN-1:0]       dev_run,
  // console signals
  input  logic [15:0]           console,
  // output channels
  output logic [N_OUT-1:0][31:0] out_q,
  output logic [N_OUT-1:0]      out_strobe,
  // observation
  output logic [11:0]           iar,
  output logic [5:0]            uaddr
);

  cv_t         cv;
  opcode_e     op;
  logic [15:0] cond;
  logic        ind_val, ind_wr, ind_wval, v_clr, ovf;
  logic [5:0]  ind_addr, in_ch, out_ch;
  logic [2:0]  in_idx, out_idx;
  digit_t      in_digit, out_digit;
  logic        out_we, out_done;
  logic        tb_start, tb_stop, tb_elapsed;
  logic [N_IN-1:0] in_full, in_restart;
  digit_t      in_rd [N_IN];

  control_unit u_cu (.clk, .rst_n, .op, .cond, .cv, .uaddr);

  operative_portion #(.ROM_WORDS(ROM_WORDS)) u_op (
    .clk, .rst_n, .cv, .op, .cond, .iar,
    .ind_val, .ind_addr, .ind_wr, .ind_wval, .v_clr, .ovf,
    .in_ch, .in_idx, .in_digit,
    .out_ch, .out_idx, .out_digit, .out_we, .out_done,
    .ld_we, .ld_addr, .ld_data);

  indicator_unit #(.N_IN(N_IN)) u_ind (
    .clk, .rst_n, .s_addr(ind_addr), .wr(ind_wr), .wval(ind_wval), .val(ind_val),
    .in_full, .in_restart, .tb_elapsed, .tb_start, .tb_stop, .ovf, .v_clr, .console);

  time_base #(.PERIOD(TB_PERIOD)) u_tb (
    .clk, .rst_n, .start(tb_start), .stop(tb_stop), .elapsed(tb_elapsed), .running());

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    input_buffer u_ib (
      .clk, .rst_n, .dev_valid(dev_valid[i]), .dev_digit(dev_digit[i]), .dev_run(dev_run[i]),
      .full(in_full[i]), .restart(in_restart[i]), .rd_idx(in_idx), .rd_digit(in_rd[i]));
  end

  always_comb begin
    in_digit = '0;
    for (int i = 0; i < N_IN; i++)
      if (32'(in_ch) == i) in_digit = in_rd[i];
  end

  for (genvar c = 0; c < N_OUT; c++) begin : g_out
    output_channel u_oc (
      .clk, .rst_n, .we(out_we && 32'(out_ch) == c), .idx(out_idx), .digit(out_digit),
      .done(out_done && 32'(out_ch) == c), .q(out_q[c]), .strobe(out_strobe[c]));
  end

endmodule
