// hybrid: one readout hybrid, a string of NCH front-end chips with a
// controller chip at each end.
//
// Chip 0 sits next to the left controller, chip NCH-1 next to the right one.
// Neighbouring chips are joined by their data and fast-OR lines in both
// directions, so each controller receives the serial data and the fast-OR of
// the chips that are set to read out toward it. Every chip hears both
// controllers' command lines, clocks and trigger strobes. The control-register
// read-back outputs of all chips share one tri-state trace; as only a chip
// addressed by its own address drives it, the trace is modelled as the OR of
// the enabled outputs, and it goes to both controllers. Both controllers have
// the same layer address; they are reached through separate command lines.
module hybrid
  import glast_pkg::*;
#(
  parameter int unsigned NCH = NCHIPS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [4:0]                layer_addr,
  input  logic [NCH-1:0][NCHAN-1:0] disc,
  // left-hand controller side
  input  logic                      cmd_l,
  input  logic                      trigger_l,
  output logic                      fast_or_out_l,
  input  logic                      token_in_l,
  output logic                      token_out_l,
  input  logic                      data_in_l,
  output logic                      data_out_l,
  // right-hand controller side
  input  logic                      cmd_r,
  input  logic                      trigger_r,
  output logic                      fast_or_out_r,
  input  logic                      token_in_r,
  output logic                      token_out_r,
  input  logic                      data_in_r,
  output logic                      data_out_r,
  // settings for the analog part of every chip
  output logic [NCH-1:0][NCHAN-1:0] cal_mask,
  output logic [NCH-1:0][6:0]       cal_dac,
  output logic [NCH-1:0][6:0]       thr_dac,
  output logic [NCH-1:0]            cal_strobe,
  // status
  output logic [1:0]                read_stall,
  output logic [1:0]                seq_busy
);
  logic clken_l, fcmd_l, ftrig_l, clken_r, fcmd_r, ftrig_r;

  // chain nets: index i joins chip i-1 (left) and chip i (right);
  // index 0 is the left controller, index NCH the right controller
  logic [NCH:0] d_left;    // data moving left, driven by chip i onto d_left[i]
  logic [NCH:0] d_right;   // data moving right, driven by chip i onto d_right[i+1]
  logic [NCH:0] fo_left, fo_right;
  logic [NCH-1:0] rb_out, rb_oe;
  logic           rb_bus;

  assign d_left[NCH]  = 1'b0;
  assign fo_left[NCH] = 1'b0;
  assign d_right[0]   = 1'b0;
  assign fo_right[0]  = 1'b0;
  assign rb_bus       = |(rb_out & rb_oe);

  for (genvar i = 0; i < NCH; i++) begin : g_chip
    fe_chip u_fe (
      .clk, .rst_n, .chip_addr(5'(i)), .disc(disc[i]),
      .clk_en_l(clken_l), .cmd_l(fcmd_l), .trig_l(ftrig_l),
      .clk_en_r(clken_r), .cmd_r(fcmd_r), .trig_r(ftrig_r),
      .fast_or_from_l(fo_right[i]),   .fast_or_from_r(fo_left[i+1]),
      .fast_or_to_l(fo_left[i]),      .fast_or_to_r(fo_right[i+1]),
      .data_in_l(d_right[i]),         .data_in_r(d_left[i+1]),
      .data_out_l(d_left[i]),         .data_out_r(d_right[i+1]),
      .ctrl_out(rb_out[i]), .ctrl_oe(rb_oe[i]),
      .cal_mask(cal_mask[i]), .cal_dac(cal_dac[i]), .thr_dac(thr_dac[i]),
      .cal_strobe(cal_strobe[i]));
  end

  controller u_ctl_l (
    .clk, .rst_n, .layer_addr, .cmd_in(cmd_l), .trigger_in(trigger_l),
    .fast_or_out(fast_or_out_l), .fast_or_in(fo_left[0]),
    .fe_clk_en(clken_l), .fe_cmd(fcmd_l), .fe_trig(ftrig_l),
    .fe_data_in(d_left[0]), .fe_ctrl_rd(rb_bus),
    .token_in(token_in_l), .token_out(token_out_l),
    .data_in(data_in_l), .data_out(data_out_l),
    .read_stall(read_stall[0]), .seq_busy(seq_busy[0]));

  controller u_ctl_r (
    .clk, .rst_n, .layer_addr, .cmd_in(cmd_r), .trigger_in(trigger_r),
    .fast_or_out(fast_or_out_r), .fast_or_in(fo_right[NCH]),
    .fe_clk_en(clken_r), .fe_cmd(fcmd_r), .fe_trig(ftrig_r),
    .fe_data_in(d_right[NCH]), .fe_ctrl_rd(rb_bus),
    .token_in(token_in_r), .token_out(token_out_r),
    .data_in(data_in_r), .data_out(data_out_r),
    .read_stall(read_stall[1]), .seq_busy(seq_busy[1]));
endmodule
