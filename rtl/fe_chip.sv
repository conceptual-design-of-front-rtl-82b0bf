// fe_chip: digital part of the 64-channel front-end readout chip.
//
// The chip has no free-running clock of its own. Each controller drives a
// command line and a clock; here every flip-flop runs on the common clock clk
// and a pulse of a controller's clock is an enable (clk_en_l, clk_en_r). The
// trigger strobe latches the masked discriminator outputs into the 8-deep
// event FIFO (on its rising edge). The left-right bit of the control register
// selects the side the chip works with: its trigger strobe and its commands
// are obeyed, its output shift register is used and its fast-OR output is
// driven. Only "load control register" is accepted from both sides (this is
// how the selection is made or changed); while it runs, the previous register
// contents appear on ctrl_out, enabled (ctrl_oe) only when the chip was
// addressed by its own address, never by the wild card.
// Commands act on the 10th clock pulse of the command:
//   read event  moves the oldest FIFO row into the selected output register
//               and lets that register shift on every further clock pulse of
//               the selected side until end read event
//   clear event drops the oldest row; reset FIFO empties the FIFO; reset
//               restores every register, the FIFO and the decoders
//   calibration starts cal_strobe, held for the 512 clock pulses that make up
//               the 522 the strobe needs (the pulse length is this design's
//               choice; the analog calibration circuit uses its edges)
// The amplifiers, discriminators, DACs and pads are analog and outside this
// module: disc[] are the comparator outputs, and the mask and DAC settings are
// outputs for the analog side.
module fe_chip
  import glast_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,       // power-on reset or RESET pad
  input  logic [4:0]       chip_addr,   // hard-wired address
  input  logic [NCHAN-1:0] disc,        // comparator outputs
  // left-hand controller
  input  logic             clk_en_l,
  input  logic             cmd_l,
  input  logic             trig_l,
  // right-hand controller
  input  logic             clk_en_r,
  input  logic             cmd_r,
  input  logic             trig_r,
  // neighbour connections
  input  logic             fast_or_from_l,
  input  logic             fast_or_from_r,
  output logic             fast_or_to_l,
  output logic             fast_or_to_r,
  input  logic             data_in_l,   // from the chip on the left
  input  logic             data_in_r,   // from the chip on the right
  output logic             data_out_l,  // toward the left
  output logic             data_out_r,  // toward the right
  // control register read-back (tri-state on the chip: value and enable)
  output logic             ctrl_out,
  output logic             ctrl_oe,
  // settings for the analog part
  output logic [NCHAN-1:0] cal_mask,
  output logic [6:0]       cal_dac,     // {range, setting}
  output logic [6:0]       thr_dac,     // {range, setting}
  output logic             cal_strobe
);
  // ---------------- command decoders ----------------
  logic    soft_rst;
  logic    exec_l, exec_r, adr_l, adr_r, lds_l, lds_r, ldu_l, ldu_r, ldg_l, ldg_r;
  fe_cmd_e code_l, code_r;

  fe_cmd_decoder u_dec_l (
    .clk, .rst_n, .soft_rst, .clk_en(clk_en_l), .cmd_in(cmd_l), .chip_addr,
    .exec(exec_l), .code(code_l), .addressed(adr_l), .ld_shift(lds_l),
    .ld_unique(ldu_l), .loading(ldg_l));
  fe_cmd_decoder u_dec_r (
    .clk, .rst_n, .soft_rst, .clk_en(clk_en_r), .cmd_in(cmd_r), .chip_addr,
    .exec(exec_r), .code(code_r), .addressed(adr_r), .ld_shift(lds_r),
    .ld_unique(ldu_r), .loading(ldg_r));

  // ---------------- control register ----------------
  logic             read_right, cal_rng, thr_rng;
  logic [5:0]       cal_set, thr_set;
  logic [NCHAN-1:0] chan_mask, trig_mask;

  fe_ctrl_reg u_ctrl (
    .clk, .rst_n, .soft_rst,
    .shift_en (lds_l | lds_r),
    .ser_in   (lds_l ? cmd_l : cmd_r),   // control register input mux
    .ser_out  (ctrl_out),
    .cal_mask, .chan_mask, .trig_mask,
    .cal_range(cal_rng), .cal_dac(cal_set),
    .thr_range(thr_rng), .thr_dac(thr_set),
    .read_right);

  assign ctrl_oe = (ldg_l && adr_l && ldu_l) || (ldg_r && adr_r && ldu_r);
  assign cal_dac = {cal_rng, cal_set};
  assign thr_dac = {thr_rng, thr_set};

  // ---------------- selected side ----------------
  wire     sel_clk  = read_right ? clk_en_r : clk_en_l;
  wire     sel_exec = read_right ? exec_r : exec_l;
  fe_cmd_e sel_code;
  assign   sel_code = read_right ? code_r : code_l;
  wire     sel_trig = read_right ? trig_r : trig_l;

  wire do_read  = sel_exec && (sel_code == FE_READ_EVENT);
  wire do_clear = sel_exec && (sel_code == FE_CLEAR_EVT);
  wire do_rstf  = sel_exec && (sel_code == FE_RESET_FIFO);
  wire do_cal   = sel_exec && (sel_code == FE_CAL_STROBE);
  wire do_end   = sel_exec && (sel_code == FE_END_READ);
  assign soft_rst = sel_exec && (sel_code == FE_RESET);

  // ---------------- trigger and event FIFO ----------------
  logic trig_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) trig_q <= 1'b0; else trig_q <= sel_trig;
  wire trig_edge = sel_trig && !trig_q;

  logic [NCHAN-1:0] masked;
  logic [NCHAN:0]   head;
  logic             fifo_empty, fifo_full;
  assign masked = disc & chan_mask;

  fe_event_fifo u_fifo (
    .clk, .rst_n, .clear(do_rstf || soft_rst),
    .wr_en(trig_edge), .wr_data({|masked, masked}),
    .rd_en(do_read || do_clear), .rd_data(head),
    .empty(fifo_empty), .full(fifo_full));

  // ---------------- output shift registers ----------------
  logic reading;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 reading <= 1'b0;
    else if (soft_rst || do_end) reading <= 1'b0;
    else if (do_read)           reading <= 1'b1;
  end
  wire shift_now = reading && sel_clk && !sel_exec;

  logic so_l, so_r;
  fe_out_shift #(.CH0_FIRST(1'b1)) u_shift_left (
    .clk, .rst_n, .soft_rst, .load(do_read && !read_right), .row(head),
    .shift(shift_now && !read_right), .ser_in(data_in_r), .ser_out(so_l));
  fe_out_shift #(.CH0_FIRST(1'b0)) u_shift_right (
    .clk, .rst_n, .soft_rst, .load(do_read && read_right), .row(head),
    .shift(shift_now && read_right), .ser_in(data_in_l), .ser_out(so_r));

  // Drivers of the unused direction are switched off (low).
  assign data_out_l = !read_right && so_l;
  assign data_out_r =  read_right && so_r;

  // ---------------- calibration strobe ----------------
  localparam int unsigned CAL_HOLD = FE_CAL_CLOCKS - FE_FRAME_BITS - 1;
  logic [9:0] cal_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cal_cnt <= '0;
    else if (soft_rst) cal_cnt <= '0;
    else if (do_cal)   cal_cnt <= 10'(CAL_HOLD);
    else if (sel_clk && cal_cnt != 0) cal_cnt <= cal_cnt - 1'b1;
  end
  assign cal_strobe = (cal_cnt != 0);

  // ---------------- fast-OR ----------------
  logic own_or;
  fe_fast_or u_fast_or (
    .disc, .trig_mask, .read_right,
    .from_left(fast_or_from_l), .from_right(fast_or_from_r),
    .own(own_or), .to_right(fast_or_to_r), .to_left(fast_or_to_l));

  // A trigger into a full FIFO is lost; the tower controller must avoid it.
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) trig_edge |-> !fifo_full;
  endproperty
  a_no_overflow: assert property (p_no_overflow)
    else $error("fe_chip %0d: trigger with a full event FIFO", chip_addr);

  logic unused_ok;
  assign unused_ok = own_or ^ fifo_empty;
endmodule
