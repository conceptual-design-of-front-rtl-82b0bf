// controller: the hybrid controller chip. Two sit on every hybrid, one at
// each end of the string of front-end chips, and either can configure and read
// all of them.
//
// It joins the units of the chip:
//   ctl_trigger_logic   fast-OR gate to the tower, latency and TOT counters
//   ctl_tot_fifo        8-deep FIFO of TOT counts and readout flags
//   ctl_global_control  command decoding, control register, front-end
//                       command and clock sequencing
//   ctl_hit_counter     zero suppression of the front-end data
//   ctl_event_buffer x2 hit lists of two events (one filling, one sending)
//   ctl_io_control      token protocol and packet output
// The trigger from the tower goes straight through to the front-end chips
// (fe_trig), so that they latch their comparators while they are still high.
// Each read-event command changes the buffer written next, and each token the
// buffer read next. Everything runs on the always-running 20 MHz clock clk.
module controller
  import glast_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,        // hard reset pad
  input  logic [4:0] layer_addr,   // hard-wired layer address
  // from the tower controller
  input  logic       cmd_in,
  input  logic       trigger_in,
  output logic       fast_or_out,
  // front-end chips
  input  logic       fast_or_in,
  output logic       fe_clk_en,
  output logic       fe_cmd,
  output logic       fe_trig,
  input  logic       fe_data_in,
  input  logic       fe_ctrl_rd,
  // readout chain
  input  logic       token_in,     // from the previous layer
  output logic       token_out,    // to the next layer
  input  logic       data_in,      // from the next layer
  output logic       data_out,     // to the previous layer
  // status
  output logic       read_stall,
  output logic       seq_busy
);
  logic        soft_rst;
  ctl_cfg_t    cfg;

  // trigger logic and TOT FIFO
  logic                push, upd, tot_pop, lat_active, tot_counting;
  tot_entry_t          push_entry, tot_head;
  logic [2:0]          wr_idx, upd_idx;
  logic [TOT_BITS-1:0] upd_tot;
  logic                tf_empty, tf_full;

  assign fe_trig = trigger_in;

  ctl_trigger_logic u_trig (
    .clk, .rst_n, .soft_rst, .fast_or_in, .fast_or_out, .trigger_in,
    .fifo_wr_idx(wr_idx), .push, .push_entry, .upd, .upd_idx, .upd_tot,
    .lat_active, .tot_counting);

  ctl_tot_fifo u_tot_fifo (
    .clk, .rst_n, .clear(soft_rst), .push, .push_entry, .wr_idx,
    .upd, .upd_idx, .upd_tot, .pop(tot_pop), .head(tot_head),
    .empty(tf_empty), .full(tf_full));

  // hit counter
  logic                 hc_start, hc_bv, hc_busy, hc_done, hit_we, hc_ovf;
  logic [5:0]           hit_idx, hc_nhits;
  logic [WORD_BITS-1:0] hit_word;

  ctl_hit_counter u_hits (
    .clk, .rst_n, .soft_rst, .start(hc_start), .nchips(cfg.nchips),
    .bit_valid(hc_bv), .bit_in(fe_data_in), .busy(hc_busy), .done(hc_done),
    .hit_we, .hit_idx, .hit_word, .nhits(hc_nhits), .overflow(hc_ovf));

  // global control
  logic                aux_valid, aux_bit, wr_sel;
  logic [1:0]          buf_ready, hdr_we;
  logic [5:0]          hdr_nhits;
  logic [TOT_BITS-1:0] hdr_tot;
  logic                hdr_err;

  ctl_global_control u_ctl (
    .clk, .rst_n, .layer_addr, .cmd_in, .soft_rst, .cfg,
    .fe_clk_en, .fe_cmd, .fe_ctrl_rd, .aux_valid, .aux_bit,
    .tot_pop, .tot_head,
    .hc_start, .hc_bit_valid(hc_bv), .hc_done, .hc_nhits, .hc_overflow(hc_ovf),
    .buf_ready, .wr_sel, .hdr_we, .hdr_nhits, .hdr_tot, .hdr_err,
    .seq_busy, .read_stall);

  // event buffers
  logic [1:0][5:0]           b_nhits;
  logic [1:0][TOT_BITS-1:0]  b_tot;
  logic [1:0]                b_err, b_release;
  logic [1:0][WORD_BITS-1:0] b_word;
  logic [5:0]                ridx;
  logic                      rd_sel, sending;

  for (genvar b = 0; b < 2; b++) begin : g_buf
    ctl_event_buffer u_buf (
      .clk, .rst_n, .soft_rst,
      .we(hit_we && (wr_sel == 1'(b))), .widx(hit_idx), .wword(hit_word),
      .hdr_we(hdr_we[b]), .hdr_nhits, .hdr_tot, .hdr_err,
      .release_buf(b_release[b]), .ridx, .rword(b_word[b]),
      .ready(buf_ready[b]), .nhits(b_nhits[b]), .tot(b_tot[b]), .err(b_err[b]));
  end

  ctl_io_control u_io (
    .clk, .rst_n, .soft_rst, .layer_addr, .cksum_en(cfg.cksum_en),
    .token_in, .token_out, .data_in, .data_out, .aux_valid, .aux_bit,
    .buf_ready, .buf_nhits(b_nhits), .buf_tot(b_tot), .buf_err(b_err),
    .buf_word(b_word), .ridx, .buf_release(b_release), .rd_sel, .sending);

  logic unused_ok;
  assign unused_ok = ^{hc_busy, tf_empty, tf_full, lat_active, tot_counting,
                       cfg.unused};
endmodule
