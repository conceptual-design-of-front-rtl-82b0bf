// ctl_trigger_logic: fast-OR gate, trigger latency counter and
// time-over-threshold (TOT) counter of the hybrid controller.
//
// The fast-OR of the hybrid's front-end chips goes to the tower controller
// without passing through a flip-flop (fast_or_out is a gate). A rising
// fast-OR, seen through a two-flop synchronizer, clears and starts the TOT
// counter and starts the latency counter. The TOT counter advances once every
// TOT_PRESCALE clocks (5 MHz from the 20 MHz clock), saturates at 1023 and
// stops when the fast-OR falls. The latency counter runs for LATENCY cycles
// (about 1.3 us) and stops early on a trigger. If it runs out first, the TOT
// counter is stopped and cleared. A fast-OR that rises again while the
// latency counter of the previous one still runs is ignored and is blocked at
// the gate.
// On the rising edge of trigger_in one entry is pushed into the TOT FIFO: the
// read flag says whether the latency counter was running, the TOT field the
// count so far. If the count is still running, its slot is remembered and its
// final value written there (upd) when the fast-OR falls.
module ctl_trigger_logic
  import glast_pkg::*;
#(
  parameter int unsigned LATENCY   = LATENCY_CYCLES,
  parameter int unsigned PRESCALE  = TOT_PRESCALE
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                soft_rst,
  input  logic                fast_or_in,     // asynchronous
  output logic                fast_or_out,    // to the tower controller
  input  logic                trigger_in,     // synchronous to clk
  input  logic [2:0]          fifo_wr_idx,    // slot the next push goes to
  output logic                push,
  output tot_entry_t          push_entry,
  output logic                upd,
  output logic [2:0]          upd_idx,
  output logic [TOT_BITS-1:0] upd_tot,
  output logic                lat_active,
  output logic                tot_counting
);
  logic f1, f2, fq, trig_q, block, pend;
  logic [$clog2(LATENCY+1)-1:0]  lat_cnt;
  logic [$clog2(PRESCALE)-1:0]   pre;
  logic [TOT_BITS-1:0]           tot;
  logic [2:0]                    pend_idx;

  wire rise   = f2 && !fq;
  wire fall   = !f2 && fq;
  wire trig   = trigger_in && !trig_q;
  assign lat_active   = (lat_cnt != 0);
  wire accept = rise && !lat_active;
  wire tmo    = (lat_cnt == 1) && !trig;   // latency expires this cycle

  assign fast_or_out = fast_or_in && !block;

  assign push             = trig;
  assign push_entry.read_flag = lat_active;
  assign push_entry.tot       = lat_active ? tot : '0;
  assign upd     = pend && tot_counting && fall;
  assign upd_idx = pend_idx;
  assign upd_tot = tot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f1 <= 1'b0; f2 <= 1'b0; fq <= 1'b0; trig_q <= 1'b0; block <= 1'b0;
      lat_cnt <= '0; pre <= '0; tot <= '0; tot_counting <= 1'b0;
      pend <= 1'b0; pend_idx <= '0;
    end else if (soft_rst) begin
      f1 <= 1'b0; f2 <= 1'b0; fq <= 1'b0; trig_q <= 1'b0; block <= 1'b0;
      lat_cnt <= '0; pre <= '0; tot <= '0; tot_counting <= 1'b0;
      pend <= 1'b0; pend_idx <= '0;
    end else begin
      f1 <= fast_or_in; f2 <= f1; fq <= f2;
      trig_q <= trigger_in;

      // latency counter
      if (accept)                      lat_cnt <= ($bits(lat_cnt))'(LATENCY);
      else if (trig)                   lat_cnt <= '0;
      else if (lat_active)             lat_cnt <= lat_cnt - 1'b1;

      // gate: block a second fast-OR inside the latency window
      if (!lat_active || accept)       block <= 1'b0;
      else if (fall)                   block <= 1'b1;

      // TOT counter
      if (accept) begin
        tot <= '0; pre <= '0; tot_counting <= 1'b1;
      end else if (tmo && tot_counting) begin
        tot <= '0; tot_counting <= 1'b0;
      end else if (tmo) begin
        tot <= '0;
      end else if (tot_counting) begin
        if (fall) tot_counting <= 1'b0;
        else begin
          pre <= (pre == ($bits(pre))'(PRESCALE-1)) ? '0 : pre + 1'b1;
          if (pre == ($bits(pre))'(PRESCALE-1) && tot != '1) tot <= tot + 1'b1;
        end
      end

      // slot whose TOT is still being counted
      if (trig && lat_active && tot_counting) begin
        pend <= 1'b1; pend_idx <= fifo_wr_idx;
      end else if (upd || !tot_counting) begin
        pend <= 1'b0;
      end
    end
  end
endmodule
