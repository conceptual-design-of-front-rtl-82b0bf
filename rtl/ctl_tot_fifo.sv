// ctl_tot_fifo: the controller's 8-deep FIFO of time-over-threshold counts and
// readout flags, kept in step with the event FIFOs of the front-end chips.
//
// push writes an entry at the tail (wr_idx tells which slot that is), upd
// overwrites the TOT field of a given slot (used when the count finishes after
// the trigger), pop removes the head; head is valid while !empty and reads as
// all-zero when empty. A push into a full FIFO is lost (the tower controller
// counts triggers against reads to prevent it). clear empties the FIFO.
module ctl_tot_fifo
  import glast_pkg::*;
#(
  parameter int unsigned DEPTH = FE_FIFO_DEPTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      push,
  input  tot_entry_t                push_entry,
  output logic [$clog2(DEPTH)-1:0]  wr_idx,
  input  logic                      upd,
  input  logic [$clog2(DEPTH)-1:0]  upd_idx,
  input  logic [TOT_BITS-1:0]       upd_tot,
  input  logic                      pop,
  output tot_entry_t                head,
  output logic                      empty,
  output logic                      full
);
  localparam int unsigned AW = $clog2(DEPTH);
  tot_entry_t    mem [DEPTH];
  logic [AW-1:0] rp;
  logic [AW:0]   count;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign head  = empty ? '0 : mem[rp];

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (upd) mem[upd_idx].tot <= upd_tot;
    if (do_push) mem[wr_idx] <= push_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_idx <= '0; rp <= '0; count <= '0;
    end else if (clear) begin
      wr_idx <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wr_idx <= (wr_idx == AW'(DEPTH-1)) ? '0 : wr_idx + 1'b1;
      if (do_pop)  rp     <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
