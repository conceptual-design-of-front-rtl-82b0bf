// fe_event_fifo: the 8-deep event buffer of the front-end readout chip.
//
// A trigger writes one 65-bit row: the 64 discriminator outputs after the
// channel mask, and in bit 64 their OR, which says whether the chip has any
// hit for that event. A read-event command takes the oldest row out (pop with
// rd_data valid in the same cycle), a clear-event command drops it, and a
// reset-FIFO or chip reset empties the buffer. A write to a full FIFO is lost
// (the tower controller counts triggers against reads to prevent it), and a
// pop of an empty FIFO returns an all-zero row, i.e. "no hits".
// All actions on the rising edge of clk; rd_data is combinational.
module fe_event_fifo
  import glast_pkg::*;
#(
  parameter int unsigned DEPTH = FE_FIFO_DEPTH,
  parameter int unsigned WIDTH = NCHAN + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,     // reset the pointers
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      count;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign rd_data = empty ? '0 : mem[rp];

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (clear) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
