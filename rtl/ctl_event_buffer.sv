// ctl_event_buffer: one of the controller's two event buffers.
//
// Holds the hit list of one event (up to 63 words of 11 bits, written by the
// hit counter) and its header fields: hit count, time-over-threshold and error
// flag, written together with hdr_we, which also marks the buffer ready
// (full). The packet serializer reads words combinationally by index and
// clears ready with release once the packet has gone out.
module ctl_event_buffer
  import glast_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 soft_rst,
  input  logic                 we,
  input  logic [5:0]           widx,
  input  logic [WORD_BITS-1:0] wword,
  input  logic                 hdr_we,
  input  logic [5:0]           hdr_nhits,
  input  logic [TOT_BITS-1:0]  hdr_tot,
  input  logic                 hdr_err,
  input  logic                 release_buf,
  input  logic [5:0]           ridx,
  output logic [WORD_BITS-1:0] rword,
  output logic                 ready,
  output logic [5:0]           nhits,
  output logic [TOT_BITS-1:0]  tot,
  output logic                 err
);
  logic [WORD_BITS-1:0] mem [MAX_HITS];

  always_ff @(posedge clk)
    if (we && widx < 6'(MAX_HITS)) mem[widx] <= wword;

  assign rword = (ridx < 6'(MAX_HITS)) ? mem[ridx] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= 1'b0; nhits <= '0; tot <= '0; err <= 1'b0;
    end else if (soft_rst) begin
      ready <= 1'b0; nhits <= '0; tot <= '0; err <= 1'b0;
    end else if (hdr_we) begin
      ready <= 1'b1; nhits <= hdr_nhits; tot <= hdr_tot; err <= hdr_err;
    end else if (release_buf) begin
      ready <= 1'b0;
    end
  end
endmodule
