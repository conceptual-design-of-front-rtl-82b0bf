// ctl_checksum: 11-bit check-sum of a data packet.
//
// The check-sum is the sum, modulo 2^11, of the 11-bit words of the packet
// that precede it (layer/hit-count word, error/TOT word and the hit words).
// The description asks for an 11-bit check-sum without naming the algorithm;
// the modular sum is this design's choice. clear starts a new packet, add
// accumulates word on the rising edge of clk; sum is the running value.
module ctl_checksum
  import glast_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 add,
  input  logic [WORD_BITS-1:0] word,
  output logic [WORD_BITS-1:0] sum
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sum <= '0;
    else if (clear) sum <= '0;
    else if (add)   sum <= sum + word;
  end
endmodule
