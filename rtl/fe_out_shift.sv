// fe_out_shift: one of the two 65-bit output shift registers of the
// front-end readout chip.
//
// On load, the register takes an event row: the hit bit goes to the exit end
// (it is the header the controller sees first), followed by the 64 channel
// bits in exit order. CH0_FIRST = 1 makes channel 0 leave first (the
// left-shifting register, channel 0 being on the left); CH0_FIRST = 0 makes
// channel 63 leave first (the right-shifting register). If the loaded row has
// no hit, a multiplexer routes the serial input around the 64 data bits, so
// the chip contributes a single zero header bit to the chain and afterwards
// passes on the data of the chips behind it through one flip-flop.
// Each shift moves the chain by one bit on the rising edge of clk; ser_out is
// the bit at the exit end, to be sampled before the shift.
module fe_out_shift
  import glast_pkg::*;
#(
  parameter bit CH0_FIRST = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             soft_rst,
  input  logic             load,
  input  logic [NCHAN:0]   row,      // bit 64 = any hit, bits 63..0 = channels
  input  logic             shift,
  input  logic             ser_in,
  output logic             ser_out
);
  logic [NCHAN:0] sr;       // sr[0] is the exit end
  logic           has_hits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; has_hits <= 1'b0;
    end else if (soft_rst) begin
      sr <= '0; has_hits <= 1'b0;
    end else if (load) begin
      has_hits <= row[NCHAN];
      sr[0]    <= row[NCHAN];
      for (int k = 0; k < NCHAN; k++)
        sr[k+1] <= CH0_FIRST ? row[k] : row[NCHAN-1-k];
    end else if (shift) begin
      if (has_hits) sr <= {ser_in, sr[NCHAN:1]};
      else          sr[0] <= ser_in;   // bypass of the data bits
    end
  end

  assign ser_out = sr[0];
endmodule
