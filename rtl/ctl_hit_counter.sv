// ctl_hit_counter: zero suppression of the serial front-end data in the
// hybrid controller.
//
// After start, every bit_valid cycle brings one bit from the front-end chain.
// The first bit of each chip is its header: 0 means no hits, and the chip
// counter moves on to the next chip; 1 means 64 data bits follow, during which
// a channel counter runs and every 1 latches the pair {chip, channel} as an
// 11-bit hit address (5 bits chip, 6 bits channel), written to the event
// buffer at index nhits. At most 63 hits are kept; further ones set overflow
// and are dropped. After the last of nchips chips, done pulses for one cycle
// and busy falls; bits arriving while not busy are ignored. Chip and channel
// are counted in the order the data arrive (chip 0 is the chip next to this
// controller, channel 0 the first data bit of a chip).
module ctl_hit_counter
  import glast_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 soft_rst,
  input  logic                 start,
  input  logic [4:0]           nchips,
  input  logic                 bit_valid,
  input  logic                 bit_in,
  output logic                 busy,
  output logic                 done,
  output logic                 hit_we,
  output logic [5:0]           hit_idx,
  output logic [WORD_BITS-1:0] hit_word,
  output logic [5:0]           nhits,
  output logic                 overflow
);
  logic       in_data;
  logic [4:0] chip;
  logic [5:0] ch;

  wire take      = busy && bit_valid;
  wire last_chip = (chip == nchips - 5'd1);

  assign hit_we   = take && in_data && bit_in && (nhits != 6'(MAX_HITS));
  assign hit_idx  = nhits;
  assign hit_word = {chip, ch};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; in_data <= 1'b0; chip <= '0; ch <= '0;
      nhits <= '0; overflow <= 1'b0;
    end else if (soft_rst) begin
      busy <= 1'b0; done <= 1'b0; in_data <= 1'b0; chip <= '0; ch <= '0;
      nhits <= '0; overflow <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= (nchips != 0); done <= (nchips == 0);
        in_data <= 1'b0; chip <= '0; ch <= '0; nhits <= '0; overflow <= 1'b0;
      end else if (take) begin
        if (!in_data) begin
          if (bit_in) begin
            in_data <= 1'b1; ch <= '0;
          end else if (last_chip) begin
            busy <= 1'b0; done <= 1'b1;
          end else chip <= chip + 1'b1;
        end else begin
          if (bit_in) begin
            if (nhits != 6'(MAX_HITS)) nhits <= nhits + 1'b1;
            else overflow <= 1'b1;
          end
          ch <= ch + 1'b1;
          if (ch == 6'(NCHAN-1)) begin
            in_data <= 1'b0;
            if (last_chip) begin busy <= 1'b0; done <= 1'b1; end
            else chip <= chip + 1'b1;
          end
        end
      end
    end
  end
endmodule
