// fe_ctrl_reg: the 207-bit control shift register of the front-end readout
// chip, with its power-up defaults and the decode of its fields.
//
// The register is loaded serially, bit 0 first: each shift moves every bit one
// place toward bit 0 and the new bit enters at bit 206, so after 207 shifts the
// first bit sent sits in bit 0. The bit leaving bit 0 is the previous content,
// which appears on ser_out ahead of each shift (read-back while writing).
// Field layout and defaults follow the chip description:
//   bits   0..63   calibration mask, bit n = channel n, default every 4th set
//   bits  64..127  channel mask, bit 64 = channel 63 ... bit 127 = channel 0
//   bits 128..191  trigger mask, bit 128+n = channel n
//   bit  192       calibration DAC range (1 = high), bits 193..198 setting,
//                  bit 198 the LSB; default low range, 001111
//   bit  199       threshold DAC range, bits 200..205 setting, bit 205 LSB;
//                  default low range, 010111
//   bit  206       1 = read out (data and fast-OR) to the right, default left
// A set channel-mask or trigger-mask bit enables the channel (this design's
// reading: all bits default to set, and a chip that powered up with every
// channel off would be of little use).
// Timing: shift_en and reset act on the rising edge of clk; the decoded fields
// are plain register outputs.
module fe_ctrl_reg
  import glast_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,     // power-on / pad reset, to defaults
  input  logic              soft_rst,  // reset command, to defaults
  input  logic              shift_en,
  input  logic              ser_in,
  output logic              ser_out,   // previous content, bit 0 first
  output logic [NCHAN-1:0]  cal_mask,  // index = channel
  output logic [NCHAN-1:0]  chan_mask, // index = channel, 1 = enabled
  output logic [NCHAN-1:0]  trig_mask, // index = channel, 1 = enabled
  output logic              cal_range,
  output logic [5:0]        cal_dac,
  output logic              thr_range,
  output logic [5:0]        thr_dac,
  output logic              read_right
);

  logic [FE_CTRL_BITS-1:0] r;

  function automatic logic [FE_CTRL_BITS-1:0] defaults();
    logic [FE_CTRL_BITS-1:0] d;
    d = '0;
    for (int n = 0; n < NCHAN; n++) begin
      d[n]       = (n % 4 == 0);
      d[64 + n]  = 1'b1;
      d[128 + n] = 1'b1;
    end
    d[192]     = 1'b0;
    d[198:193] = 6'b111100; // setting 001111 with bit 198 the LSB
    d[199]     = 1'b0;
    d[205:200] = 6'b111010; // setting 010111 with bit 205 the LSB
    d[206]     = 1'b0;
    return d;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        r <= defaults();
    else if (soft_rst) r <= defaults();
    else if (shift_en) r <= {ser_in, r[FE_CTRL_BITS-1:1]};
  end

  assign ser_out = r[0];

  always_comb begin
    for (int n = 0; n < NCHAN; n++) begin
      cal_mask[n]  = r[n];
      chan_mask[n] = r[127 - n];
      trig_mask[n] = r[128 + n];
    end
    for (int i = 0; i < 6; i++) begin
      cal_dac[i] = r[198 - i];
      thr_dac[i] = r[205 - i];
    end
  end
  assign cal_range  = r[192];
  assign thr_range  = r[199];
  assign read_right = r[206];

endmodule
