// fe_fast_or: the asynchronous fast-OR path of the front-end readout chip.
//
// The discriminator outputs of the channels enabled in the trigger mask are
// ORed into the chip's own fast-OR. One 2-input OR adds the fast-OR arriving
// from the chip on the left and drives the chip on the right; the other adds
// the fast-OR from the right and drives the chip on the left. Only the
// direction chosen by the control register's left-right bit is driven; the
// other output is held low (its driver is off). A chain of chips therefore
// delivers the OR of all unmasked channels to one end only.
// Purely combinational, as the description requires.
module fe_fast_or
  import glast_pkg::*;
(
  input  logic [NCHAN-1:0] disc,
  input  logic [NCHAN-1:0] trig_mask,  // 1 = channel contributes
  input  logic             read_right,
  input  logic             from_left,
  input  logic             from_right,
  output logic             own,
  output logic             to_right,
  output logic             to_left
);
  assign own      = |(disc & trig_mask);
  assign to_right = read_right  & (own | from_left);
  assign to_left  = !read_right & (own | from_right);
endmodule
