// sqm_subtractor: right-shift amount of one Squaremax output.
//
// Shift(i) = static_shift - dynamic_shift(i), 6 bits. For data produced by
// this engine static_shift is the position of the leading one of the sum and
// is never smaller than dynamic_shift(i), so the difference is never
// negative; should inconsistent operands give a negative difference it is
// clamped to 0. Combinational. The 6-bit width follows the published lane
// diagram; the clamp is this design's choice.
module sqm_subtractor
  import sqm_pkg::*;
(
  input  logic [SSW-1:0] static_shift,
  input  logic [DSW-1:0] dshift,
  output logic [SSW-1:0] shift
);
  logic [SSW:0] diff;

  always_comb begin
    diff  = {1'b0, static_shift} - (SSW+1)'(dshift);
    shift = diff[SSW] ? '0 : diff[SSW-1:0];
  end
endmodule
