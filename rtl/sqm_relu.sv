// sqm_relu: ReLU of a 16-bit signed Q16.0 input.
//
// Negative inputs (sign bit set) give zero; otherwise the 15 magnitude bits
// pass unchanged. Because the result is never negative it is carried on 15
// unsigned bits, the operand width of the lane multiplier. Purely
// combinational. Widths follow the published lane diagram (16 in, 15 out).
module sqm_relu
  import sqm_pkg::*;
(
  input  logic [XW-1:0]  x,  // Q16.0 two's complement
  output logic [OPW-1:0] r   // max(x, 0), unsigned
);
  always_comb r = x[XW-1] ? '0 : x[OPW-1:0];
endmodule
