// sqm_rsh: final right shifter producing a Q1.15 Squaremax value.
//
// The 30-bit product RSQR(i) * S_abc is shifted right by Shift(i) (0..63) and
// the low 16 bits are the output. Bits shifted out are truncated. For
// operands produced by this engine the shifted value is always below 2^16;
// anything larger is clamped to 16'hFFFF. Combinational. Widths (30 in,
// 6-bit amount, 16 out) follow the published lane diagram; truncation and
// the clamp are this design's choice.
module sqm_rsh
  import sqm_pkg::*;
(
  input  logic [PW-1:0]  p,
  input  logic [SSW-1:0] shift,
  output logic [YW-1:0]  y
);
  logic [PW-1:0] s;

  always_comb begin
    s = p >> shift;
    y = (s[PW-1:YW] != '0) ? '1 : s[YW-1:0];
  end
endmodule
