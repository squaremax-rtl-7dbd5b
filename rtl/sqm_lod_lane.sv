// sqm_lod_lane: dynamic scaling of a 30-bit square to 15 bits.
//
// A leading-one detector finds the most significant set bit k of the square.
// If k <= 14 the square already fits in 15 bits and dynamic_shift is 0;
// otherwise dynamic_shift = k - 14 (1..15) and RSQR is the square shifted
// right by that amount, so that its leading one sits at bit 14 and the most
// significant 15 bits are kept. Bits shifted out are dropped (truncation).
// Combinational. Widths (30 in, 15 and 4 out) and the range 0..15 of the
// shift follow the published algorithm.
module sqm_lod_lane
  import sqm_pkg::*;
(
  input  logic [PW-1:0]  sq,         // ReLU(x)^2
  output logic [OPW-1:0] rsqr,       // sq >> dshift, 15 bits
  output logic [DSW-1:0] dshift      // dynamic_shift
);
  always_comb begin
    dshift = '0;
    // Highest set bit above bit 14 decides the shift; scan upwards so the
    // last hit (the leading one) wins.
    for (int k = OPW; k < PW; k++) begin
      if (sq[k]) dshift = DSW'(k - (OPW - 1));
    end
    rsqr = OPW'(sq >> dshift);
  end
endmodule
