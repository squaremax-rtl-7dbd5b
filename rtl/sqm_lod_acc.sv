// sqm_lod_acc: leading-one detector on the 40-bit sum of squares.
//
// Finds n, the position of the most significant set bit of the sum D, so that
// D = 1.abc... x 2^n, and returns static_shift = n and abc = the three bits
// right below the leading one (missing bits below bit 0 read as zero). A zero
// sum gives n = 0 and abc = 0; every square is then zero too, and so is
// every output. Combinational. The 40-bit input and the 3-bit and 6-bit
// outputs follow the published design; the zero-sum convention is this
// design's choice.
module sqm_lod_acc
  import sqm_pkg::*;
(
  input  logic [ACCW-1:0] acc,
  output logic [IDXW-1:0] abc,
  output logic [SSW-1:0]  static_shift
);
  logic [ACCW+IDXW-1:0] ext;   // acc with three zero bits below bit 0

  always_comb begin
    static_shift = '0;
    for (int k = 0; k < ACCW; k++) begin
      if (acc[k]) static_shift = SSW'(k);
    end
    ext  = {acc, {IDXW{1'b0}}};
    abc  = IDXW'(ext >> static_shift);  // leading one moves to bit IDXW
  end
endmodule
