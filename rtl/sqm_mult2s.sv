// sqm_mult2s: 15 x 15 unsigned multiplier with two pipeline stages.
//
// The product is split over the multiplier b: stage 1 registers the two
// partial products a*b[7:0] and a*b[14:8]; stage 2 adds them (the upper one
// shifted by 8) and registers the 30-bit product. A product therefore
// appears two clock edges after its operands. The pipeline runs every cycle
// with no enable; validity travels beside it in the lane. The engine's
// description only states that a two-stage multiplier is used; the split
// point between the stages is this design's choice.
module sqm_mult2s
  import sqm_pkg::*;
(
  input  logic           clk,
  input  logic [OPW-1:0] a,
  input  logic [OPW-1:0] b,
  output logic [PW-1:0]  p   // a*b, two cycles later
);
  localparam int unsigned LOW = 8;
  localparam int unsigned HIW = OPW - LOW;

  logic [OPW+LOW-1:0] pp_lo;  // a * b[7:0]
  logic [OPW+HIW-1:0] pp_hi;  // a * b[14:8]

  always_ff @(posedge clk) begin
    pp_lo <= a * b[LOW-1:0];
    pp_hi <= a * b[OPW-1:LOW];
    p     <= PW'(pp_lo) + (PW'(pp_hi) << LOW);
  end
endmodule
