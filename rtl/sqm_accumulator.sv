// sqm_accumulator: 40-bit accumulator of the lane squares (Step 1).
//
// Each cycle with en set, the LANES 30-bit squares are added by a tree whose
// result is registered (stage 1), and that sum is added into the 40-bit
// accumulator (stage 2). The first beat of a vector (clr) loads the
// accumulator instead of adding, so back-to-back vectors need no idle
// cycle. If a sum would exceed 2^40 - 1 the accumulator saturates there and
// the sticky flag sat is set until the next clr. done pulses for one cycle
// when the beat marked last has entered the accumulator, i.e. two clock
// edges after it was presented; acc then holds the complete sum D.
// The 40-bit width, the 8 inputs and the role follow the published design;
// the adder-tree register, the saturation and the clr/last/done control are
// this design's choice.
module sqm_accumulator
  import sqm_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,     // beat valid
  input  logic                      clr,    // first beat of a vector
  input  logic                      last,   // last beat of a vector
  input  logic [LANES-1:0][PW-1:0]  sq,     // ReLU(x)^2 of each lane
  output logic [ACCW-1:0]           acc,
  output logic                      sat,
  output logic                      done
);
  localparam int unsigned SUMW = PW + $clog2(LANES + 1);

  logic [SUMW-1:0] tree, tree_q;
  logic            en_q, clr_q, last_q;
  logic [ACCW:0]   base, nxt;

  always_comb begin
    tree = '0;
    for (int l = 0; l < LANES; l++) tree += SUMW'(sq[l]);
  end

  always_comb begin
    base = clr_q ? '0 : {1'b0, acc};
    nxt  = base + (ACCW+1)'(tree_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tree_q <= '0;
      en_q   <= 1'b0;
      clr_q  <= 1'b0;
      last_q <= 1'b0;
      acc    <= '0;
      sat    <= 1'b0;
      done   <= 1'b0;
    end else begin
      tree_q <= tree;
      en_q   <= en;
      clr_q  <= en && clr;
      last_q <= en && last;
      done   <= en_q && last_q;
      if (en_q) begin
        acc <= nxt[ACCW] ? '1 : nxt[ACCW-1:0];
        sat <= (sat && !clr_q) || nxt[ACCW];
      end
    end
  end
endmodule
