// sqm_lane: one of the parallel lanes of the Squaremax engine.
//
// A lane owns one 15-bit two-stage multiplier that is shared between the two
// steps of the algorithm, selected by step:
//   Step 1 (step = STEP1): x -> ReLU -> ReLU(x)^2. The square goes to the
//     shared accumulator (sq, sq_valid) and through the lane LOD, which
//     returns the 15-bit RSQR and the 4-bit dynamic_shift for storage outside
//     the engine until Step 2.
//   Step 2 (step = STEP2): RSQR * S_abc, right-shifted by
//     static_shift - dynamic_shift, gives Squaremax(x) in Q1.15.
// Timing: all inputs are registered at the first clock edge; the two
// multiplier stages follow; sq is valid after the third edge and
// rsqr_out/dshift_out (s1_valid) or y (y_valid) are registered at the fourth
// edge, so the lane latency is 4 cycles and it accepts one element every
// cycle. The muxes, the ReLU-LOD-subtractor-shifter structure and all widths
// follow the published lane diagram; the input and output registers are this
// design's choice.
module sqm_lane
  import sqm_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  step_e          step,
  input  logic [XW-1:0]  x,             // Step 1 input, Q16.0
  input  logic [OPW-1:0] rsqr_in,       // Step 2: stored RSQR(i)
  input  logic [DSW-1:0] dshift_in,     // Step 2: stored dynamic_shift(i)
  input  logic [OPW-1:0] s_abc,         // Step 2: 1/1.abc, Q0.15
  input  logic [SSW-1:0] static_shift,  // Step 2: n of the sum
  output logic [PW-1:0]  sq,            // Step 1 square for the accumulator
  output logic           sq_valid,
  output logic [OPW-1:0] rsqr_out,      // Step 1 results to store
  output logic [DSW-1:0] dshift_out,
  output logic           s1_valid,
  output logic [YW-1:0]  y,             // Step 2 result, Q1.15
  output logic           y_valid
);
  // Stage 0: input registers.
  logic           v0, v1, v2;
  step_e          st0, st1, st2;
  logic [XW-1:0]  x0;
  logic [OPW-1:0] rsqr0, sabc0;
  logic [DSW-1:0] ds0;
  logic [SSW-1:0] ss0;
  logic [SSW-1:0] sh0, sh1, sh2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; v1 <= 1'b0; v2 <= 1'b0;
      st0 <= STEP1; st1 <= STEP1; st2 <= STEP1;
    end else begin
      v0 <= in_valid; v1 <= v0; v2 <= v1;
      st0 <= step; st1 <= st0; st2 <= st1;
    end
  end

  always_ff @(posedge clk) begin
    x0    <= x;
    rsqr0 <= rsqr_in;
    ds0   <= dshift_in;
    sabc0 <= s_abc;
    ss0   <= static_shift;
    sh1   <= sh0;
    sh2   <= sh1;
  end

  // ReLU and the two step-selected operand muxes.
  logic [OPW-1:0] r0, opa, opb;
  sqm_relu u_relu (.x(x0), .r(r0));
  always_comb begin
    opa = (st0 == STEP2) ? sabc0 : r0;
    opb = (st0 == STEP2) ? rsqr0 : r0;
  end

  // Shift amount, computed beside the multiplier and delayed with it.
  sqm_subtractor u_sub (.static_shift(ss0), .dshift(ds0), .shift(sh0));

  // Shared multiplier: product two edges after stage 0.
  logic [PW-1:0] p;
  sqm_mult2s u_mult (.clk(clk), .a(opa), .b(opb), .p(p));

  // Step 1 back end: dynamic scaling.  Step 2 back end: final shift.
  logic [OPW-1:0] rsqr_c;
  logic [DSW-1:0] ds_c;
  logic [YW-1:0]  y_c;
  sqm_lod_lane u_lod (.sq(p), .rsqr(rsqr_c), .dshift(ds_c));
  sqm_rsh      u_rsh (.p(p), .shift(sh2), .y(y_c));

  assign sq       = p;
  assign sq_valid = v2 && (st2 == STEP1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsqr_out   <= '0;
      dshift_out <= '0;
      s1_valid   <= 1'b0;
      y          <= '0;
      y_valid    <= 1'b0;
    end else begin
      s1_valid <= v2 && (st2 == STEP1);
      y_valid  <= v2 && (st2 == STEP2);
      if (v2 && st2 == STEP1) begin
        rsqr_out   <= rsqr_c;
        dshift_out <= ds_c;
      end
      if (v2 && st2 == STEP2) y <= y_c;
    end
  end
endmodule
