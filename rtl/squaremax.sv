// squaremax: LANES-wide Squaremax engine, a hardware-friendly Softmax.
//
// Squaremax(x_i) = ReLU(x_i)^2 / sum_j ReLU(x_j)^2. A vector of N elements
// (N up to 8192, fed LANES elements per beat, zero- or negative-padded at the
// end) is processed in two passes over the same LANES lanes:
//   Step 1: each lane squares ReLU(x); the squares of all lanes are summed
//     into a 40-bit accumulator, and each lane returns RSQR (square scaled to
//     15 bits) and dynamic_shift, which the user stores (they are outputs, not
//     kept inside). Mark the first beat with first and the last with last.
//     Six cycles after the last beat was presented, the leading-one detector
//     and the decoder have turned the sum D = 1.abc x 2^n into S_abc = 1/1.abc
//     and static_shift = n, held in registers (coef_valid).
//   Step 2: the stored RSQR and dynamic_shift are fed back; each lane
//     multiplies RSQR by S_abc with the same multiplier and shifts the
//     product right by static_shift - dynamic_shift, giving Q1.15 outputs.
// Interface: a beat is taken whenever in_valid is high, one per cycle, with
// no back-pressure. Lane outputs are registered: Step 1 results (s1_valid)
// and Step 2 results (y_valid) appear 4 cycles after their beat.
// The algorithm, the lane structure and the widths follow the published
// architecture. The beat framing (first/last), the coefficient registers,
// the accumulator saturation (acc_sat) and the pipeline registers around
// the two-stage multiplier are this design's choices.
module squaremax
  import sqm_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  step_e                     step,
  input  logic                      first,        // Step 1: first beat of a vector
  input  logic                      last,         // Step 1: last beat of a vector
  input  logic [LANES-1:0][XW-1:0]  x,
  input  logic [LANES-1:0][OPW-1:0] rsqr_in,
  input  logic [LANES-1:0][DSW-1:0] dshift_in,
  output logic [LANES-1:0][OPW-1:0] rsqr_out,
  output logic [LANES-1:0][DSW-1:0] dshift_out,
  output logic                      s1_valid,
  output logic [LANES-1:0][YW-1:0]  y,
  output logic                      y_valid,
  output logic [OPW-1:0]            s_abc,
  output logic [SSW-1:0]            static_shift,
  output logic                      coef_valid,
  output logic                      acc_sat
);
  // Lanes.
  logic [LANES-1:0][PW-1:0] sq;
  logic [LANES-1:0]         sq_valid, s1v, yv;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    sqm_lane u_lane (
      .clk, .rst_n, .in_valid, .step,
      .x(x[l]), .rsqr_in(rsqr_in[l]), .dshift_in(dshift_in[l]),
      .s_abc, .static_shift,
      .sq(sq[l]), .sq_valid(sq_valid[l]),
      .rsqr_out(rsqr_out[l]), .dshift_out(dshift_out[l]), .s1_valid(s1v[l]),
      .y(y[l]), .y_valid(yv[l])
    );
  end
  assign s1_valid = s1v[0];
  assign y_valid  = yv[0];

  // first/last travel with the beat to the lane products (three edges).
  logic [2:0] first_d, last_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_d <= '0;
      last_d  <= '0;
    end else begin
      first_d <= {first_d[1:0], in_valid && step == STEP1 && first};
      last_d  <= {last_d[1:0],  in_valid && step == STEP1 && last};
    end
  end

  // Accumulator, leading-one detector and decoder.
  logic [ACCW-1:0] acc;
  logic            acc_done;
  logic [IDXW-1:0] abc_c;
  logic [SSW-1:0]  ss_c;
  logic [OPW-1:0]  sabc_c;

  sqm_accumulator #(.LANES(LANES)) u_acc (
    .clk, .rst_n, .en(sq_valid[0]), .clr(first_d[2]), .last(last_d[2]),
    .sq, .acc, .sat(acc_sat), .done(acc_done)
  );
  sqm_lod_acc u_lod (.acc, .abc(abc_c), .static_shift(ss_c));
  sqm_decoder u_dec (.abc(abc_c), .s_abc(sabc_c));

  // Coefficient registers for Step 2.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_abc        <= '0;
      static_shift <= '0;
      coef_valid   <= 1'b0;
    end else if (acc_done) begin
      s_abc        <= sabc_c;
      static_shift <= ss_c;
      coef_valid   <= 1'b1;
    end else if (in_valid && step == STEP1 && first) begin
      coef_valid   <= 1'b0;
    end
  end

  // Step 2 uses the coefficients of the last completed Step 1.
  a_step2_needs_coef: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && step == STEP2) |-> coef_valid)
    else $error("Step 2 beat before the sum of squares is ready");
  // All lanes run in lock step.
  a_lanes_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (sq_valid == {LANES{sq_valid[0]}}) && (s1v == {LANES{s1v[0]}}) && (yv == {LANES{yv[0]}}))
    else $error("lanes out of step");
  a_frame_in_step1: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && (first || last)) |-> step == STEP1)
    else $error("first/last marks Step 1 beats only");
endmodule
