// sqm_pkg: widths and shared types of the Squaremax engine.
//
// Squaremax replaces exp(x) in Softmax by ReLU(x)^2 and replaces the final
// division by a multiply with 1/1.abc (three mantissa bits of the sum) and a
// right shift. The widths below are the ones of the engine: Q16.0 signed
// inputs, 15-bit ReLU outputs and multiplier operands, 30-bit squares, a
// 40-bit accumulator, 4-bit dynamic and 6-bit static shift amounts and Q1.15
// outputs. All of them follow the published architecture; only the lane
// count is a parameter of the top.
package sqm_pkg;
  localparam int unsigned XW    = 16;  // input x, Q16.0 signed
  localparam int unsigned OPW   = 15;  // multiplier operand / ReLU output / RSQR / S_abc
  localparam int unsigned PW    = 30;  // multiplier product
  localparam int unsigned ACCW  = 40;  // accumulator
  localparam int unsigned DSW   = 4;   // dynamic_shift
  localparam int unsigned SSW   = 6;   // static_shift and Shift(i)
  localparam int unsigned YW    = 16;  // Squaremax output, Q1.15 unsigned
  localparam int unsigned IDXW  = 3;   // decoder index abc

  // Step select of the shared multiplier (operand mux inputs 0 and 1).
  typedef enum logic {
    STEP1 = 1'b0,  // square ReLU(x) and accumulate
    STEP2 = 1'b1   // multiply RSQR by S_abc and shift
  } step_e;
endpackage
