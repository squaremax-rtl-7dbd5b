// sqm_decoder: reciprocal decoder of the division-to-multiplication step.
//
// The sum D is written as 1.abc x 2^n. Dividing by 1.abc is replaced by a
// multiply with S_abc = 1/1.abc, an unsigned Q0.15 fraction on 15 bits:
// S_abc = round(2^15 * 8 / (8 + abc)). For abc = 0 the exact value 1.0 does
// not fit in Q0.15 and is replaced by the largest code, 32767. The 8 entries
// are fixed constants, a small read-only table that needs no storage to be
// loaded. Bit 14 is set in every entry, so synthesis keeps it as a constant.
// Combinational. The 3-bit index and 15-bit output follow the
// published design; the Q0.15 scaling and the rounding are this design's
// choice.
module sqm_decoder
  import sqm_pkg::*;
(
  input  logic [IDXW-1:0] abc,
  output logic [OPW-1:0]  s_abc
);
  always_comb begin
    unique case (abc)
      3'd0: s_abc = 15'd32767;  // 1/1.000 = 1.0, clamped
      3'd1: s_abc = 15'd29127;  // 1/1.125
      3'd2: s_abc = 15'd26214;  // 1/1.250
      3'd3: s_abc = 15'd23831;  // 1/1.375
      3'd4: s_abc = 15'd21845;  // 1/1.500
      3'd5: s_abc = 15'd20165;  // 1/1.625
      3'd6: s_abc = 15'd18725;  // 1/1.750
      3'd7: s_abc = 15'd17476;  // 1/1.875
      default: s_abc = '0;
    endcase
  end
endmodule
