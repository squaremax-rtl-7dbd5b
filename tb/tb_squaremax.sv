// tb_squaremax: end-to-end test of the Squaremax engine at its default size
// (8 lanes). Each vector is run as the engine is meant to be used: Step 1
// beats back to back (first/last framed, tail padded with zeros), RSQR and
// dynamic_shift collected from the outputs, then fed back as Step 2 beats
// once coef_valid is up. Checked against a bit-exact reference model:
//   - every RSQR/dynamic_shift, S_abc, static_shift and Q1.15 output;
//   - every output against the exact ratio 2^15 * ReLU(x)^2 / D, within the
//     error the 3-bit reciprocal index allows (at most +12.5 %);
//   - timing: one beat per cycle in both steps, lane results 4 cycles after
//     their beat, S_abc/static_shift 6 cycles after the last Step 1 beat.
// Vector lengths include attention rows of DeiT-Tiny (197) and Swin-Tiny
// windows (49), a 1000-class classifier output and the maximum N = 8192.
// Each mechanism is counted and must happen at least once: ReLU clamping,
// dynamic scaling (shift > 0 and = 0), multi-beat accumulation, every
// decoder entry, Step 1 / Step 2 switching, a new vector's Step 1 directly
// after the previous Step 2 (the two overlap in the pipeline), accumulator
// saturation and an all-zero sum.
module tb_squaremax;
  import sqm_pkg::*;
  import tb_sqm_ref_pkg::*;

  localparam int LANES = 8;
  localparam int NMAX  = 8192;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, first, last;
  step_e step;
  logic [LANES-1:0][15:0] x;
  logic [LANES-1:0][14:0] rsqr_in, rsqr_out;
  logic [LANES-1:0][3:0]  dshift_in, dshift_out;
  logic [LANES-1:0][15:0] y;
  logic s1_valid, y_valid, coef_valid, acc_sat;
  logic [14:0] s_abc;
  logic [5:0]  static_shift;

  squaremax dut (.clk, .rst_n, .in_valid, .step, .first, .last, .x, .rsqr_in, .dshift_in,
                 .rsqr_out, .dshift_out, .s1_valid, .y, .y_valid, .s_abc, .static_shift,
                 .coef_valid, .acc_sat);
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  // Vector storage.
  logic [15:0] xv [NMAX];
  logic [14:0] rs [NMAX];
  logic [3:0]  ds [NMAX];
  int          in_cyc [NMAX/LANES];

  // Mechanism counters.
  int n_relu = 0, n_scaled = 0, n_unscaled = 0, n_multibeat = 0, n_switch = 0, n_b2b = 0;
  int pending = 0;  // Step 2 checks still running
  int n_sat = 0, n_zero = 0;
  bit abc_seen [8];
  int n_vec = 0;

  // Output collectors.
  int s1_cnt = 0, y_cnt = 0, coef_cyc = 0;
  logic [LANES-1:0][15:0] ybuf [NMAX/LANES];
  int          s1_out_cyc [NMAX/LANES];
  int          y_out_cyc  [NMAX/LANES];
  always @(negedge clk) if (rst_n) begin
    if (s1_valid) begin
      for (int l = 0; l < LANES; l++) begin
        rs[s1_cnt*LANES + l] = rsqr_out[l];
        ds[s1_cnt*LANES + l] = dshift_out[l];
      end
      s1_out_cyc[s1_cnt] = cyc;
      s1_cnt++;
    end
    if (y_valid) begin
      ybuf[y_cnt] = y;
      y_out_cyc[y_cnt] = cyc;
      y_cnt++;
    end
  end

  function automatic logic [15:0] gen_x(int mode);
    case (mode)
      0: return 16'($urandom);                                  // full range, half negative
      1: return 16'(int'($urandom_range(0, 400)) - 200);        // small values
      2: return 16'(-int'($urandom_range(1, 32768)));           // all non-positive
      3: return 16'h7FFF;                                       // maximum
      default: return 16'(int'($urandom_range(0, 8000)) - 1000);
    endcase
  endfunction

  task automatic check_step2(int vec, int beats, longint unsigned d, bit of,
                             longint unsigned sqv[], int in2[]);
    int guard = 0;
    while (y_cnt < beats && guard < 20) begin @(negedge clk); guard++; end
    checks++;
    if (y_cnt != beats) begin failures++; $display("FAIL vec %0d: %0d step-2 beats out, %0d in (cycle %0d, guard %0d)", vec, y_cnt, beats, cyc, guard); end
    for (int b = 0; b < beats && b < y_cnt; b++) begin
      checks++;
      if (y_out_cyc[b] - in2[b] != 4) begin
        failures++;
        if (failures < 20) $display("FAIL vec %0d: step-2 beat %0d latency %0d", vec, b, y_out_cyc[b] - in2[b]);
      end
      for (int l = 0; l < LANES; l++) begin
        int i = b*LANES + l;
        int e = ref_y(sqv[i], d);
        int got = int'(ybuf[b][l]);
        checks++;
        if (got != e) begin
          failures++;
          if (failures < 20) $display("FAIL vec %0d elem %0d: y %0d exp %0d", vec, i, got, e);
        end
        if (!of && d != 0) begin
          real t = 32768.0 * real'(sqv[i]) / real'(d);
          checks++;
          if (real'(got) > t * 1.1251 + 1.0 || real'(got) < t * 0.9997 - 1.5) begin
            failures++;
            if (failures < 20) $display("FAIL vec %0d elem %0d: y %0d far from exact %f", vec, i, got, t);
          end
        end
      end
    end
    pending--;
  endtask

  task automatic run_vector(int n, int mode, bit back_to_back = 0);
    int beats = (n + LANES - 1) / LANES;
    longint unsigned sqv[] = new[beats * LANES];
    int in2[] = new[beats];
    longint unsigned d = 0;
    bit of = 0;
    int last_cyc;
    n_vec++;
    for (int i = 0; i < beats * LANES; i++) begin
      xv[i] = (i < n) ? gen_x(mode) : 16'h0000;
      d += ref_square(xv[i]);
      if (i < n && $signed(xv[i]) < 0) n_relu++;
    end
    if (d > 64'hFF_FFFF_FFFF) begin of = 1; d = 64'hFF_FFFF_FFFF; end

    // Step 1, beats back to back.
    s1_cnt = 0;
    for (int b = 0; b < beats; b++) begin
      @(negedge clk);
      if (b == 0 && step == STEP2 && in_valid) n_b2b++;
      in_valid = 1; step = STEP1; first = (b == 0); last = (b == beats - 1);
      for (int l = 0; l < LANES; l++) x[l] = xv[b*LANES + l];
      in_cyc[b] = cyc;
    end
    last_cyc = cyc;
    @(negedge clk); in_valid = 0; first = 0; last = 0;
    while (!coef_valid) @(negedge clk);
    coef_cyc = cyc;
    if (beats > 1) n_multibeat++;

    // Step 1 results: count, timing, values.
    checks++;
    if (s1_cnt != beats) begin failures++; $display("FAIL vec %0d: %0d step-1 beats out, %0d in", n_vec, s1_cnt, beats); end
    for (int b = 0; b < beats && b < s1_cnt; b++) begin
      checks++;
      if (s1_out_cyc[b] - in_cyc[b] != 4) begin
        failures++;
        if (failures < 20) $display("FAIL vec %0d: step-1 beat %0d latency %0d", n_vec, b, s1_out_cyc[b] - in_cyc[b]);
      end
    end
    for (int i = 0; i < beats * LANES; i++) begin
      longint unsigned sq = ref_square(xv[i]);
      if (sq != 0 && ref_dshift(sq) > 0) n_scaled++;
      if (sq != 0 && ref_dshift(sq) == 0) n_unscaled++;
      checks++;
      if (int'(rs[i]) != ref_rsqr(sq) || int'(ds[i]) != ref_dshift(sq)) begin
        failures++;
        if (failures < 20) $display("FAIL vec %0d elem %0d: rsqr %0d ds %0d exp %0d %0d", n_vec, i, rs[i], ds[i], ref_rsqr(sq), ref_dshift(sq));
      end
    end

    // Coefficients: value and latency.
    checks++;
    if (coef_cyc - last_cyc != 6) begin failures++; $display("FAIL vec %0d: coefficients %0d cycles after last beat", n_vec, coef_cyc - last_cyc); end
    checks++;
    if (int'(static_shift) != ref_n(d) || int'(s_abc) != ref_s(ref_abc(d)) || acc_sat != of) begin
      failures++;
      $display("FAIL vec %0d: D=%h static_shift %0d S %0d sat %0b, exp %0d %0d %0b", n_vec, d,
               static_shift, s_abc, acc_sat, ref_n(d), ref_s(ref_abc(d)), of);
    end
    if (d != 0) abc_seen[ref_abc(d)] = 1;
    if (of) n_sat++;
    if (d == 0) n_zero++;

    // Step 2, beats back to back. Its results are checked by a separate
    // process so that the next vector's Step 1 can follow without a gap when
    // back_to_back is set.
    y_cnt = 0;
    for (int b = 0; b < beats; b++) begin
      @(negedge clk);
      if (b == 0 && step == STEP1) n_switch++;
      in_valid = 1; step = STEP2;
      for (int l = 0; l < LANES; l++) begin
        rsqr_in[l]   = rs[b*LANES + l];
        dshift_in[l] = ds[b*LANES + l];
        x[l]         = 16'($urandom);  // ignored in Step 2
      end
      in2[b] = cyc;
    end
    for (int i = 0; i < beats * LANES; i++) sqv[i] = ref_square(xv[i]);
    pending++;
    fork
      check_step2(n_vec, beats, d, of, sqv, in2);
    join_none
    if (!back_to_back) begin
      @(negedge clk); in_valid = 0;
      while (pending != 0) @(negedge clk);
    end
  endtask

  initial begin
    in_valid = 0; step = STEP1; first = 0; last = 0;
    x = '0; rsqr_in = '0; dshift_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_vector(1, 0);
    run_vector(8, 1);
    run_vector(49, 0);      // Swin-Tiny 7x7 attention window
    run_vector(197, 0);     // DeiT-Tiny attention row
    run_vector(1000, 4);    // ImageNet-1K classifier output
    run_vector(NMAX, 0);    // largest vector
    run_vector(37, 2);      // all negative: zero sum
    run_vector(1200, 3);    // 1200 x 32767^2 > 2^40: saturates
    for (int v = 0; v < 40; v++) run_vector(int'($urandom_range(1, 300)), v % 5 == 2 ? 1 : v % 5, v[0]);
    @(negedge clk); in_valid = 0;
    while (pending != 0) @(negedge clk);
    $display("mechanisms: relu=%0d scaled=%0d unscaled=%0d multibeat=%0d switch=%0d back_to_back=%0d sat=%0d zero_sum=%0d",
             n_relu, n_scaled, n_unscaled, n_multibeat, n_switch, n_b2b, n_sat, n_zero);
    checks++;
    if (n_relu == 0 || n_scaled == 0 || n_unscaled == 0 || n_multibeat == 0 || n_switch == 0 ||
        n_b2b == 0 || n_sat == 0 || n_zero == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (!abc_seen[k]) begin failures++; $display("FAIL decoder entry %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
