// tb_sqm_lane: one lane fed one random element per cycle (with some idle
// cycles), switching randomly between Step 1 and Step 2 from one cycle to
// the next. Step 1 must return ReLU(x)^2 (three cycles after the beat) and
// RSQR/dynamic_shift (four cycles); Step 2 must return
// (RSQR * S_abc) >> (static_shift - dynamic_shift) four cycles after the
// beat. Also counts negative inputs, scaled squares and both steps.
module tb_sqm_lane;
  import sqm_pkg::*;
  import tb_sqm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  step_e step;
  logic [15:0] x;
  logic [14:0] rsqr_in, s_abc;
  logic [3:0]  dshift_in;
  logic [5:0]  static_shift;
  logic [29:0] sq;
  logic sq_valid, s1_valid, y_valid;
  logic [14:0] rsqr_out;
  logic [3:0]  dshift_out;
  logic [15:0] y;

  sqm_lane dut (.clk, .rst_n, .in_valid, .step, .x, .rsqr_in, .dshift_in, .s_abc,
                .static_shift, .sq, .sq_valid, .rsqr_out, .dshift_out, .s1_valid,
                .y, .y_valid);
  always #5 clk = ~clk;

  typedef struct { int cyc; bit s2; longint unsigned sq; int y; } exp_t;
  exp_t q[$];
  int cyc = 0;
  int n_neg = 0, n_scaled = 0, n_s1 = 0, n_s2 = 0;
  always @(posedge clk) cyc++;

  localparam int NBEATS = 4000;

  // Stimulus, applied at the falling edge.
  initial begin
    in_valid = 0; step = STEP1; x = 0; rsqr_in = 0; dshift_in = 0; s_abc = 0; static_shift = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NBEATS; i++) begin
      exp_t e;
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      step = step_e'($urandom_range(0, 1));
      x = 16'($urandom);
      rsqr_in = 15'($urandom);
      dshift_in = 4'($urandom);
      s_abc = 15'($urandom_range(16384, 32767));
      static_shift = 6'($urandom_range(0, 45));
      if (in_valid) begin
        e.cyc = cyc; e.s2 = (step == STEP2);
        if (!e.s2) begin
          e.sq = ref_square(x);
          if ($signed(x) < 0) n_neg++;
          if (ref_dshift(e.sq) > 0) n_scaled++;
          n_s1++;
          e.y = 0;
        end else begin
          automatic longint unsigned pr = longint'(rsqr_in) * longint'(s_abc);
          automatic int sh = int'(static_shift) - int'(dshift_in);
          if (sh < 0) sh = 0;
          pr = pr >> sh;
          e.y = (pr > 65535) ? 65535 : int'(pr);
          e.sq = 0;
          n_s2++;
        end
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    checks++;
    if (n_neg == 0 || n_scaled == 0 || n_s1 == 0 || n_s2 == 0) begin
      failures++; $display("FAIL coverage neg=%0d scaled=%0d s1=%0d s2=%0d", n_neg, n_scaled, n_s1, n_s2);
    end
    $display("lane: step1=%0d step2=%0d negative=%0d scaled=%0d", n_s1, n_s2, n_neg, n_scaled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker, sampling after each rising edge settles.
  longint unsigned sq_hist[int];
  always @(negedge clk) if (rst_n) begin
    if (sq_valid) sq_hist[cyc] = longint'(sq);
    if (s1_valid || y_valid) begin
      exp_t e;
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected output at %0d", cyc);
      end else begin
        e = q.pop_front();
        checks++;
        if (cyc - e.cyc != 4 || s1_valid != !e.s2 || y_valid != e.s2) begin
          failures++; $display("FAIL latency %0d / kind at %0d", cyc - e.cyc, cyc);
        end else if (!e.s2) begin
          checks++;
          if (!sq_hist.exists(cyc - 1) || sq_hist[cyc - 1] != e.sq ||
              int'(rsqr_out) != ref_rsqr(e.sq) || int'(dshift_out) != ref_dshift(e.sq)) begin
            failures++;
            if (failures < 10) $display("FAIL step1 sq=%h rsqr=%h ds=%0d", e.sq, rsqr_out, dshift_out);
          end
        end else begin
          checks++;
          if (int'(y) != e.y) begin
            failures++;
            if (failures < 10) $display("FAIL step2 y=%0d exp=%0d", y, e.y);
          end
        end
      end
    end
  end

  initial begin
    repeat (NBEATS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
