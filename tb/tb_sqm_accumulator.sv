// tb_sqm_accumulator: random vectors of random length, with idle cycles
// between beats, back-to-back vectors and one vector that overflows 40 bits.
// Checks the sum, the sticky saturation flag and that done comes exactly two
// cycles after the last beat.
module tb_sqm_accumulator;
  localparam int LANES = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic en, clr, last;
  logic [LANES-1:0][29:0] sq;
  logic [39:0] acc;
  logic sat, done;
  sqm_accumulator dut (.clk, .rst_n, .en, .clr, .last, .sq, .acc, .sat, .done);
  always #5 clk = ~clk;

  int cyc = 0, last_cyc = 0, done_cyc = 0;
  always @(posedge clk) cyc++;

  task automatic run_vector(int beats, bit big, bit gaps);
    longint unsigned sum = 0;
    bit of = 0;
    for (int bt = 0; bt < beats; bt++) begin
      @(negedge clk);
      en = 1; clr = (bt == 0); last = (bt == beats - 1);
      for (int l = 0; l < LANES; l++) begin
        sq[l] = big ? 30'h3FFF_FFFF : 30'($urandom);
        sum += longint'(sq[l]);
      end
      if (sum > 64'hFF_FFFF_FFFF) begin of = 1; sum = 64'hFF_FFFF_FFFF; end
      if (last) last_cyc = cyc;
      if (gaps && ($urandom_range(0, 3) == 0)) begin
        @(negedge clk); en = 0; clr = 0; last = 0; sq = '0;  // idle beat
      end
    end
    @(negedge clk); en = 0; clr = 0; last = 0;
    while (!done) @(negedge clk);
    done_cyc = cyc;
    checks++;
    if (longint'(acc) != sum || sat != of) begin
      failures++;
      $display("FAIL beats=%0d acc=%h exp=%h sat=%0b exp=%0b", beats, acc, sum, sat, of);
    end
    checks++;
    if (done_cyc - last_cyc != 2) begin
      failures++;
      $display("FAIL done %0d cycles after last beat, expected 2", done_cyc - last_cyc);
    end
  endtask

  initial begin
    en = 0; clr = 0; last = 0; sq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 40; v++) run_vector(int'($urandom_range(1, 60)), 0, v[0]);
    run_vector(600, 1, 0);   // 4800 x (2^30-1) > 2^40: saturates
    run_vector(3, 0, 0);     // flag clears with the next vector
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
