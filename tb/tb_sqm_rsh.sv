// tb_sqm_rsh: random and corner checks of the 30-bit right shifter with
// 16-bit clamped output.
module tb_sqm_rsh;
  int checks = 0, failures = 0;
  logic [29:0] p;
  logic [5:0]  sh;
  logic [15:0] y;
  sqm_rsh dut (.p, .shift(sh), .y);
  task automatic check(longint unsigned pv, int s);
    longint unsigned e;
    p = 30'(pv); sh = 6'(s);
    #1;
    e = (s >= 30) ? 0 : (pv >> s);
    if (e > 65535) e = 65535;
    checks++;
    if (longint'(y) != e) begin
      failures++;
      if (failures < 10) $display("FAIL p=%0d sh=%0d y=%0d exp=%0d", pv, s, y, e);
    end
  endtask
  initial begin
    for (int s = 0; s < 64; s++) begin
      check(64'h3FFF_FFFF, s);
      check(64'h0000_0001, s);
      check(64'h2000_0000, s);
    end
    for (int i = 0; i < 20000; i++) check(longint'($urandom) & 64'h3FFF_FFFF, int'($urandom_range(0, 40)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
