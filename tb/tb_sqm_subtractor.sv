// tb_sqm_subtractor: exhaustive check of Shift = static_shift - dynamic_shift.
module tb_sqm_subtractor;
  int checks = 0, failures = 0;
  logic [5:0] ss, sh;
  logic [3:0] ds;
  sqm_subtractor dut (.static_shift(ss), .dshift(ds), .shift(sh));
  initial begin
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 16; b++) begin
        int e;
        ss = 6'(a); ds = 4'(b);
        #1;
        e = (a >= b) ? a - b : 0;
        checks++;
        if (int'(sh) != e) begin
          failures++;
          if (failures < 10) $display("FAIL %0d-%0d=%0d exp %0d", a, b, sh, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
