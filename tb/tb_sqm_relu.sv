// tb_sqm_relu: exhaustive check of the 16-bit ReLU against max(x, 0).
module tb_sqm_relu;
  int checks = 0, failures = 0;
  logic [15:0] x;
  logic [14:0] r;
  sqm_relu dut (.x, .r);
  initial begin
    for (int v = 0; v < 65536; v++) begin
      int exp_r;
      x = 16'(v);
      #1;
      exp_r = ($signed(x) > 0) ? int'($signed(x)) : 0;
      checks++;
      if (int'(r) != exp_r) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d r=%0d exp=%0d", $signed(x), r, exp_r);
      end
    end
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
