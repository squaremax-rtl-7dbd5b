// tb_sqm_decoder: all 8 entries against S = min(32767, round(2^15/(1+abc/8))).
module tb_sqm_decoder;
  import tb_sqm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0]  abc;
  logic [14:0] s;
  sqm_decoder dut (.abc, .s_abc(s));
  initial begin
    for (int k = 0; k < 8; k++) begin
      abc = 3'(k);
      #1;
      checks++;
      if (int'(s) != ref_s(k)) begin
        failures++;
        $display("FAIL abc=%0d s=%0d exp=%0d", k, s, ref_s(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
