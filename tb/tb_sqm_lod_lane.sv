// tb_sqm_lod_lane: dynamic scaling of 30-bit squares; every leading-one
// position 0..29 plus random values.
module tb_sqm_lod_lane;
  import tb_sqm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [29:0] sq;
  logic [14:0] rsqr;
  logic [3:0]  ds;
  sqm_lod_lane dut (.sq, .rsqr, .dshift(ds));
  task automatic check(longint unsigned v);
    sq = 30'(v);
    #1;
    checks++;
    if (int'(ds) != ref_dshift(v) || int'(rsqr) != ref_rsqr(v)) begin
      failures++;
      if (failures < 10)
        $display("FAIL sq=%h rsqr=%h ds=%0d exp %h %0d", v, rsqr, ds, ref_rsqr(v), ref_dshift(v));
    end
  endtask
  initial begin
    check(0);
    for (int k = 0; k < 30; k++) begin
      check(64'd1 << k);
      check((64'd1 << (k + 1)) - 1);
      check((64'd1 << k) | (longint'($urandom) & ((64'd1 << k) - 1)));
    end
    for (int i = 0; i < 20000; i++) check(longint'($urandom) >> $urandom_range(2, 31));
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
