// tb_sqm_lod_acc: leading-one detection on the 40-bit sum; every leading-one
// position, zero and random sums, against D = 1.abc x 2^n.
module tb_sqm_lod_acc;
  import tb_sqm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [39:0] acc;
  logic [2:0]  abc;
  logic [5:0]  ss;
  sqm_lod_acc dut (.acc, .abc, .static_shift(ss));
  task automatic check(longint unsigned v);
    acc = 40'(v);
    #1;
    checks++;
    if (int'(ss) != ref_n(v) || int'(abc) != ref_abc(v)) begin
      failures++;
      if (failures < 10)
        $display("FAIL acc=%h n=%0d abc=%0d exp %0d %0d", v, ss, abc, ref_n(v), ref_abc(v));
    end
  endtask
  initial begin
    check(0);
    for (int k = 0; k < 40; k++) begin
      check(64'd1 << k);
      check((64'd1 << (k + 1)) - 1);
      for (int a = 0; a < 8; a++)
        if (k >= 3) check((64'd1 << k) | (longint'(a) << (k - 3)));
    end
    for (int i = 0; i < 20000; i++)
      check((longint'({$urandom, $urandom}) & 64'hFF_FFFF_FFFF) >> $urandom_range(0, 39));
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
