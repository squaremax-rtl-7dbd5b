// tb_sqm_mult2s: back-to-back random operands (plus corners) into the
// two-stage multiplier; every product must appear exactly two cycles later.
module tb_sqm_mult2s;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic [14:0] a, b;
  logic [29:0] p;
  longint unsigned expq[$];
  sqm_mult2s dut (.clk, .a, .b, .p);
  always #5 clk = ~clk;

  localparam int NOPS = 5000;
  initial begin
    a = 0; b = 0;
    for (int i = 0; i < NOPS + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        automatic longint unsigned e = expq.pop_front();
        checks++;
        if (longint'(p) != e) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d p=%0d exp=%0d", i, p, e);
        end
      end
      if (i < 4)        begin a = '1; b = '1; end
      else if (i < 6)   begin a = 0;  b = '1; end
      else begin a = 15'($urandom); b = 15'($urandom); end
      expq.push_back(longint'(a) * longint'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NOPS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
