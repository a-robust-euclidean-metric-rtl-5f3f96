// neighbor_diff_tb: random and edge-case operand pairs; the result must be
// the exact difference when it fits, and the clamped extreme with sat=1 when
// it does not (K=24 with M=24, and K=8 with M=24).
`timescale 1ns / 1ps
module neighbor_diff_tb;
  int checks = 0, failures = 0;
  logic [23:0] a, b;
  logic signed [23:0] d24;
  logic signed [7:0]  d8;
  logic s24, s8;

  neighbor_diff #(.M_BITS(24), .K_BITS(24)) dut24 (.f_a(a), .f_b(b), .delta(d24), .sat(s24));
  neighbor_diff #(.M_BITS(24), .K_BITS(8))  dut8  (.f_a(a), .f_b(b), .delta(d8),  .sat(s8));

  task automatic one(input logic [23:0] x, input logic [23:0] y);
    longint e, e24, e8;
    a = x; b = y;
    #1;
    e   = longint'(x) - longint'(y);
    e24 = (e > 8388607) ? 8388607 : (e < -8388608) ? -8388608 : e;
    e8  = (e > 127) ? 127 : (e < -128) ? -128 : e;
    checks += 4;
    if (longint'(d24) != e24) begin failures++; $display("FAIL: 24 %0d-%0d=%0d", x, y, d24); end
    if (s24 != (e24 != e))    begin failures++; $display("FAIL: sat24"); end
    if (longint'(d8) != e8)   begin failures++; $display("FAIL: 8 %0d-%0d=%0d", x, y, d8); end
    if (s8 != (e8 != e))      begin failures++; $display("FAIL: sat8"); end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    one(24'd0, 24'd0);
    one(24'hFFFFFF, 24'd0);
    one(24'd0, 24'hFFFFFF);
    one(24'd1_144_800, 24'd1_143_500);
    one(24'd100, 24'd227);
    one(24'd100, 24'd228);
    one(24'd228, 24'd100);
    one(24'd227, 24'd100);
    for (int t = 0; t < 300; t++) one(24'($urandom), 24'($urandom));
    for (int t = 0; t < 300; t++) begin
      logic [23:0] x;
      x = 24'($urandom_range(2_000_000, 1_000_000));
      one(x, x + 24'($urandom_range(300, 0)) - 24'd150);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
