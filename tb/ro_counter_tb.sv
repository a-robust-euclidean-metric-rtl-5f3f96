// ro_counter_tb: a system clock of 20 ns opens a window of W cycles; the ring
// clock runs at a chosen period. The count must equal W*20ns/period within
// +-1 (the quantisation of the window edges), must not change after the
// window closes, must clear on clr, and a narrow counter must saturate.
`timescale 1ps / 1ps
module ro_counter_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, ro_clk = 1'b0;
  logic clr = 1'b1, gate = 1'b0;
  logic [23:0] count;
  logic [3:0]  count4;
  int ro_half = 7000;

  always #10_000 clk = ~clk;
  always #(ro_half) ro_clk = ~ro_clk;

  ro_counter #(.M_BITS(24)) dut  (.ro_clk(ro_clk), .clr(clr), .gate(gate), .count(count));
  ro_counter #(.M_BITS(4))  dut4 (.ro_clk(ro_clk), .clr(clr), .gate(gate), .count(count4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic window(input int w, input int half);
    longint exp_c;
    logic [23:0] held;
    ro_half = half;
    @(posedge clk); clr <= 1'b1;
    repeat (4) @(posedge clk);
    check(count == 0, "cleared");
    clr <= 1'b0;
    repeat (4) @(posedge clk);
    gate <= 1'b1;
    repeat (w) @(posedge clk);
    gate <= 1'b0;
    repeat (8) @(posedge clk);
    exp_c = (longint'(w) * 20_000) / (2 * half);
    check(longint'(count) >= exp_c - 1 && longint'(count) <= exp_c + 1,
          $sformatf("w=%0d half=%0d count=%0d exp=%0d", w, half, count, exp_c));
    held = count;
    repeat (20) @(posedge clk);
    check(count == held, "count stable after window");
  endtask

  initial begin : watchdog
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    window(1000, 7000);
    window(1000, 8735);
    window(333, 4000);
    window(2000, 9999);
    check(count4 == 4'hF, "4-bit counter saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
