// uart_tx_tb: sends random bytes at DIV = CLK_HZ/BAUD = 8 clocks per bit and
// decodes the line bit by bit: start bit low, data LSB first, stop bit high,
// each bit exactly DIV cycles; ready must be low while a byte is on the line
// and the line must idle high.
`timescale 1ns / 1ps
module uart_tx_tb;
  localparam int DIV = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [7:0] data = '0;
  logic ready, txd;

  always #5 clk = ~clk;

  uart_tx #(.CLK_HZ(800), .BAUD(100)) dut (.clk(clk), .rst_n(rst_n), .valid(valid), .data(data), .ready(ready), .txd(txd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(txd && ready, "idle high and ready");
    for (int t = 0; t < 40; t++) begin
      b = 8'($urandom);
      @(negedge clk);
      valid = 1'b1; data = b;
      @(negedge clk);
      valid = 1'b0; data = ~b;
      // the start bit began at the edge just passed; sample each bit at its middle
      for (int k = 0; k < 10; k++) begin
        logic exp_bit;
        exp_bit = (k == 0) ? 1'b0 : (k == 9) ? 1'b1 : b[k-1];
        for (int c = 0; c < DIV; c++) begin
          check(txd == exp_bit, $sformatf("byte %02x bit %0d cycle %0d", b, k, c));
          if (k < 9 || c < DIV - 1) check(!ready, "busy while sending");
          @(negedge clk);
        end
      end
      check(ready && txd, "ready after stop bit");
      repeat ($urandom_range(3, 0)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
