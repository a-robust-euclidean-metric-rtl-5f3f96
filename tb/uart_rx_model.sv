// uart_rx_model: simulation-only 8N1 receiver used by the testbenches to
// decode a serial line. It waits for a falling edge, samples each bit in the
// middle of its DIV-cycle slot, checks the stop bit and pulses `got` with the
// byte. `bit_err` pulses when a stop bit is not 1.
`timescale 1ns / 1ps
module uart_rx_model #(
  parameter int unsigned DIV = 4
) (
  input  logic       clk,
  input  logic       rxd,
  output logic       got,
  output logic [7:0] data,
  output logic       bit_err
);
  initial begin
    got = 1'b0; bit_err = 1'b0; data = '0;
  end

  always begin
    @(negedge rxd);
    @(posedge clk);
    repeat (DIV / 2) @(posedge clk);
    for (int b = 0; b < 8; b++) begin
      repeat (DIV) @(posedge clk);
      data[b] = rxd;
    end
    repeat (DIV) @(posedge clk);
    bit_err = !rxd;
    got = 1'b1;
    @(posedge clk);
    got = 1'b0;
    bit_err = 1'b0;
  end
endmodule
