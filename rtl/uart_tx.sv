// uart_tx: serial transmitter, 8 data bits, no parity, one stop bit.
//
// A byte is accepted when `valid` and `ready` are both high. The line then
// carries a start bit (0), the eight data bits LSB first and a stop bit (1),
// each lasting CLK_HZ/BAUD clock cycles (rounded down). `ready` is high only
// while idle, so a new byte is taken one cycle after the stop bit ends. The
// line idles high. Format and rate are this design's choice.
`timescale 1ps / 1ps
module uart_tx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200,
  localparam int unsigned DIV = (CLK_HZ / BAUD > 0) ? CLK_HZ / BAUD : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  logic [9:0]  shreg;   // stop, data[7:0], start; shifted out LSB first
  logic [3:0]  bits_left;
  logic [31:0] baud_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      baud_cnt  <= '0;
    end else if (bits_left == 0) begin
      if (valid) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        baud_cnt  <= '0;
      end
    end else if (baud_cnt == DIV - 1) begin
      baud_cnt  <= '0;
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 1'b1;
    end else begin
      baud_cnt <= baud_cnt + 1;
    end
  end

  assign ready = (bits_left == 0);
  assign txd   = (bits_left == 0) ? 1'b1 : shreg[0];

endmodule
