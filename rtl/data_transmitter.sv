// data_transmitter: serial readout of one sample to the host.
//
// On `start` it sends one frame through uart_tx:
//   byte 0      header: 8'hA5 for an ID sample, 8'h5A for raw counts
//   byte 1      sample number
//   bytes 2...  the words, each most significant byte first in ceil(W/8)
//               bytes (sign or zero bits fill the top of the first byte):
//               raw_mode=1: the N_RO ring counts (W = M_BITS),
//               raw_mode=0: the N_RO-1 ID elements (W = K_BITS).
// `raw_mode` and `sample_idx` are taken at `start`. The words are read
// directly from `freq` / `id`, which must stay unchanged until `busy` falls
// (the sequencer guarantees this by waiting for the readout). `busy` is high
// from the `start` cycle until the stop bit of the last byte is on the line.
// The frame layout is this design's choice.
`timescale 1ps / 1ps
module data_transmitter
  import puf_pkg::*;
#(
  parameter int unsigned N_RO   = 32,
  parameter int unsigned M_BITS = 24,
  parameter int unsigned K_BITS = 24,
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200,
  localparam int unsigned N_ID = N_RO - 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     raw_mode,
  input  logic [7:0]               sample_idx,
  input  logic [M_BITS-1:0]        freq [N_RO],
  input  logic signed [K_BITS-1:0] id   [N_ID],
  output logic                     busy,
  output logic                     txd
);

  localparam int unsigned MB = (M_BITS + 7) / 8;
  localparam int unsigned KB = (K_BITS + 7) / 8;

  typedef enum logic [1:0] {T_IDLE, T_HDR, T_IDX, T_WORD} tstate_e;

  tstate_e     state;
  logic        raw_q;
  logic [7:0]  idx_q;
  logic [7:0]  word;      // word number
  logic [3:0]  byte_n;    // byte within the word, 0 = most significant
  logic        draining;  // all bytes handed over, waiting for the line
  logic        u_valid, u_ready;
  logic [7:0]  u_data;

  logic [8*MB-1:0] f_word;
  logic [8*KB-1:0] k_word;

  always_comb begin
    f_word = '0;
    k_word = '0;
    for (int i = 0; i < N_RO; i++)
      if (word == 8'(i)) f_word = (8 * MB)'(freq[i]);
    for (int i = 0; i < N_ID; i++)
      if (word == 8'(i)) k_word = (8 * KB)'($signed(id[i]));
  end

  always_comb begin
    u_data = 8'h00;
    case (state)
      T_HDR:   u_data = raw_q ? HDR_RAW : HDR_ID;
      T_IDX:   u_data = idx_q;
      T_WORD:  begin
        if (raw_q) begin
          for (int b = 0; b < MB; b++)
            if (byte_n == 4'(b)) u_data = f_word[8*(MB-1-b) +: 8];
        end else begin
          for (int b = 0; b < KB; b++)
            if (byte_n == 4'(b)) u_data = k_word[8*(KB-1-b) +: 8];
        end
      end
      default: u_data = 8'h00;
    endcase
  end

  assign u_valid = (state != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      raw_q    <= 1'b0;
      idx_q    <= '0;
      word     <= '0;
      byte_n   <= '0;
      draining <= 1'b0;
    end else begin
      if (draining && u_ready) draining <= 1'b0;
      case (state)
        T_IDLE: if (start && !draining) begin
          raw_q  <= raw_mode;
          idx_q  <= sample_idx;
          word   <= '0;
          byte_n <= '0;
          state  <= T_HDR;
        end
        T_HDR:  if (u_ready) state <= T_IDX;
        T_IDX:  if (u_ready) state <= T_WORD;
        T_WORD: if (u_ready) begin
          if (byte_n == 4'((raw_q ? MB : KB) - 1)) begin
            byte_n <= '0;
            if (word == 8'((raw_q ? N_RO : N_ID) - 1)) begin
              state    <= T_IDLE;
              draining <= 1'b1;
            end else begin
              word <= word + 1'b1;
            end
          end else begin
            byte_n <= byte_n + 1'b1;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk  (clk),
    .rst_n(rst_n),
    .valid(u_valid),
    .data (u_data),
    .ready(u_ready),
    .txd  (txd)
  );

  assign busy = start || (state != T_IDLE) || draining;

endmodule
