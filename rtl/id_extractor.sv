// id_extractor: builds one ID sample from the N_RO raw counts.
//
// The ID is the vector of the N_RO-1 neighbour differences
//   id[i] = f[i] - f[i+1],  i = 0 .. N_RO-2,
// each a K_BITS two's-complement element. A single neighbor_diff subtractor
// is time-shared: in the i-th cycle after `start` it handles pair i-1 and
// writes the result into the ID register, so the sample is complete after
// N_RO-1 cycles and `id_valid` is high in cycle N_RO after `start`. `id` holds the last
// complete sample (it is updated element by element during extraction).
// `sat_any` tells whether some element of the sample was clamped. `busy` is
// high from the `start` cycle until `id_valid`.
`timescale 1ps / 1ps
module id_extractor #(
  parameter int unsigned N_RO   = 32,
  parameter int unsigned M_BITS = 24,
  parameter int unsigned K_BITS = 24,
  localparam int unsigned N_ID = N_RO - 1,
  localparam int unsigned IW   = (N_ID > 1) ? $clog2(N_ID) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [M_BITS-1:0]        freq [N_RO],
  output logic signed [K_BITS-1:0] id   [N_ID],
  output logic                     id_valid,
  output logic                     busy,
  output logic                     sat_any
);

  logic                     running;
  logic [IW-1:0]            idx;
  logic [M_BITS-1:0]        f_a, f_b;
  logic signed [K_BITS-1:0] delta;
  logic                     sat, sat_acc;

  always_comb begin
    f_a = '0;
    f_b = '0;
    for (int i = 0; i < N_ID; i++)
      if (idx == IW'(i)) begin
        f_a = freq[i];
        f_b = freq[i+1];
      end
  end

  neighbor_diff #(.M_BITS(M_BITS), .K_BITS(K_BITS)) u_diff (
    .f_a  (f_a),
    .f_b  (f_b),
    .delta(delta),
    .sat  (sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      idx      <= '0;
      id_valid <= 1'b0;
      sat_acc  <= 1'b0;
      sat_any  <= 1'b0;
      for (int i = 0; i < N_ID; i++) id[i] <= '0;
    end else begin
      id_valid <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          idx     <= '0;
          sat_acc <= 1'b0;
        end
      end else begin
        for (int i = 0; i < N_ID; i++)
          if (idx == IW'(i)) id[i] <= delta;
        if (idx == IW'(N_ID - 1)) begin
          running  <= 1'b0;
          id_valid <= 1'b1;
          sat_any  <= sat_acc | sat;
        end else begin
          idx     <= idx + 1'b1;
          sat_acc <= sat_acc | sat;
        end
      end
    end
  end

  assign busy = running | start;

endmodule
