// neighbor_diff: the subtractor that turns a pair of neighbouring ring counts
// into one ID element, delta = f_a - f_b, as a K_BITS two's-complement number.
//
// Taking the difference of neighbouring rings removes everything that moves
// all rings of a die together (die-to-die variation, temperature, supply),
// and leaves the local variation pattern. The counts are unsigned M_BITS; the
// exact difference needs M_BITS+1 bits. If it does not fit in K_BITS it is
// clamped to the largest value of its sign and `sat` is raised (own choice).
// Purely combinational.
`timescale 1ps / 1ps
module neighbor_diff #(
  parameter int unsigned M_BITS = 24,
  parameter int unsigned K_BITS = 24
) (
  input  logic [M_BITS-1:0]        f_a,
  input  logic [M_BITS-1:0]        f_b,
  output logic signed [K_BITS-1:0] delta,
  output logic                     sat
);

  localparam int unsigned W = (M_BITS + 1 > K_BITS) ? M_BITS + 1 : K_BITS;

  logic signed [W-1:0] diff;
  logic signed [W-1:0] max_v, min_v;

  always_comb begin
    diff  = $signed(W'(f_a)) - $signed(W'(f_b));
    max_v = W'({1'b0, {(K_BITS - 1){1'b1}}});
    min_v = -max_v - 1;
    if (diff > max_v) begin
      delta = {1'b0, {(K_BITS - 1){1'b1}}};
      sat   = 1'b1;
    end else if (diff < min_v) begin
      delta = {1'b1, {(K_BITS - 1){1'b0}}};
      sat   = 1'b1;
    end else begin
      delta = K_BITS'(diff);
      sat   = 1'b0;
    end
  end

endmodule
