// ro_array: behavioural model of the array of N_RO ring oscillators
// (not synthesizable; built from ro_cell).
//
// All rings share one enable. Ring i has half period
//   BASE_HALF_PS + GLOBAL_PS + local(i)
// where local(i) is a fixed pseudo-random offset in [-SPREAD_PS, SPREAD_PS]
// derived from SEED and i. SEED stands for the local process variation of one
// die, which the ID is meant to capture; GLOBAL_PS for what moves all rings of
// a die together (die-to-die variation, temperature, supply), which the
// neighbour-difference ID is meant to cancel. The hash and the default spread
// (about +-65 kHz at 57 MHz) are modelling choices.
// Ports: `enable` common to all rings, `osc[i]` the output of ring i.
`timescale 1ps / 1ps
module ro_array #(
  parameter int unsigned N_RO         = 32,
  parameter int unsigned BASE_HALF_PS = 8735,
  parameter int unsigned SPREAD_PS    = 10,
  parameter int          GLOBAL_PS    = 0,
  parameter int unsigned SEED         = 1,
  parameter int unsigned JITTER_PS    = 0
) (
  input  logic            enable,
  output logic [N_RO-1:0] osc
);

  // Integer hash (xorshift-multiply) of the die seed and ring index.
  function automatic int unsigned ring_hash(input int unsigned seed, input int unsigned idx);
    logic [31:0] h;
    h = seed * 32'h9E37_79B9 + idx * 32'h85EB_CA6B + 32'h1234_5677;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  function automatic int unsigned half_of(input int unsigned idx);
    int local_ps;
    local_ps = int'(ring_hash(SEED, idx) % (2 * SPREAD_PS + 1)) - int'(SPREAD_PS);
    return int'(BASE_HALF_PS) + GLOBAL_PS + local_ps;
  endfunction

  for (genvar i = 0; i < N_RO; i++) begin : g_ring
    ro_cell #(
      .HALF_PERIOD_PS(half_of(i)),
      .JITTER_PS     (JITTER_PS)
    ) u_ring (
      .enable(enable),
      .osc   (osc[i])
    );
  end

endmodule
