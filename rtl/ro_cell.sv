// ro_cell: behavioural model of one ring oscillator (not synthesizable).
//
// The physical ring is an enable NAND gate closing a chain of STAGES
// inverters, each in its own LUT, placed and routed by hand as a hard macro so
// that all rings are identical. Its frequency comes from the routed delays,
// which RTL cannot express, so this model only reproduces the behaviour seen
// at the ring output: while `enable` is high, `osc` toggles every
// HALF_PERIOD_PS picoseconds, plus an optional random 0..JITTER_PS per half
// period that stands for the temporal fluctuation of a real ring. While
// `enable` is low the output is held low.
//
// STAGES is kept for documentation only: the per-stage delay is folded into
// HALF_PERIOD_PS. The default gives 57.24 MHz, a typical measured ring
// frequency; per-ring values are set by ro_array. A synthesis tool reads the
// toggle as a combinational loop and reports it as such: that loop is the
// ring. On an FPGA this model is replaced by the hand-placed ring macro.
`timescale 1ps / 1ps
module ro_cell #(
  parameter int unsigned STAGES         = 16,
  parameter int unsigned HALF_PERIOD_PS = 8735,
  parameter int unsigned JITTER_PS      = 0
) (
  input  logic enable,
  output logic osc
);

  logic q;

  initial q = 1'b0;

  always begin
    wait (enable);
    #(HALF_PERIOD_PS + ((JITTER_PS == 0) ? 0 : $urandom_range(JITTER_PS, 0)));
    if (enable) q = ~q;
    else        q = 1'b0;
  end

  assign osc = q;

endmodule
