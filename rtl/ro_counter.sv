// ro_counter: the single frequency counter, clocked by the selected ring.
//
// `gate` is the measurement window from the system-clock domain. It crosses
// into the ring domain through a two-flip-flop synchroniser, and the counter
// adds one on every ring rising edge while the synchronised gate is high. The
// resulting count n_cycle is the ring frequency times the window length, give
// or take one count: the window edges are only resolved to one ring period.
// `clr` is an asynchronous clear, driven from a system-clock flip-flop, that
// also clears the synchroniser. The counter saturates at all ones rather than
// wrapping (own choice).
//
// Timing: the count is stable from three ring edges after `gate` falls; the
// sequencer waits that long before it reads `count` in the system domain, so
// no further synchronisation of the count is needed.
`timescale 1ps / 1ps
module ro_counter #(
  parameter int unsigned M_BITS = 24
) (
  input  logic              ro_clk,
  input  logic              clr,
  input  logic              gate,
  output logic [M_BITS-1:0] count
);

  logic [1:0] gate_sync;

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr) begin
      gate_sync <= '0;
      count     <= '0;
    end else begin
      gate_sync <= {gate_sync[0], gate};
      if (gate_sync[1] && count != '1) count <= count + 1'b1;
    end
  end

endmodule
