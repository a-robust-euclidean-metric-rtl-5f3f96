// ro_mux: N_RO-to-1 multiplexer in front of the single frequency counter.
//
// The ring selected by `sel` (the RO select counter of the sequencer) is
// routed to `ro_clk`, which clocks ro_counter. Purely combinational; the
// sequencer only changes `sel` while the counter is held in clear, so a glitch
// at the switch point is never counted. An out-of-range select gives 0.
`timescale 1ps / 1ps
module ro_mux #(
  parameter int unsigned N_RO = 32,
  localparam int unsigned SW  = (N_RO > 1) ? $clog2(N_RO) : 1
) (
  input  logic [N_RO-1:0] osc,
  input  logic [SW-1:0]   sel,
  output logic            ro_clk
);

  always_comb begin
    ro_clk = 1'b0;
    for (int i = 0; i < N_RO; i++)
      if (sel == SW'(i)) ro_clk = osc[i];
  end

endmodule
