// raw_freq_regs: register file of the latest count of every ring.
//
// One m-bit register per ring, written by the sequencer's capture strobe
// (`we`, `waddr`, `wdata`) and all visible at once on `freq`, so the ID
// extractor can read any neighbouring pair and the readout any word. Reset
// clears it. Write takes effect on the next clock edge.
`timescale 1ps / 1ps
module raw_freq_regs #(
  parameter int unsigned N_RO   = 32,
  parameter int unsigned M_BITS = 24,
  localparam int unsigned SW = (N_RO > 1) ? $clog2(N_RO) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [SW-1:0]     waddr,
  input  logic [M_BITS-1:0] wdata,
  output logic [M_BITS-1:0] freq [N_RO]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_RO; i++) freq[i] <= '0;
    end else if (we) begin
      for (int i = 0; i < N_RO; i++)
        if (waddr == SW'(i)) freq[i] <= wdata;
    end
  end

endmodule
