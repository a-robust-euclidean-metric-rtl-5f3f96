// id_database: store of the nominal IDs of the enrolled devices.
//
// DB_ENTRIES entries of N_ID signed K_BITS elements, each with a valid bit.
// A write (`we`, `waddr`, `wdata`) stores a nominal ID and sets the entry's
// valid bit at the next clock edge; reset clears all valid bits. The read
// port is combinational: `rdata` shows entry `raddr` in the same cycle.
`timescale 1ps / 1ps
module id_database #(
  parameter int unsigned DB_ENTRIES = 6,
  parameter int unsigned N_ID       = 31,
  parameter int unsigned K_BITS     = 24,
  localparam int unsigned AW = (DB_ENTRIES > 1) ? $clog2(DB_ENTRIES) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic signed [K_BITS-1:0] wdata [N_ID],
  input  logic [AW-1:0]            raddr,
  output logic signed [K_BITS-1:0] rdata [N_ID],
  output logic [DB_ENTRIES-1:0]    valid
);

  logic signed [K_BITS-1:0] mem [DB_ENTRIES][N_ID];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DB_ENTRIES) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (we && 32'(waddr) < DB_ENTRIES) valid[waddr] <= 1'b1;
  end

  always_comb begin
    for (int i = 0; i < N_ID; i++) rdata[i] = '0;
    if (32'(raddr) < DB_ENTRIES) rdata = mem[raddr];
  end

endmodule
