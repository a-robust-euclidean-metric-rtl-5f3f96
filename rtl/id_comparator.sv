// id_comparator: authentication decision for one ID sample.
//
// For every valid database entry it accumulates the squared Euclidean
// distance  D = sum_j (id[j] - ref[j])^2  in counts^2, one element per cycle
// with a single multiplier, and keeps the nearest entry. The normalized
// distance is
//   d = K_MEA * sqrt(D) / (2^K_NORM * sqrt(N_ID)),
// (K_MEA turns counts of the 20 ms window into Hz), and the sample matches
// when d <= D_TH_E4 * 1e-4. Squaring both sides gives a constant bound on D,
// worked out at elaboration (puf_pkg::dist_sq_threshold), so no square root
// or division is needed in hardware.
//
// Timing: `start` with `id` stable; entries are read through the
// combinational database port `db_raddr`/`db_rdata`; each valid entry takes
// N_ID cycles, an invalid one a single cycle. `done` pulses with `match`,
// `best_idx` (nearest entry) and `best_dist_sq` (its D) valid; with no valid
// entry, match is 0 and best_dist_sq all ones. `busy` is high from the
// `start` cycle until `done`. Picking the nearest of several matching entries
// is this design's choice.
`timescale 1ps / 1ps
module id_comparator
  import puf_pkg::*;
#(
  parameter int unsigned DB_ENTRIES = 6,
  parameter int unsigned N_ID       = 31,
  parameter int unsigned K_BITS     = 24,
  parameter int unsigned K_MEA      = 50,
  parameter int unsigned K_NORM     = 20,
  parameter int unsigned D_TH_E4    = 181,
  localparam int unsigned AW = (DB_ENTRIES > 1) ? $clog2(DB_ENTRIES) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [K_BITS-1:0] id       [N_ID],
  output logic [AW-1:0]            db_raddr,
  input  logic signed [K_BITS-1:0] db_rdata [N_ID],
  input  logic [DB_ENTRIES-1:0]    db_valid,
  output logic                     done,
  output logic                     match,
  output logic [AW-1:0]            best_idx,
  output logic [63:0]              best_dist_sq,
  output logic                     busy
);

  localparam logic [63:0] THRESH = dist_sq_threshold(K_MEA, K_NORM, D_TH_E4, N_ID);
  localparam int unsigned IW = (N_ID > 1) ? $clog2(N_ID) : 1;

  logic                     running;
  logic [AW-1:0]            e;
  logic [IW-1:0]            j;
  logic [63:0]              acc;
  logic signed [K_BITS:0]   diff;
  logic [2*K_BITS+1:0]      sq;
  logic [63:0]              acc_next;
  logic signed [K_BITS-1:0] a, b;
  logic                     e_valid, last_e;

  always_comb begin
    a = '0;
    b = '0;
    for (int i = 0; i < N_ID; i++)
      if (j == IW'(i)) begin
        a = id[i];
        b = db_rdata[i];
      end
    diff     = (K_BITS+1)'(a) - (K_BITS+1)'(b);
    sq       = (2*K_BITS+2)'(diff * diff);
    acc_next = acc + 64'(sq);
    e_valid  = 1'b0;
    for (int i = 0; i < DB_ENTRIES; i++)
      if (e == AW'(i)) e_valid = db_valid[i];
    last_e   = (e == AW'(DB_ENTRIES - 1));
  end

  assign db_raddr = e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= 1'b0;
      e            <= '0;
      j            <= '0;
      acc          <= '0;
      done         <= 1'b0;
      match        <= 1'b0;
      best_idx     <= '0;
      best_dist_sq <= '1;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running      <= 1'b1;
          e            <= '0;
          j            <= '0;
          acc          <= '0;
          best_idx     <= '0;
          best_dist_sq <= '1;
          match        <= 1'b0;
        end
      end else if (!e_valid || j == IW'(N_ID - 1)) begin
        // end of this entry: update the nearest one
        if (e_valid && acc_next < best_dist_sq) begin
          best_dist_sq <= acc_next;
          best_idx     <= e;
        end
        j   <= '0;
        acc <= '0;
        if (last_e) begin
          running <= 1'b0;
          done    <= 1'b1;
          if (e_valid && acc_next < best_dist_sq) match <= (acc_next <= THRESH);
          else                                   match <= (best_dist_sq <= THRESH);
        end else begin
          e <= e + 1'b1;
        end
      end else begin
        acc <= acc_next;
        j   <= j + 1'b1;
      end
    end
  end

  assign busy = running | start;

endmodule
