// puf_top: ring-oscillator PUF with Euclidean-distance ID extraction and
// authentication.
//
// Measurement: the N_RO rings of ro_array run together; meas_sequencer
// selects them one after another through ro_mux and lets ro_counter count the
// selected ring for a WINDOW_CYCLES window (20 ms at the 50 MHz clock assumed
// here). Each count goes into raw_freq_regs. After a full sweep, id_extractor
// forms the ID sample, the N_RO-1 neighbour differences f[i]-f[i+1] of k bits
// each; these differences cancel what shifts all rings of a die alike
// (temperature, supply, die-to-die variation) and keep the local pattern.
//
// Use of each ID sample:
//   * data_transmitter sends it (or the raw counts, raw_mode=1) on `txd`;
//   * enroll=1: id_enroll averages the run's NUM_SAMPLES samples and writes
//     the mean into id_database slot enroll_slot (`enroll_done`);
//   * enroll=0: id_comparator finds the nearest enrolled ID and decides
//     match / no match against the normalized threshold (`auth_*`, per sample).
// The database can also be loaded from outside (db_we, db_waddr, db_wdata).
// The sequencer starts the next sample only when readout and comparison of
// the previous one are finished.
//
// A run of NUM_SAMPLES samples starts with `start`; `enroll`, `enroll_slot`
// and `raw_mode` should be held for the run. One sample takes about
// N_RO * (WINDOW_CYCLES + 2*SETTLE_CYCLES + 1) cycles plus the serial frame.
//
// The ring array is a behavioural model of the hand-placed ring macros and
// the RO_* parameters only shape it for simulation; everything else is
// synthesizable. Putting enrolment and comparison in logic (rather than on a
// host computer) is this design's choice.
`timescale 1ps / 1ps
module puf_top
  import puf_pkg::*;
#(
  parameter int unsigned N_RO          = N_RO_DEFAULT,
  parameter int unsigned M_BITS        = M_BITS_DEFAULT,
  parameter int unsigned K_BITS        = K_BITS_DEFAULT,
  parameter int unsigned CLK_HZ        = CLK_HZ_DEFAULT,
  parameter int unsigned WINDOW_CYCLES = CLK_HZ / 50,
  parameter int unsigned SETTLE_CYCLES = 16,
  parameter int unsigned NUM_SAMPLES   = SAMPLES_DEFAULT,
  parameter int unsigned BAUD          = BAUD_DEFAULT,
  parameter int unsigned DB_ENTRIES    = DB_DEFAULT,
  parameter int unsigned K_MEA         = K_MEA_DEFAULT,
  parameter int unsigned K_NORM        = K_NORM_DEFAULT,
  parameter int unsigned D_TH_E4       = D_TH_E4_DEFAULT,
  parameter int unsigned RO_BASE_HALF_PS = 8735,
  parameter int unsigned RO_SPREAD_PS    = 10,
  parameter int          RO_GLOBAL_PS    = 0,
  parameter int unsigned RO_SEED         = 1,
  parameter int unsigned RO_JITTER_PS    = 0,
  localparam int unsigned N_ID = N_RO - 1,
  localparam int unsigned AW   = (DB_ENTRIES > 1) ? $clog2(DB_ENTRIES) : 1,
  localparam int unsigned SW   = (N_RO > 1) ? $clog2(N_RO) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     enroll,
  input  logic [AW-1:0]            enroll_slot,
  input  logic                     raw_mode,
  input  logic                     db_we,
  input  logic [AW-1:0]            db_waddr,
  input  logic signed [K_BITS-1:0] db_wdata [N_ID],
  output logic                     txd,
  output logic                     busy,
  output logic                     run_done,
  output logic [7:0]               sample_idx,
  output logic                     id_valid,
  output logic signed [K_BITS-1:0] id_sample [N_ID],
  output logic                     id_sat,
  output logic                     auth_done,
  output logic                     auth_match,
  output logic [AW-1:0]            auth_idx,
  output logic [63:0]              auth_dist_sq,
  output logic                     enroll_done
);

  // ---------------------------------------------------------------- measure
  logic              ro_en, ro_clk, clr, gate;
  logic [N_RO-1:0]   osc;
  logic [SW-1:0]     sel, cap_idx;
  logic [M_BITS-1:0] count, cap_data;
  logic              cap_valid, sweep_done, post_busy;
  logic [M_BITS-1:0] freq [N_RO];

  ro_array #(
    .N_RO(N_RO), .BASE_HALF_PS(RO_BASE_HALF_PS), .SPREAD_PS(RO_SPREAD_PS),
    .GLOBAL_PS(RO_GLOBAL_PS), .SEED(RO_SEED), .JITTER_PS(RO_JITTER_PS)
  ) u_rings (
    .enable(ro_en),
    .osc   (osc)
  );

  ro_mux #(.N_RO(N_RO)) u_mux (
    .osc   (osc),
    .sel   (sel),
    .ro_clk(ro_clk)
  );

  ro_counter #(.M_BITS(M_BITS)) u_counter (
    .ro_clk(ro_clk),
    .clr   (clr),
    .gate  (gate),
    .count (count)
  );

  meas_sequencer #(
    .N_RO(N_RO), .M_BITS(M_BITS), .WINDOW_CYCLES(WINDOW_CYCLES),
    .SETTLE_CYCLES(SETTLE_CYCLES), .NUM_SAMPLES(NUM_SAMPLES)
  ) u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .post_busy (post_busy),
    .ro_en     (ro_en),
    .sel       (sel),
    .clr       (clr),
    .gate      (gate),
    .count     (count),
    .cap_valid (cap_valid),
    .cap_idx   (cap_idx),
    .cap_data  (cap_data),
    .sweep_done(sweep_done),
    .sample_idx(sample_idx),
    .busy      (busy),
    .run_done  (run_done)
  );

  raw_freq_regs #(.N_RO(N_RO), .M_BITS(M_BITS)) u_raw (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (cap_valid),
    .waddr(cap_idx),
    .wdata(cap_data),
    .freq (freq)
  );

  // ---------------------------------------------------------------- extract
  // sweep_done coincides with the write of the last ring's count, so the
  // extractor is started one cycle later, when that count is in the register.
  logic extract_go, ext_busy, tx_busy, cmp_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) extract_go <= 1'b0;
    else        extract_go <= sweep_done;
  end

  id_extractor #(.N_RO(N_RO), .M_BITS(M_BITS), .K_BITS(K_BITS)) u_extract (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (extract_go),
    .freq    (freq),
    .id      (id_sample),
    .id_valid(id_valid),
    .busy    (ext_busy),
    .sat_any (id_sat)
  );

  data_transmitter #(
    .N_RO(N_RO), .M_BITS(M_BITS), .K_BITS(K_BITS), .CLK_HZ(CLK_HZ), .BAUD(BAUD)
  ) u_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (id_valid),
    .raw_mode  (raw_mode),
    .sample_idx(sample_idx),
    .freq      (freq),
    .id        (id_sample),
    .busy      (tx_busy),
    .txd       (txd)
  );

  // ------------------------------------------------------ enrol / authenticate
  logic signed [K_BITS-1:0] nominal [N_ID];
  logic signed [K_BITS-1:0] db_rdata [N_ID];
  logic signed [K_BITS-1:0] wr_data [N_ID];
  logic [DB_ENTRIES-1:0]    db_valid;
  logic [AW-1:0]            db_raddr, wr_addr;
  logic                     enr_done, wr_en;

  id_enroll #(.N_ID(N_ID), .K_BITS(K_BITS), .N_AVG(NUM_SAMPLES)) u_enroll (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (start && !busy),
    .id_in   (id_sample),
    .id_valid(id_valid && enroll),
    .nominal (nominal),
    .done    (enr_done)
  );

  // The enrolment result has priority over a host write in the same cycle.
  assign wr_en   = enr_done || db_we;
  assign wr_addr = enr_done ? enroll_slot : db_waddr;
  assign wr_data = enr_done ? nominal : db_wdata;

  id_database #(.DB_ENTRIES(DB_ENTRIES), .N_ID(N_ID), .K_BITS(K_BITS)) u_db (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (wr_en),
    .waddr(wr_addr),
    .wdata(wr_data),
    .raddr(db_raddr),
    .rdata(db_rdata),
    .valid(db_valid)
  );

  id_comparator #(
    .DB_ENTRIES(DB_ENTRIES), .N_ID(N_ID), .K_BITS(K_BITS),
    .K_MEA(K_MEA), .K_NORM(K_NORM), .D_TH_E4(D_TH_E4)
  ) u_cmp (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (id_valid && !enroll),
    .id          (id_sample),
    .db_raddr    (db_raddr),
    .db_rdata    (db_rdata),
    .db_valid    (db_valid),
    .done        (auth_done),
    .match       (auth_match),
    .best_idx    (auth_idx),
    .best_dist_sq(auth_dist_sq),
    .busy        (cmp_busy)
  );

  assign enroll_done = enr_done;
  // sweep_done is included so the gap before the extractor starts is covered.
  assign post_busy   = sweep_done || extract_go || ext_busy || tx_busy || cmp_busy;

endmodule
