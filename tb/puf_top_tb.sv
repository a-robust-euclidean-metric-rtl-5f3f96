// puf_top_tb: end-to-end test of the RO-PUF at reduced size (4 rings,
// 2000-cycle window, 4 samples per run, 10 clocks per serial bit).
//
// Three devices share the clock:
//   A  die pattern SEED=1 at the reference condition,
//   B  the same die with every ring slowed by 300 ps per half period
//      (a global shift such as a temperature change),
//   C  another die, SEED=2.
// Sequence: A enrols itself into slot 0; the testbench checks every ID
// sample against the neighbour differences predicted from the ring periods,
// and every later decision's squared distance against the distance to the
// testbench's own mean of A's enrolment samples (so the enrolled entry must be
// that mean). A then
// authenticates with raw readout; the mean of A's samples is loaded into B
// (slot 3) and C (slot 0) through the host port; B must be recognised as
// slot 3 despite the shift, C must be rejected. Every serial frame is
// decoded and compared with the ID samples or raw counts. Each mechanism
// (sweep over all rings, sample counter, wait for readout, enrolment, match,
// no match, ID frame, raw frame) is counted and must occur.
`timescale 1ps / 1ps
module puf_top_tb;
  localparam int N = 4, NI = N - 1, M = 16, K = 12, W = 2000, NS = 4;
  localparam int BASE = 8735, SPREAD = 100, HOT = 300, DIV = 10;
  localparam int KNORM = 14;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10_000 clk = ~clk;       // 50 MHz

  typedef struct {
    int runs, sweeps, frames_id, frames_raw, enrolls, n_match, n_nomatch, waits;
  } cnt_t;

  // ------------------------------------------------------------ devices
  logic start [3], enroll [3], raw_mode [3], db_we [3];
  logic [2:0] slot [3], db_waddr [3];
  logic signed [K-1:0] db_wdata [NI];
  logic txd [3], busy [3], run_done [3], id_valid [3], id_sat [3], auth_done [3], auth_match [3], enroll_done [3];
  logic [7:0] sidx [3];
  logic signed [K-1:0] ids [3][NI];
  logic [2:0] auth_idx [3];
  logic [63:0] auth_dsq [3];

  puf_top #(.N_RO(N), .M_BITS(M), .K_BITS(K), .CLK_HZ(50_000_000), .WINDOW_CYCLES(W),
            .SETTLE_CYCLES(8), .NUM_SAMPLES(NS), .BAUD(5_000_000), .K_NORM(KNORM),
            .RO_BASE_HALF_PS(BASE), .RO_SPREAD_PS(SPREAD), .RO_SEED(1), .RO_GLOBAL_PS(0)) dut_a (
    .clk(clk), .rst_n(rst_n), .start(start[0]), .enroll(enroll[0]), .enroll_slot(slot[0]), .raw_mode(raw_mode[0]),
    .db_we(db_we[0]), .db_waddr(db_waddr[0]), .db_wdata(db_wdata), .txd(txd[0]), .busy(busy[0]), .run_done(run_done[0]),
    .sample_idx(sidx[0]), .id_valid(id_valid[0]), .id_sample(ids[0]), .id_sat(id_sat[0]),
    .auth_done(auth_done[0]), .auth_match(auth_match[0]), .auth_idx(auth_idx[0]), .auth_dist_sq(auth_dsq[0]),
    .enroll_done(enroll_done[0]));
  puf_top #(.N_RO(N), .M_BITS(M), .K_BITS(K), .CLK_HZ(50_000_000), .WINDOW_CYCLES(W),
            .SETTLE_CYCLES(8), .NUM_SAMPLES(NS), .BAUD(5_000_000), .K_NORM(KNORM),
            .RO_BASE_HALF_PS(BASE), .RO_SPREAD_PS(SPREAD), .RO_SEED(1), .RO_GLOBAL_PS(HOT)) dut_b (
    .clk(clk), .rst_n(rst_n), .start(start[1]), .enroll(enroll[1]), .enroll_slot(slot[1]), .raw_mode(raw_mode[1]),
    .db_we(db_we[1]), .db_waddr(db_waddr[1]), .db_wdata(db_wdata), .txd(txd[1]), .busy(busy[1]), .run_done(run_done[1]),
    .sample_idx(sidx[1]), .id_valid(id_valid[1]), .id_sample(ids[1]), .id_sat(id_sat[1]),
    .auth_done(auth_done[1]), .auth_match(auth_match[1]), .auth_idx(auth_idx[1]), .auth_dist_sq(auth_dsq[1]),
    .enroll_done(enroll_done[1]));
  puf_top #(.N_RO(N), .M_BITS(M), .K_BITS(K), .CLK_HZ(50_000_000), .WINDOW_CYCLES(W),
            .SETTLE_CYCLES(8), .NUM_SAMPLES(NS), .BAUD(5_000_000), .K_NORM(KNORM),
            .RO_BASE_HALF_PS(BASE), .RO_SPREAD_PS(SPREAD), .RO_SEED(2), .RO_GLOBAL_PS(0)) dut_c (
    .clk(clk), .rst_n(rst_n), .start(start[2]), .enroll(enroll[2]), .enroll_slot(slot[2]), .raw_mode(raw_mode[2]),
    .db_we(db_we[2]), .db_waddr(db_waddr[2]), .db_wdata(db_wdata), .txd(txd[2]), .busy(busy[2]), .run_done(run_done[2]),
    .sample_idx(sidx[2]), .id_valid(id_valid[2]), .id_sample(ids[2]), .id_sat(id_sat[2]),
    .auth_done(auth_done[2]), .auth_match(auth_match[2]), .auth_idx(auth_idx[2]), .auth_dist_sq(auth_dsq[2]),
    .enroll_done(enroll_done[2]));

  // ------------------------------------------------------------ reference
  function automatic int unsigned h(input int unsigned seed, input int unsigned idx);
    logic [31:0] x;
    x = seed * 32'h9E37_79B9 + idx * 32'h85EB_CA6B + 32'h1234_5677;
    x = x ^ (x >> 15); x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12); x = x * 32'h297A_2D39;
    x = x ^ (x >> 15);
    return x;
  endfunction

  // ideal count of ring i: window length / ring period
  function automatic real ideal_count(input int seed, input int glob, input int i);
    int half;
    half = BASE + glob + int'(h(seed, i) % (2 * SPREAD + 1)) - SPREAD;
    return real'(W) * 20_000.0 / (2.0 * real'(half));
  endfunction

  localparam int SEED_OF [3] = '{1, 1, 2};
  localparam int GLOB_OF [3] = '{0, HOT, 0};

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  cnt_t cnt [3];
  byte unsigned frame_q [3][$];
  logic signed [K-1:0] id_hist [3][$];     // ID samples in order, for frame checks
  longint id_sum [3][NI];
  int     n_ids [3];

  // ID samples: compare with the prediction, accumulate for the mean
  localparam int SWEEP_CYCLES = N * (W + 2 * 8 + 1);
  localparam int FRAME_CYCLES = (2 + 2 * NI) * 10 * DIV;
  int last_valid [3] = '{-1, -1, -1};
  int cyc = 0;
  logic signed [K-1:0] last_id [3][NI];
  logic signed [K-1:0] mean [NI];
  bit mean_ok = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n) for (int d = 0; d < 3; d++) begin
      if (id_valid[d]) begin
        for (int i = 0; i < NI; i++) begin
          real e;
          e = ideal_count(SEED_OF[d], GLOB_OF[d], i) - ideal_count(SEED_OF[d], GLOB_OF[d], i + 1);
          check(rabs(real'(ids[d][i]) - e) <= 2.0,
                $sformatf("dev %0d id[%0d]=%0d predicted %f", d, i, ids[d][i], e));
          id_sum[d][i] = id_sum[d][i] + longint'(ids[d][i]);
          id_hist[d].push_back(ids[d][i]);
        end
        n_ids[d] = n_ids[d] + 1;
      end
      if (id_valid[d]) begin
        // consecutive samples of a run: the next sweep waited for the frame
        if (last_valid[d] >= 0 && cyc - last_valid[d] < SWEEP_CYCLES + FRAME_CYCLES)
          check(cyc - last_valid[d] < SWEEP_CYCLES + 2 * FRAME_CYCLES + 100, "sample spacing");
        if (last_valid[d] >= 0 && cyc - last_valid[d] >= SWEEP_CYCLES + FRAME_CYCLES &&
            cyc - last_valid[d] < SWEEP_CYCLES + FRAME_CYCLES + 200)
          cnt[d].waits = cnt[d].waits + 1;
        last_valid[d] = cyc;
        cnt[d].sweeps = cnt[d].sweeps + 1;
        for (int i = 0; i < NI; i++) last_id[d][i] = ids[d][i];
      end
      if (run_done[d]) begin
        cnt[d].runs = cnt[d].runs + 1;
        last_valid[d] = -1;
      end
      if (enroll_done[d]) cnt[d].enrolls = cnt[d].enrolls + 1;
      if (auth_done[d] && mean_ok) begin
        longint e;
        e = 0;
        for (int i = 0; i < NI; i++) e += (longint'(last_id[d][i]) - longint'(mean[i])) ** 2;
        check(auth_dsq[d] == 64'(e), $sformatf("dev %0d distance^2 %0d exp %0d", d, auth_dsq[d], e));
      end
      if (auth_done[d]) begin
        if (auth_match[d]) cnt[d].n_match = cnt[d].n_match + 1;
        else               cnt[d].n_nomatch = cnt[d].n_nomatch + 1;
      end
    end
  end

  // ------------------------------------------------------------ serial frames
  logic got [3], berr [3];
  logic [7:0] rxb [3];

  for (genvar d = 0; d < 3; d++) begin : g_rx
    uart_rx_model #(.DIV(DIV)) u_rx (.clk(clk), .rxd(txd[d]), .got(got[d]), .data(rxb[d]), .bit_err(berr[d]));
    always @(posedge got[d]) begin
      check(!berr[d], "stop bit");
      frame_q[d].push_back(rxb[d]);
    end
  end

  // Check one complete frame of device d; raw frames against the ideal counts.
  task automatic check_frame(input int d, input bit raw);
    int nb;
    nb = raw ? 2 + 2 * N : 2 + 2 * NI;
    check(frame_q[d].size() >= nb, $sformatf("dev %0d frame length %0d", d, frame_q[d].size()));
    if (frame_q[d].size() < nb) return;
    check(frame_q[d][0] == (raw ? 8'h5A : 8'hA5), "frame header");
    if (raw) begin
      for (int i = 0; i < N; i++) begin
        int v;
        v = {frame_q[d][2 + 2*i], frame_q[d][3 + 2*i]};
        check(rabs(real'(v) - ideal_count(SEED_OF[d], GLOB_OF[d], i)) <= 1.0,
              $sformatf("raw count %0d of ring %0d", v, i));
      end
      cnt[d].frames_raw++;
    end else begin
      for (int i = 0; i < NI; i++) begin
        logic signed [15:0] v;
        v = {frame_q[d][2 + 2*i], frame_q[d][3 + 2*i]};
        check(v == 16'(id_hist[d][i]), $sformatf("ID word %0d", i));
      end
      cnt[d].frames_id++;
    end
    for (int i = 0; i < nb; i++) void'(frame_q[d].pop_front());
    if (!raw) for (int i = 0; i < NI; i++) void'(id_hist[d].pop_front());
  endtask


  // Run NS samples on device d and check each frame as it completes.
  task automatic run(input int d, input bit enr, input bit raw);
    enroll[d] = enr; raw_mode[d] = raw;
    @(negedge clk); start[d] = 1'b1;
    @(negedge clk); start[d] = 1'b0;
    for (int s = 0; s < NS; s++) begin
      @(posedge id_valid[d]);
      // wait for the frame to be on the line completely
      begin
        int nb, t;
        nb = raw ? 2 + 2 * N : 2 + 2 * NI;
        t = 0;
        while (frame_q[d].size() < nb && t < 2 * FRAME_CYCLES) begin @(negedge clk); t++; end
      end
      check_frame(d, raw);
      if (raw) for (int i = 0; i < NI; i++) void'(id_hist[d].pop_front());
    end
    while (busy[d]) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  function automatic longint tdiv(input longint s, input longint n);
    return (s < 0) ? -((-s) / n) : s / n;
  endfunction

  initial begin : watchdog
    #(64'd10_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m0, n0, m1, n1, m2;
    for (int d = 0; d < 3; d++) begin
      start[d] = 0; enroll[d] = 0; raw_mode[d] = 0; db_we[d] = 0; slot[d] = 0; db_waddr[d] = 0;
      n_ids[d] = 0; cnt[d] = '{default: 0};
      for (int i = 0; i < NI; i++) id_sum[d][i] = 0;
    end
    for (int i = 0; i < NI; i++) db_wdata[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // 1. A enrols into slot 0
    run(0, 1'b1, 1'b0);
    check(cnt[0].enrolls == 1, $sformatf("A enrolled %0d", cnt[0].enrolls));
    for (int i = 0; i < NI; i++) mean[i] = K'(tdiv(id_sum[0][i], NS));
    mean_ok = 1;   // from now on every decision's distance is checked against this mean

    // 2. A authenticates itself, with raw readout
    m0 = cnt[0].n_match;
    run(0, 1'b0, 1'b1);
    check(cnt[0].n_match - m0 == NS && cnt[0].n_nomatch == 0, "A recognised");
    check(auth_idx[0] == 0, "A recognised as slot 0");

    // 3. B (same die, globally shifted) and C (other die) get A's mean
    for (int i = 0; i < NI; i++) db_wdata[i] = mean[i];
    @(negedge clk);
    db_we[1] = 1'b1; db_waddr[1] = 3'd3;
    db_we[2] = 1'b1; db_waddr[2] = 3'd0;
    @(negedge clk);
    db_we[1] = 1'b0; db_we[2] = 1'b0;
    fork
      run(1, 1'b0, 1'b0);
      run(2, 1'b0, 1'b0);
    join
    check(cnt[1].n_match == NS && cnt[1].n_nomatch == 0, $sformatf("B recognised (%0d)", cnt[1].n_match));
    check(auth_idx[1] == 3'd3, "B recognised as slot 3");
    check(cnt[2].n_match == 0 && cnt[2].n_nomatch == NS, $sformatf("C rejected (%0d)", cnt[2].n_nomatch));
    $display("B distance^2 %0d, C distance^2 %0d", auth_dsq[1], auth_dsq[2]);

    // mechanism coverage
    check(cnt[0].sweeps == 2 * NS && cnt[1].sweeps == NS && cnt[2].sweeps == NS, "sweeps");
    check(cnt[0].runs == 2 && cnt[1].runs == 1 && cnt[2].runs == 1, "runs ended");
    check(cnt[0].waits > 0, "sequencer waited for readout");
    check(cnt[0].enrolls == 1, "enrolment");
    check(cnt[0].n_match + cnt[1].n_match > 0, "match");
    check(cnt[2].n_nomatch > 0, "no match");
    check(cnt[0].frames_id == NS && cnt[1].frames_id == NS && cnt[2].frames_id == NS, "ID frames");
    check(cnt[0].frames_raw == NS, "raw frames");
    check(n_ids[0] == 2 * NS, "ID samples of A");
    $display("mechanisms: sweeps=%0d/%0d/%0d waits=%0d enrol=%0d match=%0d/%0d nomatch=%0d idframes=%0d rawframes=%0d",
             cnt[0].sweeps, cnt[1].sweeps, cnt[2].sweeps, cnt[0].waits, cnt[0].enrolls,
             cnt[0].n_match, cnt[1].n_match, cnt[2].n_nomatch,
             cnt[0].frames_id + cnt[1].frames_id + cnt[2].frames_id, cnt[0].frames_raw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
