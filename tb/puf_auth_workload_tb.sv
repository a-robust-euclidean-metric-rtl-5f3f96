// puf_auth_workload_tb: identification workload over a full database of six
// devices, at reduced measurement size (8 rings, 2000-cycle window, 4 samples
// per run, 16-bit counts, 12-bit ID elements, K_NORM = 14, 10 clocks per
// serial bit). The database keeps its default depth of six entries.
//
// Thirteen copies of the top run side by side on one clock:
//   0..5   six dies (ring patterns SEED 1..6) at the reference condition,
//   6..11  the same six dies with every ring slowed by 300 ps per half
//          period, a global shift of the kind a temperature change causes,
//   12     a seventh die (SEED 7) that is never enrolled.
// Phase 1: each reference die enrols itself into its own slot d. The
// testbench forms its own truncated mean of the enrolment samples.
// Phase 2: the six means are written through the host port into every
// database (device d's own slot is left to its enrolment result), then all
// thirteen devices authenticate. For every decision the testbench works out
// the nearest entry and its squared distance from the last ID sample and its
// means, and the match flag from the threshold formula evaluated in real
// arithmetic; the top must agree exactly. Die d, cold or shifted, must be
// identified as entry d; the outsider must be rejected.
// Counted and required: enrolments, matches at reference, matches under the
// shift, rejections. The worst intra-device and best inter-device
// normalized distances are printed.
`timescale 1ps / 1ps
module puf_auth_workload_tb;
  localparam int N = 8, NI = N - 1, M = 16, K = 12, W = 2000, NS = 4;
  localparam int BASE = 8735, SPREAD = 100, HOT = 300, DIV = 10, KNORM = 14;
  localparam int NDIE = 6, ND = 2 * NDIE + 1, DB = 6;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10_000 clk = ~clk;       // 50 MHz

  function automatic int seed_of(input int g);
    return (g < NDIE) ? g + 1 : (g < 2 * NDIE) ? g - NDIE + 1 : NDIE + 1;
  endfunction
  function automatic int glob_of(input int g);
    return (g >= NDIE && g < 2 * NDIE) ? HOT : 0;
  endfunction

  logic start [ND], enroll [ND], db_we [ND];
  logic [2:0] slot [ND], db_waddr [ND];
  logic signed [K-1:0] db_wdata [ND][NI];
  logic txd [ND], busy [ND], run_done [ND], id_valid [ND], id_sat [ND];
  logic auth_done [ND], auth_match [ND], enroll_done [ND];
  logic [7:0] sidx [ND];
  logic signed [K-1:0] ids [ND][NI];
  logic [2:0] auth_idx [ND];
  logic [63:0] auth_dsq [ND];

  for (genvar g = 0; g < ND; g++) begin : g_dev
    puf_top #(.N_RO(N), .M_BITS(M), .K_BITS(K), .CLK_HZ(50_000_000), .WINDOW_CYCLES(W),
              .SETTLE_CYCLES(8), .NUM_SAMPLES(NS), .BAUD(5_000_000), .K_NORM(KNORM),
              .RO_BASE_HALF_PS(BASE), .RO_SPREAD_PS(SPREAD), .RO_SEED(seed_of(g)),
              .RO_GLOBAL_PS(glob_of(g))) dut (
      .clk(clk), .rst_n(rst_n), .start(start[g]), .enroll(enroll[g]), .enroll_slot(slot[g]),
      .raw_mode(1'b0), .db_we(db_we[g]), .db_waddr(db_waddr[g]), .db_wdata(db_wdata[g]),
      .txd(txd[g]), .busy(busy[g]), .run_done(run_done[g]), .sample_idx(sidx[g]),
      .id_valid(id_valid[g]), .id_sample(ids[g]), .id_sat(id_sat[g]),
      .auth_done(auth_done[g]), .auth_match(auth_match[g]), .auth_idx(auth_idx[g]),
      .auth_dist_sq(auth_dsq[g]), .enroll_done(enroll_done[g]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // threshold in counts^2, from the real-valued formula
  //   50 * sqrt(D) / (2^KNORM * sqrt(NI)) <= 0.0181
  function automatic real norm_dist(input longint dsq);
    return 50.0 * $sqrt(real'(dsq)) / (real'(1 << KNORM) * $sqrt(real'(NI)));
  endfunction

  function automatic longint tdiv(input longint s, input longint n);
    return (s < 0) ? -((-s) / n) : s / n;
  endfunction

  longint id_sum [ND][NI];
  logic signed [K-1:0] last_id [ND][NI];
  logic signed [K-1:0] mean [DB][NI];
  bit  means_ok = 0;
  int  n_enrol = 0, n_match_ref = 0, n_match_hot = 0, n_reject = 0, n_dec [ND];
  real worst_intra = 0.0, best_inter = 1.0e9;

  always @(posedge clk) begin
    if (rst_n) for (int g = 0; g < ND; g++) begin
      if (id_valid[g]) begin
        check(!id_sat[g], $sformatf("dev %0d ID saturated", g));
        for (int i = 0; i < NI; i++) begin
          id_sum[g][i] = id_sum[g][i] + longint'(ids[g][i]);
          last_id[g][i] = ids[g][i];
        end
      end
      if (enroll_done[g]) n_enrol++;
      if (auth_done[g] && means_ok) begin
        longint best, e;
        int bi;
        best = 0; bi = 0;
        for (int s = 0; s < DB; s++) begin
          e = 0;
          for (int i = 0; i < NI; i++) e += (longint'(last_id[g][i]) - longint'(mean[s][i])) ** 2;
          if (s == 0 || e < best) begin best = e; bi = s; end
          if (g < 2 * NDIE && s == g % NDIE && norm_dist(e) > worst_intra) worst_intra = norm_dist(e);
          if (!(g < 2 * NDIE && s == g % NDIE) && norm_dist(e) < best_inter) best_inter = norm_dist(e);
        end
        n_dec[g]++;
        check(auth_dsq[g] == 64'(best), $sformatf("dev %0d distance^2 %0d exp %0d", g, auth_dsq[g], best));
        check(auth_idx[g] == 3'(bi), $sformatf("dev %0d nearest %0d exp %0d", g, auth_idx[g], bi));
        check(auth_match[g] == (norm_dist(best) <= 0.0181),
              $sformatf("dev %0d match %0d at d=%f", g, auth_match[g], norm_dist(best)));
        if (g < 2 * NDIE) begin
          check(auth_match[g] && auth_idx[g] == 3'(g % NDIE),
                $sformatf("dev %0d identified as %0d (match %0d)", g, auth_idx[g], auth_match[g]));
          if (auth_match[g]) begin
            if (g < NDIE) n_match_ref++;
            else          n_match_hot++;
          end
        end else begin
          check(!auth_match[g], "outsider rejected");
          if (!auth_match[g]) n_reject++;
        end
      end
    end
  end

  // Start devices lo..hi together and wait until every one has finished.
  task automatic run_all(input int lo, input int hi, input bit enr);
    bit all_done;
    for (int g = lo; g <= hi; g++) begin enroll[g] = enr; slot[g] = 3'(g % NDIE); end
    @(negedge clk);
    for (int g = lo; g <= hi; g++) start[g] = 1'b1;
    @(negedge clk);
    for (int g = lo; g <= hi; g++) start[g] = 1'b0;
    do begin
      @(negedge clk);
      all_done = 1'b1;
      for (int g = lo; g <= hi; g++) if (busy[g]) all_done = 1'b0;
    end while (!all_done);
    repeat (2) @(negedge clk);
  endtask

  initial begin : watchdog
    #(64'd40_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < ND; g++) begin
      start[g] = 0; enroll[g] = 0; db_we[g] = 0; slot[g] = 0; db_waddr[g] = 0; n_dec[g] = 0;
      for (int i = 0; i < NI; i++) begin id_sum[g][i] = 0; db_wdata[g][i] = '0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // Phase 1: the six reference dies enrol themselves
    run_all(0, NDIE - 1, 1'b1);
    check(n_enrol == NDIE, $sformatf("enrolments %0d", n_enrol));
    for (int s = 0; s < DB; s++)
      for (int i = 0; i < NI; i++) mean[s][i] = K'(tdiv(id_sum[s][i], NS));

    // Phase 2: fill every database with the six means through the host port
    for (int s = 0; s < DB; s++) begin
      for (int g = 0; g < ND; g++) begin
        for (int i = 0; i < NI; i++) db_wdata[g][i] = mean[s][i];
        db_waddr[g] = 3'(s);
        db_we[g]    = !(g < NDIE && g == s);   // own slot holds the enrolment result
      end
      @(negedge clk);
    end
    for (int g = 0; g < ND; g++) db_we[g] = 1'b0;
    means_ok = 1;
    run_all(0, ND - 1, 1'b0);

    for (int g = 0; g < ND; g++) check(n_dec[g] == NS, $sformatf("dev %0d decisions %0d", g, n_dec[g]));
    check(n_match_ref == NDIE * NS, $sformatf("matches at reference %0d", n_match_ref));
    check(n_match_hot == NDIE * NS, $sformatf("matches under shift %0d", n_match_hot));
    check(n_reject == NS, $sformatf("outsider rejections %0d", n_reject));
    check(worst_intra < best_inter, "intra and inter distances separate");
    $display("enrol=%0d match_ref=%0d match_shift=%0d reject=%0d worst_intra=%f best_inter=%f",
             n_enrol, n_match_ref, n_match_hot, n_reject, worst_intra, best_inter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
