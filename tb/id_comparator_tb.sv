// id_comparator_tb: DB_ENTRIES=4, N_ID=5, K=12. Entries are random; samples
// are either an entry plus small noise (should match it) or random (usually
// no match). The reference computes every squared distance, the nearest valid
// entry, and the normalized distance 50*sqrt(D)/(2^20*sqrt(5)) in real
// arithmetic against 0.0181. Also checks the latency (N_ID cycles per valid
// entry, one per invalid entry, plus one) and the empty-database case.
`timescale 1ns / 1ps
module id_comparator_tb;
  localparam int DB = 4, NI = 5, K = 12;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [K-1:0] id [NI], db_rdata [NI];
  logic signed [K-1:0] mem [DB][NI];
  logic [DB-1:0] db_valid;
  logic [1:0] db_raddr, best_idx;
  logic done, match, busy;
  logic [63:0] best_dist_sq;
  int n_match = 0, n_nomatch = 0;

  always #5 clk = ~clk;

  assign db_rdata = mem[db_raddr];

  id_comparator #(.DB_ENTRIES(DB), .N_ID(NI), .K_BITS(K), .K_MEA(50), .K_NORM(20), .D_TH_E4(181)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .id(id), .db_raddr(db_raddr), .db_rdata(db_rdata),
    .db_valid(db_valid), .done(done), .match(match), .best_idx(best_idx), .best_dist_sq(best_dist_sq), .busy(busy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, steps, best_e;
    longint d, best_d;
    real dn;
    bit exp_match, any;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      db_valid = (t == 0) ? '0 : DB'($urandom_range(15, 1));
      for (int e = 0; e < DB; e++)
        for (int i = 0; i < NI; i++) mem[e][i] = K'($urandom);
      if (t % 2 == 0) begin
        int e;
        e = $urandom_range(DB - 1, 0);
        for (int i = 0; i < NI; i++) id[i] = mem[e][i] + K'($urandom_range(60, 0)) - K'(30);
      end else begin
        for (int i = 0; i < NI; i++) id[i] = K'($urandom);
      end
      best_d = -1; best_e = 0; steps = 0; any = 0;
      for (int e = 0; e < DB; e++) begin
        if (!db_valid[e]) begin steps += 1; continue; end
        steps += NI;
        d = 0;
        for (int i = 0; i < NI; i++) d += (longint'(id[i]) - longint'(mem[e][i])) ** 2;
        if (!any || d < best_d) begin best_d = d; best_e = e; end
        any = 1;
      end
      dn = any ? 50.0 * $sqrt(real'(best_d)) / (1048576.0 * $sqrt(5.0)) : 1.0;
      exp_match = any && (dn <= 0.0181);
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      lat = 1;
      while (!done) begin check(busy, "busy"); @(negedge clk); lat++; end
      check(lat == steps + 1, $sformatf("latency %0d exp %0d", lat, steps + 1));
      check(match == exp_match, $sformatf("t=%0d match=%0b exp=%0b dn=%f", t, match, exp_match, dn));
      if (any) begin
        check(best_dist_sq == 64'(best_d), $sformatf("dist %0d exp %0d", best_dist_sq, best_d));
        check(best_idx == 2'(best_e), "nearest entry");
      end else begin
        check(best_dist_sq == '1 && !match, "empty database");
      end
      if (match) n_match++; else n_nomatch++;
    end
    check(n_match > 20 && n_nomatch > 20, $sformatf("both outcomes seen (%0d/%0d)", n_match, n_nomatch));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
