// id_extractor_tb: random ring counts; the ID sample must be the vector of
// neighbour differences f[i]-f[i+1], id_valid must come N_RO cycles after
// start, busy must cover the extraction, and sat_any must flag a pair whose
// difference does not fit (second instance with K=8).
`timescale 1ns / 1ps
module id_extractor_tb;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [23:0] freq [N];
  logic signed [23:0] id  [N-1];
  logic signed [7:0]  id8 [N-1];
  logic v, busy, sat, v8, busy8, sat8;

  always #5 clk = ~clk;

  id_extractor #(.N_RO(N), .M_BITS(24), .K_BITS(24)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .freq(freq), .id(id), .id_valid(v), .busy(busy), .sat_any(sat));
  id_extractor #(.N_RO(N), .M_BITS(24), .K_BITS(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .start(start), .freq(freq), .id(id8), .id_valid(v8), .busy(busy8), .sat_any(sat8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    bit need_sat, need_sat24;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      need_sat = 0;
      need_sat24 = 0;
      for (int i = 0; i < N; i++)
        freq[i] = (t % 3 == 0) ? 24'($urandom) : 24'(1_140_000 + $urandom_range(120, 0));
      for (int i = 0; i < N - 1; i++) begin
        longint e;
        e = longint'(freq[i]) - longint'(freq[i+1]);
        if (e > 127 || e < -128) need_sat = 1;
      end
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      lat = 1;
      while (!v) begin
        check(busy, "busy during extraction");
        @(negedge clk);
        lat++;
      end
      check(lat == N, $sformatf("latency %0d", lat));
      for (int i = 0; i < N - 1; i++) begin
        longint e, e8, e24;
        e  = longint'(freq[i]) - longint'(freq[i+1]);
        e8 = (e > 127) ? 127 : (e < -128) ? -128 : e;
        e24 = (e > 8388607) ? 8388607 : (e < -8388608) ? -8388608 : e;
        if (e24 != e) need_sat24 = 1;
        check(longint'(id[i]) == e24, $sformatf("id[%0d]=%0d exp %0d", i, id[i], e24));
        check(longint'(id8[i]) == e8, "saturated element");
      end
      check(sat == need_sat24, "sat_any at K=24");
      check(sat8 == need_sat, "sat_any at K=8");
      @(negedge clk);
      check(!busy, "idle after id_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
