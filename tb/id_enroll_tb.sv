// id_enroll_tb: feeds random signed ID samples and compares the result with
// the exact element-wise mean rounded toward zero, for N_AVG=5 (K=12) and for
// N_AVG=255 (K=24, with values near the extremes to exercise the reciprocal
// division). Also checks that extra samples are ignored, that clear restarts
// the average, and that done comes N_ID+1 cycles after the last sample.
`timescale 1ns / 1ps
module id_enroll_tb;
  localparam int NI = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, v = 1'b0;
  logic signed [11:0] in12 [NI], nom12 [NI];
  logic signed [23:0] in24 [NI], nom24 [NI];
  logic done12, done24;

  always #5 clk = ~clk;

  id_enroll #(.N_ID(NI), .K_BITS(12), .N_AVG(5))   dut12 (.clk(clk), .rst_n(rst_n), .clear(clear), .id_in(in12), .id_valid(v), .nominal(nom12), .done(done12));
  id_enroll #(.N_ID(NI), .K_BITS(24), .N_AVG(255)) dut24 (.clk(clk), .rst_n(rst_n), .clear(clear), .id_in(in24), .id_valid(v), .nominal(nom24), .done(done24));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint s12 [NI], s24 [NI];
  int n_done12 = 0, n_done24 = 0;
  always @(posedge done12) n_done12 = n_done12 + 1;
  always @(posedge done24) n_done24 = n_done24 + 1;

  function automatic longint tdiv(input longint s, input longint n);
    return (s < 0) ? -((-s) / n) : s / n;
  endfunction

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      for (int i = 0; i < NI; i++) begin s12[i] = 0; s24[i] = 0; end
      for (int t = 0; t < 255; t++) begin
        for (int i = 0; i < NI; i++) begin
          in12[i] = 12'($urandom);
          case (run)
            0: in24[i] = 24'($urandom);
            1: in24[i] = (i % 2) ? 24'sh7FFFFF - 24'($urandom_range(3, 0)) : -24'sh800000 + 24'($urandom_range(3, 0));
            default: in24[i] = 24'($urandom_range(4000, 0)) - 24'sd2000;
          endcase
          if (t < 5) s12[i] += longint'(in12[i]);
          s24[i] += longint'(in24[i]);
        end
        v = 1'b1;
        @(negedge clk);
        v = 1'b0;
        if (t == 4) begin
          lat = 1;
          while (!done12) begin @(negedge clk); lat++; end
          check(lat == NI + 1, $sformatf("latency %0d", lat));
          for (int i = 0; i < NI; i++)
            check(longint'(nom12[i]) == tdiv(s12[i], 5), $sformatf("mean5[%0d]=%0d exp %0d", i, nom12[i], tdiv(s12[i], 5)));
        end
      end
      repeat (NI + 3) @(negedge clk);
      for (int i = 0; i < NI; i++)
        check(longint'(nom24[i]) == tdiv(s24[i], 255), $sformatf("mean255[%0d]=%0d exp %0d", i, nom24[i], tdiv(s24[i], 255)));
      check(n_done12 == run + 1 && n_done24 == run + 1, $sformatf("one done per average %0d %0d", n_done12, n_done24));
      // samples after completion are ignored
      for (int i = 0; i < NI; i++) in12[i] = 12'sd1000;
      v = 1'b1; @(negedge clk); v = 1'b0;
      repeat (NI + 3) @(negedge clk);
      check(n_done12 == run + 1, "no second done without clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
