// meas_sequencer_tb: N_RO=4, WINDOW=20, SETTLE=3, NUM_SAMPLES=3. The counter
// is modelled as count = 1000*sample + 10*ring. Checks: captures come in ring
// order with the modelled count; one ring takes 2*SETTLE+WINDOW+1 cycles; the
// gate is high for exactly WINDOW cycles with clr low; the select only
// changes while clr is high; sweep_done ends each sweep; the next sweep waits
// while post_busy is high; run_done after NUM_SAMPLES sweeps; ro_en covers the
// run.
`timescale 1ns / 1ps
module meas_sequencer_tb;
  localparam int N = 4, W = 20, S = 3, NS = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, post_busy = 1'b0;
  logic ro_en, clr, gate, cap_valid, sweep_done, busy, run_done;
  logic [1:0] sel, cap_idx;
  logic [23:0] count, cap_data;
  logic [7:0] sample_idx;

  always #5 clk = ~clk;

  meas_sequencer #(.N_RO(N), .M_BITS(24), .WINDOW_CYCLES(W), .SETTLE_CYCLES(S), .NUM_SAMPLES(NS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .post_busy(post_busy), .ro_en(ro_en), .sel(sel),
    .clr(clr), .gate(gate), .count(count), .cap_valid(cap_valid), .cap_idx(cap_idx),
    .cap_data(cap_data), .sweep_done(sweep_done), .sample_idx(sample_idx), .busy(busy),
    .run_done(run_done));

  assign count = 24'(1000 * sample_idx + 10 * sel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, last_cap = -1, ncap = 0, nsweep = 0, gate_len = 0, nruns = 0;
  int hold_until = 0, waits_seen = 0;
  logic [1:0] sel_d;
  logic gate_d;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    sel_d <= sel;
    gate_d <= gate;
    if (rst_n && busy) begin
      if (sel != sel_d && !clr) begin checks++; failures++; $display("FAIL: select changed with clr low"); end
      if (gate && clr) begin checks++; failures++; $display("FAIL: gate with clr"); end
      if (!ro_en) begin checks++; failures++; $display("FAIL: rings disabled during run"); end
    end
    if (gate) gate_len <= gate_len + 1;
    if (gate_d && !gate) begin
      check(gate_len == W, $sformatf("gate length %0d", gate_len));
      gate_len <= 0;
    end
    if (cap_valid) begin
      check(cap_idx == 2'(ncap % N), $sformatf("capture order %0d", cap_idx));
      check(sample_idx == 8'(ncap / N), "sample counter");
      check(cap_data == 24'(1000 * (ncap / N) + 10 * (ncap % N)), "captured count");
      if (last_cap >= 0 && (ncap % N) != 0)
        check(cyc - last_cap == 2 * S + W + 1, $sformatf("ring time %0d", cyc - last_cap));
      if (last_cap >= 0 && (ncap % N) == 0)
        check(cyc - last_cap >= 2 * S + W + 1 + 10, "next sweep waited for post_busy");
      last_cap <= cyc;
      ncap <= ncap + 1;
    end
    if (sweep_done) begin
      nsweep <= nsweep + 1;
      check(cap_valid && cap_idx == 2'(N - 1), "sweep_done with last capture");
      hold_until <= cyc + 10;
    end
    post_busy <= (cyc < hold_until) || sweep_done;
    if (run_done) nruns <= nruns + 1;
  end

  initial begin : watchdog
    #200_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(!busy && !ro_en && clr, "idle after reset");
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    wait (run_done);
    @(posedge clk);
    @(posedge clk);
    check(ncap == N * NS, $sformatf("captures %0d", ncap));
    check(nsweep == NS, "sweeps");
    check(nruns == 1, "one run_done");
    check(!busy && !ro_en, "idle after run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
