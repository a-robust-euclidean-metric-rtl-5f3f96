// ro_cell_tb: checks the ring oscillator model: output held low while
// disabled, period 2*HALF_PERIOD_PS while enabled, jitter bounded, and low
// again after disable.
`timescale 1ps / 1ps
module ro_cell_tb;
  int checks = 0, failures = 0;
  logic en = 1'b0, en_j = 1'b0;
  logic osc, osc_j;

  ro_cell #(.HALF_PERIOD_PS(5000)) dut (.enable(en), .osc(osc));
  ro_cell #(.HALF_PERIOD_PS(5000), .JITTER_PS(20)) dut_j (.enable(en_j), .osc(osc_j));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0, t1;
    int  edges;
    #100_000;
    check(osc == 1'b0, "output low while disabled");
    en = 1'b1;
    @(posedge osc); t0 = $time;
    for (int i = 0; i < 20; i++) begin
      @(posedge osc); t1 = $time;
      check(t1 - t0 == 10_000, $sformatf("period %0t", t1 - t0));
      t0 = t1;
    end
    en = 1'b0;
    #20_000;
    check(osc == 1'b0, "output low after disable");
    edges = 0;
    fork
      begin #100_000; end
      forever begin @(posedge osc); edges++; end
    join_any
    disable fork;
    check(edges == 0, "no edges while disabled");
    // jittered ring: each period between 10000 and 10040 ps
    en_j = 1'b1;
    @(posedge osc_j); t0 = $time;
    for (int i = 0; i < 50; i++) begin
      @(posedge osc_j); t1 = $time;
      check(t1 - t0 >= 10_000 && t1 - t0 <= 10_040, $sformatf("jittered period %0t", t1 - t0));
      t0 = t1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
