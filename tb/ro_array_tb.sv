// ro_array_tb: checks that every ring of the array runs at the half period
// BASE + GLOBAL + local(i), with local(i) recomputed here from the documented
// hash, that all local offsets lie in [-SPREAD, SPREAD], that a global shift
// moves every ring by the same amount, and that a different seed gives a
// different local pattern.
`timescale 1ps / 1ps
module ro_array_tb;
  localparam int N = 6;
  localparam int BASE = 4000, SPREAD = 10;
  int checks = 0, failures = 0;
  logic en = 1'b0;
  logic [N-1:0] osc_a, osc_b, osc_c;

  ro_array #(.N_RO(N), .BASE_HALF_PS(BASE), .SPREAD_PS(SPREAD), .SEED(7))
    dut_a (.enable(en), .osc(osc_a));
  ro_array #(.N_RO(N), .BASE_HALF_PS(BASE), .SPREAD_PS(SPREAD), .SEED(7), .GLOBAL_PS(150))
    dut_b (.enable(en), .osc(osc_b));
  ro_array #(.N_RO(N), .BASE_HALF_PS(BASE), .SPREAD_PS(SPREAD), .SEED(8))
    dut_c (.enable(en), .osc(osc_c));

  function automatic int unsigned h(input int unsigned seed, input int unsigned idx);
    logic [31:0] x;
    x = seed * 32'h9E37_79B9 + idx * 32'h85EB_CA6B + 32'h1234_5677;
    x = x ^ (x >> 15); x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12); x = x * 32'h297A_2D39;
    x = x ^ (x >> 15);
    return x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  time per_a [N], per_b [N], per_c [N];

  task automatic measure(input int which, input int i, output time p);
    time t0;
    case (which)
      0: begin @(posedge osc_a[i]); t0 = $time; @(posedge osc_a[i]); end
      1: begin @(posedge osc_b[i]); t0 = $time; @(posedge osc_b[i]); end
      default: begin @(posedge osc_c[i]); t0 = $time; @(posedge osc_c[i]); end
    endcase
    p = $time - t0;
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int diffs;
    #1000;
    check(osc_a == '0, "all rings low while disabled");
    en = 1'b1;
    for (int i = 0; i < N; i++) begin
      int exp_half;
      measure(0, i, per_a[i]);
      measure(1, i, per_b[i]);
      measure(2, i, per_c[i]);
      exp_half = BASE + int'(h(7, i) % (2 * SPREAD + 1)) - SPREAD;
      check(per_a[i] == time'(2 * exp_half), $sformatf("ring %0d period %0t exp %0d", i, per_a[i], 2 * exp_half));
      check(per_a[i] >= 2 * (BASE - SPREAD) && per_a[i] <= 2 * (BASE + SPREAD), "local offset in range");
      check(per_b[i] - per_a[i] == 300, $sformatf("global shift ring %0d", i));
    end
    diffs = 0;
    for (int i = 0; i < N; i++) if (per_c[i] != per_a[i]) diffs++;
    check(diffs > 0, "other seed gives other pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
