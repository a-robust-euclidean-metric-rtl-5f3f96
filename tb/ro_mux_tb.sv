// ro_mux_tb: random ring vectors and selects; the output must equal the
// selected bit, and an out-of-range select must give 0.
`timescale 1ps / 1ps
module ro_mux_tb;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic [N-1:0] osc;
  logic [2:0]   sel;
  logic         y;

  ro_mux #(.N_RO(N)) dut (.osc(osc), .sel(sel), .ro_clk(y));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      osc = N'($urandom);
      sel = 3'($urandom_range(7, 0));
      #10;
      checks++;
      if (y !== ((sel < N) ? osc[sel] : 1'b0)) begin
        failures++;
        $display("FAIL: osc=%b sel=%0d y=%b", osc, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
