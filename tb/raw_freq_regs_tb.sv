// raw_freq_regs_tb: reset clears all registers; random writes are mirrored in
// a reference array and every register is compared after each write.
`timescale 1ns / 1ps
module raw_freq_regs_tb;
  localparam int N = 5;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [2:0] waddr;
  logic [23:0] wdata;
  logic [23:0] freq [N];
  logic [23:0] ref_q [N];

  always #5 clk = ~clk;

  raw_freq_regs #(.N_RO(N), .M_BITS(24)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .freq(freq));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      ref_q[i] = '0;
      checks++;
      if (freq[i] != 0) failures++;
    end
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 3'($urandom_range(N - 1, 0));
      wdata = 24'($urandom);
      @(posedge clk);
      if (we) ref_q[waddr] = wdata;
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (freq[i] != ref_q[i]) begin failures++; $display("FAIL: reg %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
