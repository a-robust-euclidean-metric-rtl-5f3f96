// id_database_tb: after reset no entry is valid; random writes are mirrored
// in a reference model, each write sets its valid bit, and every entry read
// back through the combinational port must equal the reference.
`timescale 1ns / 1ps
module id_database_tb;
  localparam int DB = 6, NI = 5;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [2:0] waddr = '0, raddr = '0;
  logic signed [23:0] wdata [NI], rdata [NI];
  logic [DB-1:0] valid;
  logic signed [23:0] ref_m [DB][NI];
  logic [DB-1:0] ref_v;

  always #5 clk = ~clk;

  id_database #(.DB_ENTRIES(DB), .N_ID(NI), .K_BITS(24)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata), .valid(valid));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NI; i++) wdata[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    ref_v = '0;
    #1;
    checks++; if (valid != 0) failures++;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      we = (t < 8) || ($urandom_range(2, 0) == 0);
      waddr = 3'($urandom_range(DB - 1, 0));
      for (int i = 0; i < NI; i++) wdata[i] = 24'($urandom);
      @(posedge clk);
      if (we) begin ref_m[waddr] = wdata; ref_v[waddr] = 1'b1; end
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (valid != ref_v) begin failures++; $display("FAIL: valid %b exp %b", valid, ref_v); end
      for (int e = 0; e < DB; e++) if (ref_v[e]) begin
        raddr = 3'(e);
        #1;
        for (int i = 0; i < NI; i++) begin
          checks++;
          if (rdata[i] != ref_m[e][i]) begin failures++; $display("FAIL: entry %0d elem %0d", e, i); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
