// data_transmitter_tb: N_RO=4, M=12 and K=10 bits (two bytes per word),
// 4 clocks per bit. Frames are decoded by uart_rx_model and compared with
// the expected byte stream: header, sample number, words MSB first (ID
// elements sign-extended). Both an ID frame and a raw frame are sent; busy
// must cover the frame.
`timescale 1ns / 1ps
module data_transmitter_tb;
  localparam int N = 4, M = 12, K = 10, DIV = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, raw_mode = 1'b0;
  logic [7:0] sidx = 8'd0;
  logic [M-1:0] freq [N];
  logic signed [K-1:0] id [N-1];
  logic busy, txd, got, berr;
  logic [7:0] rx;
  byte unsigned exp_q [$];
  int nrx = 0;

  always #5 clk = ~clk;

  data_transmitter #(.N_RO(N), .M_BITS(M), .K_BITS(K), .CLK_HZ(DIV * 1000), .BAUD(1000)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .raw_mode(raw_mode), .sample_idx(sidx),
    .freq(freq), .id(id), .busy(busy), .txd(txd));

  uart_rx_model #(.DIV(DIV)) u_rx (.clk(clk), .rxd(txd), .got(got), .data(rx), .bit_err(berr));

  always @(posedge got) begin
    checks++;
    nrx++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected byte %02x", rx); end
    else begin
      byte unsigned e;
      e = exp_q.pop_front();
      if (rx != e || berr) begin failures++; $display("FAIL: got %02x exp %02x", rx, e); end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic frame(input bit raw, input logic [7:0] s);
    logic [15:0] w;
    exp_q.push_back(raw ? 8'h5A : 8'hA5);
    exp_q.push_back(s);
    if (raw) for (int i = 0; i < N; i++) begin
      w = 16'(freq[i]); exp_q.push_back(w[15:8]); exp_q.push_back(w[7:0]);
    end else for (int i = 0; i < N - 1; i++) begin
      w = 16'(id[i]); exp_q.push_back(w[15:8]); exp_q.push_back(w[7:0]);
    end
    @(negedge clk);
    start = 1'b1; raw_mode = raw; sidx = s;
    @(negedge clk);
    start = 1'b0; raw_mode = !raw; sidx = 8'hEE;   // must have been latched
    while (busy) @(negedge clk);
    repeat (3 * DIV) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("frame complete, %0d bytes missing", exp_q.size()));
  endtask

  initial begin : watchdog
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) freq[i] = M'($urandom);
    id[0] = -10'sd3; id[1] = 10'sd300; id[2] = -10'sd512;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    frame(1'b0, 8'd7);
    frame(1'b1, 8'd200);
    for (int i = 0; i < N - 1; i++) id[i] = K'($urandom);
    frame(1'b0, 8'd1);
    check(nrx == 8 + 10 + 8, $sformatf("bytes received %0d", nrx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
