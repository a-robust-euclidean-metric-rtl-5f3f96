// puf_top_full_tb: one complete operation of the PUF at its default size:
// 32 rings, 20 ms window at 50 MHz, 24-bit counts and ID elements, 115200
// baud, six database entries. The database is loaded through the host port
// with the ID predicted from the ring periods (slot 0) and with a different
// pattern (slot 1). One sample is then measured (32 windows, 640 ms of
// simulated time), extracted, sent and authenticated: the ID must agree with
// the prediction within +-2 counts per element, the serial frame must carry
// it, and the device must be recognised as slot 0.
`timescale 1ps / 1ps
module puf_top_full_tb;
  localparam int N = 32, NI = 31, BASE = 8735, SPREAD = 10, W = 1_000_000;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, db_we = 1'b0;
  logic [2:0] db_waddr = '0;
  logic signed [23:0] db_wdata [NI];
  logic txd, busy, run_done, id_valid, id_sat, auth_done, auth_match, enroll_done;
  logic [7:0] sidx;
  logic signed [23:0] ids [NI];
  logic [2:0] auth_idx;
  logic [63:0] auth_dsq;

  always #10_000 clk = ~clk;       // 50 MHz

  puf_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .enroll(1'b0), .enroll_slot(3'd0), .raw_mode(1'b0),
    .db_we(db_we), .db_waddr(db_waddr), .db_wdata(db_wdata), .txd(txd), .busy(busy), .run_done(run_done),
    .sample_idx(sidx), .id_valid(id_valid), .id_sample(ids), .id_sat(id_sat),
    .auth_done(auth_done), .auth_match(auth_match), .auth_idx(auth_idx), .auth_dist_sq(auth_dsq),
    .enroll_done(enroll_done));

  function automatic int unsigned h(input int unsigned seed, input int unsigned idx);
    logic [31:0] x;
    x = seed * 32'h9E37_79B9 + idx * 32'h85EB_CA6B + 32'h1234_5677;
    x = x ^ (x >> 15); x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12); x = x * 32'h297A_2D39;
    x = x ^ (x >> 15);
    return x;
  endfunction

  function automatic real ideal_count(input int i);
    int half;
    half = BASE + int'(h(1, i) % (2 * SPREAD + 1)) - SPREAD;
    return real'(W) * 20_000.0 / (2.0 * real'(half));
  endfunction

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // serial capture
  logic got, berr;
  logic [7:0] rxb;
  byte unsigned frame_q [$];
  uart_rx_model #(.DIV(50_000_000 / 115_200)) u_rx (.clk(clk), .rxd(txd), .got(got), .data(rxb), .bit_err(berr));
  always @(posedge got) frame_q.push_back(rxb);

  initial begin : watchdog
    #(64'd900_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e [NI];
    for (int i = 0; i < NI; i++) begin
      e[i] = ideal_count(i) - ideal_count(i + 1);
      db_wdata[i] = 24'($rtoi(e[i]));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    db_we = 1'b1; db_waddr = 3'd0;
    @(negedge clk);
    for (int i = 0; i < NI; i++) db_wdata[i] = -db_wdata[i];
    db_waddr = 3'd1;
    @(negedge clk);
    db_we = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    @(posedge id_valid);
    #1;
    for (int i = 0; i < NI; i++)
      check(rabs(real'(ids[i]) - e[i]) <= 2.0, $sformatf("id[%0d]=%0d predicted %f", i, ids[i], e[i]));
    check(!id_sat, "no saturation");
    @(posedge auth_done);
    #1;
    check(auth_match && auth_idx == 3'd0, $sformatf("recognised: match=%0b idx=%0d dsq=%0d", auth_match, auth_idx, auth_dsq));
    begin
      int t;
      t = 0;
      while (frame_q.size() < 2 + 3 * NI && t < 1_000_000) begin @(negedge clk); t++; end
    end
    check(frame_q.size() == 2 + 3 * NI, $sformatf("frame bytes %0d", frame_q.size()));
    if (frame_q.size() == 2 + 3 * NI) begin
      check(frame_q[0] == 8'hA5 && frame_q[1] == 8'd0, "frame header");
      for (int i = 0; i < NI; i++)
        check({frame_q[2+3*i], frame_q[3+3*i], frame_q[4+3*i]} == 24'(ids[i]), $sformatf("frame word %0d", i));
    end
    check(busy && !run_done, "run continues with the next sample");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
