// tb_async_square_gen: end-to-end test of the square generator at its
// default parameters (N = 16).
//
// A sender process offers numbers on the four-phase input channel with
// random gaps; a receiver process acknowledges results with random delays,
// so the pipeline fills and stalls. The numbers are the two published
// cases 0xAA55 (every ball fits a box) and 0x6655 (no ball fits), 0, 1,
// 0xFFFF and random values. Every result is compared with num*num computed
// here, in order. The test also counts how often each mechanism of the
// design happened: a ball merged by the Fast Algorithm, an addition skipped
// by ZeroPass, an addition done by the adder, a stage stalled by the next
// one, and more than one square in flight; a mechanism never seen counts as
// a failure. The isolated latency of 0xAA55 must be below that of 0x6655.
module tb_async_square_gen;

  localparam int N      = 16;
  localparam int NUM_RAND = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_in = 1'b0, ack_in = 1'b0;
  logic ack_out, req_out;
  logic [N-1:0]   num = '0;
  logic [2*N-1:0] result;

  always #5 clk = ~clk;

  async_square_gen dut (
    .clk(clk), .rst_n(rst_n), .req_in(req_in), .ack_out(ack_out), .num(num),
    .req_out(req_out), .ack_in(ack_in), .result(result)
  );

  int checks = 0, failures = 0;
  logic [N-1:0] expq[$];
  int sent = 0, received = 0, acked = 0, total;

  // mechanism counters
  int n_merge = 0, n_zeropass = 0, n_add = 0, n_stall = 0, n_overlap = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_s2.req_d && !dut.u_s2.ack_in && !dut.req2)
      n_merge += $countones(dut.u_dvg.ball_empty);
    if (dut.u_add.zero_pass) n_zeropass++;
    if (dut.u_add.u_ctrl.step && !dut.u_add.zero_sel) n_add++;
    if (dut.u_s2.req_d && dut.u_s2.ack_in && !dut.req2) n_stall++;
  end

  task automatic send(input logic [N-1:0] v);
    num <= v;
    expq.push_back(v);
    @(posedge clk) req_in <= 1'b1;
    while (!ack_out) @(posedge clk);
    if (sent - acked >= 1) n_overlap++;  // an older square still inside
    sent++;
    @(posedge clk) req_in <= 1'b0;
    while (ack_out) @(posedge clk);
  endtask

  // isolated latency, req_in rise to req_out rise, pipeline empty
  task automatic latency(input logic [N-1:0] v, output int cyc);
    logic [N-1:0] e;
    num <= v;
    @(posedge clk) req_in <= 1'b1;
    cyc = 0;
    while (!req_out) begin @(posedge clk); cyc++; end
    checks++;
    if (result !== 32'(v) * 32'(v)) begin
      failures++;
      $display("FAIL latency run %h: %h", v, result);
    end
    while (!ack_out) @(posedge clk);
    req_in <= 1'b0;
    @(posedge clk) ack_in <= 1'b1;
    while (req_out) @(posedge clk);
    ack_in <= 1'b0;
    repeat (20) @(posedge clk);
  endtask

  initial begin : receiver
    logic [N-1:0] v;
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (req_out && !ack_in && expq.size() > 0 && sent > received) begin
        v = expq.pop_front();
        checks++;
        if (result !== 32'(v) * 32'(v)) begin
          failures++;
          if (failures < 10) $display("FAIL %h^2: got %h exp %h", v, result, 32'(v) * 32'(v));
        end
        received++;
        repeat ($urandom_range(0, 3) == 0 ? $urandom_range(5, 60) : 0) @(posedge clk);
        ack_in <= 1'b1;
        acked++;
        while (req_out) @(posedge clk);
        ack_in <= 1'b0;
      end
    end
  end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: sent %0d received %0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int lat_best, lat_worst;
    static logic [N-1:0] fixed[6] = '{16'hAA55, 16'h6655, 16'h0000, 16'h0001, 16'hFFFF, 16'h8000};
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // isolated latencies of the published best and worst cases (receiver idle:
    // the queue is empty, so it does not answer)
    latency(16'hAA55, lat_best);
    latency(16'h6655, lat_worst);
    $display("latency AA55 = %0d clocks, 6655 = %0d clocks", lat_best, lat_worst);
    checks++;
    if (!(lat_best < lat_worst)) begin
      failures++;
      $display("FAIL best case not faster than worst case");
    end

    total = NUM_RAND + 6;
    foreach (fixed[i]) begin
      send(fixed[i]);
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    for (int i = 0; i < NUM_RAND; i++) begin
      send(N'($urandom));
      repeat ($urandom_range(0, 3) == 0 ? $urandom_range(0, 40) : 0) @(posedge clk);
    end
    while (received < total) @(posedge clk);

    $display("merges=%0d zeropass=%0d additions=%0d stall_cycles=%0d overlaps=%0d",
             n_merge, n_zeropass, n_add, n_stall, n_overlap);
    checks++; if (n_merge == 0)    begin failures++; $display("FAIL no Fast Algorithm merge"); end
    checks++; if (n_zeropass == 0) begin failures++; $display("FAIL no ZeroPass skip"); end
    checks++; if (n_add == 0)      begin failures++; $display("FAIL no adder addition"); end
    checks++; if (n_stall == 0)    begin failures++; $display("FAIL no stall"); end
    checks++; if (n_overlap == 0)  begin failures++; $display("FAIL no overlap"); end
    checks++; if (received != total) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
