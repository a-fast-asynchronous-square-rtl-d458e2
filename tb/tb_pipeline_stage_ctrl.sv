// tb_pipeline_stage_ctrl: a single four-phase bundled-data stage between a
// sender and a receiver with random delays. Every value must arrive once, in
// order, and the request must reach the next stage DELAY+1 clocks after it
// entered when the next stage is free (matched delay plus C-element).
module tb_pipeline_stage_ctrl;
  localparam int DW = 16, DELAY = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req_in = 1'b0, ack_in = 1'b0, ack_out, req_out;
  logic [DW-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [DW-1:0] q[$];
  int fast = 0, nsent = 0, nrecv = 0;
  always #5 clk = ~clk;

  pipeline_stage_ctrl #(.DW(DW), .DELAY(DELAY)) dut (
    .clk(clk), .rst_n(rst_n), .req_in(req_in), .ack_out(ack_out), .data_in(din),
    .req_out(req_out), .ack_in(ack_in), .data_out(dout));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : receiver
    logic [DW-1:0] e;
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (req_out && !ack_in) begin
        e = q.pop_front();
        checks++;
        if (dout !== e) begin failures++; $display("FAIL got %h exp %h", dout, e); end
        nrecv++;
        repeat ($urandom_range(0, 6)) @(posedge clk);
        // bundled data: still valid when acknowledged
        checks++;
        if (dout !== e) begin failures++; $display("FAIL data changed before ack: %h", dout); end
        ack_in <= 1'b1;
        while (req_out) @(posedge clk);
        ack_in <= 1'b0;
      end
    end
  end

  initial begin : sender
    int cyc;
    logic [DW-1:0] v;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 500; i++) begin
      repeat ($urandom_range(0, 4)) @(posedge clk);
      v = DW'($urandom);
      din <= v;
      q.push_back(v);
      @(posedge clk) req_in <= 1'b1;
      cyc = 0;
      @(posedge clk);
      while (!req_out) begin @(posedge clk); cyc++; end
      if (cyc == DELAY + 1) fast++;
      checks++;
      if (cyc < DELAY) begin failures++; $display("FAIL request passed in %0d clocks", cyc); end
      while (!ack_out) @(posedge clk);
      req_in <= 1'b0;
      din <= DW'($urandom);  // data may change once acknowledged
      nsent++;
      while (ack_out) @(posedge clk);
    end
    while (nrecv < nsent) @(posedge clk);
    checks++;
    if (fast == 0) begin failures++; $display("FAIL never saw the matched-delay latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
