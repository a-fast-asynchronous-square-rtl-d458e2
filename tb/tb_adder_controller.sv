// tb_adder_controller: the local four-phase controller with counter and
// ZeroPass against a behavioural adder that answers each started addition
// (start = Local_Rin and not ZeroFlag) after a random delay and drops its
// done after start falls. For each global request with random zero flags:
// there must be NUM_OPS-1 steps, a step for a zero operand must come one
// clock after Local_Rin and without an adder answer, the counter must read
// NUM_OPS-1 when the global complete rises and the complete must fall
// after the global request does.
module tb_adder_controller;
  localparam int NUM_OPS = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic global_rin = 1'b0, global_done, adder_done = 1'b0;
  logic [NUM_OPS-1:0] zf = '0;
  logic local_rin, local_ain, zero_sel, step;
  logic [2:0] counter;
  int checks = 0, failures = 0, nsteps, nzero, zero_total = 0, adds_total = 0;
  always #5 clk = ~clk;

  adder_controller #(.NUM_OPS(NUM_OPS)) dut (
    .clk(clk), .rst_n(rst_n), .global_rin(global_rin), .global_done(global_done),
    .zero_flag(zf), .adder_done(adder_done), .local_rin(local_rin), .local_ain(local_ain),
    .zero_sel(zero_sel), .step(step), .counter(counter));

  // behavioural adder
  initial begin : adder
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (local_rin && !zero_sel) begin
        repeat ($urandom_range(1, 8)) @(posedge clk);
        adder_done <= 1'b1;
        while (local_rin) @(posedge clk);
        @(posedge clk);
        adder_done <= 1'b0;
      end
    end
  end

  // step monitor
  int rin_age = 0;
  always @(posedge clk) begin
    rin_age <= local_rin ? rin_age + 1 : 0;
    if (step) begin
      nsteps++;
      if (zero_sel) begin
        nzero++;
        checks++;
        if (rin_age != 0 || adder_done) begin failures++; $display("FAIL slow zero pass"); end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_zero;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 200; t++) begin
      zf <= NUM_OPS'($urandom);
      nsteps = 0; nzero = 0;
      @(posedge clk) global_rin <= 1'b1;
      @(posedge clk);
      while (!global_done) @(posedge clk);
      exp_zero = $countones(zf[NUM_OPS-1:1]);
      checks++;
      if (nsteps != NUM_OPS - 1 || nzero != exp_zero || counter != 3'(NUM_OPS - 1)) begin
        failures++;
        $display("FAIL zf=%b steps=%0d zero=%0d counter=%0d", zf, nsteps, nzero, counter);
      end
      zero_total += nzero;
      adds_total += nsteps - nzero;
      global_rin <= 1'b0;
      repeat (3) @(posedge clk);
      checks++;
      if (global_done || counter != 0) begin failures++; $display("FAIL no return to zero"); end
    end
    checks++;
    if (zero_total == 0 || adds_total == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
