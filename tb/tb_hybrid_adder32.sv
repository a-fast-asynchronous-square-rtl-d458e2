// tb_hybrid_adder32: self-timed adder with completion detection.
//
// Adds operand pairs whose sum fits the adder (no carry out): zero and
// corner patterns, long carry-propagate runs and random values. For each
// pair start is raised, done must rise within the bound set by the carry
// chain, and the completion time must equal the longest carry-propagate run
// plus two clocks, worked out here from the operands. The sum is compared
// with a + b. start is then lowered and done must return to 0.
module tb_hybrid_adder32;

  localparam int W = 32;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] a = '0, b = '0, sum;
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hybrid_adder32 #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                              .sum(sum), .done(done));

  // expected completion: the carry out of bit i is known (k+1) clocks after
  // start, k being the number of propagate bits directly below i that the
  // carry must ripple through; done follows one clock after the last one,
  // and this testbench sees it at the next edge (driven and sampled at
  // clock edges), hence worst + 2.
  function automatic int expect_cycles(logic [W-1:0] x, logic [W-1:0] y);
    int worst = 0, run = 0;
    for (int i = 0; i < W - 1; i++) begin
      if (i > 0 && (x[i] ^ y[i])) run++;
      else run = 0;
      if (run + 1 > worst) worst = run + 1;
    end
    return worst + 2;
  endfunction

  task automatic add(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc;
    a = x; b = y;
    @(posedge clk) start <= 1'b1;
    cyc = 0;
    while (!done && cyc < 100) begin @(posedge clk); cyc++; end
    checks++;
    if (sum !== x + y || cyc != expect_cycles(x, y)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h: sum %h exp %h, %0d clocks exp %0d", x, y, sum, x + y, cyc, expect_cycles(x, y));
    end
    start <= 1'b0;
    cyc = 0;
    while (done && cyc < 10) begin @(posedge clk); cyc++; end
    checks++;
    if (done) begin failures++; $display("FAIL done stuck high"); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] x, y;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    add('0, '0);
    add(32'h7FFF_FFFF, 32'h0000_0001);  // carry through 30 propagate bits
    add(32'h4000_0000, 32'h3FFF_FFFF);
    add(32'h6A55_0000, 32'h0695_4000);
    add(32'h0000_FFFF, 32'h0000_0000);
    for (int i = 0; i < 400; i++) begin
      x = $urandom & 32'h7FFF_FFFF;
      y = $urandom & 32'h7FFF_FFFF;
      add(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
