// tb_hybrid_adder_zeropass: stage 3 with random DValue sets shaped like the
// generator's (DValue r is at most 2(16-2r) bits, zero with probability
// 1/4, total below 2^32). The result must be the sum of the eight values,
// the number of ZeroPass skips must equal the number of zero DValues among
// the seven second operands, and a set whose second operands are all zero
// must finish faster than the same set with them non-zero.
module tb_hybrid_adder_zeropass;
  localparam int N = 16, L = N / 2;
  logic clk = 1'b0, rst_n = 1'b0, grin = 1'b0, gdone, lrin, zpass;
  logic [L-1:0][2*N-1:0] dval = '0;
  logic [L-1:0] zf = '0;
  logic [2*N-1:0] result;
  logic [2:0] counter;
  int checks = 0, failures = 0, nzp;
  always #5 clk = ~clk;

  hybrid_adder_zeropass #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .global_rin(grin), .global_done(gdone), .dval(dval),
    .zero_flag(zf), .result(result), .local_rin(lrin), .zero_pass(zpass), .counter(counter));

  always @(posedge clk) if (zpass) nzp++;

  task automatic run(output int cyc);
    longint s = 0;
    int ez = 0;
    for (int r = 0; r < L; r++) begin
      s += longint'(dval[r]);
      if (r > 0 && dval[r] == 0) ez++;
    end
    nzp = 0;
    @(posedge clk) grin <= 1'b1;
    cyc = 0;
    @(posedge clk);
    while (!gdone && cyc < 5000) begin @(posedge clk); cyc++; end
    checks++;
    if (longint'(result) != (s & 64'hFFFF_FFFF) || nzp != ez) begin
      failures++;
      $display("FAIL result %h exp %h, zero passes %0d exp %0d", result, s, nzp, ez);
    end
    grin <= 1'b0;
    while (gdone) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c1, c2;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 300; t++) begin
      for (int r = 0; r < L; r++) begin
        dval[r] = ($urandom_range(0, 3) == 0) ? '0
                : (2*N)'({$urandom, $urandom} & ((64'd1 << (2 * (N - 2 * r) - 3)) - 1));
        zf[r] = (dval[r] == 0);
      end
      run(c1);
    end
    // same first operand, second operands all zero vs all non-zero
    dval = '0; dval[0] = 32'h3FFF_FFFF;
    for (int r = 0; r < L; r++) zf[r] = (dval[r] == 0);
    run(c1);
    for (int r = 1; r < L; r++) dval[r] = 1;
    for (int r = 0; r < L; r++) zf[r] = (dval[r] == 0);
    run(c2);
    $display("all-zero operands: %0d clocks, non-zero: %0d clocks", c1, c2);
    checks++;
    if (!(c1 < c2)) begin failures++; $display("FAIL ZeroPass not faster"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
