// tb_c_element: Muller C-element truth table (both 0 -> 0, both 1 -> 1,
// otherwise hold) under random input sequences, plus reset to 0.
module tb_c_element;
  logic clk = 1'b0, rst_n = 1'b0, a = 1'b0, b = 1'b0, z;
  logic model = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  c_element dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .z(z));
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    a <= 1'b1; b <= 1'b1;
    repeat (2) @(posedge clk);
    checks++; if (z !== 1'b0) failures++;  // held in reset
    rst_n <= 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk);
      if (a == b) model = a;
      #1;
      checks++;
      if (z !== model) begin failures++; $display("FAIL a=%b b=%b z=%b", a, b, z); end
      a <= 1'($urandom); b <= 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
