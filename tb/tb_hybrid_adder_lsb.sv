// tb_hybrid_adder_lsb: bit 0 cell. With start high the carry of a + b must
// be known at once on exactly one rail and sum must be a XOR b; with start
// low only a generate may show.
module tb_hybrid_adder_lsb;
  logic a, b, start, sum, ot, of, done;
  int checks = 0, failures = 0;
  hybrid_adder_lsb dut (.a(a), .b(b), .start(start), .sum(sum), .cout_t(ot), .cout_f(of), .done(done));
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int s;
    for (int v = 0; v < 8; v++) begin
      {a, b, start} = 3'(v);
      #1;
      s = int'(a) + int'(b);
      checks++;
      if (start ? (ot !== (s == 2) || of !== (s < 2) || !done || sum !== 1'(s))
                : (ot !== (s == 2) || of !== 1'b0)) begin
        failures++; $display("FAIL a%b b%b st%b: %b%b", a, b, start, ot, of);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
