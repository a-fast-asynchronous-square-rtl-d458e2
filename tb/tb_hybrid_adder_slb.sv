// tb_hybrid_adder_slb: second-last bit cell, all input combinations. With a
// known carry-in and start high, cout_t is the carry of a + b + cin, done
// is high and sum is the sum bit; with an empty carry-in done is high only
// for a generate or a kill.
module tb_hybrid_adder_slb;
  logic a, b, start, ct, cf, sum, ot, done;
  int checks = 0, failures = 0;
  hybrid_adder_slb dut (.a(a), .b(b), .start(start), .cin_t(ct), .cin_f(cf),
                        .sum(sum), .cout_t(ot), .done(done));
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int s;
    for (int v = 0; v < 8; v++) begin
      {a, b, ct} = 3'(v);
      cf = ~ct; start = 1'b1;
      #1;
      s = int'(a) + int'(b) + int'(ct);
      checks++;
      if (ot !== (s >= 2) || !done || sum !== 1'(s)) begin failures++; $display("FAIL %b%b%b", a, b, ct); end
      ct = 1'b0; cf = 1'b0;
      #1;
      checks++;
      if (done !== (a == b) || ot !== (a & b)) begin failures++; $display("FAIL empty %b%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
