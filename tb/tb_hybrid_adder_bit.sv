// tb_hybrid_adder_bit: all 32 input combinations of the dual-rail cell.
// With start high and a known carry-in, the out rails must encode the carry
// of a + b + cin, done must be high and sum must be the sum bit. With an
// empty carry-in only generate (true) and kill (false) may be known; with
// start low the false rail may only come from the carry-in.
module tb_hybrid_adder_bit;
  logic a, b, start, ct, cf, sum, ot, of, done;
  int checks = 0, failures = 0;
  hybrid_adder_bit dut (.a(a), .b(b), .start(start), .cin_t(ct), .cin_f(cf),
                        .sum(sum), .cout_t(ot), .cout_f(of), .done(done));
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int s;
    logic et, ef;
    for (int v = 0; v < 16; v++) begin
      {a, b, start, ct} = 4'(v);
      cf = 1'b0;
      for (int e = 0; e < 2; e++) begin
        if (e == 0) begin cf = ~ct; end else begin ct = 1'b0; cf = 1'b0; end
        #1;
        s = int'(a) + int'(b) + int'(ct);
        if (ct | cf) begin
          et = (s >= 2);
          ef = (s < 2) && (start || cf && (a ^ b));
          checks++;
          if (ot !== et || of !== ef || done !== (et | ef) || (ot | of) && sum !== 1'(s)) begin
            failures++; $display("FAIL a%b b%b st%b ct%b cf%b: %b%b %b", a, b, start, ct, cf, ot, of, sum);
          end
        end else begin
          et = a & b;
          ef = start & ~a & ~b;
          checks++;
          if (ot !== et || of !== ef || done !== (et | ef)) begin
            failures++; $display("FAIL empty a%b b%b st%b: %b%b", a, b, start, ot, of);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
