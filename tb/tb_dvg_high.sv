// tb_dvg_high: upper half of the DValue, exhaustively for operand widths 2, 8
// and 12. The expected DValue is worked out here as |N|^2 - |N*|^2, with
// N* = M when bit w-2 is 0 and 2^(w-2)-1-M when it is 1.
module tb_dvg_high;
  int checks = 0, failures = 0;

  logic [1:0]  n2;  logic [1:0]  d2;
  logic [7:0]  n8;  logic [7:0]  d8;
  logic [11:0] n12; logic [11:0] d12;
  dvg_high #(.W(2))  u2  (.num(n2),  .d_high(d2));
  dvg_high #(.W(8))  u8  (.num(n8),  .d_high(d8));
  dvg_high #(.W(12)) u12 (.num(n12), .d_high(d12));

  function automatic longint expect_half(int W, longint x);
    longint m, ns, d;
    m  = (W > 2) ? x % (64'd1 << (W - 2)) : 0;
    ns = ((x >> (W - 2)) & 1) != 0 ? ((64'd1 << (W - 2)) - 1 - m) : m;
    d  = x * x - ns * ns;
    return d >> W;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      n2 = 2'(v); n8 = 8'(v); n12 = 12'(v);
      #1;
      if (v < 4) begin
        checks++;
        if (longint'(d2) != expect_half(2, longint'(v))) begin failures++; $display("FAIL w2 %0d", v); end
      end
      if (v < 256) begin
        checks++;
        if (longint'(d8) != expect_half(8, longint'(v))) begin failures++; $display("FAIL w8 %0d: %h", v, d8); end
      end
      checks++;
      if (longint'(d12) != expect_half(12, longint'(v))) begin failures++; $display("FAIL w12 %0d: %h", v, d12); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
