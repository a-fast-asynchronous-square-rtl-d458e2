// tb_oc_chain: the recursive operands OCNum16..OCNum2 for every 16-bit
// input, computed here by subtraction (N* = 2^(w-2)-1-M when bit w-2 is set),
// and the published values for input 0xAA55
// (2a55, a55, 255, 55, 2a, a, 2).
module tb_oc_chain;
  localparam int N = 16, L = N / 2;
  logic [N-1:0] num;
  logic [L-1:0][N-1:0] oc;
  int checks = 0, failures = 0;
  oc_chain #(.N(N)) dut (.num(num), .oc_num(oc));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int cur, w, m;
    static logic [N-1:0] pub[L] = '{16'haa55, 16'h2a55, 16'h0a55, 16'h0255, 16'h0055, 16'h002a, 16'h000a, 16'h0002};
    for (int v = 0; v < (1 << N); v++) begin
      num = N'(v);
      #1;
      cur = v;
      for (int r = 0; r < L; r++) begin
        w = N - 2 * r;
        checks++;
        if (int'(oc[r]) != cur) begin
          failures++;
          if (failures < 10) $display("FAIL %h level %0d: %h exp %h", num, r, oc[r], cur);
        end
        m = cur % (1 << (w - 2));
        cur = ((cur >> (w - 2)) & 1) != 0 ? ((1 << (w - 2)) - 1 - m) : m;
      end
    end
    num = 16'haa55;
    #1;
    for (int r = 0; r < L; r++) begin
      checks++;
      if (oc[r] !== pub[r]) begin failures++; $display("FAIL AA55 level %0d: %h", r, oc[r]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
