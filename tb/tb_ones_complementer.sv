// tb_ones_complementer: exhaustive check of the folding step at W = 10:
// N* equals the low W-2 bits when bit W-2 is 0 and 2^(W-2)-1 minus them
// when it is 1, computed here by subtraction.
module tb_ones_complementer;
  localparam int W = 10;
  logic [W-1:0] num;
  logic [W-3:0] oc;
  int checks = 0, failures = 0;
  ones_complementer #(.W(W)) dut (.num(num), .oc_num(oc));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int m, e;
    for (int v = 0; v < (1 << W); v++) begin
      num = W'(v);
      #1;
      m = v % (1 << (W - 2));
      e = num[W-2] ? ((1 << (W - 2)) - 1 - m) : m;
      checks++;
      if (int'(oc) != e) begin failures++; $display("FAIL %h -> %h exp %h", num, oc, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
