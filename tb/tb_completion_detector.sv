// tb_completion_detector: random done vectors of width 31. complete must
// rise one clock after every bit is done, fall one clock after every bit is
// empty, and hold in between.
module tb_completion_detector;
  localparam int W = 31;
  logic clk = 1'b0, rst_n = 1'b0, complete;
  logic [W-1:0] done = '0;
  logic model = 1'b0;
  int checks = 0, failures = 0, rises = 0, holds = 0;
  always #5 clk = ~clk;
  completion_detector #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .done(done), .complete(complete));
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      case ($urandom_range(0, 3))
        0: done <= '1;
        1: done <= '0;
        default: done <= W'($urandom) | 1;  // partial: neither all valid nor all empty
      endcase
      @(posedge clk);
      if (&done) begin if (!model) rises++; model = 1'b1; end
      else if (done == '0) model = 1'b0;
      else holds++;
      #1;
      checks++;
      if (complete !== model) begin failures++; $display("FAIL done=%h complete=%b", done, complete); end
    end
    checks++;
    if (rises == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
