// tb_latency_table8: latency of the generator with and without the Fast
// Algorithm, on the two published cases (0xAA55: every ball fits a box;
// 0x6655: none does) and on random inputs. Two generators are built side by
// side, one with USE_FA = 0. Each square is sent alone into an empty
// pipeline and timed from req_in rising to req_out rising. Checked: every
// result; the Fast Algorithm makes 0xAA55 faster, does not change 0x6655,
// and lowers the mean latency over random inputs.
module tb_latency_table8;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] req_in = '0, ack_in = '0, ack_out, req_out;
  logic [N-1:0] num = '0;
  logic [1:0][2*N-1:0] result;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  async_square_gen #(.USE_FA(1'b1)) dut_fa (
    .clk(clk), .rst_n(rst_n), .req_in(req_in[1]), .ack_out(ack_out[1]), .num(num),
    .req_out(req_out[1]), .ack_in(ack_in[1]), .result(result[1]));
  async_square_gen #(.USE_FA(1'b0)) dut_nofa (
    .clk(clk), .rst_n(rst_n), .req_in(req_in[0]), .ack_out(ack_out[0]), .num(num),
    .req_out(req_out[0]), .ack_in(ack_in[0]), .result(result[0]));

  // one square on generator g (1 = with the Fast Algorithm), latency in clocks
  task automatic square(input int g, input logic [N-1:0] v, output int cyc);
    num <= v;
    @(posedge clk) req_in[g] <= 1'b1;
    cyc = 0;
    @(posedge clk);
    while (!req_out[g]) begin @(posedge clk); cyc++; end
    checks++;
    if (result[g] !== 32'(v) * 32'(v)) begin failures++; $display("FAIL %0d: %h^2 = %h", g, v, result[g]); end
    req_in[g] <= 1'b0;
    ack_in[g] <= 1'b1;
    while (req_out[g] || ack_out[g]) @(posedge clk);
    ack_in[g] <= 1'b0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bf, bn, wf, wn, cf, cn;
    static longint sf = 0, sn = 0;
    logic [N-1:0] v;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    square(1, 16'hAA55, bf);  square(0, 16'hAA55, bn);
    square(1, 16'h6655, wf);  square(0, 16'h6655, wn);
    $display("best case 0xAA55:  %0d clocks with, %0d without the Fast Algorithm (%0.2f%% faster)",
             bf, bn, 100.0 * (bn - bf) / bn);
    $display("worst case 0x6655: %0d clocks with, %0d without the Fast Algorithm", wf, wn);
    checks++; if (!(bf < bn)) begin failures++; $display("FAIL best case not faster"); end
    checks++; if (wf != wn)   begin failures++; $display("FAIL worst case changed"); end
    for (int i = 0; i < 2000; i++) begin
      v = N'($urandom);
      square(1, v, cf);
      square(0, v, cn);
      checks++;
      if (cf > cn) begin failures++; $display("FAIL %h slower with the Fast Algorithm", v); end
      sf += longint'(cf); sn += longint'(cn);
    end
    $display("mean latency over 2000 random inputs: %0.2f with, %0.2f without (%0.2f%% faster)",
             real'(sf) / 2000.0, real'(sn) / 2000.0, 100.0 * real'(sn - sf) / real'(sn));
    checks++; if (!(sf < sn)) begin failures++; $display("FAIL mean not lower"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
