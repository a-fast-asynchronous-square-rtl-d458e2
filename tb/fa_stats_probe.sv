// fa_stats_probe: testbench helper for tb_fa_statistics. For one operand
// width N it feeds every N-bit input through oc_chain and dvg_fa_stage with
// the full Fast Algorithm (N/4 boxes and N/4 balls) and accumulates, over
// all inputs, how often each ball was moved and how many operand bits the
// moves saved (the width of each moved ball). run() returns when done.
module fa_stats_probe #(
  parameter int N = 16
);
  localparam int L = N / 2, Q = N / 4;
  logic [N-1:0]          num;
  logic [L-1:0][N-1:0]   oc;
  logic [L-1:0][2*N-1:0] dv;
  logic [L-1:0]          zf;
  logic [Q-1:0]          be;

  oc_chain #(.N(N)) u_oc (.num(num), .oc_num(oc));
  dvg_fa_stage #(.N(N), .NUM_BOX(Q), .NUM_BALL(Q)) u_st (.oc_num(oc), .dval(dv), .zero_flag(zf), .ball_empty(be));

  longint moved[Q];
  longint bits;
  int     bad;

  task automatic run();
    longint s;
    bits = 0; bad = 0;
    for (int k = 0; k < Q; k++) moved[k] = 0;
    for (longint v = 0; v < (64'd1 << N); v++) begin
      num = N'(v);
      #1;
      s = 0;
      for (int r = 0; r < L; r++) s += longint'(dv[r]);
      if (s != v * v) bad++;
      for (int k = 0; k < Q; k++)
        if (be[k]) begin moved[k]++; bits = bits + longint'(N) - longint'(4 * k); end
    end
  endtask
endmodule
