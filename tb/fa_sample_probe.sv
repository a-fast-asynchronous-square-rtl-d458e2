// fa_sample_probe: testbench helper for tb_fa_statistics_sampled. For one
// operand width N it squares SAMPLES uniformly random N-bit inputs through
// oc_chain and dvg_fa_stage with the full Fast Algorithm (N/4 boxes and N/4
// balls) and accumulates how often each ball was moved and how many operand
// bits the moves saved (the width of each moved ball). It also counts inputs
// whose DValues do not add up to the exact square. run() returns when done.
module fa_sample_probe #(
  parameter int N       = 28,
  parameter int SAMPLES = 1 << 18
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
    logic [2*N-1:0] s, sq;
    bits = 0; bad = 0;
    for (int k = 0; k < Q; k++) moved[k] = 0;
    for (int i = 0; i < SAMPLES; i++) begin
      num = N'({$urandom, $urandom, $urandom});
      #1;
      s = '0;
      for (int r = 0; r < L; r++) s += dv[r];
      sq = {{N{1'b0}}, num} * {{N{1'b0}}, num};
      if (s != sq) bad++;
      for (int k = 0; k < Q; k++)
        if (be[k]) begin moved[k]++; bits = bits + longint'(N) - longint'(4 * k); end
    end
  endtask
endmodule
