// tb_fast_algorithm: ball-into-box assignment against a reference written
// the way the published pseudo code reads: balls i = N/4..1 (ball i is the
// DValue D(4i)), boxes j = N/4..1 (box j is the DValue D(2N-4(N/4-j))), a
// ScanPoint counting down from N/4, and a lower scan bound
// max(2i - N/4, 1). The reduced three-box, three-ball instance is compared
// with that reference run with ball 1 and box 1 forced absent; a second
// instance with N/4 of each is compared with the full reference. All flag
// combinations are tried with random ball values of the right widths.
module tb_fast_algorithm;
  localparam int N = 16, Q = N / 4;
  int checks = 0, failures = 0;

  logic [2:0]        box3, ball3, empty3;
  logic [2:0][N-1:0] bval3, nbox3, nball3;
  logic [3:0]        box4, ball4, empty4;
  logic [3:0][N-1:0] bval4, nbox4, nball4;

  fast_algorithm #(.N(N)) dut3 (.ball_dval(bval3), .box(box3), .ball(ball3),
    .new_box_low(nbox3), .new_ball(nball3), .ball_empty(empty3));
  fast_algorithm #(.N(N), .NUM_BOX(4), .NUM_BALL(4)) dut4 (.ball_dval(bval4), .box(box4), .ball(ball4),
    .new_box_low(nbox4), .new_ball(nball4), .ball_empty(empty4));

  // reference: target[i] = box j that ball i goes to, 0 if none (1-based)
  function automatic void ref_scan(input bit bx[1:Q], input bit bl[1:Q], output int target[1:Q]);
    int scan_point = Q, bound;
    for (int i = 1; i <= Q; i++) target[i] = 0;
    for (int i = Q; i >= 1; i--) begin
      if (scan_point != 0 && bl[i]) begin
        bound = 2 * i - Q;
        if (bound < 1) bound = 1;
        for (int j = scan_point; j >= bound; j--) begin
          scan_point--;
          if (bx[j]) begin target[i] = j; break; end
        end
      end
    end
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit bx[1:Q], bl[1:Q];
    int tgt[1:Q];
    static int merges = 0;
    logic [N-1:0] ebox, eball;
    for (int rep = 0; rep < 4; rep++)
    for (int f = 0; f < 256; f++) begin
      box4 = f[3:0]; ball4 = f[7:4];
      for (int k = 0; k < 4; k++) bval4[k] = ball4[k] ? N'(($urandom | 1) & ((1 << (N - 4 * k)) - 1)) : '0;
      box3 = box4[2:0]; ball3 = ball4[2:0];
      for (int k = 0; k < 3; k++) bval3[k] = bval4[k];
      #1;
      // index k (0 = largest) <-> pseudo-code ball i = Q-k, box j = Q-k
      for (int full = 0; full < 2; full++) begin
        for (int x = 1; x <= Q; x++) begin
          bx[x] = box4[Q - x];
          bl[x] = ball4[Q - x];
        end
        if (full == 0) begin bx[1] = 0; bl[1] = 0; end
        ref_scan(bx, bl, tgt);
        for (int k = 0; k < (full != 0 ? 4 : 3); k++) begin
          // ball k
          eball = (tgt[Q - k] != 0) ? '0 : bval4[k];
          // box k
          ebox = '0;
          for (int i = 1; i <= Q; i++) if (tgt[i] == Q - k) ebox = bval4[Q - i];
          checks++;
          if (full != 0 ? (nball4[k] !== eball || nbox4[k] !== ebox || empty4[k] !== (tgt[Q - k] != 0))
                   : (nball3[k] !== eball || nbox3[k] !== ebox || empty3[k] !== (tgt[Q - k] != 0))) begin
            failures++;
            if (failures < 10) $display("FAIL full=%0d flags=%h k=%0d", full, f, k);
          end
          if (full == 0 && tgt[Q - k] != 0) merges++;
        end
      end
    end
    checks++;
    if (merges == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
