// tb_dvg_fa_stage: stage-2 logic for every 16-bit input. The operands of the
// eight levels are computed here by subtraction; the DValues must add up to
// num*num, each must fit its width 2(16-2r), the zero flags must match the
// values, and a moved ball must have left a zero behind. For 0xAA55 the
// published stage-2 values are checked (D32 = 6a551555, D28 = 6954680,
// D24 = 655060, D20 = 55400, D16 = D12 = D8 = 0, D4 = 4, ZeroFlag = 0e with
// bit 0 for D4), and 0x6655 must merge nothing. A second instance without
// the Fast Algorithm is checked the same way.
module tb_dvg_fa_stage;
  localparam int N = 16, L = N / 2;
  int checks = 0, failures = 0;
  logic [L-1:0][N-1:0]   oc;
  logic [L-1:0][2*N-1:0] dv, dv0;
  logic [L-1:0]          zf, zf0;
  logic [2:0]            be, be0;

  dvg_fa_stage #(.N(N)) dut (.oc_num(oc), .dval(dv), .zero_flag(zf), .ball_empty(be));
  dvg_fa_stage #(.N(N), .USE_FA(1'b0)) dut0 (.oc_num(oc), .dval(dv0), .zero_flag(zf0), .ball_empty(be0));

  task automatic set_num(int v);
    int cur = v, w, m;
    for (int r = 0; r < L; r++) begin
      w = N - 2 * r;
      oc[r] = N'(cur);
      m = cur % (1 << (w - 2));
      cur = ((cur >> (w - 2)) & 1) != 0 ? ((1 << (w - 2)) - 1 - m) : m;
    end
  endtask

  function automatic bit consistent(int v, logic [L-1:0][2*N-1:0] d, logic [L-1:0] z);
    longint s = 0;
    for (int r = 0; r < L; r++) begin
      s += longint'(d[r]);
      if ((d[r] >> (2 * (N - 2 * r))) != 0) return 0;
      if (z[r] != (d[r] == 0)) return 0;
    end
    return s == longint'(v) * longint'(v);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int merges = 0;
    static logic [2*N-1:0] pub[L] = '{32'h6a551555, 32'h06954680, 32'h00655060, 32'h00055400,
                               32'h0, 32'h0, 32'h0, 32'h4};
    for (int v = 0; v < (1 << N); v++) begin
      set_num(v);
      #1;
      checks++;
      if (!consistent(v, dv, zf) || !consistent(v, dv0, zf0) || be0 != 0) begin
        failures++;
        if (failures < 10) $display("FAIL %h", v);
      end
      merges += $countones(be);
    end
    set_num(32'haa55);
    #1;
    for (int r = 0; r < L; r++) begin
      checks++;
      if (dv[r] !== pub[r]) begin failures++; $display("FAIL AA55 D%0d = %h", 2 * (N - 2 * r), dv[r]); end
    end
    checks++;
    if ({<<{zf}} !== 8'h0e) begin failures++; $display("FAIL AA55 ZeroFlag %b", zf); end
    set_num(32'h6655);
    #1;
    checks++;
    if (be !== '0) begin failures++; $display("FAIL 6655 merged"); end
    checks++;
    if (merges == 0) failures++;
    $display("merges over all inputs: %0d", merges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
