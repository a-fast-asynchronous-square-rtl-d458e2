// dvg_fa_stage: stage-2 logic, DValue generation and the Fast Algorithm.
//
// From the N/2 operands of the one's complementer chain it builds the N/2
// DValues D(2N), D(2N-4), ... D4 whose sum is the square of the input. Level
// r has a W = N-2r bit operand and a 2W-bit DValue made of a dvg_high upper
// half and a dvg_low lower half. From each level's folding code it derives
// three flags: Box (code 10, empty lower half) for the NUM_BOX largest
// levels, Ball (code not 00) for the NUM_BALL levels starting at N/4, and
// Zero (the DValue is zero). fast_algorithm then moves balls into boxes; a
// moved ball becomes a zero DValue and its zero flag is set.
//
// USE_FA = 0 leaves the DValues as generated (the generator without the Fast
// Algorithm, kept for latency comparisons). DValues are returned
// right-aligned in 2N-bit words, index 0 = D(2N). ZeroFlag bit r belongs to
// level r (the order of the 8-bit ZeroFlag bus is the reverse: its bit 0 is
// D4). Combinational.
module dvg_fa_stage
  import sqgen_pkg::*;
#(
  parameter int unsigned N        = 16,
  parameter int unsigned NUM_BOX  = 3,
  parameter int unsigned NUM_BALL = 3,
  parameter bit          USE_FA   = 1'b1
) (
  input  logic [N/2-1:0][N-1:0]   oc_num,      // oc_num[r]: operand of level r, N-2r bits
  output logic [N/2-1:0][2*N-1:0] dval,        // dval[r]: DValue of level r, 2(N-2r) bits
  output logic [N/2-1:0]          zero_flag,   // zero_flag[r]: dval[r] == 0
  output logic [NUM_BALL-1:0]     ball_empty   // ball k merged into a box
);

  localparam int unsigned L = N / 2;
  localparam int unsigned Q = N / 4;  // level of the first ball

  logic [L-1:0][2*N-1:0] dval_raw;
  fold_code_e [L-1:0]    code;

  for (genvar r = 0; r < L; r++) begin : g_lvl
    localparam int unsigned W = N - 2 * r;
    logic [W-1:0] hi, lo;
    dvg_high #(.W(W)) u_hi (.num(oc_num[r][W-1:0]), .d_high(hi));
    dvg_low  #(.W(W)) u_lo (.num(oc_num[r][W-1:0]), .d_low (lo));
    assign dval_raw[r] = (2*N)'({hi, lo});
    assign code[r]     = fold_code_e'(oc_num[r][W-1:W-2]);
  end

  logic [NUM_BOX-1:0]         box;
  logic [NUM_BALL-1:0]        ball;
  logic [NUM_BALL-1:0][N-1:0] ball_dval, new_ball;
  logic [NUM_BOX-1:0][N-1:0]  new_box_low;
  logic [NUM_BALL-1:0]        moved;

  always_comb begin
    for (int j = 0; j < int'(NUM_BOX); j++) box[j] = (code[j] == CODE_BOX);
    for (int k = 0; k < int'(NUM_BALL); k++) begin
      ball[k]      = (code[Q+k] != CODE_ZERO);
      ball_dval[k] = dval_raw[Q+k][N-1:0];  // a ball is at most N bits wide
    end
  end

  fast_algorithm #(.N(N), .NUM_BOX(NUM_BOX), .NUM_BALL(NUM_BALL)) u_fa (
    .ball_dval   (ball_dval),
    .box         (box),
    .ball        (ball),
    .new_box_low (new_box_low),
    .new_ball    (new_ball),
    .ball_empty  (moved)
  );

  always_comb begin
    ball_empty = USE_FA ? moved : '0;
    for (int r = 0; r < int'(L); r++) begin
      dval[r]      = dval_raw[r];
      zero_flag[r] = (code[r] == CODE_ZERO);
    end
    if (USE_FA) begin
      for (int j = 0; j < int'(NUM_BOX); j++)
        dval[j] = dval_raw[j] | (2*N)'(new_box_low[j]);
      for (int k = 0; k < int'(NUM_BALL); k++) begin
        dval[Q+k]      = (2*N)'(new_ball[k]);
        zero_flag[Q+k] = (code[Q+k] == CODE_ZERO) | moved[k];
      end
    end
  end

endmodule
