// async_square_gen: asynchronous square generator with the Fast Algorithm.
//
// Computes result = num * num without a multiplier. The square is split by
// recursive four-folding into N/2 difference values (DValues) that add up to
// it; the pipeline has three four-phase bundled-data stages:
//   1. oc_chain: the recursive one's complementers (OCNum16..OCNum2),
//      latched after a matched delay DELAY1;
//   2. dvg_fa_stage: DValue generation, Box/Ball/Zero flags and the Fast
//      Algorithm, which moves small DValues into the empty lower halves of
//      large ones; latched after a matched delay DELAY2;
//   3. hybrid_adder_zeropass: a single self-timed adder adds the DValues in
//      N/2-1 additions, skipping zero DValues (ZeroPass); its completion
//      signal is the request of the output latch.
//
// Interface: four-phase bundled data on both sides. Hold num stable and
// raise req_in; ack_out rises once num is taken, then lower req_in. result
// is valid while req_out is high; answer with ack_in high, then low after
// req_out falls. Up to three squares are in flight at once.
//
// Timing model: a clocked emulation of the self-timed circuit, one clk
// period per gate delay; the latency depends on the data through the
// adder's carry chains and the ZeroPass skips. The N = 16 default, three
// stages, three boxes and balls and the structure of every stage follow the
// published design; the matched delays are this design's own values.
module async_square_gen #(
  parameter int unsigned N        = 16,
  parameter int unsigned NUM_BOX  = 3,
  parameter int unsigned NUM_BALL = 3,
  parameter bit          USE_FA   = 1'b1,
  parameter int unsigned DELAY1   = 7,   // stage 1: N/2-1 XOR gates in series
  parameter int unsigned DELAY2   = 6    // stage 2: DVG multiplexer + Fast Algorithm
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req_in,
  output logic           ack_out,
  input  logic [N-1:0]   num,
  output logic           req_out,
  input  logic           ack_in,
  output logic [2*N-1:0] result
);

  localparam int unsigned L = N / 2;

  // ---------------- stage 1: one's complementers
  logic [L-1:0][N-1:0] oc_comb, oc_num;
  logic                req1, ack1;

  oc_chain #(.N(N)) u_oc (.num(num), .oc_num(oc_comb));

  pipeline_stage_ctrl #(.DW(L*N), .DELAY(DELAY1)) u_s1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .req_in   (req_in),
    .ack_out  (ack_out),
    .data_in  (oc_comb),
    .req_out  (req1),
    .ack_in   (ack1),
    .data_out (oc_num)
  );

  // ---------------- stage 2: DValue generator and Fast Algorithm
  logic [L-1:0][2*N-1:0] dval_comb, dval;
  logic [L-1:0]          zf_comb, zero_flag;
  logic [NUM_BALL-1:0]   ball_empty;
  logic                  req2, ack2;

  dvg_fa_stage #(.N(N), .NUM_BOX(NUM_BOX), .NUM_BALL(NUM_BALL), .USE_FA(USE_FA)) u_dvg (
    .oc_num     (oc_num),
    .dval       (dval_comb),
    .zero_flag  (zf_comb),
    .ball_empty (ball_empty)
  );

  pipeline_stage_ctrl #(.DW(L*2*N + L), .DELAY(DELAY2)) u_s2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .req_in   (req1),
    .ack_out  (ack1),
    .data_in  ({dval_comb, zf_comb}),
    .req_out  (req2),
    .ack_in   (ack2),
    .data_out ({dval, zero_flag})
  );

  // ---------------- stage 3: hybrid adder with local four-phase control
  logic [2*N-1:0] sum;
  logic           req3;
  logic           local_rin, zero_pass;
  logic [$clog2(L)-1:0] counter;

  hybrid_adder_zeropass #(.N(N)) u_add (
    .clk         (clk),
    .rst_n       (rst_n),
    .global_rin  (req2),
    .global_done (req3),
    .dval        (dval),
    .zero_flag   (zero_flag),
    .result      (sum),
    .local_rin   (local_rin),
    .zero_pass   (zero_pass),
    .counter     (counter)
  );

  pipeline_stage_ctrl #(.DW(2*N), .DELAY(0)) u_s3 (
    .clk      (clk),
    .rst_n    (rst_n),
    .req_in   (req3),
    .ack_out  (ack2),
    .data_in  (sum),
    .req_out  (req_out),
    .ack_in   (ack_in),
    .data_out (result)
  );

endmodule
