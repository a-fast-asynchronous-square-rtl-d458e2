// hybrid_adder_zeropass: stage 3, the ZeroPass accumulator on one adder.
//
// Sums the NUM_OPS DValues of stage 2 (D32 + D28 + ... + D4 for N = 16) with
// NUM_OPS-1 additions on a single hybrid_adder32, sequenced by
// adder_controller. Two operand registers feed the adder: Input1 takes
// DValue 0 for the first addition and the running sum afterwards; Input2
// takes DValue counter+1. Both load while Local_Rin is low and hold while it
// is high, like latches enabled by Local_Rin. When an addition completes,
// the running sum register takes the adder's sum, or keeps Input1 if the
// second operand was zero (ZeroPass: that addition is skipped). When the
// global complete (global_done) rises, result holds the square; it stays
// valid until global_rin falls.
//
// Handshake: global_rin / global_done form a four-phase pair; the DValues
// and zero flags must be stable while global_rin is high.
module hybrid_adder_zeropass #(
  parameter int unsigned N       = 16,   // width of the squared number
  localparam int unsigned L      = N / 2,
  localparam int unsigned CW     = $clog2(L)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                global_rin,
  output logic                global_done,
  input  logic [L-1:0][2*N-1:0] dval,       // dval[r]: DValue of level r, r = 0 is D(2N)
  input  logic [L-1:0]        zero_flag,
  output logic [2*N-1:0]      result,
  // observation of the local handshake
  output logic                local_rin,
  output logic                zero_pass,    // an addition skipped by ZeroPass completes now
  output logic [CW-1:0]       counter
);

  logic [2*N-1:0] input1, input2, temp_sum, acc;
  logic           adder_done, local_ain, zero_sel, step, adder_start;

  adder_controller #(.NUM_OPS(L)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .global_rin  (global_rin),
    .global_done (global_done),
    .zero_flag   (zero_flag),
    .adder_done  (adder_done),
    .local_rin   (local_rin),
    .local_ain   (local_ain),
    .zero_sel    (zero_sel),
    .step        (step),
    .counter     (counter)
  );

  assign adder_start = local_rin & ~zero_sel;

  hybrid_adder32 #(.W(2*N)) u_add (
    .clk   (clk),
    .rst_n (rst_n),
    .start (adder_start),
    .a     (input1),
    .b     (input2),
    .sum   (temp_sum),
    .done  (adder_done)
  );

  // operand latches, transparent while Local_Rin is low
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      input1 <= '0;
      input2 <= '0;
    end else if (!local_rin) begin
      input1 <= (counter == '0) ? dval[0] : acc;
      input2 <= '0;
      for (int r = 1; r < int'(L); r++)
        if (int'(counter) + 1 == r) input2 <= dval[r];
    end
  end

  // running sum: Temp_Sum, or Input1 when the second operand is zero
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc <= '0;
    else if (step) acc <= zero_sel ? input1 : temp_sum;
  end

  assign result    = acc;
  assign zero_pass = step & zero_sel;

endmodule
