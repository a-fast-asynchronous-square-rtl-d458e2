// hybrid_adder32: W-bit self-timed adder of the square generator (W = 32).
//
// Bundled-data operands a and b are added with a dual-rail ripple carry: bit
// 0 is a hybrid_adder_lsb (no carry in), bits 1..W-3 are hybrid_adder_bit,
// bit W-2 is hybrid_adder_slb and bit W-1 is a single XOR (no carry out is
// ever needed). The done signals of bits 0..W-2 feed a completion_detector
// whose output is the request out, so the adder finishes as soon as its
// longest carry-propagate run has settled instead of after a worst-case
// delay.
//
// Timing model: every carry leaves its cell through a register, so a carry
// moves one bit per clock, a clock standing for one cell delay. While start
// is low these registers are held empty (both rails 0): that is the
// return-to-zero phase of the four-phase protocol, and it also clears every
// done signal so that the completion detector falls. a and b must be stable
// while start is high. After start rises, done rises after (longest
// propagate run + 2) clocks and sum is valid while done is high.
module hybrid_adder32 #(
  parameter int unsigned W = 32  // at least 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,  // Req_In, also the latch enable of the operands
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         done    // Req_Out
);

  // cell outputs and their registered copies, bits 0..W-2
  logic [W-2:0] ct, cf, dn;
  logic [W-2:0] ct_q, cf_q, dn_q;

  hybrid_adder_lsb u_lsb (
    .a(a[0]), .b(b[0]), .start(start),
    .sum(sum[0]), .cout_t(ct[0]), .cout_f(cf[0]), .done(dn[0])
  );

  for (genvar i = 1; i < W - 2; i++) begin : g_bit
    hybrid_adder_bit u_bit (
      .a(a[i]), .b(b[i]), .start(start),
      .cin_t(ct_q[i-1]), .cin_f(cf_q[i-1]),
      .sum(sum[i]), .cout_t(ct[i]), .cout_f(cf[i]), .done(dn[i])
    );
  end

  hybrid_adder_slb u_slb (
    .a(a[W-2]), .b(b[W-2]), .start(start),
    .cin_t(ct_q[W-3]), .cin_f(cf_q[W-3]),
    .sum(sum[W-2]), .cout_t(ct[W-2]), .done(dn[W-2])
  );
  assign cf[W-2] = 1'b0;  // the false rail into the MSB is not needed

  assign sum[W-1] = a[W-1] ^ b[W-1] ^ ct_q[W-2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ct_q <= '0;
      cf_q <= '0;
      dn_q <= '0;
    end else if (!start) begin
      ct_q <= '0;
      cf_q <= '0;
      dn_q <= '0;
    end else begin
      ct_q <= ct;
      cf_q <= cf;
      dn_q <= dn;
    end
  end

  completion_detector #(.W(W-1)) u_cd (
    .clk      (clk),
    .rst_n    (rst_n),
    .done     (dn_q),
    .complete (done)
  );

endmodule
