// oc_chain: stage-1 logic, the chain of one's complementers.
//
// The N-bit input is the operand of recursion level 0. Each following level
// takes the one's complement step of the previous one, so level r holds an
// operand of N-2r bits (OCNum16, OCNum14, ... OCNum2 for N = 16). The N/2
// operands are returned right-aligned in an array of N-bit words, the unused
// upper bits being zero. There are N/2-1 complementers with 2+4+...+(N-2)
// XOR gates in total (56 for N = 16); the path through the chain is N/2-1
// XOR gates deep. Combinational.
module oc_chain #(
  parameter int unsigned N = 16  // input width, even, at least 4
) (
  input  logic [N-1:0]             num,
  output logic [N/2-1:0][N-1:0]    oc_num  // oc_num[r]: operand of level r, N-2r bits
);

  localparam int unsigned L = N / 2;

  assign oc_num[0] = num;

  for (genvar r = 1; r < L; r++) begin : g_lvl
    localparam int unsigned WP = N - 2 * (r - 1);  // width of the previous level
    logic [WP-3:0] oc;
    ones_complementer #(.W(WP)) u_oc (
      .num    (oc_num[r-1][WP-1:0]),
      .oc_num (oc)
    );
    assign oc_num[r] = N'(oc);
  end

endmodule
