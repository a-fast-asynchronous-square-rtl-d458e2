// dvg_low: lower half of the DValue of one recursion level (DVG_L).
//
// For a W-bit operand with M = a[W-3:0], the lower W bits of the DValue are
// {0, ~M, 1} when a[W-2] is set and zero otherwise. Built from W-2 NOR gates,
// d[i] = NOR(a[i-1], ~a[W-2]) for i = 1..W-2, one inverter for ~a[W-2],
// d[0] = a[W-2] and d[W-1] = 0. Combinational.
module dvg_low #(
  parameter int unsigned W = 16  // operand width, even, at least 2
) (
  input  logic [W-1:0] num,
  output logic [W-1:0] d_low
);

  logic sel_n;
  assign sel_n = ~num[W-2];

  always_comb begin
    d_low        = '0;
    d_low[0]     = num[W-2];
    for (int i = 1; i <= int'(W) - 2; i++)
      d_low[i] = ~(num[i-1] | sel_n);
  end

endmodule
