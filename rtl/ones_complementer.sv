// ones_complementer: one four-folding step on an operand of W bits.
//
// Output N* = a[W-3:0] XOR {W-2{a[W-2]}}: the low W-2 bits are inverted when
// bit W-2 is set and passed unchanged otherwise. That is the operand of the
// next recursion level, because |N|^2 = |N*|^2 + |D| where D depends only on
// the two top bits and the low bits (see dvg_high / dvg_low). W-2 XOR gates,
// purely combinational. Bit W-1 is not used here.
module ones_complementer #(
  parameter int unsigned W = 16  // operand width, at least 3
) (
  input  logic [W-1:0] num,
  output logic [W-3:0] oc_num
);

  always_comb oc_num = num[W-3:0] ^ {(W-2){num[W-2]}};

endmodule
