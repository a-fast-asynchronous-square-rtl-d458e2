// hybrid_adder_lsb: bit 0 of the self-timed hybrid adder.
//
// The carry into bit 0 of the square generator's adder is always zero, so
// this cell drops the carry-in rails of hybrid_adder_bit: the carry out is
// known as soon as start is high. The true rail is Generate (a AND b); the
// false rail is every other case, NOT(a AND b) qualified by start, since a
// propagating bit 0 passes on the zero carry-in. sum = a XOR b, and done is
// high whenever either carry rail is. Combinational.
module hybrid_adder_lsb (
  input  logic a,
  input  logic b,
  input  logic start,
  output logic sum,
  output logic cout_t,
  output logic cout_f,
  output logic done
);

  always_comb begin
    cout_t    = a & b;
    cout_f    = ~(a & b) & start;
    done      = cout_t | cout_f;
    sum       = a ^ b;
  end

endmodule
