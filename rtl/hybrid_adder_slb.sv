// hybrid_adder_slb: the second-last bit (bit W-2) of the self-timed adder.
//
// The square of an n-bit number fits 2n bits, so the adder never carries out
// of its MSB and the MSB is a plain XOR of a, b and the carry into it. This
// cell therefore hands only the true rail of its carry out to the MSB; the
// false rail is used only inside the cell, for its done signal, which tells
// the completion detector that the carry into the MSB is known.
// Otherwise identical to hybrid_adder_bit. Combinational.
module hybrid_adder_slb (
  input  logic a,
  input  logic b,
  input  logic start,
  input  logic cin_t,
  input  logic cin_f,
  output logic sum,
  output logic cout_t,
  output logic done
);

  logic generate_c, kill, propagate, cout_f;

  always_comb begin
    generate_c = a & b;
    kill       = ~(a | b) & start;
    propagate  = a ^ b;
    cout_t     = generate_c | (propagate & cin_t);
    cout_f     = kill | (propagate & cin_f);
    done       = cout_t | cout_f;
    sum        = propagate ^ cin_t;
  end

endmodule
