// hybrid_adder_bit: one bit of the self-timed hybrid adder.
//
// Operands and sum are bundled data; the carry is dual-rail (t, f), with
// both rails low meaning "not known yet". Generate (a AND b) drives the true
// rail and Kill (neither a nor b, qualified by start) the false rail at once;
// Propagate (a XOR b) passes the incoming carry rails on. done is high as
// soon as either outgoing rail is high, so the completion time of a whole
// adder is set by its longest propagate run. sum = propagate XOR carry-in
// (true rail), valid once the incoming carry is known. Combinational.
module hybrid_adder_bit (
  input  logic a,
  input  logic b,
  input  logic start,
  input  logic cin_t,
  input  logic cin_f,
  output logic sum,
  output logic cout_t,
  output logic cout_f,
  output logic done
);

  logic generate_c, temp_kill, kill, propagate;

  always_comb begin
    generate_c = a & b;
    temp_kill  = ~(a | b);
    kill       = temp_kill & start;
    propagate  = a ^ b;
    cout_t     = generate_c | (propagate & cin_t);
    cout_f     = kill | (propagate & cin_f);
    done       = cout_t | cout_f;
    sum        = propagate ^ cin_t;
  end

endmodule
