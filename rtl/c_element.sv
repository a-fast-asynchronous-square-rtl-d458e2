// c_element: two-input Muller C-element with active-low reset.
//
// The output follows the inputs when they agree (both 0 -> 0, both 1 -> 1)
// and keeps its value when they differ. This is the state-holding gate that
// sequences every four-phase handshake in the design.
//
// Timing model: the whole design is written as a clocked emulation of the
// self-timed circuit. clk is a fast time base in which one period stands for
// one gate delay, so the C-element output takes its new value one clock
// after its inputs agree. rst_n clears the output to 0, the reset scheme of a
// C-element written at register-transfer level.
module c_element (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic z
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      z <= 1'b0;
    else if (a == b) z <= a;
  end

endmodule
