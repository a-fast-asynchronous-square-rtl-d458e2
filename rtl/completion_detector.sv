// completion_detector: completion detection for a wide dual-rail bus.
//
// Rather than one C-element with a fan-in of W, the per-bit done signals go
// to a W-input AND (All_Valid: every bit known) and a W-input OR (not
// All_Empty: some bit still known), and a single two-input C-element joins
// the two. Its output rises once every bit is done and falls once every bit
// has returned to empty, which is the four-phase completion signal.
// Timing: one clock (one gate delay) through the C-element.
module completion_detector #(
  parameter int unsigned W = 31
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] done,
  output logic         complete
);

  logic all_valid, all_empty;

  assign all_valid = &done;
  assign all_empty = ~|done;

  c_element u_c (
    .clk   (clk),
    .rst_n (rst_n),
    .a     (all_valid),
    .b     (~all_empty),
    .z     (complete)
  );

endmodule
