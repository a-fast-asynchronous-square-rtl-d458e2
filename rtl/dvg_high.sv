// dvg_high: upper half of the DValue of one recursion level (DVG_H).
//
// For a W-bit operand with top bits {a[W-1], a[W-2]} and low part M = a[W-3:0],
// the square splits as |N|^2 = |N*|^2 + |D| with a 2W-bit DValue D. Its upper
// W bits are chosen by a 4-to-1 multiplexer on the two top bits:
//   00 -> 0,  10 -> {0,1,M},  01 -> {0,0,M},  11 -> {1,M,0}.
// The lower W bits come from dvg_low. Combinational.
module dvg_high
  import sqgen_pkg::*;
#(
  parameter int unsigned W = 16  // operand width, even, at least 2
) (
  input  logic [W-1:0] num,
  output logic [W-1:0] d_high
);

  fold_code_e code;
  assign code = fold_code_e'(num[W-1:W-2]);

  if (W > 2) begin : g_wide
    logic [W-3:0] m;
    assign m = num[W-3:0];
    always_comb begin
      unique case (code)
        CODE_ZERO: d_high = '0;
        CODE_BOX:  d_high = {2'b01, m};
        CODE_LOW:  d_high = {2'b00, m};
        CODE_HIGH: d_high = {1'b1, m, 1'b0};
      endcase
    end
  end else begin : g_two
    // W = 2: M is empty, D4 = 0, 4, 1 or 9.
    always_comb begin
      unique case (code)
        CODE_ZERO: d_high = 2'b00;
        CODE_BOX:  d_high = 2'b01;
        CODE_LOW:  d_high = 2'b00;
        CODE_HIGH: d_high = 2'b10;
      endcase
    end
  end

endmodule
