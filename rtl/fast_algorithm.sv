// fast_algorithm: merges lower-half DValues into empty upper-half DValues.
//
// A DValue of the upper recursion levels whose folding code is 10 has an
// all-zero lower half: a "box". A non-zero DValue of the lower recursion
// levels is a "ball". A ball that fits in the lower half of a box can be
// written there instead of being added separately, which leaves one more
// zero operand for the ZeroPass adder to skip. Box j is the DValue of level j
// (D32, D28, D24 for N = 16, lower-half widths N-2j = 16, 14, 12); ball k is
// the DValue of level N/4+k (D16, D12, D8, widths N-4k = 16, 12, 8). Ball k
// fits box j when N-2j >= N-4k, that is j <= 2k.
//
// Assignment is greedy, largest ball first: a scan pointer starts at the
// largest box, each ball scans boxes from the pointer down while they still
// fit, takes the first empty one, and every box it looked at is passed for
// good. This is the scan with a moving ScanPoint and a width bound of the
// published pseudo code, unrolled into a multiplexer. NUM_BOX and NUM_BALL
// default to three, the reduced set of the implemented generator; the full
// algorithm uses N/4 of each.
//
// Index 0 is the largest box and the largest ball. Inputs and outputs hold
// each value right-aligned in an N-bit word. Combinational.
module fast_algorithm #(
  parameter int unsigned N        = 16,  // operand width of the generator, multiple of 4
  parameter int unsigned NUM_BOX  = 3,   // boxes: DValues of levels 0..NUM_BOX-1, at most N/4
  parameter int unsigned NUM_BALL = 3    // balls: DValues of levels N/4..N/4+NUM_BALL-1, at most N/4
) (
  input  logic [NUM_BALL-1:0][N-1:0] ball_dval,    // DValue16, DValue12, DValue8
  input  logic [NUM_BOX-1:0]         box,          // 1: lower half of box j is empty
  input  logic [NUM_BALL-1:0]        ball,         // 1: ball k is non-zero
  output logic [NUM_BOX-1:0][N-1:0]  new_box_low,  // New_DValue32_Low, ..28_Low, ..24_Low
  output logic [NUM_BALL-1:0][N-1:0] new_ball,     // New_DValue16, 12, 8
  output logic [NUM_BALL-1:0]        ball_empty    // 1: ball k was moved into a box
);

  logic [NUM_BOX-1:0][NUM_BALL-1:0] sel;  // sel[j][k]: ball k goes into box j

  always_comb begin
    int  ptr;
    logic found;
    sel = '0;
    ptr = 0;
    for (int k = 0; k < int'(NUM_BALL); k++) begin
      found = 1'b0;
      if (ball[k]) begin
        for (int j = 0; j < int'(NUM_BOX); j++) begin
          if (!found && j >= ptr && j <= 2 * k) begin
            ptr = j + 1;
            if (box[j]) begin
              found     = 1'b1;
              sel[j][k] = 1'b1;
            end
          end
        end
      end
    end
  end

  always_comb begin
    new_box_low = '0;
    ball_empty  = '0;
    for (int j = 0; j < int'(NUM_BOX); j++)
      for (int k = 0; k < int'(NUM_BALL); k++)
        if (sel[j][k]) begin
          new_box_low[j] = new_box_low[j] | ball_dval[k];
          ball_empty[k]  = 1'b1;
        end
    for (int k = 0; k < int'(NUM_BALL); k++)
      new_ball[k] = ball_empty[k] ? '0 : ball_dval[k];
  end

endmodule
