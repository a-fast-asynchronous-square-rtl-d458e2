// sqgen_pkg: shared types of the asynchronous square generator.
//
// Every recursion level of the square generator looks at the two most
// significant bits of its operand (the "folding code") and chooses one of
// four DValue shapes. fold_code_e names those four codes with the upper bit
// first. The adder controller's states are also kept here so that the
// testbenches can name them.
package sqgen_pkg;

  // Folding code {a[w-1], a[w-2]} of a w-bit operand of one recursion level.
  typedef enum logic [1:0] {
    CODE_ZERO = 2'b00,  // DValue is zero
    CODE_LOW  = 2'b01,  // DValue = {00, M, 0, ~M, 1}
    CODE_BOX  = 2'b10,  // DValue = {01, M, 0...0}: lower half empty (a "box")
    CODE_HIGH = 2'b11   // DValue = {1, M, 00, ~M, 1}
  } fold_code_e;

  // States of the local four-phase controller of the ZeroPass adder.
  typedef enum logic [1:0] {
    LC_IDLE = 2'b00,  // waiting for the global request
    LC_REQ  = 2'b01,  // local request high, waiting for the local acknowledge
    LC_RTZ  = 2'b10,  // local request low, waiting for the acknowledge to fall
    LC_DONE = 2'b11   // seven additions done, global complete held high
  } lctrl_state_e;

endpackage
