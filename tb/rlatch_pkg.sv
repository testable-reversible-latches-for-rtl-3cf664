// rlatch_pkg: control codes shared by the testable reversible latches.
//
// Every latch has two control inputs, C1 and C2, that feed constant inputs of
// its Fredkin gates. For the D, T and JK latches C1C2 = 01 is normal
// operation, while 00 and 11 cut the feedback loop by forcing the feedback
// wire T1 to 0 or 1, so that the whole latch behaves as a combinational
// conservative circuit that the all-0s or all-1s test vector can exercise.
// The RS latch uses 11 for normal operation (where the all-1s vector is also
// its test) and 00 for the all-0s test. These codes follow the document; the
// names are this design's own. The testbenches use these names when they
// drive the latches.
package rlatch_pkg;

  typedef enum logic [1:0] {
    CTRL_TEST_ALL0 = 2'b00,  // feedback forced to 0, apply the all-0s vector
    CTRL_NORMAL    = 2'b01,  // D, T and JK latches: normal latch operation
    CTRL_TEST_ALL1 = 2'b11   // feedback forced to 1, apply the all-1s vector
  } ctrl_e;

  // The RS latch runs in normal mode with both controls at 1.
  localparam ctrl_e RS_CTRL_NORMAL = CTRL_TEST_ALL1;

  // Constant (ancilla) inputs of the gates as drawn for normal operation.
  localparam logic       T_ANC_NORMAL  = 1'b0;   // T latch, C input of F1
  localparam logic [1:0] JK_ANC_NORMAL = 2'b01;  // JK latch, {B, C} of F1
  localparam logic [1:0] RS_ANC_NORMAL = 2'b00;  // RS latch, C of F1 and of F2

endpackage
