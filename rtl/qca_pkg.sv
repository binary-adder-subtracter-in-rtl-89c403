// qca_pkg: types and constants shared by the QCA adder-subtracter.
//
// The add/subtract control is a single bit: 0 selects addition and 1 selects
// two's-complement subtraction. The value 1 for subtraction follows from the
// design itself, because the control is also the carry-in of the least
// significant stage and subtraction needs a carry-in of 1. QCA circuits are
// driven by a four-phase clock; QCA_PHASES_PER_CYCLE records that.
package qca_pkg;

  typedef enum logic {
    OP_ADD = 1'b0,
    OP_SUB = 1'b1
  } op_e;

  // Four clock phases (switch, hold, release, relax) make one QCA clock cycle.
  localparam int unsigned QCA_PHASES_PER_CYCLE = 4;

  // Operand width of the evaluated design.
  localparam int unsigned QCA_WIDTH = 8;

endpackage
