// alu_pkg: constants and types shared by the 16-bit clock-gated ALU.
//
// ALU_WIDTH is the operand width (16 bits). CSA_NB and CSA_BW describe the
// variable block length carry skip adder: seven ripple carry blocks of
// 1, 2, 3, 4, 3, 2 and 1 bits, listed from the least significant end.
// unit_e encodes the unit select S2 (0 = logic unit, 1 = arithmetic unit).
// All of these numbers follow the published design; only the type names
// are this implementation's own.
package alu_pkg;

  localparam int unsigned ALU_WIDTH = 16;
  localparam int unsigned CSA_NB = 7;
  localparam int unsigned CSA_BW [CSA_NB] = '{1, 2, 3, 4, 3, 2, 1};

  typedef enum logic {
    UNIT_LU = 1'b0,   // S2 = 0: logic unit
    UNIT_AU = 1'b1    // S2 = 1: arithmetic unit
  } unit_e;

  // Operation word as presented on the pins.
  typedef struct packed {
    logic s2;
    logic s1;
    logic s0;
    logic cin;
  } alu_op_t;

endpackage
