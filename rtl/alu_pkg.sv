// alu_pkg: types and constants shared by the push-button ALU.
//
// The function code FN[3:0] follows the ALU function table of the design:
// FN[2:0] selects the operation and FN[3] selects signed arithmetic. The
// codes 0000, 0001, 0010, 0011, 0100, 1010, 1011 and 1100 are the ones the
// design defines; every other code makes the ALU output zero.
// RegCtrl is this design's own encoding: one load enable per operand register.
package alu_pkg;

  // Operation field FN[2:0]
  typedef enum logic [2:0] {
    OP_PASS_A = 3'b000,
    OP_PASS_B = 3'b001,
    OP_ADD    = 3'b010,
    OP_SUB    = 3'b011,
    OP_MOD3   = 3'b100
  } alu_op_e;

  // Complete function code: FN[3] = signed, FN[2:0] = operation
  typedef struct packed {
    logic    sgn;
    alu_op_e op;
  } alu_fn_t;

  // Operand register load enables (RegCtrl)
  typedef struct packed {
    logic load_b;
    logic load_a;
  } reg_ctrl_t;

  // Controller states, one per phase of the Enter sequence
  typedef enum logic [2:0] {
    ST_ENTER_A = 3'd0,
    ST_ENTER_B = 3'd1,
    ST_ADD     = 3'd2,
    ST_SUB     = 3'd3,
    ST_MOD3    = 3'd4
  } ctrl_state_e;

endpackage
