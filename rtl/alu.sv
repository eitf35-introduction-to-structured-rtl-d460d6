// alu: combinational ALU of the push-button calculator.
//
// Inputs are the two stored 8-bit operands A and B and the function code FN
// from the controller (alu_pkg::alu_fn_t, FN[3] = signed, FN[2:0] = op):
//   0000 A        0010 A+B (unsigned)   1010 A+B (signed)
//   0001 B        0011 A-B (unsigned)   1011 A-B (signed)
//                 0100 A mod 3 (uns.)   1100 A mod 3 (signed)
// An "Arith." unit (alu_arith) and a "mod 3" unit (alu_mod3) work in
// parallel and a multiplexer picks the result, as in the design's block
// diagram. Outputs: result[7:0] (two's complement for A+B / A-B, 0..2 for mod
// 3, the raw operand for A and B), sign (the exact result is negative) and
// overflow (the exact result does not fit in 8 bits in the chosen mode).
// A, B and mod 3 never set sign or overflow; this, and result 0 for unused
// codes, is this design's choice. No clock, no latency.
module alu
  import alu_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  alu_fn_t    fn,
  output logic [7:0] result,
  output logic       sign,
  output logic       overflow
);

  logic [7:0] arith_res;
  logic       arith_neg, arith_ovf;
  logic [1:0] mod_res;

  alu_arith u_arith (
    .a   (a),
    .b   (b),
    .sub (fn.op == OP_SUB),
    .sgn (fn.sgn),
    .res (arith_res),
    .neg (arith_neg),
    .ovf (arith_ovf)
  );

  alu_mod3 u_mod3 (
    .a   (a),
    .sgn (fn.sgn),
    .res (mod_res)
  );

  // Result multiplexer
  always_comb begin
    result   = '0;
    sign     = 1'b0;
    overflow = 1'b0;
    unique case (fn.op)
      OP_PASS_A: result = a;
      OP_PASS_B: result = b;
      OP_ADD, OP_SUB: begin
        result   = arith_res;
        sign     = arith_neg;
        overflow = arith_ovf;
      end
      OP_MOD3:   result = {6'b0, mod_res};
      default:   result = '0;
    endcase
  end

endmodule
