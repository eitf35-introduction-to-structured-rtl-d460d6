// alu_arith: 8-bit adder/subtractor of the ALU ("Arith." unit).
//
// Computes A+B (sub=0) or A-B (sub=1) with one adder on a 9-bit extension
// of the operands: B is inverted and a carry of one is injected for
// subtraction. The 9-bit extension is a zero extension in unsigned mode and a
// sign extension in signed mode (sgn=1), so bit 8 of the wide sum is the sign
// of the exact result.
//   res  : the low 8 bits of the result (two's complement)
//   neg  : the exact result is below zero. In unsigned mode this happens only
//          for A-B with A<B; the magnitude is then B-A = -res (mod 256).
//   ovf  : the exact result does not fit: unsigned A+B > 255, or a signed
//          result outside -128..127.
// Purely combinational. That unsigned A-B<0 is reported as negative and not
// as overflow is this design's choice; the operations, the two modes and the
// two flags follow the design's function table.
module alu_arith (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       sub,
  input  logic       sgn,
  output logic [7:0] res,
  output logic       neg,
  output logic       ovf
);

  logic [8:0] a_ext, b_ext, sum;

  always_comb begin
    a_ext = {sgn & a[7], a};
    b_ext = {sgn & b[7], b};
    if (sub) b_ext = ~b_ext;
    sum = a_ext + b_ext + 9'(sub);
    res = sum[7:0];
    if (sgn) begin
      neg = sum[8];
      ovf = sum[8] ^ sum[7];
    end else begin
      // bit 8 of the zero-extended sum: carry for add, borrow for sub
      neg = sub & sum[8];
      ovf = ~sub & sum[8];
    end
  end

endmodule
