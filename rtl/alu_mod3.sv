// alu_mod3: A mod 3 for an 8-bit A read as unsigned or as signed.
//
// The result is x - 3*floor(x/3), always 0, 1 or 2, also for negative x.
// It is not built from repeated add/subtract. Because 4 = 1 (mod 3), an
// unsigned number is congruent to the sum of its base-4 digits: the four
// 2-bit digits of A are added in a small tree (sum 0..12), the 4-bit sum is
// split again into two base-4 digits (sum 0..6) and a last 3-bit step maps
// 0..6 to 0..2. For signed A, x = u - 256*a7 and 256 = 1 (mod 3), so
// x = u + 2*a7 (mod 3): the only extra logic for signed mode is adding 2*a7
// into the first level of the tree.
// Purely combinational. The digit-sum structure is this design's own choice;
// the function (positive result, signed and unsigned) follows the design.
module alu_mod3 (
  input  logic [7:0] a,
  input  logic       sgn,
  output logic [1:0] res
);

  logic [3:0] s1;      // 0..14: four base-4 digits plus the signed correction
  logic [2:0] s2;      // 0..6 : s1 folded once more (s1[3:2] + s1[1:0])
  logic       corr;

  always_comb begin
    corr = sgn & a[7];
    s1 = 4'(a[1:0]) + 4'(a[3:2]) + 4'(a[5:4]) + 4'(a[7:6]) + {2'b00, corr, 1'b0};
    s2 = 3'(s1[3:2]) + 3'(s1[1:0]);
    unique case (s2)
      3'd0, 3'd3, 3'd6: res = 2'd0;
      3'd1, 3'd4:       res = 2'd1;
      3'd2, 3'd5:       res = 2'd2;
      default:          res = 2'd1;  // 7 (=1 mod 3) cannot occur
    endcase
  end

endmodule
