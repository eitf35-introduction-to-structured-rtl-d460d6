// reg_update: the two operand registers, Reg A and Reg B.
//
// The 8-bit switch value `din` is copied into Reg A on every clock cycle in
// which RegCtrl.load_a is high, and into Reg B while RegCtrl.load_b is high;
// otherwise each register keeps its value. The controller holds load_a high
// during operand-A entry and load_b during operand-B entry, so a register
// follows the switches while its operand is being set and is frozen by the
// Enter press that ends that phase. Outputs a and b show the stored values
// one clock after the switches. A synchronous, active-high reset clears both
// registers. Written as a combinational next-value process plus a register
// process, the two-process style the design recommends; the enable
// encoding and the reset value are this design's choices.
module reg_update
  import alu_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  reg_ctrl_t  reg_ctrl,
  input  logic [7:0] din,
  output logic [7:0] a,
  output logic [7:0] b
);

  logic [7:0] a_next, b_next;

  always_comb begin
    a_next = reg_ctrl.load_a ? din : a;
    b_next = reg_ctrl.load_b ? din : b;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      a <= '0;
      b <= '0;
    end else begin
      a <= a_next;
      b <= b_next;
    end
  end

endmodule
