// alu_top: push-button calculator on an FPGA board.
//
// Two 8-bit operands are set on eight switches and stored with the Enter
// button; further Enter presses cycle the display through A+B, A-B and
// A mod 3, and the Sign button toggles signed (two's complement) and unsigned
// arithmetic. The result is shown in decimal on a 4-digit 7-segment display,
// with "-" or "F" (overflow) in the leftmost digit.
// Structure, following the design's block diagram:
//   alu_ctrl   FSM driven by Enter/Sign, produces FN and RegCtrl
//   reg_update Reg A / Reg B, loaded from the switches under RegCtrl
//   alu        Arith. and mod 3 units plus result multiplexer
//   bin2bcd    result magnitude to three BCD digits
//   seg7_driver multiplexed display with sign/overflow digit
// Between the ALU and the BCD converter the result is replaced by its
// magnitude when the ALU flags it negative (two's complement negation, so
// -128 is shown as 128); this step is this design's choice.
// Ports (names of the design's top-level interface): Input[7:0] switches,
// b_Enter, b_Sign buttons (active high), Clk (50 MHz), reset (synchronous,
// active high), Anode[3:0] and seven_seg[6:0] (both active low).
// Timing: a clean button press takes effect DEBOUNCE_CYCLES + 3 clocks
// later, and the digit values change in the same clock (the ALU path is
// combinational); during operand entry the display trails the switches by
// one clock (the operand register). Each digit is lit for REFRESH_CYCLES
// clocks in turn.
module alu_top
  import alu_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000,
  parameter int unsigned REFRESH_CYCLES  = 50_000
) (
  input  logic       Clk,
  input  logic       reset,
  input  logic [7:0] Input,
  input  logic       b_Enter,
  input  logic       b_Sign,
  output logic [3:0] Anode,
  output logic [6:0] seven_seg
);

  alu_fn_t     fn;
  reg_ctrl_t   reg_ctrl;
  logic [7:0]  a, b, result, magnitude;
  logic        sign, overflow;
  logic [9:0]  bcd;

  alu_ctrl #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_ctrl (
    .clk         (Clk),
    .reset       (reset),
    .enter       (b_Enter),
    .sign        (b_Sign),
    .fn          (fn),
    .reg_ctrl    (reg_ctrl),
    .state       ()
  );

  reg_update u_regs (
    .clk      (Clk),
    .reset    (reset),
    .reg_ctrl (reg_ctrl),
    .din      (Input),
    .a        (a),
    .b        (b)
  );

  alu u_alu (
    .a        (a),
    .b        (b),
    .fn       (fn),
    .result   (result),
    .sign     (sign),
    .overflow (overflow)
  );

  assign magnitude = sign ? 8'(-result) : result;

  bin2bcd u_bcd (
    .bin (magnitude),
    .bcd (bcd)
  );

  seg7_driver #(.REFRESH_CYCLES(REFRESH_CYCLES)) u_disp (
    .clk       (Clk),
    .reset     (reset),
    .sign      (sign),
    .overflow  (overflow),
    .bcd       (bcd),
    .anode     (Anode),
    .seven_seg (seven_seg)
  );

endmodule
