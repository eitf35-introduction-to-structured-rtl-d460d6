// alu_ctrl: the controller FSM of the push-button calculator.
//
// Every press of Enter moves the FSM one step along
//   ENTER_A -> ENTER_B -> ADD -> SUB -> MOD3 -> ADD -> ...
// and every press of Sign toggles between unsigned mode (after reset) and
// signed mode. In ENTER_A the ALU shows operand A and Reg A follows the
// switches; in ENTER_B the ALU shows B and Reg B follows the switches; from
// ADD on both registers are locked and the ALU shows A+B, A-B or A mod 3 in
// the current mode. Reset returns to ENTER_A in unsigned mode.
// Outputs (Moore, registered state): fn = {signed, op} for the ALU and
// reg_ctrl = {load_b, load_a} for the operand registers. Both buttons pass
// through btn_pulse (synchroniser, debouncer and edge detector), so the FSM
// advances DEBOUNCE_CYCLES + 3 clocks after a clean press. The state
// sequence, the FN codes and the sign toggling follow the design; the
// button conditioning and the state encoding are this design's choices.
module alu_ctrl
  import alu_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        enter,     // raw "Enter" button, active high
  input  logic        sign,      // raw "Sign" button, active high
  output alu_fn_t     fn,
  output reg_ctrl_t   reg_ctrl,
  output ctrl_state_e state      // current phase, for observation
);

  logic        enter_p, sign_p;
  logic        signed_mode;
  ctrl_state_e state_next;

  btn_pulse #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_enter (
    .clk, .reset, .btn(enter), .pressed(enter_p)
  );

  btn_pulse #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_sign (
    .clk, .reset, .btn(sign), .pressed(sign_p)
  );

  // Next-state logic
  always_comb begin
    state_next = state;
    if (enter_p) begin
      unique case (state)
        ST_ENTER_A: state_next = ST_ENTER_B;
        ST_ENTER_B: state_next = ST_ADD;
        ST_ADD:     state_next = ST_SUB;
        ST_SUB:     state_next = ST_MOD3;
        ST_MOD3:    state_next = ST_ADD;
        default:    state_next = ST_ENTER_A;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state       <= ST_ENTER_A;
      signed_mode <= 1'b0;
    end else begin
      state <= state_next;
      if (sign_p) signed_mode <= ~signed_mode;
    end
  end

  // Moore outputs
  always_comb begin
    fn       = '{sgn: 1'b0, op: OP_PASS_A};
    reg_ctrl = '{load_b: 1'b0, load_a: 1'b0};
    unique case (state)
      ST_ENTER_A: begin
        fn.op           = OP_PASS_A;
        reg_ctrl.load_a = 1'b1;
      end
      ST_ENTER_B: begin
        fn.op           = OP_PASS_B;
        reg_ctrl.load_b = 1'b1;
      end
      ST_ADD:  fn = '{sgn: signed_mode, op: OP_ADD};
      ST_SUB:  fn = '{sgn: signed_mode, op: OP_SUB};
      ST_MOD3: fn = '{sgn: signed_mode, op: OP_MOD3};
      default: ;
    endcase
  end

  // Only one operand register may follow the switches at a time.
  always_ff @(posedge clk) begin
    if (!reset) begin
      assert (!(reg_ctrl.load_a && reg_ctrl.load_b))
        else $error("both operand registers enabled");
    end
  end

endmodule
