// tb_alu_ctrl: drives the controller with Enter and Sign presses of random
// length and checks after each press the function code and register enables
// against a model of the Enter sequence A -> B -> A+B -> A-B -> mod 3 ->
// A+B ..., the signed/unsigned toggle, the response time of DEBOUNCE + 3
// clocks, that glitches shorter than the debounce time are ignored, and that
// reset returns to operand-A entry in unsigned mode.
module tb_alu_ctrl;
  import alu_pkg::*;
  localparam int unsigned DEB = 2;
  logic clk = 0, reset, enter, sign;
  alu_fn_t fn;
  reg_ctrl_t reg_ctrl;
  ctrl_state_e state;
  int checks = 0, failures = 0;

  alu_ctrl #(.DEBOUNCE_CYCLES(DEB)) dut (.clk, .reset, .enter, .sign, .fn, .reg_ctrl, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // model
  int  phase;       // 0 A, 1 B, 2 add, 3 sub, 4 mod
  bit  smode;

  task automatic check_outputs();
    logic [3:0] want_fn;
    logic [1:0] want_rc;
    case (phase)
      0: begin want_fn = 4'b0000; want_rc = 2'b01; end
      1: begin want_fn = 4'b0001; want_rc = 2'b10; end
      2: begin want_fn = {smode, 3'b010}; want_rc = 2'b00; end
      3: begin want_fn = {smode, 3'b011}; want_rc = 2'b00; end
      default: begin want_fn = {smode, 3'b100}; want_rc = 2'b00; end
    endcase
    check(fn === want_fn && reg_ctrl === want_rc,
          $sformatf("phase %0d smode %0d: fn=%b rc=%b want %b %b", phase, smode, fn, reg_ctrl, want_fn, want_rc));
  endtask

  // Press a button (0 enter, 1 sign); returns clocks until the outputs changed
  task automatic press(input int which, input int hold, output int latency);
    alu_fn_t f0 = fn;
    latency = -1;
    if (which == 0) enter = 1; else sign = 1;
    for (int c = 1; c <= hold; c++) begin
      @(posedge clk);
      #1;
      if (latency < 0 && fn != f0) latency = c;
    end
    enter = 0;
    sign = 0;
    for (int c = hold + 1; c <= hold + DEB + 6; c++) begin
      @(posedge clk);
      #1;
      if (latency < 0 && fn != f0) latency = c;
    end
  endtask

  initial begin
    int lat, n_enter, n_sign, r;
    reset = 1;
    enter = 0;
    sign = 0;
    repeat (3) @(posedge clk);
    #1;
    reset = 0;
    phase = 0;
    smode = 0;
    n_enter = 0;
    n_sign = 0;
    check_outputs();
    for (int n = 0; n < 400; n++) begin
      r = $urandom_range(9);
      if (r < 6) begin
        press(0, DEB + 3 + $urandom_range(5), lat);
        phase = (phase < 4) ? phase + 1 : 2;
        n_enter++;
        check(lat == DEB + 3, $sformatf("enter latency %0d", lat));
      end else if (r < 8) begin
        press(1, DEB + 3 + $urandom_range(5), lat);
        smode = ~smode;
        n_sign++;
        // the code only changes in the arithmetic phases
        if (phase >= 2) check(lat == DEB + 3, $sformatf("sign latency %0d", lat));
      end else if (r < 9) begin
        // glitch shorter than the debounce time: must be ignored
        enter = 1;
        @(posedge clk);
        #1;
        enter = 0;
        repeat (DEB + 6) @(posedge clk);
        #1;
      end else begin
        reset = 1;
        @(posedge clk);
        #1;
        reset = 0;
        phase = 0;
        smode = 0;
      end
      check_outputs();
    end
    check(n_enter > 50 && n_sign > 20, "too few presses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
