// tb_alu_top_full: one complete calculation on the calculator at its
// default sizes (20 ms debounce, 1 ms per display digit at 50 MHz).
// Operands A = 200 and B = 100 are entered with the switches and Enter;
// the display is then checked after every press. The steps:
//   A entry shows " 200", B entry shows " 100",
//   Enter: unsigned A+B = 300 -> "F044"   (overflow, low 8 bits 44)
//   Enter: unsigned A-B = 100 -> " 100"
//   Enter: 200 mod 3 = 2      -> " 002"
//   Sign : signed -56 mod 3 = 1 -> " 001"
//   Enter: signed -56 + 100 = 44 -> " 044"
//   Enter: signed -56 - 100 = -156 -> "F156" (overflow, magnitude 156)
// It also checks that Enter takes effect DEBOUNCE_CYCLES + 3 clocks after
// it is pressed.
module tb_alu_top_full;
  import tb_seg_pkg::*;
  localparam int unsigned DEB = 1_000_000;
  localparam int unsigned REF = 50_000;
  logic       Clk = 0, reset;
  logic [7:0] Input;
  logic       b_Enter, b_Sign;
  logic [3:0] Anode;
  logic [6:0] seven_seg;
  int checks = 0, failures = 0;

  alu_top dut (.Clk, .reset, .Input, .b_Enter, .b_Sign, .Anode, .seven_seg);

  always #10 Clk = ~Clk;  // 50 MHz

  initial begin
    repeat (30_000_000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic press(ref logic btn);
    btn = 1;
    repeat (DEB + 10) @(posedge Clk);
    #1;
    btn = 0;
    repeat (DEB + 10) @(posedge Clk);
    #1;
  endtask

  task automatic read_display(output string shown);
    byte d [4];
    for (int k = 0; k < 4; k++) d[k] = "?";
    for (int c = 0; c < 4 * REF + 10; c++) begin
      for (int k = 0; k < 4; k++)
        if (!Anode[k]) d[k] = decode(seven_seg);
      @(posedge Clk);
      #1;
    end
    shown = {string'(d[3]), string'(d[2]), string'(d[1]), string'(d[0])};
  endtask

  task automatic expect_display(input string want);
    string shown;
    read_display(shown);
    check(shown == want, $sformatf("display \"%s\" want \"%s\"", shown, want));
  endtask

  initial begin
    int lat;
    reset = 1;
    b_Enter = 0;
    b_Sign = 0;
    Input = 8'd200;
    repeat (3) @(posedge Clk);
    #1;
    reset = 0;
    expect_display(" 200");
    // measure the controller's response to the first Enter press
    Input = 8'd200;
    b_Enter = 1;
    lat = 0;
    while (dut.u_ctrl.state == alu_pkg::ST_ENTER_A && lat < DEB + 100) begin
      @(posedge Clk);
      #1;
      lat++;
    end
    check(lat == DEB + 3, $sformatf("Enter response %0d clocks", lat));
    repeat (20) @(posedge Clk);
    #1;
    b_Enter = 0;
    repeat (DEB + 10) @(posedge Clk);
    #1;
    Input = 8'd100;
    repeat (2) @(posedge Clk);
    #1;
    expect_display(" 100");
    press(b_Enter);
    Input = 8'd7;           // switches are locked from now on
    expect_display("F044");
    press(b_Enter);
    expect_display(" 100");
    press(b_Enter);
    expect_display(" 002");
    press(b_Sign);
    expect_display(" 001");
    press(b_Enter);
    expect_display(" 044");
    press(b_Enter);
    expect_display("F156");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
