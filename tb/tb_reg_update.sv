// tb_reg_update: random load-enable and switch sequences against a model of
// two enabled registers; also checks the reset value.
module tb_reg_update;
  import alu_pkg::*;
  logic clk = 0, reset;
  reg_ctrl_t reg_ctrl;
  logic [7:0] din, a, b, ma, mb;
  int checks = 0, failures = 0;

  reg_update dut (.clk, .reset, .reg_ctrl, .din, .a, .b);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1;
    reg_ctrl = '0;
    din = 8'hA5;
    @(posedge clk);
    #1;
    checks++;
    if (a !== 0 || b !== 0) begin
      failures++;
      $display("FAIL reset: a=%0d b=%0d", a, b);
    end
    reset = 0;
    ma = 0;
    mb = 0;
    for (int n = 0; n < 2000; n++) begin
      reg_ctrl = reg_ctrl_t'(2'($urandom));
      din = 8'($urandom);
      @(posedge clk);
      if (reg_ctrl.load_a) ma = din;
      if (reg_ctrl.load_b) mb = din;
      #1;
      checks++;
      if (a !== ma || b !== mb) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: a=%0d b=%0d want %0d %0d", n, a, b, ma, mb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
