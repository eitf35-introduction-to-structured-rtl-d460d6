// tb_seg7_driver: checks the multiplexed display driver with a short scan
// period. For random BCD values and flag combinations it follows the scan
// for two full rounds and checks that exactly one anode is active, that the
// digits come in order 0,1,2,3 and each is held for REFRESH_CYCLES clocks,
// and that each digit shows the right character ("F" before "-" before blank
// in the leftmost digit).
module tb_seg7_driver;
  import tb_seg_pkg::*;
  localparam int unsigned REFRESH = 3;
  logic clk = 0, reset;
  logic sign, overflow;
  logic [9:0] bcd;
  logic [3:0] anode;
  logic [6:0] seven_seg;
  int checks = 0, failures = 0;

  seg7_driver #(.REFRESH_CYCLES(REFRESH)) dut (.clk, .reset, .sign, .overflow, .bcd, .anode, .seven_seg);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    int dig, prev_dig, held;
    byte want;
    reset = 1;
    sign = 0;
    overflow = 0;
    bcd = 0;
    repeat (2) @(posedge clk);
    #1;
    reset = 0;
    prev_dig = 0;
    held = 0;
    for (int n = 0; n < 300; n++) begin
      // new display value, kept for two scan rounds
      sign = 1'($urandom);
      overflow = 1'($urandom);
      bcd = {2'($urandom_range(2)), 4'($urandom_range(9)), 4'($urandom_range(9))};
      #1;
      for (int t = 0; t < 8 * REFRESH; t++) begin
        check($countones(~anode) == 1, $sformatf("anode %b not one-hot", anode));
        dig = 0;
        for (int k = 0; k < 4; k++) if (!anode[k]) dig = k;
        if (dig == prev_dig) held++;
        else begin
          check(dig == (prev_dig + 1) % 4, $sformatf("digit %0d after %0d", dig, prev_dig));
          check(held == REFRESH, $sformatf("digit held %0d cycles", held));
          held = 1;
        end
        prev_dig = dig;
        case (dig)
          0: want = "0" + 8'(bcd[3:0]);
          1: want = "0" + 8'(bcd[7:4]);
          2: want = "0" + 8'(bcd[9:8]);
          default: want = overflow ? "F" : (sign ? "-" : " ");
        endcase
        check(decode(seven_seg) == want,
              $sformatf("digit %0d shows '%c' want '%c'", dig, decode(seven_seg), want));
        @(posedge clk);
        #2;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
