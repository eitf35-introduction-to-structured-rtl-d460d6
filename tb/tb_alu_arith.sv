// tb_alu_arith: exhaustive check of the adder/subtractor.
// Every A, B, add/sub and signed/unsigned combination is compared with an
// integer model: the exact result, whether it is negative and whether it
// leaves the 8-bit range of the chosen mode.
module tb_alu_arith;
  logic [7:0] a, b, res;
  logic sub, sgn, neg, ovf;
  int checks = 0, failures = 0;

  alu_arith dut (.a, .b, .sub, .sgn, .res, .neg, .ovf);

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, r;
    bit exp_neg, exp_ovf;
    for (int m = 0; m < 4; m++) begin
      sub = m[0];
      sgn = m[1];
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          a = 8'(i);
          b = 8'(j);
          #1;
          x = sgn ? int'($signed(a)) : i;
          y = sgn ? int'($signed(b)) : j;
          r = sub ? x - y : x + y;
          exp_neg = r < 0;
          exp_ovf = sgn ? (r < -128 || r > 127) : (r > 255);
          checks++;
          if (res !== 8'(r) || neg !== exp_neg || ovf !== exp_ovf) begin
            failures++;
            if (failures < 10)
              $display("FAIL sub=%0d sgn=%0d a=%0d b=%0d: res=%0d neg=%0d ovf=%0d, want %0d %0d %0d",
                       sub, sgn, a, b, res, neg, ovf, 8'(r), exp_neg, exp_ovf);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
