// tb_alu_mod3: exhaustive check of A mod 3 against x - 3*floor(x/3) for all
// 256 values of A, read as unsigned and as signed.
module tb_alu_mod3;
  logic [7:0] a;
  logic       sgn;
  logic [1:0] res;
  int checks = 0, failures = 0;

  alu_mod3 dut (.a, .sgn, .res);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, q, r;
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < 256; i++) begin
        a = 8'(i);
        sgn = s[0];
        #1;
        x = sgn ? int'($signed(a)) : i;
        // floor division for negative numbers
        q = x / 3;
        if (x < 0 && q * 3 != x) q = q - 1;
        r = x - 3 * q;
        checks++;
        if (int'(res) != r) begin
          failures++;
          $display("FAIL sgn=%0d a=%0d (x=%0d): got %0d want %0d", sgn, a, x, res, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
