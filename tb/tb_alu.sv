// tb_alu: checks the ALU for every function code of the function table
// over all 65,536 operand pairs, plus the
// codes the table leaves unused, against an integer model.
module tb_alu;
  import alu_pkg::*;
  logic [7:0] a, b, result;
  alu_fn_t fn;
  logic sign, overflow;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .fn, .result, .sign, .overflow);

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, r, q;
    logic [7:0] exp_res;
    bit exp_sign, exp_ovf;
    for (int code = 0; code < 16; code++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          fn = alu_fn_t'(code[3:0]);
          a = 8'(i);
          b = 8'(j);
          #1;
          x = code[3] ? int'($signed(a)) : i;
          y = code[3] ? int'($signed(b)) : j;
          exp_sign = 0;
          exp_ovf = 0;
          case (code[2:0])
            0: exp_res = a;
            1: exp_res = b;
            2, 3: begin
              r = (code[2:0] == 2) ? x + y : x - y;
              exp_res = 8'(r);
              exp_sign = r < 0;
              exp_ovf = code[3] ? (r < -128 || r > 127) : (r > 255);
            end
            4: begin
              q = x / 3;
              if (x < 0 && q * 3 != x) q = q - 1;
              exp_res = 8'(x - 3 * q);
            end
            default: exp_res = 0;
          endcase
          checks++;
          if (result !== exp_res || sign !== exp_sign || overflow !== exp_ovf) begin
            failures++;
            if (failures < 10)
              $display("FAIL fn=%b a=%0d b=%0d: %0d s=%0d o=%0d, want %0d s=%0d o=%0d",
                       code[3:0], a, b, result, sign, overflow, exp_res, exp_sign, exp_ovf);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
