// tb_bin2bcd: exhaustive check of the binary to BCD converter against
// division by 100 and 10, including the example 249 -> 10_0100_1001.
module tb_bin2bcd;
  logic [7:0] bin;
  logic [9:0] bcd;
  int checks = 0, failures = 0;

  bin2bcd dut (.bin, .bcd);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] want;
    for (int i = 0; i < 256; i++) begin
      bin = 8'(i);
      #1;
      want = {2'(i / 100), 4'((i / 10) % 10), 4'(i % 10)};
      checks++;
      if (bcd !== want) begin
        failures++;
        $display("FAIL %0d: got %b want %b", i, bcd, want);
      end
    end
    bin = 8'b1111_1001;
    #1;
    checks++;
    if (bcd !== 10'b10_0100_1001) begin
      failures++;
      $display("FAIL 249 example: %b", bcd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
