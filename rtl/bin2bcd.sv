// bin2bcd: 8-bit binary to three BCD digits ("Bi/BCD").
//
// Shift-and-add-3 ("double dabble") unrolled into combinational logic: the
// binary value is shifted into the BCD field one bit at a time, MSB first,
// and before each shift every BCD digit that is 5 or more gets 3 added so
// that the shift carries it correctly into the next digit. Eight steps give
// the full result. Output bcd[9:8] is the hundreds digit (0..2), bcd[7:4]
// the tens and bcd[3:0] the ones; 249 = 8'b11111001 becomes
// 10'b10_0100_1001. Combinational, no latency. The algorithm is this
// design's choice; the 8-bit input and 10-bit output follow the design.
module bin2bcd (
  input  logic [7:0] bin,
  output logic [9:0] bcd
);

  logic [11:0] acc;  // hundreds, tens, ones during the conversion

  always_comb begin
    acc = '0;
    for (int i = 7; i >= 0; i--) begin
      if (acc[3:0]  >= 4'd5) acc[3:0]  = acc[3:0]  + 4'd3;
      if (acc[7:4]  >= 4'd5) acc[7:4]  = acc[7:4]  + 4'd3;
      if (acc[11:8] >= 4'd5) acc[11:8] = acc[11:8] + 4'd3;
      acc = {acc[10:0], bin[i]};
    end
    bcd = acc[9:0];
  end

endmodule
