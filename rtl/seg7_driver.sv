// seg7_driver: time-multiplexed driver for a 4-digit 7-segment display.
//
// The four digits share one set of segment lines; the driver lights one
// digit at a time and moves to the next every REFRESH_CYCLES clocks
// (50,000 = 1 ms at 50 MHz by default, so the whole display is refreshed at
// 250 Hz and does not flicker). Digit 3 (leftmost) shows the status of the
// result: "F" when overflow is set, otherwise "-" when sign is set,
// otherwise blank. Digits 2, 1, 0 show the hundreds, tens and ones of the
// BCD input bcd[9:0] (hundreds in bcd[9:8]); leading zeros are shown.
// Both outputs are active low, as on common-anode boards:
// anode[i] = 0 enables digit i, seven_seg[6:0] = {g,f,e,d,c,b,a}, 0 = lit.
// The digit scan starts at digit 0 after the synchronous, active-high reset.
// The sign and overflow symbols follow the design; the scan rate, digit
// order, polarity and segment order are this design's choices.
module seg7_driver #(
  parameter int unsigned REFRESH_CYCLES = 50_000
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       sign,
  input  logic       overflow,
  input  logic [9:0] bcd,
  output logic [3:0] anode,
  output logic [6:0] seven_seg
);

  localparam int unsigned CNT_W = $clog2(REFRESH_CYCLES + 1);

  // Characters the driver can show, in {g,f,e,d,c,b,a} order, active high
  localparam logic [6:0] SEG_MINUS = 7'b100_0000;
  localparam logic [6:0] SEG_F     = 7'b111_0001;
  localparam logic [6:0] SEG_BLANK = 7'b000_0000;

  function automatic logic [6:0] digit_segments(input logic [3:0] d);
    unique case (d)
      4'd0:    return 7'b011_1111;
      4'd1:    return 7'b000_0110;
      4'd2:    return 7'b101_1011;
      4'd3:    return 7'b100_1111;
      4'd4:    return 7'b110_0110;
      4'd5:    return 7'b110_1101;
      4'd6:    return 7'b111_1101;
      4'd7:    return 7'b000_0111;
      4'd8:    return 7'b111_1111;
      4'd9:    return 7'b110_1111;
      default: return SEG_BLANK;
    endcase
  endfunction

  logic [CNT_W-1:0] cnt;
  logic [1:0]       digit;
  logic [6:0]       seg_on;

  // Scan timer and digit counter
  always_ff @(posedge clk) begin
    if (reset) begin
      cnt   <= '0;
      digit <= '0;
    end else if (cnt >= CNT_W'(REFRESH_CYCLES - 1)) begin
      cnt   <= '0;
      digit <= digit + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  // Character of the active digit
  always_comb begin
    unique case (digit)
      2'd0: seg_on = digit_segments(bcd[3:0]);
      2'd1: seg_on = digit_segments(bcd[7:4]);
      2'd2: seg_on = digit_segments({2'b00, bcd[9:8]});
      2'd3: seg_on = overflow ? SEG_F : (sign ? SEG_MINUS : SEG_BLANK);
      default: seg_on = SEG_BLANK;
    endcase
    anode     = ~(4'b0001 << digit);
    seven_seg = ~seg_on;
  end

endmodule
