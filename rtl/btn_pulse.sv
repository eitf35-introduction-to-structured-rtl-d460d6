// btn_pulse: turns a push-button level into one clock-wide press pulse.
//
// The raw button is first passed through two flip-flops to bring it into the
// clock domain. The synchronised level is accepted as the new debounced
// level only after it has stayed unchanged for DEBOUNCE_CYCLES clocks
// (1,000,000 = 20 ms at 50 MHz by default), which hides contact bounce. The
// output `pressed` is high for exactly one clock when the debounced level goes
// from released to pressed, so each press is counted once however long the
// button is held. The pulse is high in the clock cycle that begins
// DEBOUNCE_CYCLES + 2 rising edges after the first edge that samples the
// press. DEBOUNCE_CYCLES must be at least 1. Synchronous, active-high reset; the button is
// active high. The whole block is this design's own addition: the design
// only asks that each press of a button advance the calculator once.
module btn_pulse #(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000
) (
  input  logic clk,
  input  logic reset,
  input  logic btn,
  output logic pressed
);

  localparam int unsigned CNT_W = $clog2(DEBOUNCE_CYCLES + 1);

  logic             sync1, sync2;
  logic             stable;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      sync1   <= 1'b0;
      sync2   <= 1'b0;
      stable  <= 1'b0;
      cnt     <= '0;
      pressed <= 1'b0;
    end else begin
      sync1   <= btn;
      sync2   <= sync1;
      pressed <= 1'b0;
      if (sync2 == stable) begin
        cnt <= '0;
      end else if (cnt >= CNT_W'(DEBOUNCE_CYCLES - 1)) begin
        cnt     <= '0;
        stable  <= sync2;
        pressed <= sync2;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
