// debounce: pushbutton conditioner.
//
// The buttons pull their input to ground when pressed, against a weak
// pull-up, so the raw input is active low and bounces for a few
// milliseconds on every press and release.  The input is first passed
// through two flip-flops to bring it into the clock domain; a counter then
// measures how long the synchronised level has differed from the accepted
// level, and the accepted level only changes once the new level has been
// stable for STABLE_CYCLES consecutive clocks (10 ms at 50 MHz by default).
// Any bounce restarts the count.
//
// sw is the debounced, active-high "pressed" level, delayed by 2 +
// STABLE_CYCLES clocks from a clean input edge.  There is no reset (the
// reset button itself passes through here): whatever state the registers
// power up in, the output follows the input within 2 + STABLE_CYCLES
// clocks.  The specification only names this block and its ports (clk, sw_in,
// sw); the counting scheme, the 10 ms window and the inversion to an
// active-high output are this design's choices.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 500_000
) (
  input  logic sw_in,   // raw button, low when pressed
  input  logic clk,
  output logic sw       // debounced, high while pressed
);

  localparam int unsigned CNT_W = $clog2(STABLE_CYCLES + 1);

  logic             sync0, sync1;
  logic             level;            // accepted (debounced) input level
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    sync0 <= sw_in;
    sync1 <= sync0;
    if (sync1 == level) begin
      cnt <= '0;
    end else if (cnt == CNT_W'(STABLE_CYCLES - 1)) begin
      cnt   <= '0;
      level <= sync1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign sw = ~level;

endmodule
