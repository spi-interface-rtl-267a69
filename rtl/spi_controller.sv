// spi_controller: transfer sequencer for the 16-bit SPI master.
//
// Because every transfer steps through the same sequence of states, the
// controller is just a binary down counter (see spi_pkg for its fields).
// On `start` (one clock wide, the rising edge of the debounced transmit
// button) the counter is loaded with 11'h3FF; it then decrements once per
// clock until it wraps around to 11'h7FF, where it holds.  ss_n is the
// counter's sign bit, and sclk is the inverse of bit 5, so sclk has a period
// of 64 system clocks (781 kHz from 50 MHz) and idles low (CPOL=0).
//
// Besides the SPI pins, the block provides one-clock strobes that are true
// during the clock period *before* an sclk edge (found by comparing the
// counter's next value with its present one):
//   sclk_rise - the next clock edge makes sclk rise   (sample miso)
//   sclk_fall - the next clock edge makes sclk fall   (shift data)
// A transfer has 16 rising and 16 falling sclk edges; the last falling edge
// coincides with ss_n returning high, 1024 clocks after the load.
//
// sclk is also gated by ss_n.  Once the counter has been idle this changes
// nothing (the idle value has bit 5 set), but it keeps sclk low while ss_n
// is high even straight after power-up, when the counter holds an
// arbitrary value; the gating is this design's addition.  sclk is the NOR
// of two flip-flop outputs that never switch in opposite directions on the
// same clock, so it cannot glitch and needs no output register.
//
// `clear` forces the idle value; returning to idle on the reset button is
// this design's choice, the counter itself follows the specification.  A start
// during a transfer restarts it, as the specified counter load does.
module spi_controller
  import spi_pkg::*;
(
  input  logic               clk,
  input  logic               clear,      // synchronous, forces idle
  input  logic               start,      // one-clock start strobe
  output logic               ss_n,       // slave select, active low
  output logic               sclk,       // serial clock, idles low
  output logic               sclk_rise,  // sclk rises at the next clock edge
  output logic               sclk_fall,  // sclk falls at the next clock edge
  output logic [COUNT_W-1:0] count       // raw counter value, for debug pins
);

  spi_count_t cnt, cnt_next;

  always_comb begin
    if (clear)
      cnt_next = spi_count_t'(COUNT_IDLE);
    else if (start)
      cnt_next = spi_count_t'(COUNT_LOAD);
    else if (!cnt.ss_n)
      cnt_next = spi_count_t'(cnt - 1'b1);
    else
      cnt_next = cnt;
  end

  always_ff @(posedge clk) cnt <= cnt_next;

  assign ss_n      = cnt.ss_n;
  assign sclk      = ~(cnt.sclk_n | cnt.ss_n);
  assign sclk_rise = cnt.sclk_n && !cnt_next.sclk_n;
  assign sclk_fall = !cnt.sclk_n && cnt_next.sclk_n;
  assign count     = cnt;

endmodule
