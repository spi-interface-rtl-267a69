// lab7: 16-bit SPI master with pushbutton control and a 4-digit display.
//
// Pressing reset loads the 16-bit data register with a fixed number
// (SECRET).  Pressing transmit asserts ss_n and shifts the register out on
// mosi, most significant bit first, while 16 bits are shifted in from miso;
// afterwards the register holds the received word.  mosi changes on the
// falling edge of sclk and miso is captured on the rising edge (SPI mode 0,
// CPOL=0, CPHA=0).  sclk is the 50 MHz clock divided by 64 (781 kHz), and a
// transfer lasts 1024 clocks from the press being recognised until ss_n
// rises.  The data register is shown on the display at all times.  mosi_n,
// the inverse of mosi, is a test output: wired to miso_in it makes every
// transfer complement the register, so two presses restore the number.
//
// Structure: two debouncers, a register on the debounced transmit level for
// rising-edge detection, the counter-based controller, the shift-register
// datapath and the display multiplexer.  Everything runs on `clock`; sclk
// is a data signal, never a clock.  The pin list, the controller counter,
// the datapath and the display structure follow the specification; the debounce
// window, the display polarities and clearing a transfer on reset are this
// design's choices.
module lab7 #(
  parameter logic [15:0] SECRET          = 16'h1234,
  parameter int unsigned DEBOUNCE_CYCLES = 500_000,   // 10 ms at 50 MHz
  parameter int unsigned REFRESH_W       = 16
) (
  input  logic       clock,                   // 50 MHz clock
  input  logic       reset_in, transmit_in,   // pushbuttons, low when pressed
  output logic [3:0] en,                      // digit enables
  output logic       a, b, c, d, e, f, g, dp, // segments
  output logic       ss_n, sclk, mosi,        // SPI master
  output logic       mosi_n,                  // MISO test output
  input  logic       miso_in                  // MISO input
);

  logic               reset, transmit, transmit_next, start;
  logic               sclk_rise, sclk_fall;
  logic [15:0]        data;
  logic [6:0]         seg;

  // Controls: debounced buttons, rising edge of transmit starts a transfer.
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) db0 (
    .sw_in(transmit_in), .clk(clock), .sw(transmit_next));
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) db1 (
    .sw_in(reset_in), .clk(clock), .sw(reset));

  always_ff @(posedge clock) transmit <= transmit_next;
  assign start = !transmit && transmit_next;

  spi_controller u_ctrl (
    .clk(clock), .clear(reset), .start(start),
    .ss_n(ss_n), .sclk(sclk), .sclk_rise(sclk_rise), .sclk_fall(sclk_fall),
    .count());   // counter value: spare debug output, not brought out

  spi_datapath #(.DATA_W(16), .SECRET(SECRET)) u_data (
    .clk(clock), .load(reset), .sclk_rise(sclk_rise), .sclk_fall(sclk_fall),
    .miso_in(miso_in), .mosi(mosi), .mosi_n(mosi_n), .data(data));

  display_mux #(.REFRESH_W(REFRESH_W)) u_disp (
    .clk(clock), .data(data), .en(en), .seg(seg), .dp(dp));

  assign {a, b, c, d, e, f, g} = seg;

  // SPI mode 0 rules: sclk idles low, and during a transfer mosi only
  // changes together with a falling edge of sclk.
  a_sclk_idle_low: assert property (@(posedge clock) ss_n |-> !sclk);
  a_mosi_on_fall: assert property (@(posedge clock)
    !ss_n ##1 (!ss_n && $changed(mosi)) |-> $fell(sclk));

endmodule
