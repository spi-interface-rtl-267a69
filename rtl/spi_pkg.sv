// spi_pkg: constants and types shared by the SPI master blocks.
//
// The transfer controller is a single 11-bit down counter whose bit fields
// each play a role (most significant first):
//   [10]   ss_n       - low while a transfer is in progress (sign bit)
//   [9:6]  bit_cnt    - number of the bit being sent, 15 down to 0
//   [5]    sclk_n     - inverted serial clock
//   [4:0]  div        - divides the 50 MHz system clock by 32
// A transfer loads the counter with 16*64-1 = 11'h3FF and counts down until
// it wraps to -1 (11'h7FF), which is also the idle value.  These field
// sizes are those of the specification; the idle value at reset is this
// design's own choice.
package spi_pkg;

  localparam int unsigned DATA_W    = 16;  // bits per transfer
  localparam int unsigned BIT_CNT_W = 4;   // log2(DATA_W)
  localparam int unsigned DIV_W     = 5;   // system clock / 2**DIV_W per sclk half period
  localparam int unsigned COUNT_W   = 1 + BIT_CNT_W + 1 + DIV_W;  // 11

  // Bit-field view of the controller counter.
  typedef struct packed {
    logic                 ss_n;
    logic [BIT_CNT_W-1:0] bit_cnt;
    logic                 sclk_n;
    logic [DIV_W-1:0]     div;
  } spi_count_t;

  // Loaded on a rising edge of transmit: 16 x 64 - 1.
  localparam logic [COUNT_W-1:0] COUNT_LOAD = COUNT_W'(DATA_W * (2 ** (DIV_W + 1)) - 1);
  // Idle value: the counter has wrapped around to -1.
  localparam logic [COUNT_W-1:0] COUNT_IDLE = '1;

  // System clock cycles from the start of a transfer until ss_n rises again.
  localparam int unsigned TRANSFER_CYCLES = DATA_W * (2 ** (DIV_W + 1));

endpackage
