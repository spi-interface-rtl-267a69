// spi_datapath: 16-bit shift register of the SPI master.
//
// The shift register `data` is both the transmit and the receive buffer.
// Its most significant bit drives mosi, so data goes out MSB first, and
// mosi_n is its inverse (a test output that can be looped back to miso).
// miso_in is sampled into a flip-flop in the clock period before sclk rises
// (strobe sclk_rise from the controller); in the clock period before sclk
// falls (strobe sclk_fall) the register shifts left by one bit and takes
// the sampled miso bit into bit 0.  mosi therefore changes on the falling
// edge of sclk and miso is captured on the rising edge (CPOL=0, CPHA=0).
// After the 16 falling edges of a transfer the register holds the 16 bits
// received.  `load` (the reset button) loads the parameter SECRET; the
// value 16'h1234 is the example number used in the specification.  Everything is
// clocked by the single system clock; sclk is never used as a clock.
module spi_datapath #(
  parameter int unsigned    DATA_W = 16,
  parameter logic [DATA_W-1:0] SECRET = 16'h1234
) (
  input  logic              clk,
  input  logic              load,       // load SECRET into the register
  input  logic              sclk_rise,  // sample miso_in at this clock edge
  input  logic              sclk_fall,  // shift at this clock edge
  input  logic              miso_in,
  output logic              mosi,
  output logic              mosi_n,
  output logic [DATA_W-1:0] data
);

  logic              miso, miso_next;
  logic [DATA_W-1:0] data_next;

  always_comb begin
    miso_next = sclk_rise ? miso_in : miso;
    if (load)
      data_next = SECRET;
    else if (sclk_fall)
      data_next = {data[DATA_W-2:0], miso};
    else
      data_next = data;
  end

  always_ff @(posedge clk) begin
    miso <= miso_next;
    data <= data_next;
  end

  assign mosi   = data[DATA_W-1];
  assign mosi_n = ~data[DATA_W-1];

endmodule
