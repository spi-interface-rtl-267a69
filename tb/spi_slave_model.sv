// spi_slave_model: behavioural SPI mode-0 slave used by the testbenches.
//
// When ss_n falls it puts tx_word[15] on miso; it captures mosi on every
// rising sclk edge and presents the next bit of tx_word on every falling
// edge.  When ss_n rises it publishes the captured word on rx_word, the
// number of sclk rising edges it saw in that frame on rx_bits, and counts
// the frame.  Not synthesizable: it reacts to sclk and ss_n edges directly.
module spi_slave_model (
  input  logic        ss_n,
  input  logic        sclk,
  input  logic        mosi,
  output logic        miso,
  input  logic [15:0] tx_word,
  output logic [15:0] rx_word,
  output int          rx_bits,
  output int          frames
);
  logic [15:0] tx_sr, rx_sr;
  int          bits;

  initial begin
    miso = 1'b0; rx_word = '0; rx_bits = 0; frames = 0; bits = 0;
    tx_sr = '0; rx_sr = '0;
  end

  always @(negedge ss_n) begin
    tx_sr = tx_word;
    miso  = tx_word[15];
    bits  = 0;
  end

  always @(posedge sclk) if (!ss_n) begin
    rx_sr = {rx_sr[14:0], mosi};
    bits++;
  end

  always @(negedge sclk) if (!ss_n) begin
    tx_sr = {tx_sr[14:0], 1'b0};
    miso  = tx_sr[15];
  end

  always @(posedge ss_n) begin
    rx_word = rx_sr;
    rx_bits = bits;
    frames++;
  end
endmodule
