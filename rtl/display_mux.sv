// display_mux: drives a four-digit multiplexed 7-segment LED display.
//
// A free-running REFRESH_W-bit counter x advances every clock; its two most
// significant bits select which digit is lit.  When x[15:14] = k the digit
// data[4k+3:4k] is decoded and en[k] alone is asserted, so en[0] shows the
// least significant hex digit and en[3] the most significant one.  With the
// default 16-bit counter each digit is lit for 16384 clocks (328 us at
// 50 MHz), a full refresh cycle every 1.3 ms.  The enables, the segments and
// the decimal point are registered, so they change one clock after x.
// Enables and segments are active high and the decimal point is kept off.
// The counter, the digit multiplexers, the one-hot enable shift and the
// registered outputs follow the reference schematic; output polarities
// are this design's choice.
module display_mux #(
  parameter int unsigned REFRESH_W = 16
) (
  input  logic        clk,
  input  logic [15:0] data,   // four hex digits, digit 3 in [15:12]
  output logic [3:0]  en,     // digit enables, one-hot, 1 = on
  output logic [6:0]  seg,    // {a,b,c,d,e,f,g}, 1 = lit
  output logic        dp      // decimal point, 1 = lit
);

  logic [REFRESH_W-1:0] x;         // free running, needs no reset
  logic [1:0]           sel;
  logic [3:0]           digit;
  logic [6:0]           seg_next;

  assign sel   = x[REFRESH_W-1 -: 2];
  assign digit = data[4*sel +: 4];

  seg7_decoder u_dec (.digit(digit), .seg(seg_next));

  always_ff @(posedge clk) begin
    x   <= x + 1'b1;
    en  <= 4'b0001 << sel;
    seg <= seg_next;
    dp  <= 1'b0;
  end

endmodule
