// seg7_decoder: hexadecimal digit to seven-segment pattern.
//
// Purely combinational lookup table.  The output is ordered {a,b,c,d,e,f,g}
// with a segment lit by a 1; segments are named the usual way (a at the
// top, then clockwise b..f, g in the middle).  All sixteen hex digits are
// decoded, so that a received value such as 16'hEDCB is shown as well as
// BCD digits; A..F use the common shapes A, b, C, d, E, F.  The specification
// only shows this as a lookup table ahead of the segment registers; the encoding
// and polarity are this design's choices.
module seg7_decoder (
  input  logic [3:0] digit,
  output logic [6:0] seg     // {a,b,c,d,e,f,g}, 1 = lit
);

  always_comb begin
    unique case (digit)
      4'h0: seg = 7'b111_1110;
      4'h1: seg = 7'b011_0000;
      4'h2: seg = 7'b110_1101;
      4'h3: seg = 7'b111_1001;
      4'h4: seg = 7'b011_0011;
      4'h5: seg = 7'b101_1011;
      4'h6: seg = 7'b101_1111;
      4'h7: seg = 7'b111_0000;
      4'h8: seg = 7'b111_1111;
      4'h9: seg = 7'b111_1011;
      4'hA: seg = 7'b111_0111;
      4'hB: seg = 7'b001_1111;
      4'hC: seg = 7'b100_1110;
      4'hD: seg = 7'b011_1101;
      4'hE: seg = 7'b100_1111;
      4'hF: seg = 7'b100_0111;
    endcase
  end

endmodule
