// seg7_decoder_tb: all sixteen digits against the reference shapes.
module seg7_decoder_tb;
  import seg7_ref_pkg::*;

  logic [3:0] digit;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  seg7_decoder dut (.digit(digit), .seg(seg));

  initial begin
    for (int i = 0; i < 16; i++) begin
      digit = 4'(i);
      #1;
      checks++;
      if (seg != seg_of(digit)) begin
        failures++;
        $display("FAIL digit %h: seg %b expected %b", digit, seg, seg_of(digit));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
