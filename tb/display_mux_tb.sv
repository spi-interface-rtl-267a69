// display_mux_tb: digit multiplexing with a 6-bit refresh counter.
//
// Each clock the tb checks that exactly one enable is on, that the segments
// show the hex digit of `data` that belongs to that enable (en[k] shows
// data[4k+3:4k]) and that the decimal point is off.  It also checks that
// the digits take turns in the order 0,1,2,3 and that each is lit for
// 2**(REFRESH_W-2) = 16 clocks.  data changes between rounds.
module display_mux_tb;
  import seg7_ref_pkg::*;
  localparam int unsigned REFRESH_W = 6;
  localparam int unsigned DWELL = 2 ** (REFRESH_W - 2);

  logic clk = 1'b0;
  logic [15:0] data;
  logic [3:0] en;
  logic [6:0] seg;
  logic dp;
  int checks = 0, failures = 0;
  int run, digit, prev_digit, switches;

  display_mux #(.REFRESH_W(REFRESH_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    data = 16'h1234;
    repeat (2) @(posedge clk);   // outputs registered once
    #1;
    prev_digit = -1; run = 0; switches = 0;
    for (int n = 0; n < 40 * DWELL; n++) begin
      if (n % (8 * DWELL) == 3) data = 16'($urandom);
      #1;
      check($onehot(en), $sformatf("one-hot en %b", en));
      digit = 0;
      for (int k = 0; k < 4; k++) if (en[k]) digit = k;
      // segments were registered from the data of the previous clock
      check(dp == 1'b0, "dp off");
      if (digit == prev_digit) run++;
      else begin
        if (prev_digit >= 0) begin
          check(digit == (prev_digit + 1) % 4, "digit order");
          if (switches > 0) check(run == DWELL, $sformatf("dwell %0d", run));
          switches++;
        end
        run = 1;
      end
      prev_digit = digit;
      @(posedge clk);
      #1;
    end
    check(switches >= 30, "digits rotated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Segment contents: compare with the data value present at the clock edge
  // that loaded them.
  logic [15:0] data_q;
  always @(posedge clk) data_q <= data;
  always @(negedge clk) begin
    if ($time > 30 && $onehot(en)) begin
      for (int k = 0; k < 4; k++)
        if (en[k]) begin
          checks++;
          if (seg != seg_of(data_q[4*k +: 4])) begin
            failures++;
            $display("FAIL seg %b for digit %0d of %h", seg, k, data_q);
          end
        end
    end
  end

  initial begin
    repeat (100 * DWELL) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
