// debounce_tb: checks the debouncer with a short window (20 clocks).
//
// Bursts of bounce shorter than the window must not change the output; a
// level held for the window must show up on sw exactly 2 + 20 clocks after
// the input settled (two synchroniser stages, then the count), inverted
// because the buttons are active low.
module debounce_tb;
  localparam int unsigned N = 20;

  logic clk = 1'b0, sw_in = 1'b1, sw;
  int checks = 0, failures = 0;

  debounce #(.STABLE_CYCLES(N)) dut (.sw_in(sw_in), .clk(clk), .sw(sw));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Bounce for a while, settle at `level`, then verify the exact delay.
  task automatic bounce_to(input logic level);
    logic old;
    old = sw;
    repeat (8) begin
      sw_in = ~level;
      repeat (1 + $urandom_range(0, N - 5)) @(posedge clk);
      #1 sw_in = level;
      repeat (1 + $urandom_range(0, N - 5)) @(posedge clk);
      #1;
      check(sw == old, "output ignores bounce");
    end
    sw_in = ~level;
    @(posedge clk); #1;
    sw_in = level;     // settles from here
    for (int k = 1; k <= N + 10; k++) begin
      @(posedge clk); #1;
      check(sw == ((k >= N + 2) ? ~level : old),
            $sformatf("delay k=%0d level=%0b sw=%0b", k, level, sw));
    end
  endtask

  initial begin
    // Power up in an unknown state: hold released long enough to settle.
    repeat (N + 5) @(posedge clk);
    #1 check(sw == 1'b0, "released after settling");
    for (int n = 0; n < 4; n++) begin
      bounce_to(1'b0);   // press
      check(sw == 1'b1, "pressed");
      bounce_to(1'b1);   // release
      check(sw == 1'b0, "released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
