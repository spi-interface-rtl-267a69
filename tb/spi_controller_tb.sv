// spi_controller_tb: cycle-exact check of the transfer counter.
//
// After a one-clock start strobe the tb counts clocks k (k = 0 right after
// the loading edge) and compares ss_n, sclk, the rise/fall strobes and the
// raw count against closed-form expectations: ss_n low for k < 1024, sclk
// high in the odd 32-clock slots, count = 1023 - k.  It also checks that the
// idle state holds, that clear aborts a transfer and that a start during a
// transfer restarts it.
module spi_controller_tb;
  import spi_pkg::*;

  logic clk = 1'b0, clear, start;
  logic ss_n, sclk, sclk_rise, sclk_fall;
  logic [COUNT_W-1:0] count;
  int checks = 0, failures = 0;
  int rises, falls;

  spi_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One full transfer starting now; checks every clock for 1100 clocks.
  task automatic run_transfer(input int stop_after);
    bit exp_ss_n, exp_sclk, exp_sclk_next;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    rises = 0; falls = 0;
    for (int k = 0; k <= stop_after; k++) begin
      exp_ss_n      = (k >= 1024);
      exp_sclk      = (k < 1024) && ((k / 32) % 2 == 1);
      exp_sclk_next = (k + 1 < 1024) && (((k + 1) / 32) % 2 == 1);
      check(ss_n == exp_ss_n, $sformatf("ss_n k=%0d", k));
      check(sclk == exp_sclk, $sformatf("sclk k=%0d", k));
      check(sclk_rise == (!exp_sclk && exp_sclk_next), $sformatf("rise k=%0d", k));
      check(sclk_fall == (exp_sclk && !exp_sclk_next), $sformatf("fall k=%0d", k));
      if (k < 1024) check(count == COUNT_W'(1023 - k), $sformatf("count k=%0d", k));
      else          check(count == '1, $sformatf("idle count k=%0d", k));
      if (sclk_rise) rises++;
      if (sclk_fall) falls++;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    clear = 1'b1; start = 1'b0;
    repeat (3) @(posedge clk);
    #1 clear = 1'b0;
    // Idle holds.
    repeat (50) begin
      check(ss_n && !sclk && count == '1 && !sclk_rise && !sclk_fall, "idle");
      @(posedge clk); #1;
    end
    // Load value right after start.
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
    check(count == 11'h3FF, "load value 11'h3FF");
    check(!ss_n && !sclk, "ss_n asserted, sclk low after load");
    clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
    // Full transfer: 1024 clocks, 16 rising and 16 falling sclk edges.
    run_transfer(1100);
    check(rises == 16, $sformatf("16 sclk rises (got %0d)", rises));
    check(falls == 16, $sformatf("16 sclk falls (got %0d)", falls));
    // Clear aborts a transfer.
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
    repeat (300) @(posedge clk);
    #1 clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
    check(ss_n && !sclk && count == '1, "clear returns to idle");
    // Restart in the middle of a transfer starts from the top.
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
    repeat (500) @(posedge clk);
    #1 run_transfer(1030);
    check(rises == 16 && falls == 16, "restarted transfer is complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
