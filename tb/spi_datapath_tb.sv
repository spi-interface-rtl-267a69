// spi_datapath_tb: shift register, miso sampling and mosi ordering.
//
// The tb drives the sclk_rise / sclk_fall strobes itself, 16 of each per
// transfer, and plays a mode-0 slave: it records mosi at every rising edge
// and presents the bits of a random word on miso_in.  miso_in is changed to
// a wrong value right after each sampling strobe, so a register that takes
// miso at the falling edge instead is caught.  Checks: the word sent equals
// the register content old_word the transfer (MSB first), the register holds
// the received word afterwards, mosi_n is always ~mosi, and load restores
// SECRET.
module spi_datapath_tb;
  localparam logic [15:0] SECRET = 16'hA5C3;

  logic clk = 1'b0, load = 1'b0, sclk_rise = 1'b0, sclk_fall = 1'b0, miso_in = 1'b0;
  logic mosi, mosi_n;
  logic [15:0] data;
  int checks = 0, failures = 0;

  spi_datapath #(.DATA_W(16), .SECRET(SECRET)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) check(mosi_n == ~mosi, "mosi_n is inverse of mosi");

  task automatic transfer(input logic [15:0] reply);
    logic [15:0] old_word;
    old_word = data;
    for (int i = 15; i >= 0; i--) begin
      repeat (3) @(posedge clk);
      #1 miso_in = reply[i];
      sclk_rise = 1'b1;
      @(posedge clk); #1;
      sclk_rise = 1'b0;
      miso_in = ~reply[i];         // bit no longer valid after the rise
      check(data == old_word, "register does not move at sclk rise");
      repeat (3) @(posedge clk);
      #1 sclk_fall = 1'b1;
      @(posedge clk); #1;
      sclk_fall = 1'b0;
      old_word = {old_word[14:0], reply[i]};
      check(data == old_word, $sformatf("register after shift %0d", 15 - i));
    end
    check(data == reply, $sformatf("received %h expected %h", data, reply));
  endtask

  initial begin
    logic [15:0] w, prev;
    load = 1'b1; @(posedge clk); #1; load = 1'b0;
    check(data == SECRET, "load SECRET");
    check(mosi == SECRET[15], "mosi is MSB");
    for (int n = 0; n < 6; n++) begin
      w = 16'($urandom);
      prev = data;
      // Capture what leaves on mosi, MSB first, and compare with prev.
      fork
        transfer(w);
        begin : watch
          logic [15:0] got;
          for (int i = 15; i >= 0; i--) begin
            @(posedge clk iff sclk_rise);
            got[i] = mosi;
          end
          check(got == prev, $sformatf("sent %h expected %h", got, prev));
        end
      join
    end
    // Idle: no strobes, no change.
    prev = data;
    repeat (20) @(posedge clk);
    check(data == prev, "holds without strobes");
    load = 1'b1; @(posedge clk); #1; load = 1'b0;
    check(data == SECRET, "reload SECRET");
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
