// lab7_full_tb: the SPI master at its default sizes (10 ms debounce window,
// 16-bit display refresh counter, SECRET = 16'h1234), taken through the
// board demonstration sequence: reset shows the number, transmit with
// mosi_n looped back to miso shows its complement, transmit again shows the
// number again; then one transfer against a behavioural slave.
//
// Checks: start latency (DEB+3 clocks after the button settles), 1024-clock
// frames with 16 sclk rising edges 64 clocks apart, the word the slave
// receives, and all four digits of the display.  About 6 million clocks.
module lab7_full_tb;
  import seg7_ref_pkg::*;

  localparam int unsigned DEB    = 500_000;
  localparam int unsigned DWELL  = 2 ** 14;
  localparam logic [15:0] SECRET = 16'h1234;

  logic clock = 1'b0, reset_in = 1'b1, transmit_in = 1'b1, miso_in;
  logic [3:0] en;
  logic a, b, c, d, e, f, g, dp, ss_n, sclk, mosi, mosi_n;

  logic        loop = 1'b1;
  logic        slave_miso;
  logic [15:0] tx_word = 16'h5A0F, rx_word;
  int          rx_bits, frames;

  int checks = 0, failures = 0;
  int cyc = 0, settle_cyc;
  bit armed = 1'b0, expect_latency = 1'b0;
  int n_transfer = 0, n_latency = 0, n_digit[4] = '{default: 0};

  lab7 dut (.*);

  spi_slave_model slave (.ss_n(ss_n), .sclk(sclk), .mosi(mosi), .miso(slave_miso),
    .tx_word(tx_word), .rx_word(rx_word), .rx_bits(rx_bits), .frames(frames));

  assign miso_in = loop ? mosi_n : slave_miso;

  always #10 clock = ~clock;
  always @(posedge clock) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clock);
    #1;
  endtask

  // A short burst of bounce, then the final level.
  task automatic set_button(input bit is_reset, input logic level);
    repeat (5) begin
      if (is_reset) reset_in = level; else transmit_in = level;
      wait_cycles(1 + $urandom_range(0, 2000));
      if (is_reset) reset_in = ~level; else transmit_in = ~level;
      wait_cycles(1 + $urandom_range(0, 2000));
    end
    if (is_reset) reset_in = level; else transmit_in = level;
    settle_cyc = cyc;
  endtask

  task automatic push(input bit is_reset);
    set_button(is_reset, 1'b0);
    wait_cycles(DEB + 2000);
    set_button(is_reset, 1'b1);
    wait_cycles(DEB + 10);
  endtask

  int fall_cyc, last_rise, rises;
  always @(negedge clock) begin : frame_mon
    static logic ss_q = 1'b1, sclk_q = 1'b0;
    if (armed) begin
      if (ss_q && !ss_n) begin
        fall_cyc = cyc; rises = 0; last_rise = -1;
        if (expect_latency) begin
          check(cyc - settle_cyc == DEB + 3, $sformatf("start latency %0d", cyc - settle_cyc));
          n_latency++;
          expect_latency = 1'b0;
        end
      end
      if (!ss_n && !sclk_q && sclk) begin
        if (last_rise >= 0) check(cyc - last_rise == 64, "sclk period 64 clocks");
        last_rise = cyc;
        rises++;
      end
      if (!ss_q && ss_n) begin
        check(cyc - fall_cyc == 1024, $sformatf("ss_n low %0d clocks", cyc - fall_cyc));
        check(rises == 16, $sformatf("%0d sclk rises", rises));
        n_transfer++;
      end
    end
    ss_q = ss_n; sclk_q = sclk;
  end

  task automatic check_display(input logic [15:0] value);
    bit seen[4] = '{default: 0};
    int bad = 0;
    for (int n = 0; n < 4 * DWELL + 4; n++) begin
      @(negedge clock);
      for (int k = 0; k < 4; k++)
        if (en[k] && {a, b, c, d, e, f, g} != seg_of(value[4*k +: 4])) bad++;
      if (!$onehot(en) || dp) bad++;
      for (int k = 0; k < 4; k++) if (en[k]) seen[k] = 1'b1;
    end
    check(bad == 0, $sformatf("display of %h: %0d bad clocks", value, bad));
    for (int k = 0; k < 4; k++) begin
      check(seen[k], $sformatf("digit %0d lit", k));
      if (seen[k]) n_digit[k]++;
    end
    #1;
  endtask

  task automatic transmit_and_check(input logic [15:0] old_word, input logic [15:0] new_word);
    int f0;
    f0 = frames;
    expect_latency = 1'b1;
    push(1'b0);
    check(frames == f0 + 1, "one frame per press");
    check(rx_bits == 16 && rx_word == old_word,
          $sformatf("slave got %h expected %h", rx_word, old_word));
    check_display(new_word);
  endtask

  initial begin
    wait_cycles(2 * DEB + 2000);   // debouncers leave their power-up state
    armed = 1'b1;
    push(1'b1);
    check_display(SECRET);
    transmit_and_check(SECRET, ~SECRET);     // shows EDCB
    transmit_and_check(~SECRET, SECRET);     // shows 1234 again
    loop = 1'b0;
    transmit_and_check(SECRET, tx_word);
    check(n_transfer == 3, $sformatf("transfers %0d", n_transfer));
    check(n_latency == 3, "start latency measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9_000_000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
