// lab7_tb: end-to-end test of the SPI master at reduced debounce and
// refresh sizes (40-clock debounce window, 6-bit refresh counter).
//
// A behavioural mode-0 slave sits on the SPI pins.  miso_in is driven
// either by the slave or, as on the lab board, by the mosi_n test output
// (loopback).  The buttons are driven with contact bounce.  The tb checks:
//   - reset loads SECRET and the display shows it
//   - a transmit press starts a transfer exactly DEB+3 clocks after the
//     button settles; ss_n stays low 1024 clocks; sclk has a 64-clock
//     period and 16 rising edges per frame
//   - the slave receives the old register content, MSB first, and the
//     register then holds what the slave sent
//   - in loopback every transfer complements the register (two restore it)
//   - a button glitch shorter than the window starts nothing, a held
//     button starts one transfer only, and reset aborts a running transfer
//   - the display shows each of the four hex digits of the register
// Each of these mechanisms is counted and must occur at least once.
module lab7_tb;
  import seg7_ref_pkg::*;

  localparam int unsigned DEB       = 40;
  localparam int unsigned REFRESH_W = 6;
  localparam int unsigned DWELL     = 2 ** (REFRESH_W - 2);
  localparam logic [15:0] SECRET    = 16'h1234;

  logic clock = 1'b0, reset_in = 1'b1, transmit_in = 1'b1, miso_in;
  logic [3:0] en;
  logic a, b, c, d, e, f, g, dp, ss_n, sclk, mosi, mosi_n;

  logic        loop = 1'b1;
  logic        slave_miso;
  logic [15:0] tx_word = '0, rx_word;
  int          rx_bits, frames;

  int checks = 0, failures = 0;
  int cyc = 0;
  int settle_cyc;                 // cycle at which a button last settled
  bit abort_expected = 1'b0;
  bit expect_latency = 1'b0;
  bit armed = 1'b0;               // monitors on, after power-up settling

  // mechanism counters
  int n_reset_load = 0, n_transfer = 0, n_loopback = 0, n_slave_rx = 0;
  int n_glitch_ignored = 0, n_held_once = 0, n_abort = 0, n_latency = 0;
  int n_digit[4] = '{default: 0};

  lab7 #(.SECRET(SECRET), .DEBOUNCE_CYCLES(DEB), .REFRESH_W(REFRESH_W)) dut (.*);

  spi_slave_model slave (.ss_n(ss_n), .sclk(sclk), .mosi(mosi), .miso(slave_miso),
    .tx_word(tx_word), .rx_word(rx_word), .rx_bits(rx_bits), .frames(frames));

  assign miso_in = loop ? mosi_n : slave_miso;

  always #10 clock = ~clock;        // 50 MHz
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

  // Drive a button low (pressed) or high with bounce shorter than the
  // window, then leave it at `level`; records when it settled.
  task automatic set_button(input bit is_reset, input logic level);
    repeat (4) begin
      if (is_reset) reset_in = ~level; else transmit_in = ~level;
      wait_cycles(1 + $urandom_range(0, DEB / 3));
      if (is_reset) reset_in = level; else transmit_in = level;
      wait_cycles(1 + $urandom_range(0, DEB / 3));
    end
    if (is_reset) reset_in = ~level; else transmit_in = ~level;
    wait_cycles(1);
    if (is_reset) reset_in = level; else transmit_in = level;
    settle_cyc = cyc;
  endtask

  task automatic push(input bit is_reset, input int hold);
    set_button(is_reset, 1'b0);
    wait_cycles(hold);
    set_button(is_reset, 1'b1);
    wait_cycles(DEB + 5);
  endtask

  // Frame monitor: ss_n low time, sclk period and edge count.
  int fall_cyc, last_rise, rises;
  always @(negedge clock) begin : frame_mon
    static logic ss_q = 1'b1, sclk_q = 1'b0;
    if (!armed) begin
      ss_q = 1'b1; sclk_q = sclk;
    end else begin
    if (ss_q && !ss_n) begin
      fall_cyc = cyc; rises = 0; last_rise = -1;
      if (expect_latency) begin
        check(cyc - settle_cyc == DEB + 3,
              $sformatf("start latency %0d", cyc - settle_cyc));
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
      if (abort_expected) begin
        check(cyc - fall_cyc < 1024 && rises < 16, "aborted frame is short");
        n_abort++;
      end else begin
        check(cyc - fall_cyc == 1024, $sformatf("ss_n low %0d clocks", cyc - fall_cyc));
        check(rises == 16, $sformatf("%0d sclk rises", rises));
        n_transfer++;
      end
    end
    check(!(ss_n && sclk), "sclk low while idle");
    ss_q = ss_n; sclk_q = sclk;
    end
  end

  // Watch the display for a full refresh round.
  task automatic check_display(input logic [15:0] value);
    bit seen[4] = '{default: 0};
    for (int n = 0; n < 4 * DWELL + 4; n++) begin
      @(negedge clock);
      check($onehot(en) && !dp, "one digit on, dp off");
      for (int k = 0; k < 4; k++)
        if (en[k]) begin
          check({a, b, c, d, e, f, g} == seg_of(value[4*k +: 4]),
                $sformatf("digit %0d of %h", k, value));
          seen[k] = 1'b1;
        end
    end
    for (int k = 0; k < 4; k++) if (seen[k]) n_digit[k]++;
    #1;
  endtask

  // One transfer from a transmit press; checks what moved both ways.
  task automatic transmit_and_check(input logic [15:0] old_word, input logic [15:0] after);
    int f0;
    f0 = frames;
    expect_latency = 1'b1;
    set_button(1'b0, 1'b0);
    wait_cycles(DEB + 1100);
    set_button(1'b0, 1'b1);
    wait_cycles(DEB + 5);
    check(frames == f0 + 1, "one frame per press");
    check(rx_bits == 16, "slave saw 16 bits");
    check(rx_word == old_word, $sformatf("slave got %h expected %h", rx_word, old_word));
    check_display(after);
  endtask

  initial begin
    logic [15:0] value, w;
    // Let the debouncers settle from their power-up state, and any
    // transfer they may have started run out.
    wait_cycles(2 * DEB + 1200);
    armed = 1'b1;

    // Reset loads the secret number.
    push(1'b1, 3 * DEB);
    check_display(SECRET);
    n_reset_load++;
    value = SECRET;

    // Loopback: each transfer complements the register.
    loop = 1'b1;
    for (int i = 0; i < 2; i++) begin
      transmit_and_check(value, ~value);
      value = ~value;
      n_loopback++;
    end
    check(value == SECRET, "two loopback transfers restore the secret");

    // External slave: random words.
    loop = 1'b0;
    for (int i = 0; i < 3; i++) begin
      w = 16'($urandom);
      tx_word = w;
      transmit_and_check(value, w);
      value = w;
      n_slave_rx++;
    end

    // A glitch shorter than the debounce window starts nothing.
    begin
      int f0;
      f0 = frames;
      transmit_in = 1'b0; wait_cycles(DEB - 5); transmit_in = 1'b1;
      wait_cycles(DEB + 1200);
      check(frames == f0 && ss_n, "glitch ignored");
      if (frames == f0) n_glitch_ignored++;
    end

    // A button held for three transfer times starts one transfer.
    begin
      int f0;
      f0 = frames;
      tx_word = 16'h0F5A;
      set_button(1'b0, 1'b0);
      wait_cycles(3300);
      set_button(1'b0, 1'b1);
      wait_cycles(DEB + 5);
      check(frames == f0 + 1, "held button: exactly one frame");
      if (frames == f0 + 1) n_held_once++;
      value = 16'h0F5A;
      check_display(value);
    end

    // Reset during a transfer aborts it and reloads the secret.
    tx_word = 16'hFFFF;
    set_button(1'b0, 1'b0);
    wait_cycles(DEB + 300);
    check(!ss_n, "transfer running");
    abort_expected = 1'b1;
    push(1'b1, 2 * DEB);
    abort_expected = 1'b0;
    set_button(1'b0, 1'b1);
    wait_cycles(DEB + 1200);
    check(ss_n, "idle after abort");
    check_display(SECRET);

    // Every mechanism must have occurred.
    check(n_reset_load > 0, "reset load happened");
    check(n_transfer >= 6, $sformatf("transfers %0d", n_transfer));
    check(n_loopback > 0, "loopback happened");
    check(n_slave_rx > 0, "slave receive happened");
    check(n_glitch_ignored > 0, "glitch rejection happened");
    check(n_held_once > 0, "held button case happened");
    check(n_abort > 0, "abort happened");
    check(n_latency > 0, "start latency measured");
    for (int k = 0; k < 4; k++) check(n_digit[k] > 0, $sformatf("digit %0d shown", k));
    $display("mechanisms: reset_load=%0d transfer=%0d loopback=%0d slave_rx=%0d glitch_ignored=%0d held_once=%0d abort=%0d latency=%0d",
             n_reset_load, n_transfer, n_loopback, n_slave_rx, n_glitch_ignored,
             n_held_once, n_abort, n_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
