# 16-bit SPI master with a one-counter controller

This is a small SPI master for a CPLD or FPGA board with a 50 MHz clock, two
pushbuttons and a four-digit multiplexed 7-segment display. Pressing **reset**
loads a fixed 16-bit number into a shift register. Pressing **transmit** sends
that register out on `mosi`, most significant bit first, while 16 bits are
taken in from `miso`. After the transfer the register holds the received word.
The display always shows the register in hexadecimal.

The serial format is SPI mode 0 (CPOL=0, CPHA=0):

- `sclk` idles low.
- `mosi` changes on the falling edge of `sclk`.
- `miso` is sampled on the rising edge of `sclk`.

`sclk` runs at 50 MHz / 64 = 781.25 kHz, so one 16-bit frame takes 1024 system
clocks (20.48 µs).

There is also a test output, `mosi_n`, which is the inverse of `mosi`. If it
is wired back to `miso_in`, each transfer replaces the register with its own
complement. Two presses then bring the original number back:
`1234 → EDCB → 1234`.

Everything is synchronous to the single system clock. `sclk` is an ordinary
data output, never used as a clock inside the design.

## The controller is one 11-bit down counter

Every transfer steps through the same sequence of states. That is why the
whole controller can be a single binary counter. It is read as four fields
(`spi_pkg::spi_count_t`):

| bits | field     | role                                               |
|------|-----------|----------------------------------------------------|
| 10   | `ss_n`    | sign bit; it is the slave-select output directly   |
| 9:6  | `bit_cnt` | number of the bit being sent, 15 down to 0         |
| 5    | `sclk_n`  | inverted serial clock                              |
| 4:0  | `div`     | divides the 50 MHz clock by 32                     |

A transfer loads the counter with 16 × 64 − 1 = `11'h3FF`. The counter then
counts down once per clock until it wraps around to −1 (`11'h7FF`), and stays
there. This single decrement moves all four fields together:

- The divider counts 31…0 once for every half period of `sclk`.
- Each borrow out of the divider toggles bit 5. `sclk = ~bit5`, so `sclk` has
  a period of 64 clocks.
- Every second borrow lowers the bit counter by one.
- The load value makes bit 10 zero. `ss_n` therefore goes low on the clock
  after the start and returns high exactly when the count wraps to −1.

Timing of one frame, counting `k` in clocks after the load:

| k          | ss_n | bit_cnt | sclk | what happens                                  |
|------------|------|---------|------|-----------------------------------------------|
| 0          | 0    | 15      | 0    | `mosi` = bit 15 of the register               |
| 32         | 0    | 15      | ↑ 1  | `miso` sampled (bit 15 of the incoming word)  |
| 64         | 0    | 14      | ↓ 0  | register shifts; `mosi` = old bit 14          |
| …          |      |         |      |                                               |
| 64·i + 32  | 0    | 15 − i  | ↑    | sample                                        |
| 64·(i + 1) | 0    | 14 − i  | ↓    | shift                                         |
| 1024       | 1    | 15      | ↓ 0  | 16th shift; `ss_n` high; counter idle at −1   |

The last falling edge of `sclk` and the rising edge of `ss_n` happen on the
same clock.

### Edge strobes

Nothing may be clocked by `sclk`. Instead the controller compares the
counter's next value with its present value. This gives two one-clock strobes
that are true during the clock period *before* an `sclk` edge:

- `sclk_rise` = `sclk_n && !sclk_n_next`
- `sclk_fall` = `!sclk_n && sclk_n_next`

The datapath acts on these strobes. Its registers therefore change on the
same system-clock edge on which `sclk` changes.

## Datapath: one register both ways

`spi_datapath` has a 16-bit register `data` and one extra flip-flop, `miso`:

- **`sclk_rise`:** `miso` ← `miso_in`.
- **`sclk_fall`:** `data` ← `{data[14:0], miso}`.
- **`load`** (reset button held): `data` ← `SECRET`.

`mosi` is `data[15]` and `mosi_n` is `~data[15]`.

The incoming bit is captured at the rising edge but only enters the register
at the next falling edge. This gives `miso` half an `sclk` period (32 clocks)
to settle. It also lets the same register send and receive: the bit leaving
at the top and the bit entering at the bottom move on the same edge.

## Buttons and start

- The buttons pull their pins to ground against weak pull-ups, so the raw
  inputs are active low.
- Each raw input goes through `debounce`. This is a two-flip-flop
  synchroniser and a counter. It accepts a new level only after the level has
  stayed the same for `DEBOUNCE_CYCLES` clocks (default 500 000, 10 ms). Its
  output is an active-high "pressed" level.
- The debounced transmit level is registered once. A transfer starts on the
  clock where the level is high and the registered copy is still low: the
  rising edge, which is the press.
- Holding the button down starts only one transfer.
- `ss_n` falls `DEBOUNCE_CYCLES + 3` clocks after the button stops bouncing.
- While the debounced reset level is high, two things happen on every clock:
  - the register is loaded with `SECRET`;
  - the controller is forced back to idle.

  A reset press therefore also aborts a transfer that is running.

## Display

`display_mux` has a free-running counter `x`, 16 bits by default. Its two top
bits choose the digit. When `x[15:14] = k`:

- `en[k]` is the only enable that is on;
- the segments show hex digit `data[4k+3:4k]`.

`en[3]` is therefore the most significant (leftmost) digit. `seg7_decoder`
decodes all sixteen hex values. The enables and segments are registered. Each
digit stays lit for 16 384 clocks, so a full refresh takes 1.3 ms. Enables and
segments are active high, and the decimal point is held off.

## Files

| file                    | contents                                                        |
|-------------------------|-----------------------------------------------------------------|
| `rtl/spi_pkg.sv`        | field widths, counter struct, load and idle values              |
| `rtl/spi_controller.sv` | the 11-bit counter, `ss_n`, `sclk`, edge strobes                |
| `rtl/spi_datapath.sv`   | shift register, `miso` sample flip-flop, `mosi`/`mosi_n`        |
| `rtl/debounce.sv`       | button synchroniser and debouncer                               |
| `rtl/seg7_decoder.sv`   | hex digit to segments `{a,b,c,d,e,f,g}`                         |
| `rtl/display_mux.sv`    | digit multiplexing and output registers                         |
| `rtl/lab7.sv`           | top level                                                       |

### Top-level ports (`lab7`)

| port                  | dir | meaning                                            |
|-----------------------|-----|----------------------------------------------------|
| `clock`               | in  | 50 MHz                                             |
| `reset_in`            | in  | reset button, low when pressed (use a pull-up)     |
| `transmit_in`         | in  | transmit button, low when pressed (use a pull-up)  |
| `en[3:0]`             | out | digit enables, one-hot                             |
| `a`…`g`, `dp`         | out | segments, decimal point                            |
| `ss_n`, `sclk`, `mosi`| out | SPI master                                         |
| `mosi_n`              | out | `~mosi`, test output for loopback                  |
| `miso_in`             | in  | SPI data from the slave                            |

### Parameters (`lab7`)

| parameter         | default    | meaning                                     |
|-------------------|------------|---------------------------------------------|
| `SECRET`          | `16'h1234` | value loaded by the reset button            |
| `DEBOUNCE_CYCLES` | 500000     | stable clocks before a button level counts  |
| `REFRESH_W`       | 16         | width of the display refresh counter        |

The frame format is fixed in `spi_pkg`: 16 bits and a divide-by-32 half
period. If you change `DATA_W`, `BIT_CNT_W` or `DIV_W` there, keep
`BIT_CNT_W = log2(DATA_W)`. The rest is derived from these three.

The reference board is a MAX II EPM240T100C5. It uses these pins:

- clock: 12
- SPI: `ss_n` 1, `sclk` 3, `mosi` 5, `miso_in` 7, `mosi_n` 28
- buttons: `transmit_in` 97, `reset_in` 99
- segments: `a` 33, `b` 44, `c` 38, `d` 34, `e` 30, `f` 52, `g` 40, `dp` 36
- enables: `en[0]` 42, `en[1]` 48, `en[2]` 50, `en[3]` 35

On that board, 200 Ω series resistors on `sclk` and `ss_n` damp ringing.

## What is fixed and what was chosen

The following parts are the design as specified:

- the port list;
- the mode-0 timing, the 16-bit MSB-first frame and the 781 kHz clock;
- the counter fields, the load value and the wrap to −1;
- sampling `miso` on the rising edge and shifting on the falling edge;
- the `mosi_n` test output;
- starting on the rising edge of the debounced transmit level;
- the structure of the display, with the `x[15:14]` digit select and
  registered outputs.

The following are this implementation's own choices:

- **Debouncer.** Only its name and ports were given. The window length, the
  synchroniser and the inversion to an active-high output are choices made
  here.
- **Button polarity.** The buttons are taken to be active low, because they
  switch to ground against pull-ups.
- **Display polarity.** Enables and segments are active high. The `dp` output
  is held off. Invert them for a common-anode display or for low-side drivers.
- **Hex digits.** The display decodes all 16 hex digits, not only BCD, because
  received values such as `EDCB` must be shown.
- **Reset.** Reset is a level. It holds the controller idle as well as loading
  the register.
- **`sclk` gating.** `sclk` is gated by `ss_n`, which keeps it low while idle
  even straight after power-up. Once the counter has wrapped to −1 this
  changes nothing.
- **Restart.** A transmit press during a transfer reloads the counter and
  restarts the frame. If `sclk` is high at that moment, the restart also
  causes one extra shift of the register.
- **No power-on reset.** After power-up, allow up to
  `DEBOUNCE_CYCLES + 1024` clocks for things to settle. A press of reset puts
  the design in a known state.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- **`spi_controller_tb`** checks every clock of a frame against closed-form
  expectations:
  - `ss_n` is low for k < 1024;
  - `sclk` is high in the odd 32-clock slots;
  - `count` is 1023 − k;
  - each strobe appears.

  It also checks the idle hold, clear-to-idle and a restart.
- **`spi_datapath_tb`** drives the strobes and acts as a slave. It changes
  `miso_in` right after each sampling strobe, so sampling on the wrong edge is
  detected.
- **`debounce_tb`** checks that bounce shorter than the window is ignored, and
  the exact 2 + `STABLE_CYCLES` delay.
- **`seg7_decoder_tb`** and **`display_mux_tb`** compare the outputs with
  segment shapes written out letter by letter (`tb/seg7_ref_pkg.sv`). They
  also check the digit order and how long each digit stays lit.
- **`lab7_tb`** is an end-to-end test with a 40-clock debounce window and a
  6-bit refresh counter. A behavioural mode-0 slave (`tb/spi_slave_model.sv`)
  sits on the pins. The test checks:
  - reset load;
  - two loopback transfers, complement and restore;
  - three random-word transfers with the slave;
  - a glitch that is ignored;
  - a held button that gives only one transfer;
  - reset aborting a transfer;
  - every frame's length, `sclk` period, edge count and start latency;
  - all four digits of the display.

  It counts each mechanism and fails if one never happened.
- **`lab7_full_tb`** runs the top at its default parameters: reset, loopback
  twice (`1234 → EDCB → 1234`), then one slave transfer. This is about 5
  million clocks, a few seconds in Verilator.

The top also carries two assertions for the bus rules:

- `sclk` is low whenever `ss_n` is high;
- during a frame, `mosi` changes only together with a falling edge of `sclk`.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/spi_pkg.sv tb/seg7_ref_pkg.sv tb/lab7_tb.sv --top-module lab7_tb
./obj_dir/Vlab7_tb
```

Replace `lab7_tb` with any other testbench name. The packages must come first
on the command line. The design has no `x` dependence: every register that is
read either has a defined load path or is free-running. The tests pass with
Verilator's random initial values (`+verilator+rand+reset+2`).
