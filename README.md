# Register-configurable SPI master

A fixed-function SPI master is built for one peripheral: one clock rate, one
clock mode, one word length. This design moves those choices into registers.
Software can change the SPI clock rate, clock polarity (CPOL), clock phase
(CPHA) and word width (8, 16, 24 or 32 bits) at run time, so one piece of
hardware can serve peripherals with different needs. A small state machine
sequences each word. It re-reads the configuration whenever the host changes
it, so new settings never disturb a word in flight.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`, with
self-checking testbenches in `tb/`.

## Structure

```
             host register port                      SPI bus
               |                                         ^
        +------v------+  cfg_act   +------------+ spi_clk|
        |  spi_regs   |----------->| spi_clkgen |--------+
        | CONFIG/TX/  |            +------------+        |
        | RX/STATUS   |        lead/trail |  ^ run_clk   |
        +-------------+                   v  |           |
          ^   |  tx_word         +--------------+  mosi  |
          |   +----------------->| spi_datapath |--------+
  load_cfg|                      |  (shift regs,|<-- miso
  cfg_ack |    load_data         |  data_length)|
        +-+-----------+--------->+--------------+
        |   spi_fsm   |    len_zero   |
        |             |<--------------+
        +-------------+
              | state_d
        +-----v--------+
        | spi_ctrl_sig |--> spi_cs (active low), tx_done, rx_done
        +--------------+
```

| File | Role |
|---|---|
| `rtl/spi_pkg.sv` | Shared types: state codes, configuration record, register addresses, width decoding |
| `rtl/spi_regs.sv` | Register configuration: programmed and working configuration, transmit word, read-back |
| `rtl/spi_fsm.sv` | State machine control |
| `rtl/spi_clkgen.sv` | Clock generation: divider, idle level, edge strobes |
| `rtl/spi_datapath.sv` | Data transmission: MOSI and MISO shift registers, `data_length` counter |
| `rtl/spi_ctrl_sig.sv` | Control signal generation: chip select, done flags |
| `rtl/spi_master.sv` | Top level |

Everything runs on the single system clock `clk`. `spi_clk` is an ordinary
registered output. The shift registers do not run on `spi_clk`. They act on
one-cycle *strobes* (`lead`, `trail`) from the clock generator, issued on the
same system-clock edge that moves `spi_clk`. All flops reset asynchronously on
`rst` (active high).

## The life of a word

The controller's state code is brought out on `state`:

| Code | State | What happens |
|---|---|---|
| 0 | INIT | Entered on reset, and again after a CONFIG write. Chip select is high. |
| 1 | LOAD | The programmed configuration is checked and copied into the working copy. A division factor of 0 goes to ERROR. |
| 2 | IDLE | `spi_clk` rests at CPOL. The controller waits for `start`. |
| 3 | START | Chip select falls. The word is loaded into the transmit register. `data_length` is set to the width, and the done flags are cleared. |
| 4 | TRANSFER | `spi_clk` runs. One bit goes out and one comes in per `spi_clk` period. |
| 5 | STOP | Chip select rises and `tx_done`/`rx_done` are set. The next state is IDLE. |
| 6 | ERROR | Chip select is high and no words are sent. The controller leaves ERROR when CONFIG is written again. |

TRANSFER ends once `data_length` has counted down to zero *and* `spi_clk` is
back at its idle level. With CPHA = 1 the last bit is sampled half a period
before the clock comes to rest, so the controller waits for that last half
period.

**Timing.** `spi_clk` toggles every `div_factor` system clocks, so one SPI
bit takes `2 * div_factor` clocks. `spi_clk` runs at `f_clk / (2 *
div_factor)`, from `f_clk/2` (div 1) to `f_clk/30` (div 15). For a word of
`bits` bits, chip select is low for exactly

    1 (START) + 2 * div_factor * bits + 1   system clocks

The final clock is the cycle in which the controller sees the count at zero
and the clock at rest. Add two clocks when a CONFIG write precedes the word
(INIT and LOAD). From `start` being sampled in IDLE, chip select falls on the
next clock edge.

**Start.** `start` is sampled on every clock. A pulse seen outside a word is
remembered until the controller reaches START, so a pulse given during
re-initialisation is not lost. A pulse during START, TRANSFER or STOP is
ignored, and ERROR discards it. `start` may be a one-cycle pulse. A level
held high starts a new word after every STOP.

## Clock modes and which edge does what

This is the part most likely to surprise. The edge roles follow the
reference design's mode definitions:

| Mode | CPOL | CPHA | `spi_clk` idle | MOSI changes on | MISO sampled on |
|---|---|---|---|---|---|
| 0 | 0 | 0 | low | rising (leading) | falling (trailing) |
| 1 | 0 | 1 | low | falling (trailing) | rising (leading) |
| 2 | 1 | 0 | high | falling (leading) | rising (trailing) |
| 3 | 1 | 1 | high | rising (trailing) | falling (leading) |

In short:
- **CPHA = 0:** the master drives a bit on every leading edge and samples on
  every trailing edge.
- **CPHA = 1:** the master samples on every leading edge and drives the next
  bit on every trailing edge. The first bit is put on MOSI when the word is
  loaded, before the first edge.

**This is the reverse of the common (Motorola) convention**, in which CPHA = 0
*samples* on the leading edge. A slave built to the common convention will
see data half a period late. To talk to such a slave, change the two lines
that pick `tx_ev` and `rx_ev` in `rtl/spi_datapath.sv`, and the mirror logic
in `tb/spi_slave_model.sv`.

Words are sent and received most significant bit first. A word narrower than
32 bits is taken from the low bits of TXDATA and returned in the low bits of
`data_out`. Each sampled bit enters `data_out` at bit 0, so `data_out` fills up
visibly during a word (with MISO held high: 1, 3, 7, f, ...). With CPHA = 0,
MOSI is low from START to the first leading edge.

## Registers

The host port is a plain synchronous port. `reg_we`, `reg_addr` and
`reg_wdata` are sampled on the rising edge of `clk`. `reg_rdata` is
combinational from `reg_addr`.

| Addr | Name | Access | Contents |
|---|---|---|---|
| 0 | CONFIG | R/W | `[3:0]` div_factor, `[4]` cpol, `[5]` cpha, `[7:6]` width code (0: 8, 1: 16, 2: 24, 3: 32 bits) |
| 1 | TXDATA | R/W | Word to send, right-aligned |
| 2 | RXDATA | R | Last received word, right-aligned (same as `data_out`) |
| 3 | STATUS | R | `[0]` tx_done, `[1]` rx_done, `[2]` busy (START/TRANSFER/STOP), `[3]` error, `[6:4]` state |

After reset, CONFIG reads `0xC4`: div_factor 4, mode 0, 32-bit words.

**Two copies of the configuration.** Writing CONFIG changes only the
*programmed* copy and raises an internal `cfg_pending` flag. The interface
runs from a *working* copy, which is updated only in the LOAD state. When the
controller is in IDLE (or ERROR) and sees `cfg_pending`, it goes back through
INIT and LOAD, which takes two clocks. A CONFIG write during a word therefore
takes effect after that word. TXDATA is captured when a word starts, so it
may be rewritten for the next word as soon as chip select is low.

`tx_done` and `rx_done` are set together in STOP and stay high until the next
START. They are separate outputs, but in this design they always carry the
same value.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_spi_master` | End to end, with every parameter at its default. It uses a behavioural slave (`tb/spi_slave_model.sv`) built to the same edge roles. It sweeps all four modes × all four widths × division factors 1, 2, 4 and 15, with random words. Per word it checks the data in both directions, RXDATA and STATUS, the done flags, the exact chip-select low time, the number of `spi_clk` edges, and that MOSI only moves on the mode's transmit edge. It also checks the reset state sequence 0 → 1 → 2 and the reset configuration. It exercises re-initialisation on a CONFIG write, a start during re-initialisation, a start during a word, and ERROR with recovery. Each of these mechanisms is counted, and one that never happens fails the test. |
| `tb_spi_demo_runs` | Replays the demonstration runs described for the design, as listed below. |
| `tb_spi_clkgen` | Strobe spacing, alternation and `spi_clk` levels against a cycle model, for div 1..15 and both polarities |
| `tb_spi_datapath` | MOSI bit order, `data_length` count-down and the received word for both phases and all widths. MISO carries the wrong bit at the edge that must not sample it. |
| `tb_spi_fsm` | Every transition, including priorities (configuration before start), the remembered start and ERROR |
| `tb_spi_ctrl_sig` | Chip select and done flags against a reference over a random state walk |
| `tb_spi_regs` | Random register traffic against a reference model |

`tb_spi_demo_runs` replays these runs:
- reset;
- one 32-bit `0xAAAAAAAA` word in mode 0 at div 4, with MISO held high;
- the same word in modes 1 to 3.

It checks the values such a run should show: state codes, `data_length`
`0x0020` at load and 3, 2, 1, 0 at the end, and `data_out` filling 1, 3, 7, f.
It also checks the MOSI bit pattern and the clock idle level per mode.

Simulation with plain Verilator (5.x), from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y tb -y rtl \
    rtl/spi_pkg.sv tb/tb_spi_master.sv --top-module tb_spi_master
./obj_dir/Vtb_spi_master
```

For a unit testbench, replace the testbench file and top module name, e.g.
`tb/tb_spi_fsm.sv --top-module tb_spi_fsm`. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/spi_pkg.sv rtl/spi_master.sv`.
The whole end-to-end test takes well under a second.

The top carries three concurrent assertions:
- chip select is low exactly in START and TRANSFER;
- `spi_clk` is at its idle level when a word starts;
- `data_length` never exceeds the word size.

## What is this design's own

These follow the reference design:
- the module split;
- the states and the codes of INIT, IDLE, START, TRANSFER and STOP;
- loading the configuration during initialisation;
- chip select and done-flag behaviour;
- the 4-bit division factor, 16-bit bit counter and 32-bit maximum word;
- the per-mode edge roles;
- MSB-first reception.

These are this design's own choices:
- **State code 1 (LOAD) and ERROR (code 6).** The reference design names an
  error state without saying what triggers it. Here it is triggered by a
  division factor of 0 and cleared by a new CONFIG write.
- **The division ratio.** A half period is `div_factor` clocks.
- **The host register port, the register map and the width encoding.**
- **Reset values.** div 4, mode 0 and 32 bits are the values of the
  demonstration runs.
- **Re-initialisation on a CONFIG write, and remembering `start`.**
- **Right alignment of narrow words, and MOSI low before the first CPHA = 0
  bit.**
- **The extra clock at the end of TRANSFER.**

Not provided:
- a slave mode;
- LSB-first transfer;
- multiple chip selects;
- back-to-back words under one chip select;
- interrupts;
- a synchroniser on `spi_miso`. MISO is sampled directly; add a synchroniser
  if it comes from another clock domain.

## Changing it

- **Wider division factor.** Change `SPI_DIV_W` in `spi_pkg` (and the CONFIG
  layout in `spi_cfg_t`).
- **Other widths.** `width_bits()` in `spi_pkg` maps the 2-bit code to a bit
  count. `DATA_W` must be at least the largest count.
- **Edge convention.** See the mode table above.
