# UART with a line-synchronised bit clock

A UART link has no shared clock. The receiver must find the middle of each
bit by itself, working only from the serial line and a local clock. This
design runs everything on `clk16x`, a clock sixteen times the bit rate. It
builds the receive bit clock by dividing `clk16x` by 16, and it re-phases that
divider on **every falling edge of the line**. The falling edge of the bit
clock then lands in the middle of each bit, and the receiver samples there.
Between edges, a `restart` flag lets the divider run on by itself, so a run
of equal bits is still timed.

The RTL has a transmitter, the bit-clock generator, a receiver built on it,
and a top level that loops the transmitter's output back into the receiver.
The bit-clock generator follows a description written as two SystemVerilog
cover properties, `cp_bit_clk` and `cp_reset`, with match items that set
variables. Here that behaviour is turned into ordinary synthesizable
registers.

## Frame format

```
 idle  START  D0 (LSB) D1 ... D7 (MSB)  PARITY  STOP  idle
  1      0    <-- data, LSB first -->  optional  1     1
```

* Every bit lasts 16 `clk16x` periods.
* The data word is `DATA_BITS` wide. The default is 8, the usual UART
  word. The same format is defined for 16 and 32 data bits, and both work
  when you set the parameter.
* The parity bit is sent only when `parity_enb` is 1.
* `odd_parity` = 1 makes the number of ones in data plus parity odd. 0 makes
  it even. (`uart_pkg::parity_bit`.)
* There is one STOP bit.
* An 8-bit frame with parity is 11 bits long, which is 176 `clk16x` periods.

## Bit-clock generation (`bit_clk_gen`)

This block is the core of the design. Its rules:

1. `rxd_r` is `rxd` delayed by one `clk16x`. A falling edge of `rxd`, seen at
   a `clk16x` edge, **cancels** the bit period in progress. One edge later,
   `rxd_r` falls too, and that **starts** a new period.
2. A period also starts when `restart` is set. `restart` is set at the end of
   every period that runs to completion, and while `rst_n` is low.
3. On the start edge (phase 0), `bit_clk` goes to 1 and `restart` is cleared.
   On the 7th edge after it (phase 7), `bit_clk` goes to 0: this is
   mid-bit. On phase 15, `bit_clk` goes back to 1 and `restart` is set, so
   phase 16 is phase 0 of the next period.

When undisturbed, `bit_clk` is 8 cycles high and 8 low. A falling edge on the
line always pulls the phase back. The waveform below shows the START bit of
a frame. `^` marks a `clk16x` edge, numbered from the first edge that
samples the line low:

```
edge        0   1   2 ...  7   8   9 ... 16  17
rxd       ‾‾\_______________________________ ... (START bit, 16 edges)
fell(rxd)   X                                    cancels any period
start           X                                phase 0 (fell(rxd_r))
bit_clk         1   1 ...  1   0   0 ...  1   1
mid_bit                    ^ high in the cycle ending at edge 8
```

Put as counts: the receiver samples a bit on the 8th edge after the edge
that first saw its falling edge. That is the middle of a 16-edge bit.

The register form uses a 4-bit phase counter `cnt`, a flag `active`, and
`restart`. A cancel wins over a start, and a start wins over counting. A
cancel leaves `bit_clk` and `restart` unchanged. So if an edge arrives just
as a period ends, the next period still begins from the delayed edge, one
`clk16x` later, exactly as with a cancel at any other phase.

`mid_bit` is a combinational strobe. It is high in the `clk16x` cycle whose
closing edge makes `bit_clk` fall, unless that same edge is a falling edge
of `rxd`. Users register data on `clk16x` when `mid_bit` is 1. No flop is
clocked by `bit_clk`. `bit_clk` is still brought out, because it is the
signal the design is named after and is handy on a waveform viewer.

Out of reset, `restart` is 1, so the bit clock runs freely. It is re-phased
by the first START bit that arrives.

An assertion in the module checks that a mid-bit strobe never comes while
`bit_clk` is already low.

## Transmitter (`uart_tx`)

The host puts a word on `tx_data` and gives a one-cycle `load` while
`tx_busy` is low. On that edge:

* the whole frame is loaded into a shift register,
* the START bit appears on `serial_out`,
* `tx_busy` rises.

Every 16 cycles the register shifts right and fills with 1s, which is the
idle level. `serial_out` is bit 0 of that register, so it comes straight
from a flop and does not glitch. `tx_busy` falls on the edge that ends the
STOP bit, so it is high for exactly one frame time. The parity settings are
taken at `load`. A `load` while busy is ignored. If `load` is held high, the
frames go out back-to-back with one `clk16x` of idle line between them.

## Receiver (`uart_rx`)

The receiver holds a `bit_clk_gen` and a four-state machine. The machine
moves only on `mid_bit`:

| state       | at mid-bit                                                       |
|-------------|------------------------------------------------------------------|
| `RX_IDLE`   | `rxd` = 0 is a START bit: go to `RX_DATA`                        |
| `RX_DATA`   | shift `rxd` into the receive register from the MSB end, `DATA_BITS` times |
| `RX_PARITY` | (only if `parity_enb`) keep the parity bit                       |
| `RX_STOP`   | update `rxdata` and `parity_err`, pulse `rdy`, go back to `RX_IDLE` |

* `rdy` is high for one cycle.
* `rxdata` and `parity_err` hold their values until the next word.
* `parity_enb` is read when the last data bit comes in and again at the
  STOP bit, and `odd_parity` is read at the STOP bit. Both must therefore
  describe the frame being received.
* The STOP bit's value is not checked. There is no framing-error output.

## Top level (`uart_top`)

`serial_out` drives the receiver's `rxd` directly. Both halves share
`clk16x`, `rst_n`, `parity_enb` and `odd_parity`. The host side stays
outside the design: its signals are ports. These are `load`, `tx_data` and
`tx_busy` for sending, and `rxdata`, `rdy` and `parity_err` for receiving.
`serial_out` and `bit_clk` are also brought out so they can be watched.

Timing, counted in `clk16x` edges:

| event                                        | edges after the `load` edge |
|----------------------------------------------|-----------------------------|
| START bit on `serial_out`                    | 0                           |
| START bit confirmed by the receiver          | 9                           |
| `rdy` set                                    | (DATA_BITS + 1 + parity_enb)·16 + 9 = 169 (8 bits, parity) or 153 (no parity) |
| `tx_busy` falls                              | (DATA_BITS + 2 + parity_enb)·16 = 176 or 160 |

## Parameters

| parameter     | default | where                       | meaning |
|---------------|---------|-----------------------------|---------|
| `DATA_BITS`   | 8       | `uart_tx`, `uart_rx`, `uart_top` | data bits per frame. 8, 16 and 32 are tested. At most `uart_pkg::MAX_DATA_BITS` = 32 |
| `OVERSAMPLE`  | 16      | all modules                 | `clk16x` periods per bit. Must exceed `HIGH_CYCLES` + 1 |
| `HIGH_CYCLES` | 7       | `bit_clk_gen`               | edges from a period start to mid-bit |

The receive phase counter is `$clog2(OVERSAMPLE)` bits wide. The period ends
at phase `OVERSAMPLE-1`.

## Choices made in this design, and how it departs from the original

The following come from the original description:

* the frame format and bit order,
* the 16× clock,
* the reset and resynchronisation of the divide-by-16 on falling edges,
* the 7/8 phase split and the `restart` free-run,
* the setting of `restart` during reset,
* the `rdy`/`rxdata` outputs and the parity controls,
* the loopback of the transmitter into the receiver.

The following are this design's own choices:

* **Bit clock as an enable.** The original toggles a `bit_clk` variable and
  uses it to clock the data stream. Here the receiver stays on `clk16x`, and
  `mid_bit` is the enable that marks the `bit_clk` falling edge.
* **`rxd_r` delay.** The prose speaks of delaying `rxd` "by one bit". The
  register it then shows delays `rxd` by one `clk16x` period, and that is
  what is built.
* **Receive register.** The original declares an 11-bit receive register
  (START, 8 data, parity, STOP). Here only the data bits are shifted in, and
  the parity bit is kept on its own.
* **Resynchronisation policy.** An alternative, class-based generator in the
  original resets its counter only when the receiver is empty and the line
  is low. This design follows the cover-property version, which
  resynchronises on every falling edge, including those inside a frame.
* **Interface details.** None of these are specified in the original:
  the `load`/`tx_busy` handshake, `rdy` as a one-cycle pulse, the
  synchronous active-low reset, the reset value 0 of `bit_clk`, the parity
  convention, the single STOP bit, and the unchecked STOP bit.
* **Synchronous line.** `rxd` must be synchronous to `clk16x`, as it is in
  the loopback. A line from another clock domain needs a two-flop
  synchroniser in front of `uart_rx`. That adds two cycles of latency, and
  the sampling point stays well inside the bit.
* **Parity default.** The original's receiver model has parity enabled by
  default. Here parity is an input with no default.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line. Each has a watchdog.

* `tb_bit_clk_gen` drives UART-like streams, stray falling edges at random
  phases, long runs with no edge, and a reset. A reference model remembers
  only where the current period began. From that it predicts `bit_clk`
  after every edge and `mid_bit` before every edge.
* `tb_uart_tx` loads random words in all three parity modes, both with gaps
  and back-to-back, and also tries a load while busy. It compares
  `serial_out` with the expected frame on every cycle and checks the length
  of `tx_busy`.
* `tb_uart_rx` sends frames from a line model: random data, parity modes,
  gaps and phases, and some wrong parity bits. It also cuts one frame with a
  reset. It checks the word, `parity_err`, one `rdy` per frame, and the
  latency from the START edge to `rdy`.
* `tb_uart_top` is the end-to-end test at the default parameters. It runs
  about 200 words through the loopback, with a scoreboard that checks the
  word, the parity flag and the load-to-`rdy` latency. It provokes parity
  errors by flipping `odd_parity` in the middle of a frame, and checks that
  a frame cut by reset is dropped. It counts, and requires at least once:
  no, even and odd parity; parity errors; back-to-back frames;
  resynchronisation on a falling edge inside a frame; bit periods started
  by `restart`; and the reset.
* `tb_uart_wide` runs 16- and 32-bit words through two `uart_top`
  instances.

## Simulating

With Verilator 5, from the top of the tree:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/uart_pkg.sv rtl/bit_clk_gen.sv rtl/uart_tx.sv rtl/uart_rx.sv rtl/uart_top.sv \
    tb/tb_uart_top.sv --top-module tb_uart_top
./obj_dir/Vtb_uart_top
```

Swap in another testbench and its top module in the same way. Each run
takes well under a second. `uart_pkg.sv` must be compiled before the
modules that import it.

## Files

* `rtl/uart_pkg.sv`: frame constants and the parity function
* `rtl/bit_clk_gen.sv`: line-synchronised bit clock and mid-bit strobe
* `rtl/uart_tx.sv`: transmitter
* `rtl/uart_rx.sv`: receiver
* `rtl/uart_top.sv`: loopback top level
* `tb/tb_*.sv`: the testbenches described above
