# UART with built-in self-test

An 8-bit asynchronous serial port (UART) that can check itself without an
external tester. A single pulse on `bist_start` turns the UART back on itself:
the transmitter's serial output is routed inside the chip into the receiver, an
8-bit linear feedback shift register (LFSR) supplies 255 pseudo-random bytes,
and each byte is sent as a full serial frame, received, and compared with what
was sent. At the end a result register says pass or fail. Outside a test run
the same UART serves a host through an ordinary parallel byte interface and a
serial line.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, on one clock. It
follows a published design for a BIST-equipped UART. The structure, the frame
format, the 50 MHz clock, the 9600 bit/s rate and the loopback self-test with
LFSR patterns come from that design. Handshakes, timing details, the
controller's sequence and the register layouts are this implementation's own.
The section [Departures and open points](#departures-and-open-points) lists
each difference.

## Block structure

```
uart_bist_top
├── uart                  the circuit under test
│   ├── baud_gen          50 MHz -> 16 x 9600 Hz enable (divide by 326)
│   ├── uart_tx           buffer register + 11-bit shift register
│   ├── uart_rx           synchronizer, 16x oversampling, buffer register
│   └── uart_status       status register with sticky error bits
├── lfsr                  pattern generator, x^8 + x^4 + x^3 + x^2 + 1
├── bist_comparator       response check and error counters
└── bist_ctrl             control/result register and test sequencer
```

`uart_pkg` holds the shared types: `byte_t`, the parity sense `parity_e`,
and the packed structs `uart_status_t` and `bist_status_t`. It also holds the
frame constants and the parity function.

Three multiplexers in the top module choose what drives the UART's `din`, `wrn`
and `rdn`. They pass the host's signals in normal operation and the self-test
controller's during a test. One multiplexer in `uart` switches the receiver's
input between the `rxd` pin and the transmitter's output.

## A character on the line

```
 idle  start  d0 d1 d2 d3 d4 d5 d6 d7  parity  stop  idle
 1111    0    <-- LSB first -------->    p      1    111
```

Eleven bit times per character. Parity is even by default: the data bits plus
the parity bit have an even number of ones. Setting `PARITY = PAR_ODD` makes it
odd. There is always exactly one stop bit.

**Timing.** `baud_gen` turns the system clock into a one-cycle enable,
`tick16`, at sixteen times the bit rate. The divisor is
round(CLK_HZ / (16 · BAUD)): 326 at 50 MHz and 9600 bit/s. That gives
9585.9 bit/s, 0.15 % slow, well inside what an oversampling receiver tolerates.
With these numbers:

| quantity | clk cycles |
|---|---|
| one tick16 period | 326 |
| one bit | 16 × 326 = 5,216 |
| one frame | 11 × 5,216 = 57,376 (1.15 ms) |

**Transmitter (`uart_tx`).** The transmitter has two registers:

- A one-byte buffer register. A host write loads it (`wrn` low for one clock
  while `tbre` is high) and `tbre` falls. A write while `tbre` is low is
  dropped, so the host must poll `tbre`.
- An 11-bit shift register. When it is idle, or exactly when the previous stop
  bit ends, it takes the buffered byte on the next `tick16`. It adds start,
  parity and stop bits, and `tbre` rises again.

A frame starts only on a tick, so every bit lasts exactly 16 ticks. Back-to-back
bytes leave no idle gap. `tsre` is high while nothing is being sent. `sdo`
idles at 1.

**Receiver (`uart_rx`).** The receiver handles a frame in these steps:

1. `rxd` passes through a two-flop synchronizer.
2. While idle, the receiver looks at the line on every tick. A 0 starts a frame.
3. Seven ticks later, in the middle of the start bit, it looks again. A 1 there
   means a glitch, and the receiver returns to idle.
4. From then on it samples every 16th tick, in the middle of each of the eight
   data bits, the parity bit and the stop bit.
5. At the stop-bit sample, the byte goes to the buffer register `dout` and
   `data_ready` rises.

   - `parity_error` and `framing_error` (stop bit was 0) describe that frame.
     The next frame replaces them.
   - `frame_valid` pulses for one cycle.
6. After a 0 stop bit, the receiver waits for the line to return to 1 before it
   looks for the next start bit. Without this rule, the rest of a broken stop
   bit would look like a new start bit.

`data_ready` rises 167 ticks after the receiver first sees the start bit. That
is the middle of the stop bit, half a bit before the frame ends. It stays high
until the host reads: `data_ready` clears on the first clock edge with `rdn`
low. `dout_oe` equals `!rdn` and is meant as the enable of a tristate driver,
if `dout` goes onto a shared bus. A byte that is not read is overwritten by the
next frame. There is no overrun flag.

## The self-test run

This is the part that needs the closest reading. `bist_ctrl` is a small state
machine. Its `status` output, a `bist_status_t`, is the result register the
host reads.

| state | what happens | leaves when |
|---|---|---|
| IDLE | UART belongs to the host | `bist_start` pulse |
| CLEAR | LFSR loaded with the seed (1), comparator cleared, `busy` set | next cycle |
| SETTLE | loopback on; read strobe held low | `SETTLE_CYCLES` (one frame) passed |
| SEND | waits for `tbre`, then writes the LFSR byte (`wrn` low 1 cycle) | write done |
| WAIT | waits for `data_ready` | byte arrived, or `TIMEOUT_CYCLES` (two frames) passed |
| READ | `rdn` low 1 cycle; comparator checks `dout` against the LFSR byte | next cycle |
| NEXT | LFSR steps; count of sent bytes +1 | to FINISH after `NUM_PATTERNS`, else SEND |
| FINISH | `busy` cleared; `done` set; `pass` = no bad byte and no timeout | next cycle |

The following points explain the design choices in the sequence:

- **Loopback and isolation.** Loopback switches on when `busy` rises, in
  CLEAR. Then the receiver listens to the transmitter inside the block, and
  the `sdo` pin is held at 1. The outside line sees an idle line and noise on
  `rxd` cannot get in. Host writes and reads are ignored while `busy` is high.
- **Why SETTLE exists.** When loopback is switched on, a frame may be arriving
  from outside. SETTLE waits one full frame time with the read strobe held
  low, so any such partial frame finishes and is thrown away. It does not
  reach the comparator.
- **One byte in flight.** The controller does not write the next pattern until
  it has read back the previous one. The LFSR therefore still holds the byte
  that was sent, and no second copy is needed for the comparison. This costs no
  throughput: the receiver reports a byte half a bit before the frame ends, so
  the next write reaches the buffer during the previous stop bit and the
  frames still follow each other without a gap.
- **Duration.** A full run takes one settling frame plus 255 frames, ending in
  the middle of the last stop bit. That is 256 × 57,376 − 2,608 ≈ 14.69
  million cycles, 0.29 s at 50 MHz. The end-to-end testbench measures
  14,685,968 cycles.
- **What counts as a bad byte.** A byte is bad if it differs from the pattern,
  or if it arrived with a parity or framing error. `bist_comparator` keeps a
  sticky `fail`, a saturating count of bad bytes (`bist_err_count` at the top)
  and a count of compared bytes. An assertion in the top checks that the count
  of compared bytes equals `NUM_PATTERNS` at the end of a run without timeout.
- **Timeout.** If a byte never comes back, for example because the transmitter
  is stuck, WAIT gives up after two frame times. The run then ends with
  `timeout = 1` and `pass = 0`, so it never hangs.
- **Result.** `bist_status = {busy, done, pass, timeout}`. The result is held
  until the next `bist_start`. A `bist_start` during a run is ignored.

**The patterns.** `lfsr` is a shift register with an XOR in front of each
tapped stage. The top bit is fed back to the taps. Each step multiplies the
state by x modulo x^8 + x^4 + x^3 + x^2 + 1. This polynomial is primitive, so
starting from any non-zero seed, the register passes through all 255 non-zero
byte values once before it repeats. A run therefore sends every byte value
except 0x00.

From seed 1 the sequence begins 01, 02, 04, 08, 10, 20, 40, 80, 1D, 3A, …

A zero seed would lock the register at zero, so it is replaced by 1.

**What the test covers.** The run exercises:

- the whole transmit path: buffer, shift register, parity generation and bit
  timing;
- the whole receive path: start detection, sampling, parity check and stop
  check;
- the baud rate generator, because both sides must keep the same rate for
  11 bits.

It does not cover:

- the `rxd` input pin and the path from it to the loopback multiplexer, which
  loopback bypasses;
- the `sdo` output driver;
- the 0x00 data byte;
- the host-side multiplexers in their host position.

## Host interface

All signals are synchronous to `clk`. `rst` is asynchronous and active high.

| signal | dir | meaning |
|---|---|---|
| `din[7:0]`, `wrn` | in | write a byte: `wrn` low for one cycle while `tbre` = 1 |
| `tbre`, `tsre` | out | transmit buffer empty; transmit shift register empty |
| `dout[7:0]`, `data_ready` | out | received byte, valid while `data_ready` = 1 |
| `rdn` | in | low = read; clears `data_ready` on the next edge |
| `dout_oe` | out | `!rdn`, enable for an external tristate driver |
| `parity_error`, `framing_error` | out | flags of the last received frame |
| `uart_status_word` | out | `uart_status_t`: `{framing_sticky, parity_sticky, tsre, tbre, framing_error, parity_error, data_ready}` |
| `stat_clr` | in | one-cycle pulse, clears both sticky bits |
| `rxd`, `sdo` | in/out | serial line |
| `bist_start` | in | one-cycle pulse, starts a self-test run |
| `bist_status` | out | `bist_status_t`: `{busy, done, pass, timeout}` |
| `bist_err_count[7:0]`, `bist_mismatch` | out | bad bytes in the last run; one-cycle pulse per bad byte |

The status register (`uart_status`) holds copies of the live flags, one cycle
late. It also holds two sticky bits that record a parity error or a framing
error in any frame since the last `stat_clr`. A host that polls slowly still
learns that some data was corrupted. If an error and a clear come in the same
cycle, the error wins.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `uart_bist_top`, `uart`, `baud_gen` | `CLK_HZ` | 50,000,000 | system clock |
| same | `BAUD` | 9600 | bit rate |
| `baud_gen` | `OVERSAMPLE` | 16 | ticks per bit; `uart_tx` and `uart_rx` assume 16 |
| `baud_gen` | `DIVISOR` | round(CLK_HZ / (OVERSAMPLE · BAUD)) = 326 | |
| `uart_bist_top`, `uart`, `uart_tx`, `uart_rx` | `PARITY` | `PAR_EVEN` | or `PAR_ODD` |
| `uart_bist_top`, `bist_ctrl` | `NUM_PATTERNS` | 255 | bytes per run; at most 255 with the 8-bit counters |
| `uart_bist_top`, `lfsr` | `LFSR_SEED` / `SEED` | 8'h01 | non-zero |
| `lfsr` | `WIDTH`, `POLY` | 8, 8'h1D | POLY holds the low 8 coefficients of the polynomial |
| `bist_ctrl` | `SETTLE_CYCLES`, `TIMEOUT_CYCLES` | 57,376, 114,752 | one and two frames; the top computes them from `CLK_HZ` and `BAUD` |
| `bist_comparator` | `CNT_W` | 8 | counter width |

## Departures and open points

- **Buffers, not FIFOs.** The source describes loading test patterns into a
  transmitter FIFO and collecting them in a receiver FIFO. Its port list has
  buffer-empty and shift-register-empty flags, and its resource summary has
  only two 8-bit data registers. This design follows those: one-byte buffers
  on each side and no deeper FIFO.
- **One clock.** The source's UART takes a separate 16x clock (`clk16x`). Here
  everything runs on the system clock and the 16x rate is a clock enable.
- **Tristate output.** The source drives `dout` through a tristate buffer.
  Here `dout` is a plain output with a separate `dout_oe`.
- **Fixed frame.** The general frame format allows 5 to 8 data bits, an
  optional parity bit and 1, 1.5 or 2 stop bits. This design is fixed at 8
  data bits, one parity bit and one stop bit, which is the 8-bit character the
  source design uses.
- **LFSR size and taps.** The source's LFSR drawing shows a 4-stage register
  with data inputs on each stage, and it gives no tap positions. Here the
  register is 8 bits wide, to feed the 8-bit transmitter input. It has no data
  inputs and uses the polynomial above.
- **No signature register.** The response analysis is a direct byte
  comparison, as in the source's proposed system. It does not compact the
  responses into a signature.
- **Own choices.** The following are this design's own, because the source
  does not give them:
  - the register layouts;
  - the write-ignored-when-full rule;
  - glitch rejection, the synchronizer and the wait-for-idle after a framing
    error;
  - the settling wait and the timeout;
  - async active-high reset.
- **Source numbers not reproduced.** The source reports FPGA synthesis
  results: minimum period 10.572 ns, and counts of cells and flip-flops. They
  were not targeted and are not reproduced.

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends it with a
failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/uart_pkg.sv tb/tb_uart_bist_top.sv --top-module tb_uart_bist_top
./obj_dir/Vtb_uart_bist_top
```

Replace the testbench name to run another one:

| testbench | what it shows |
|---|---|
| `tb_uart_bist_top` | At default parameters: host transfers through an external loop, parity and framing errors, sticky bits and their clear, then a complete 255-pattern self-test. Every received byte is checked against an independent model of the LFSR sequence. `rxd` noise and host writes during the run are ignored, `sdo` stays at 1, and the run length is checked. The test ends with functional traffic again. About 15 M cycles, 15 s. |
| `tb_uart_bist_inject` | Whole design at 100 kbit/s from 1.6 MHz, with faults forced onto the receiver's internal input. One corrupted frame must fail the run with exactly one bad byte. A line stuck at 1 must end by timeout, and a line stuck at 0 must give one bad byte and then a timeout. Clean runs before and after must pass. |
| `tb_uart` | The assembled UART at a fast bit rate: external loop with latency check, internal loopback with `rxd` stuck at 0, error frames, status word. |
| `tb_uart_tx` | Frames from even- and odd-parity transmitters decoded by an independent monitor; exact bit and frame lengths; back-to-back frames; dropped writes. |
| `tb_uart_rx` | Driven frames at random phase: data, flags, the `data_ready` time window, reads, glitch rejection, recovery after a framing error. |
| `tb_baud_gen` | Tick spacing of exactly 326 cycles at the defaults and 6 cycles at 1 kHz / 10 bit/s. |
| `tb_lfsr` | Period 255, every non-zero value once, agreement with a polynomial model, load, hold and zero-seed rules. |
| `tb_bist_comparator` | Random compares against a reference model, saturation, clear. |
| `tb_bist_ctrl` | Sequencer against a handshake model of the UART: clean run, comparator failure, no answer (timeout), ordering of write, compare and step. |

Random stimulus uses `$urandom`. Verilator starts uninitialised variables at
random values and every register here is reset, so results do not depend on
the seed. All blocks also lint cleanly with `verilator --lint-only -Wall`,
apart from unused-constant notes from the shared package. A second remaining
warning concerns `rst` appearing in `disable iff` of assertions, which the
flops use asynchronously.
