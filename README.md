# Real-time signal capture over a UART

An FPGA prototype often has to show what happens on an internal bus
while it runs. This design does that with almost no I/O: it sits next to
the design being observed in the same FPGA, takes a burst of 8-bit
samples of a chosen signal when a trigger fires, and sends them to a
computer over a single serial line. The line runs at one of eight
standard bit rates, from 115200 down to 1200 bit/s, picked by a 3-bit
input, so the same bitstream works with whatever the far end can receive.

The capture is reconfigured without touching the RTL: sample count,
FIFO depth, system clock frequency and an optional parity bit are
parameters, and the bit rate is an input.

Because the capture runs on the fast system clock and the serial link on
a slow bit-rate clock, the two halves are joined by an asynchronous
FIFO. The FIFO is also the capture memory: one capture fills it in
consecutive clocks, and the link then drains it at its own pace.

```
             +---------------- rsc_top ------------------------------------------+
             |  capture_module                 communication_module              |
 trigger --->|  +--------------------+        +--------------------------------+ |
 data[7:0]-->|  | capture_fsm        | winc   | async_fifo (16 x 8)            | |
             |  | sample_counter     |------->| wclk = clk      rclk = uart_clk| |
 clk ------->|  | hold register      | wdata  |         |rdata, rempty, rinc   | |
 rst ------->|  +--------------------+<-------|         v                      | |
             |            ^            wfull  |      uart_tx ------------------+-+--> dout
             |            |                   |         ^ uart_clk             | |
 bps[2:0] -->|------------+-------------------+-> clock_mux8 <- baud_clock_gen | |
             |                                +--------------------------------+ |
             +-------------------------------------------------------------------+
```

## One capture, start to finish

1. After reset the capture state machine is armed (`CAP_IDLE`). Its
   hold register copies `data` every clock.
2. The first clock edge that sees `trigger` high moves it to `CAP_RUN`.
   The value of `data` at that edge is the first sample.
3. In `CAP_RUN`, each clock in which the FIFO is not full writes the held
   sample into the FIFO and loads the next one. With the defaults (16
   samples, 16-word FIFO) this takes 16 consecutive clocks: sample *k* is
   `data` at the trigger edge plus *k* clocks, written *k*+1 clocks
   after the trigger edge.
4. After the 16th write the machine enters `CAP_DONE` and raises
   `cap_done`. It stays there while `trigger` is high and re-arms when
   `trigger` goes low, so every trigger pulse gives exactly one capture.
5. Meanwhile the transmitter sees the FIFO become non-empty a few
   bit-clock edges later and starts sending. Each byte is one frame.
   The line is free again about 16 x 12 bit times after the trigger.

### Stall instead of loss

If `NUM_SAMPLES` is set larger than the FIFO, or a new capture is
triggered before the link has drained the previous one, the FIFO fills
up. The capture then does not drop samples. The hold register keeps the
pending sample, the counter stops, and nothing is written until the FIFO
has room. The stored samples are then no longer consecutive: each one is
the input at the clock of the previous successful write. `fifo_full`
shows when this happens. Choose `NUM_SAMPLES` no larger than the FIFO
depth when the samples must be back-to-back in time.

## The asynchronous FIFO

This is the most delicate part of the design, and it is built in the
classic way, from five pieces:

| module | clock | job |
|---|---|---|
| `fifo_mem` | `wclk` | 2^ASIZE x 8 array, written when `winc` and not full; read port combinational |
| `fifo_wptr_full` | `wclk` | write pointer, full flag |
| `fifo_rptr_empty` | `rclk` | read pointer, empty flag |
| `sync_2ff` (x2) | the receiving side's clock | two-flop synchronizer for a pointer |
| `async_fifo` | both | wires the above together |

**Pointers one bit wider than the address.** With 16 words the
address is 4 bits and each pointer 5 bits. The write pointer names the
next word to write and the read pointer the word to read next; both are
0 after reset. When the lower 4 bits are equal the FIFO is either empty
or full. The extra top bit tells which: equal top bits mean both
pointers have wrapped equally often (empty), different top bits mean the
writer is one wrap ahead (full).

**Gray code across the clock boundary.** Each side keeps its pointer
in binary, to address the memory, and in Gray code, to hand to the other
side. Successive Gray values differ in one bit, so a pointer sampled
while it changes is seen as either its old or its new value. Either is
safe. A stale read pointer can only make the write side think the FIFO
is fuller than it is. A stale write pointer can only make the read side
think it is emptier.

**Flags where they are needed.** Empty is computed in the read domain
and full in the write domain, from the local pointer and the
synchronized remote one, so each flag rises in the same clock that makes
it true:

* empty: next Gray read pointer == synchronized Gray write pointer
  (all 5 bits);
* full: next Gray write pointer == synchronized Gray read pointer with its
  two top bits inverted. In Gray code, a pointer one wrap ahead differs
  from the other in its two top bits, not just one. In binary the same
  test reads `{~wptr[4], wptr[3:0]} == rptr`.

Both flags are registered. Empty clears two to three read-clock edges
after the first write, and full clears two to three write-clock edges
after a read. That delay is the cost of the synchronizers. It never
causes an overflow or underflow, only a short wait.

**First-word fall-through.** The memory read is combinational, so the
word at the read pointer is already on `rdata` while `rempty` is low.
The transmitter takes it and pulses `rinc` in the same clock edge.

## Bit-rate clocks

`baud_clock_gen` is the timer block. For each rate it has its own
counter on the 50 MHz clock that toggles an output every
`round(CLK_HZ / (2 * rate))` clocks:

| `bps` | rate (bit/s) | clocks per bit at 50 MHz | actual rate |
|---|---|---|---|
| 0 | 115200 | 434 | 115207 |
| 1 | 57600 | 868 | 57604 |
| 2 | 38400 | 1302 | 38402 |
| 3 | 19200 | 2604 | 19201 |
| 4 | 9600 | 5208 | 9601 |
| 5 | 4800 | 10416 | 4800 |
| 6 | 2400 | 20834 | 2400 |
| 7 | 1200 | 41666 | 1200 |

`clock_mux8` picks one of the eight with `bps`. That clock,
`uart_clk`, drives the transmitter and the FIFO read side. One period of
`uart_clk` is one bit on the line.

Two consequences of using a divided and multiplexed clock rather than a
clock enable:

* `bps` must only change while the link is idle or in reset. A change
  while the clocks run can put a short pulse on `uart_clk`.
* During reset every divider output is held low, so `uart_clk` does not
  tick. The read domain therefore leaves its asynchronous reset before
  its first clock edge, and no reset synchronizer is needed there.

On an FPGA, route `uart_clk` on a clock buffer or replace the mux with a
glitch-free clock switch.

## Serial frame

`uart_tx` moves through one state per bit clock:
`idle, start, d0 ... d7, stop, nop`, then back to `idle`.

* The line (`dout`) is high when idle.
* Each frame is a start bit (0), eight data bits with the least
  significant bit first, and one stop bit (1). There is no parity bit.
* The `nop` state adds one more high bit. `idle` needs one clock to
  take the next byte.
* Back to back, a byte therefore takes 12 bit times. A standard receiver
  set to 8N1 reads this stream without trouble, since it only sees a
  slightly longer stop period.
* Setting `PARITY` to `PAR_EVEN` or `PAR_ODD` inserts a parity bit
  between `d7` and `stop` (state `TX_PAR`), making a frame 13 bit times.
  Even parity makes the count of ones in data plus parity even, odd
  parity makes it odd. The default is no parity.

## Ports of `rsc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 50 MHz system clock; capture and FIFO write side |
| `rst` | in | 1 | active-high asynchronous reset of everything |
| `trigger` | in | 1 | level; a capture starts at the first clock it is seen high while armed |
| `data` | in | 8 | the observed signal |
| `bps` | in | 3 | rate select, see the table above |
| `dout` | out | 1 | serial line |
| `cap_busy` | out | 1 | capture in progress |
| `cap_done` | out | 1 | capture complete, waiting for trigger to drop |
| `fifo_full` | out | 1 | FIFO full; a running capture is stalled |
| `tx_busy` | out | 1 | a frame is on the line (in the `uart_clk` domain) |

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `CLK_HZ` | 50 000 000 | `rsc_top`, `communication_module`, `baud_clock_gen` | system clock frequency; the dividers are derived from it |
| `NUM_SAMPLES` | 16 | `rsc_top`, `capture_module`, `sample_counter` | samples per capture |
| `FIFO_ASIZE` / `ASIZE` | 4 | `rsc_top`, `async_fifo` and its parts | FIFO holds 2^ASIZE words |
| `DSIZE` | 8 | `async_fifo`, `fifo_mem` | word width |
| `PARITY` | `PAR_NONE` | `rsc_top`, `communication_module`, `uart_tx` | optional even or odd parity bit |

The sample width (8) and the list of rates are in `rsc_pkg`. The
transmitter is written for 8-bit bytes.

## What is fixed and what was chosen

Taken from the design as specified: the split into a capture module (capture
state machine plus sample counter) and a communication module (FIFO,
timer block, 8:1 clock mux, UART); 8-bit samples; a 50 MHz clock; the
eight rates and their order on the mux inputs; the 16-word FIFO with
one-bit-wider pointers, Gray-coded pointers, two-flop synchronizers,
empty generated on the read side and full on the write side, and writes
blocked while full; the transmitter's state sequence with a `nop` state
after the stop bit.

Chosen here, where the specification says nothing:

* the three capture states, the level-sensitive trigger, and the
  re-arm when the trigger drops;
* stalling on a full FIFO rather than dropping samples;
* 16 samples per capture by default;
* the Gray-code form of the full test;
* rounding of the divider ratios, one counter per rate;
* LSB-first data, line high when idle, no parity by default;
* active-high reset everywhere except the FIFO's own active-low
  resets, which the top drives from `rst`.

Not built:

* a receiver: the link only sends;
* parity checking, which needs the receiver. Parity generation is
  available but off by default, because the specified transmitter's
  state sequence has no parity state;
* the sampled-binary-pointer handshake that can replace Gray pointers,
  which is an alternative to the FIFO built here;
* the host software, and the observed design itself.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs.

| testbench | what it shows |
|---|---|
| `tb_rsc_top_full` | the top at its defaults (50 MHz, 16 samples): one capture at each of the eight rates, plus a second capture at 19200 bit/s of a signal cycling 00, 33, 44, 55; decodes the line at the expected bit time and checks every byte, the framing and that no stall occurs |
| `tb_rsc_top` | the top at a 1.152 MHz clock with 24 samples per capture: forces stalls on a full FIFO, re-arming, all rates, back-to-back frames and the line going idle |
| `tb_communication_module` | FIFO plus link at all rates; bytes, bit time, 12-bit-time frame spacing, full FIFO |
| `tb_async_fifo` | 10 ns / 37 ns clocks, random traffic against a reference queue; exactly 16 words fit; full and empty block |
| `tb_fifo_wptr_full`, `tb_fifo_rptr_empty`, `tb_sync_2ff`, `tb_fifo_mem` | the FIFO parts against reference models |
| `tb_baud_clock_gen` | period and high time of all eight clocks at 50 MHz |
| `tb_uart_tx_parity` | even and odd parity frames: parity bit, data, 13-bit-time spacing |
| `tb_clock_mux8`, `tb_uart_tx`, `tb_capture_fsm`, `tb_sample_counter`, `tb_capture_module` | the remaining blocks |

`tb/uart_line_monitor.sv` is a testbench-only serial receiver. It is
used by the system-level testbenches.

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_rsc_top_full -y rtl -y tb +libext+.sv -Irtl \
  rtl/rsc_pkg.sv tb/tb_rsc_top_full.sv
./obj_dir/Vtb_rsc_top_full
```

Replace the testbench name to run another one. The full-size test covers
about 17 million clock cycles and runs in roughly 10 seconds. Every
other testbench finishes in under a second.

The RTL carries a few assertions, checked when the simulator is run
with `--assert`:

* the capture never writes a full FIFO;
* the transmitter never reads an empty one;
* each Gray pointer changes in at most one bit per clock.

Simulation notes:

* The testbenches apply inputs away from clock edges and check outputs
  after them.
* A testbench that starts with reset already high gives it a rising
  edge at time 1, because the asynchronous resets in the `uart_clk`
  domain see no clock during reset.
