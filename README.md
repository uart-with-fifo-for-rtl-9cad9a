# UART with transmit and receive FIFOs

A plain UART hands the host one byte at a time. If the host is late to
collect a received byte, the next byte overwrites it and data is lost
(overrun). When sending, the serial line sits idle until the host supplies
the next byte. This design places a 16-word FIFO on each side of a UART core.
The host can then write a burst of bytes and read received bytes whenever it
gets round to it. The UART core meanwhile keeps the line busy and stores
what arrives. The FIFOs are dual-clock, so the host side and the UART core
can run from unrelated clocks.

```
   host_clk domain                 |                clk domain (UART core)
                                   |
   tx_wr_en, tx_wr_data ---> [ TX FIFO 16 x 8 ] ---> uart_tx ---> tx
   tx_full, tx_almost_full         |   tx_empty, tx_almost_empty, tx_busy, tx_done
                                   |
   rx_rd_en  ---------------> [ RX FIFO 16 x 10 ] <--- uart_rx <--- rx
   rx_rd_data, rx_parity_err,      |   rx_full, rx_almost_full, rx_overrun
   rx_frame_err, rx_empty, ...     |
                                   |   baud_gen --tick--> uart_tx, uart_rx
```

The structure has four blocks: baud generator, transmitter, receiver and
FIFO. The frame handling, the FIFO flags and the Gray-coded pointer crossing
all follow a published description of a UART-with-FIFO IP core. That
description does not fix the interface details. Those details are this
implementation's own choices, and each one is marked as such below.

## Files

| file | contents |
|---|---|
| `rtl/uart_pkg.sv` | default sizes, `parity_e`, `uart_cfg_t`, Gray-code functions |
| `rtl/baud_gen.sv` | programmable tick generator |
| `rtl/uart_tx.sv` | transmitter state machine and shift register |
| `rtl/uart_rx.sv` | receiver with start detection, mid-bit sampling and error checks |
| `rtl/async_fifo.sv` | dual-clock FIFO with Gray pointers and four status flags |
| `rtl/sync_2ff.sv`, `rtl/rst_sync.sv` | synchronizer and reset synchronizer helpers |
| `rtl/uart_fifo_top.sv` | the complete design |
| `tb/tb_*.sv` | one self-checking testbench per block, plus two system tests |

## Frame format and bit timing

A frame has these parts, in order:

- a start bit (0);
- 1 to 8 data bits, least significant bit first;
- an optional parity bit, even or odd;
- one or two stop bits (1).

The line idles at 1. The format is set at run time through `cfg`:

```
cfg.data_bits   number of data bits (normally 8)
cfg.parity      PAR_NONE, PAR_EVEN or PAR_ODD
cfg.two_stop    0: one stop bit, 1: two
```

Even parity makes the count of ones across the data and parity bits even.
Odd parity makes that count odd. The transmitter and the receiver each
sample `cfg` at the start of a frame, so a change takes effect from the next
frame.

All serial timing comes from a single tick. `baud_gen` counts clock cycles
and pulses `tick` each time the count reaches `divisor`. A bit lasts
`OVERSAMPLE` = 16 ticks, so:

```
divisor = f_clk / (16 * baud)
```

| baud | divisor at 100 MHz | actual rate |
|---:|---:|---:|
| 9600 | 651 | 9600.6 |
| 19200 | 326 | 19171.8 |
| 38400 | 163 | 38343.6 |
| 115200 | 54 | 115740.7 |

The divisor is 16 bits wide, which reaches 9600 baud with clocks up to about
157 MHz. In simulation a small divisor (2 to 4) shortens the bit time without
changing any timing relation between bits.

### Transmitter

`uart_tx` waits in idle until the transmit FIFO is non-empty. It then pops
the head word into its shift register and steps a state machine through
START, DATA, PARITY (only when parity is on) and STOP. Each state lasts 16
ticks. `busy` is high from the pop until the last stop bit ends. At that
moment `done` pulses for one cycle, and the next word is popped on the
following clock. A full FIFO therefore goes out as back-to-back frames with
no gap.

A frame starts on a clock edge, not on a tick, so the start bit can be up to
one tick (1/16 bit) short. Every later bit is exactly 16 ticks.

### Receiver

`uart_rx` passes `rx` through a two-flop synchronizer. In idle it watches for
a high-to-low edge, then waits half a bit (8 ticks) and samples the line
again:

- still low: the start bit is real;
- high again: it was a glitch, and the receiver returns to idle.

From the middle of the start bit it samples every 16 ticks, so each data
bit, the parity bit and the stop bit are read near their centres. This leaves
about ±7/16 of a bit for clock mismatch and edge distortion, accumulated over
the frame. The testbench checks ±3 % mismatch.

After the stop bit is sampled, `valid` pulses with the word and two flags:

- `parity_err`: the parity bit does not match the selected parity;
- `frame_err`: the stop bit was 0.

Only the first stop bit is checked; a second stop bit looks like idle line.
Starting a frame needs a fresh falling edge. A line held low after a framing
error (a break) therefore does not produce a stream of false frames.

## The dual-clock FIFO

`async_fifo` is the most delicate part of the design. Each FIFO is a 16-entry
memory with two pointers:

- the write pointer lives in the writer's clock domain;
- the read pointer lives in the reader's clock domain.

Each pointer has one more bit than the address. Equal pointers mean empty.
Pointers that differ only in that top bit mean full.

To reach the other domain, a pointer is kept in Gray code and sent through a
two-flop synchronizer. The far side converts it back to binary. One
increment changes one Gray bit, so a pointer sampled mid-change reads as
either its old or its new value, never as something in between.

Each side computes its flags from its own pointer and the delayed copy of
the other side's pointer:

| side | flags | computed from |
|---|---|---|
| write | `full`, `almost_full`, `wr_level` | write pointer minus synchronized read pointer |
| read | `empty`, `almost_empty`, `rd_level` | synchronized write pointer minus read pointer |

The far pointer is always a few cycles old. As a result, the writer can only
*overestimate* the occupancy and the reader can only *underestimate* it.
Neither can overwrite an unread word or read a word twice. The cost is a
short delay: a word written into an empty FIFO becomes visible to the reader
after about three read-clock cycles. Space freed by a read becomes visible to
the writer after a similar delay.

- **Thresholds:** the almost-full and almost-empty thresholds are run-time
  inputs. `almost_full` is `wr_level >= af_thresh`; `almost_empty` is
  `rd_level <= ae_thresh`.
- **Ignored requests:** a write while full and a read while empty are both
  ignored.
- **Read port:** first-word fall-through. `rd_data` shows the head word
  whenever `empty` is low, and `rd_en` removes it.

In the top:

| FIFO | writer side | reader side | entry |
|---|---|---|---|
| TX FIFO | host (`host_clk`) | `uart_tx` (`clk`) | 8 bits: the word |
| RX FIFO | `uart_rx` (`clk`) | host (`host_clk`) | 10 bits: {frame error, parity error, word} |

The RX entries carry the error flags, so each received word keeps its own
flags.

**Overrun.** If `uart_rx` delivers a word while the RX FIFO is full, the word
is dropped and `rx_overrun` pulses for one `clk` cycle. Words already in the
FIFO are kept.

## Top-level interface (`uart_fifo_top`)

| port | dir | domain | meaning |
|---|---|---|---|
| `clk` | in | | UART core clock (baud generator, transmitter, receiver) |
| `host_clk` | in | | host clock; may be the same net as `clk` |
| `rst` | in | async | active-high reset; released synchronously in each domain |
| `divisor[15:0]` | in | clk | clock cycles per tick |
| `cfg` | in | clk | frame format (`uart_cfg_t`) |
| `tx_af_thresh`, `rx_ae_thresh` | in | host_clk | almost-full threshold of the TX FIFO, almost-empty threshold of the RX FIFO |
| `tx_ae_thresh`, `rx_af_thresh` | in | clk | almost-empty threshold of the TX FIFO, almost-full threshold of the RX FIFO |
| `tx_wr_en`, `tx_wr_data` | in | host_clk | write a word to send (ignored while `tx_full`) |
| `tx_full`, `tx_almost_full`, `tx_level` | out | host_clk | TX FIFO state as the host sees it |
| `rx_rd_en` | in | host_clk | remove the head received word |
| `rx_rd_data`, `rx_parity_err`, `rx_frame_err` | out | host_clk | head received word and its flags, valid while `!rx_empty` |
| `rx_empty`, `rx_almost_empty`, `rx_level` | out | host_clk | RX FIFO state as the host sees it |
| `tx_empty`, `tx_almost_empty` | out | clk | TX FIFO state as the transmitter sees it |
| `tx_busy`, `tx_done` | out | clk | frame in progress; one-cycle pulse when a frame ends |
| `rx_full`, `rx_almost_full` | out | clk | RX FIFO state as the receiver sees it |
| `rx_overrun` | out | clk | one-cycle pulse: a received word was dropped |
| `rx`, `tx` | in/out | | serial lines, idle high |

Parameters: `DATA_W` = 8, `FIFO_DEPTH` = 16 (a power of two),
`OVERSAMPLE` = 16, `DIV_W` = 16. The width of `cfg.data_bits` is fixed in
`uart_pkg` at 4 bits. A build with `DATA_W` above 15 would need
`DEF_DATA_W` in the package raised as well.

## What follows the source description and what does not

**Taken from the source description:**

- the four blocks and how they connect;
- the frame (start low, LSB first, optional parity, one or more stop bits
  high);
- busy and transmit-complete status;
- receiver behaviour: falling-edge start detection, half-bit wait, mid-bit
  sampling, and parity and framing errors stored in the receive FIFO with
  the data;
- the FIFO: dual-port memory with separate pointers; empty, full,
  almost-empty and almost-full flags; programmable almost thresholds; Gray
  pointers with synchronizers;
- the 16-word depth and the 8-bit data width;
- the counter-and-compare baud generator;
- the port names `clk`, `rst`, `rx` and `tx`, and the top name
  `uart_fifo_top`.

**Chosen here:**

- 16 ticks per bit;
- even/odd parity selection and a limit of two stop bits;
- a second clock input for the host side;
- first-word fall-through read ports;
- the threshold comparisons;
- the overrun pulse;
- reset polarity and synchronization;
- the host-side port list.

**Differences:**

- **Run-time settings:** the source names data width, depth, divisor and
  parity among the settings fixed by parameters, but also calls the divisor
  and the frame format programmable. Here width and depth are parameters.
  Divisor, frame format and thresholds are run-time inputs; tie them to
  constants to get a fixed configuration.
- **FIFO memory:** the source maps the FIFO memory to one Spartan-3 block
  RAM. With a fall-through read port, the memory here would map to
  distributed (LUT) RAM instead. Registering `rd_data` would allow block RAM
  but adds a cycle of read latency.
- **Size:** the source reports about 350 LUTs and 220 flip-flops on a
  Spartan-3 XC3S400 and above 100 MHz. This RTL has not been mapped to that
  device. Generic synthesis gives 174 flip-flop bits plus 2 × 16 FIFO words.
- **Not built:** auto-baud detection, RTS/CTS flow control, an AXI bus
  wrapper and error-correcting coding. These appear only as future
  extensions.

## Verification

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Every testbench also has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_baud_gen` | tick period equals the divisor for 1, 2, 3, 7, 54 and 651 |
| `tb_uart_tx` | an independent decoder checks start, data, parity and stop bits for 8N1, 8E1, 8O2, 7E1, 5N2 and 6O1; the frame period in cycles; one `done` pulse per frame; back-to-back sending |
| `tb_uart_rx` | the same formats, injected parity and framing errors, glitch rejection, ±3 % sender clock error, and when `valid` arrives |
| `tb_async_fifo` | writer and reader on unrelated clocks (10/17 ns, then 22/6 ns) against a reference queue: ordering; full at exactly 16 words; writes while full and reads while empty ignored; pessimistic levels on both sides; flag thresholds; about 3-cycle write-to-read latency |
| `tb_uart_fifo_top` | end to end at default parameters, with a 100 MHz core clock and a ~71 MHz host clock in loopback. It runs a 40-word burst with host stalls and back-to-back frames, RX FIFO overflow with 4 overrun pulses, four format switches, parity and framing errors from an external sender, and an exact 864-cycle bit time at 115200 baud. It counts each of these events and fails if one never happens |
| `tb_uart_baud_rates` | loopback at 9600, 19200, 38400 and 115200 baud with a 100 MHz clock; bit times, rates and data |

Any testbench can be run with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/uart_pkg.sv \
    tb/tb_uart_fifo_top.sv --top-module tb_uart_fifo_top -o sim
./obj_dir/sim
```

Verilator simulates with two states, so each testbench starts with its reset
asserted on an edge. Each run takes well under a second. Assertions in the
RTL check that the transmitter never pops an empty FIFO and that neither
FIFO side ever sees more than `FIFO_DEPTH` words.
