# A buffered UART with a 16-byte transmit queue

This is a universal asynchronous receiver/transmitter (UART) in synthesizable
SystemVerilog. The host writes bytes faster than the serial line can carry them. A
16-byte first-in first-out buffer soaks up the difference, so the host does not
have to wait for each character to leave. Behind the buffer, two registers work as a
small pipeline. The *transmitter hold register* (THR) takes the next byte. The
*transmitter shift register* (TSR) frames that byte and shifts it out one bit per
baud period. A receiver with the mirror structure turns incoming frames back into
bytes and flags line errors. A line control register (LCR) sets the framing for
both directions. A baud rate generator paces both from the one system clock.

The structure follows a published VHDL design of a UART transmitter. That design
describes the transmit path in detail: the buffer, THR, TSR, the flowcharts that
connect them, the frame format and the register widths. It shows the receiver,
the LCR and the baud rate generator only as named boxes in its block diagram. The
sections below say, block by block, what comes from that description and what
this implementation chose.

## The serial frame

The line idles at 1. A frame has these bits, in order:

| bits | value |
|---|---|
| 1 start bit | 0 |
| 5, 6, 7 or 8 data bits | least significant bit first |
| optional parity bit | even or odd |
| 1 or 2 stop bits | 1 |

Even parity makes the number of ones in data plus parity even. Odd parity makes it
odd. For example, 'A' (`0100_0001`) has an even parity bit of 0. The longest frame
is 1 + 8 + 1 + 2 = 12 bits, so the TSR is 12 bits wide.

Every bit lasts one baud period. No clock travels with the data. The receiver finds
each start bit's falling edge and then times the remaining bits from it.

## Line control register (`lcr_reg`)

The LCR is 8 bits wide. Its field layout is this design's choice, in the familiar
16550 arrangement:

| bits | field | meaning |
|---|---|---|
| `[1:0]` | `wls` | word length: 00=5, 01=6, 10=7, 11=8 data bits |
| `[2]` | `stb` | 0: one stop bit, 1: two |
| `[3]` | `pen` | parity enable |
| `[4]` | `eps` | 1: even parity, 0: odd |
| `[7:5]` | — | stored, unused |

The layout is the packed struct `uart_pkg::lcr_t`. After reset the LCR reads
`8'h1B`: 8 data bits, even parity, one stop bit.

## Host interface

The host has one 8-bit write bus, `din`. The control-write line `cw` decides
where a write goes:

* `wr=1, cw=1`: `din` goes into the LCR.
* `wr=1, cw=0`: `din` goes into the transmit buffer. The buffer takes one byte per
  clock for as long as `wr` stays high. A write while `txf` (buffer full) is high
  is dropped.
* `txe` is high while the transmit buffer is empty.
* `tx` enables transmission. While it is low, a frame already loaded into the TSR
  waits. A frame that has started always finishes.
* `rd=1` pops one received byte, which appears on `rxout` from that clock edge on.
  `rx_empty` and `rx_full` report the receive buffer's state.
* `status` is `{BI, OE, PE, FE}`: break, overrun, parity error and framing error.
  Each bit is sticky until `err_clr` is pulsed.
* `baud_out` is a one-clock strobe once per baud period.

Everything runs on `clk` with an asynchronous active-low reset `rst_n`. The baud
"clocks" are enable strobes in that domain, so the design has a single clock.

## Transmit path: buffer → THR → TSR

This is the part that takes the most care. Three stages hand a byte along, and each
handshake is a simple ready/valid pair:

1. **Buffer (`lilo_fifo`)**, 16 × 8 bits. The name stands for "last in, last
   out": bytes leave in the order they arrived. `dataout` is a register that
   changes only on a read, so a byte is valid on the clock *after* `rd`.
2. **THR (`thr`)**, 8 bits, a three-state machine: EMPTY, FETCH, FULL.
   * When it is EMPTY and the buffer is not empty, it raises `lilo_rd` for one
     clock. This is its acknowledge to the buffer.
   * In FETCH it captures the buffer's output.
   * In FULL it waits for the TSR's `ready`, then hands the byte over with a
     one-clock `tsr_load`.

   Assertions check that the THR never pops an empty buffer and never loads a busy
   TSR.
3. **TSR (`tsr`)**, 12 bits. On `load` it builds the whole frame in one step from
   the byte and the current LCR: start bit, data, parity, stop bits, with unused
   upper bits set to 1. Each `baud_tick` then drives bit 0 onto `serialout` and
   shifts right, filling with 1.

The hand-off timing keeps frames back to back. `ready` rises on the clock edge
that puts the *last stop bit* on the line, not when that bit ends. The THR
therefore loads the next frame while the stop bit is still being sent. The next
start bit then follows on the very next baud strobe, with no idle gap between
frames.

Latency from an idle transmitter is as follows. A byte written at clock edge *n*
is read from the buffer at *n+1*, captured by the THR at *n+2* and loaded into the
TSR at *n+3*. Its start bit begins on the first baud strobe after that, if `tx` is
high.

Bytes in flight: with `tx` low the transmitter accepts 18 bytes before `txf`
rises. That is 16 in the buffer, 1 in the THR and 1 in the TSR. `txe` therefore
says only that the *buffer* is empty: up to two frames may still be on their way
out.

## Receive path

The receiver has the block structure of the original diagram. Everything inside
those blocks is this design's own:

* **Sampling logic (`rx_sampling`).** Two flip-flops synchronise `rxin`. The line
  is then sampled on every 16× strobe, and the output is the majority of the last
  three samples. A glitch seen by only one sample is removed.
* **Timing and control (`rx_ctrl`).** In IDLE this state machine waits for a 1→0
  step between two samples.
  * It counts 8 strobes to the middle of the start bit. If the line is back at 1
    there, the edge was noise and it returns to IDLE.
  * It then samples every 16 strobes, in the middle of each bit.
  * Data bits become `shift` strobes. It also captures the parity bit and the
    first stop bit.
  * It pulses `done` in the middle of the stop bit, then returns to IDLE.
  * Because it returns in the middle of the stop bit, it also catches a next
    start bit that comes early because the sender's clock is slightly fast. A
    second stop bit is not checked.
* **RSR (`rsr`).** It shifts data bits in at the top, LSB first. For 5- to 7-bit
  words it shifts the result down so the word is right-aligned.
* **RHR (`rhr`).** It holds a finished word until the receive buffer has room. If
  the next word arrives while the RHR is still waiting on a full buffer, the new
  word is lost and `overrun` pulses.
* **Error logic and status (`rx_error`).** This block sets one flag for each error:
  * PE: the received parity bit does not match the word.
  * FE: the stop bit is 0.
  * BI: data, parity and stop bits are all 0.

  These flags and `overrun` are ORed into the sticky status register.
* **Receive buffer.** A second `lilo_fifo`, read with `rd`.

Sampling uses the middle of each bit, at 1/16-bit resolution. The sender's and
receiver's baud rates may therefore differ by roughly ±4% over an 11-bit frame.
The test covers ±3%.

## Baud rate generator (`baud_gen`)

A counter divides `clk` by `DIV16 = round(CLK_HZ / (16·BAUD))` to make `tick16`.
Every 16th `tick16` is also a `baud_tick`, so the transmitter's and receiver's
timing stay in step. With the defaults (100 MHz, 115200 baud), DIV16 = 54. One bit
then lasts 864 clocks, which is 115 741 baud (+0.47%). The original design drew a
connection from the LCR to the baud generator but did not say what it carries.
Here the rate is set by parameters only.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `uart_top` | `CLK_HZ` | 100 000 000 | the original's simulations use a 10 ns clock |
| `uart_top` | `BAUD` | 115 200 | this design's choice |
| `uart_top`, `transmitter`, `receiver`, `lilo_fifo` | `DEPTH` | 16 | the original's 16-byte buffer; must be a power of two |
| `tsr` | `FRAME_W` | 12 | the original's 12-bit TSR |
| `lcr_reg` | `RESET_VALUE` | `8'h1B` | this design's choice |
| `baud_gen` | `OVERSAMPLE` | 16 | this design's choice |

## Where this differs from the original description

* **Buffer order.** The original calls the buffer "Last In Last Out" and
  describes first-come, first-served behaviour. Some of its captions say LIFO.
  This design implements first-in first-out order, which is what a UART needs.
* **One clock instead of two.** The original calls its buffer asynchronous but
  draws it with a single clock. Here it is a single-clock buffer.
* **Two transmitter ports left out.** The original's transmitter symbol has two
  inputs, `rd` and `wrps`, whose purpose it never explains. They are not
  implemented.
* **LCR layout and baud generator invented here.** The original gives only the
  rule for writing the LCR (wr with cw). The LCR's field layout and the baud
  generator's insides are this design's choice (see above).
* **Receiver invented here.** All of its insides, including the break and overrun
  rules, are this design's choice. They follow common 16550 practice.
* **Clock tolerance.** The original states that the two ends' clocks must not
  drift apart by more than 10%. A mid-bit-sampling receiver like this one
  tolerates about ±4% over a full frame.
* **Resource use.** The original reports 11 slice registers for its whole
  transmitter. That count cannot include a 16-byte buffer built from flip-flops.
  This transmitter has 39 flip-flop bits plus a 16 × 8 memory.
* **Reset.** All registers reset asynchronously. The original does not describe
  reset.

## Files and testbenches

`rtl/` has one module or package per file. `uart_pkg.sv` holds the LCR struct, the
status struct and the parity function. `uart_top.sv` is the top level.

Each module has a self-checking testbench in `tb/`, named `tb_<module>.sv`, except
`lcr_reg`, whose testbench is `tb_lcr.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself if it hangs.

* **`tb_uart_top`** runs the whole UART at 1.5625 Mbaud, so a bit lasts 64
  clocks. It loops `txout` back to `rxin` and covers:
  * five framings;
  * `tx` hold-off;
  * a full transmit buffer and a dropped write;
  * back-to-back frames;
  * a full receive buffer and an overrun;
  * parity error, framing error and break.

  It counts each of these and fails if one never happens.
* **`tb_uart_full`** runs the top at its default parameters (115200 baud). It
  sends 'A' and three more bytes in loopback and checks the bits of the first
  frame on the line at their nominal times.

To run a testbench with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_uart_top rtl/uart_pkg.sv tb/tb_uart_top.sv -o sim
./obj_dir/sim
```

Replace `tb_uart_top` with any other testbench name. The simulations finish in a
few seconds.
