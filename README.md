# Multi-channel UART controller with asynchronous FIFOs

A master control unit (MCU) talks to several pieces of sub-equipment over
serial lines, but each sub-equipment listens at its own baud rate, and none of
them at the MCU's rate. If the MCU simply pushed characters at its own speed,
a slower sub-equipment would lose them. This controller sits between the two
sides. It receives each character from the MCU once. It keeps a separate
16-character asynchronous FIFO for every sub-equipment. It then retransmits
each FIFO's contents at that channel's own rate, in that channel's own clock
domain. A burst from the MCU is absorbed by the FIFOs, and each channel
drains its FIFO as fast as its line allows.

```
             clk domain                              sub_clk[i] domain
mcu_rx ─► uart_rx ─► bus channel 1 ─┬─► async_fifo[0] ─► sub_channel_tx[0] ─► sub_tx[0]  (÷4)
          (RSR→RHR)  (bus_wr/bus_data)├─► async_fifo[1] ─► sub_channel_tx[1] ─► sub_tx[1]  (÷8)
                                     └─► async_fifo[2] ─► sub_channel_tx[2] ─► sub_tx[2]  (÷16)
                        status_buffer ◄── full / empty / overflow / parity / framing
```

The top module is `mc_uart_ctrl` (`rtl/mc_uart_ctrl.sv`). All RTL is
synthesizable SystemVerilog-2017. Shared constants live in `rtl/uart_pkg.sv`.

## Character and frame format

A character is 7 bits wide. On every serial line it travels as a 10-bit frame
of equal-length bits, least significant data bit first:

| bit on the line | 0 | 1 … 7 | 8 | 9 |
|---|---|---|---|---|
| content | start (0) | data[0] … data[6] | parity = XOR of data bits (even) | stop (1) |

A bit lasts `DIV` clocks of the sending side's clock. The MCU side uses
`DIV = 4`. The three channels default to 4, 8 and 16, each counted in its own
clock. The line idles high.

## The asynchronous FIFO (`async_fifo`)

This is the part that makes the design work, and the part that needs the
most care when it is changed. Each FIFO holds 16 words of 7 bits. It is
written on `clk`, the controller side, and read on `sub_clk[i]`. No phase or
frequency relation is assumed between the two clocks.

* **Pointers.** Each side keeps a 5-bit pointer: 4 address bits and one wrap
  bit. It is held as a binary count, which addresses the memory, and as the
  Gray code of that count (`g4 = b4`, `gi = bi ^ b(i+1)`). Only the Gray form
  crosses to the other domain. Successive Gray values differ in one bit, so
  a pointer sampled while it changes is either the old value or the new one.
  It is never a mixture. Reading eight words gives the read-pointer sequence
  00, 01, 03, 02, 06, 07, 05, 04, 0C.
* **Synchronizers** (`ptr_sync`). Each Gray pointer passes through two
  flip-flops clocked by the receiving domain.
* **Empty** (`fifo_rptr_empty`). The FIFO is empty when the read pointer
  equals the synchronized write pointer.
* **Full** (`fifo_wptr_full`). The FIFO is full when the write pointer and the
  synchronized read pointer differ in their two top bits and agree in the
  other three. In Gray code, that is what "exactly one lap ahead" looks like.
  Comparing only the top bit, which is the rule for binary pointers, is wrong
  here. The testbench of this block catches that mistake.
* **Flag timing.** Both flags are registered. Each is computed from the
  pointer value after this clock's operation. So `wfull` rises on the very
  write that fills the FIFO, and `rempty` rises on the read that takes the
  last word. Flags are released late, never early. `wfull` drops 2 to 3
  write clocks after a read. `rempty` drops 2 to 3 read clocks after a
  write. The FIFO can therefore never overflow or underflow. Writes while
  full and reads while empty are ignored.
* **Read data.** `data_out` is a register in the read domain. It is loaded
  only by a read and is valid the read clock after `rd`.
* **Reset and clear.** `rst_n` and `clr_n` are both active low. They are
  ANDed and used as an asynchronous reset of both domains. Hold either one
  low for at least two clocks of the slower domain. The top ties `clr_n` high.

## UART transmitter (`uart_tx`) and channel sequencer (`sub_channel_tx`)

The transmitter has a 7-bit transmit buffer register (TBR) and a 10-bit
transmit shift register (TSR). While `txrdy = 1`, a `wr` strobe copies the
character into TBR. The next clock builds the frame in TSR: start bit, data,
parity and stop bit. The transmitter then waits for the next baud tick
(state SYNCH) and drives the start bit. On each following tick it shifts TSR
right by one bit and counts the shift in `Bct`. At `Bct = 9` the stop bit has
lasted a full bit time, and the transmitter returns to idle with `txrdy = 1`.
The start bit's first clock and the rise of `txrdy` are exactly
`10 × DIV` clocks apart. `tx_sts` is the inverse of `txrdy`.

`sub_channel_tx` is one output channel. It contains a free-running
`baud_gen`, a `uart_tx` and a three-state sequencer. In IDLE it waits until
the FIFO is not empty and the transmitter is ready. In FETCH it pulses
`fifo_rd`. In LOAD the FIFO's registered output is valid, and it pulses the
transmitter's `wr`. While characters are waiting, frames follow each other
with at most one bit time plus a few clocks of idle line.

## UART receiver (`uart_rx`)

The receiver has a 9-bit receive shift register (RSR) and a 7-bit receive
hold register (RHR). The way it notices that a character is complete is
unusual:

1. While idle, RSR holds all ones.
2. The line passes through two flip-flops first. A low level on the line is
   taken as a start bit and pulses `det_rx`. It also restarts the receiver's
   own `baud_gen`, preloaded so that its ticks fall near the middle of each
   bit after the three-clock detection delay.
3. On every tick the sampled bit enters RSR at the top, and RSR shifts right.
4. After nine ticks the start bit, which entered first, is in `RSR[0]`. A
   zero in `RSR[0]` therefore means "start, data and parity received". No
   bit counter is needed.
5. At that moment `RSR[7:1]` is copied to RHR, `rxrdy` is set, `RSR[8]` is
   checked against the XOR of the data, and RSR is set back to all ones. One
   more tick samples the stop bit. A stop bit sampled low pulses `frame_err`.
6. If the line is high again at the first sample, the low level was a glitch
   or the tail of a missing stop bit. It is dropped as a false start.

`rd` copies RHR to the registered `data` output and clears `rxrdy`. In the
controller, `rd` is simply `rxrdy`, so each character is on `bus_data` one
clock later. One clock after that it is written into all FIFOs (`bus_wr`).
The broadcast comes about 9.5 bit times after the leading edge of the start
bit.

## Baud rate generator (`baud_gen`)

The generator produces a one-clock enable pulse every `DIV` clocks. It is an
enable, not a derived clock, so the whole controller has exactly one clock
per domain. A `restart` pulse loads the counter with `RESTART_CNT`, and the
next tick comes `DIV − RESTART_CNT` clocks later. Transmitters leave
`restart` low. The receiver uses it to align its ticks to mid-bit.

## Overflow, errors and the status buffer

Slow channels can fall behind during long bursts. With the default clocks in
the testbench (MCU side 10 ns, channels 9, 11 and 13 ns) and back-to-back MCU
frames, the ÷8 and ÷16 channels fill up. A character offered to a full FIFO
is lost for that channel only. The other channels still get it, and the
channel's sticky `overflow` bit is set. A character that arrives with a
parity or stop-bit error is forwarded anyway, and the sticky
`rx_parity_err` / `rx_frame_err` bits are set.

`status_buffer` collects all of this in the `clk` domain:

* `fifo_full`, copied from the write side.
* `fifo_empty`, brought over from each channel's domain by a two-flop
  synchronizer.
* The sticky bits. A `status_clr` strobe clears them. An event in the same
  clock as the strobe is kept.

## Clocks and reset

| domain | clock | contents |
|---|---|---|
| controller | `clk` | MCU receiver, bus channel 1, FIFO write sides, status buffer |
| channel i | `sub_clk[i]` | FIFO i read side, channel i sequencer, baud generator and transmitter |

`rst_n` is a single asynchronous, active-low reset for every domain. It has
no reset synchronizers, so release it while the clocks are quiet, or add a
synchronizer per domain when integrating. The channels may all be driven
from `clk` if one clock is all you have. Their rates still differ through
`SUB_DIV`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `mc_uart_ctrl` | `N_CH` | 3 | number of sub-equipment channels |
| | `MCU_DIV` | 4 | clocks per bit on the MCU line |
| | `SUB_DIV[N_CH]` | '{4, 8, 16} | clocks per bit of each channel, in its own clock |
| `async_fifo` | `AW`, `W` | 4, 7 | 2^AW words of W bits |
| `baud_gen` | `DIV`, `RESTART_CNT` | 4, DIV/2 | tick period, counter value loaded by restart |
| `uart_rx`, `sub_channel_tx` | `DIV` | 4 | clocks per bit |

The character width (7) and frame length (10) are fixed in `uart_pkg`.
`AW` must be at least 2.

## Where this RTL departs from the specification or fills gaps

Followed as specified:

* 16 × 7 FIFOs with 5-bit Gray pointers.
* The full and empty rules.
* The 10-bit frame with XOR parity.
* Four clocks per bit.
* RSR reset to all ones and the RSR[0] = 0 completion test.
* RHR = RSR without its first and last bit.
* The transmitter's state sequence.
* Three channels fed from one bus.

Choices made in this RTL:

* **Channel rates.** The divisors 4, 8 and 16 are a choice. The
  specification only says that the channel rates differ from each other and
  from the MCU rate.
* **Separate clocks.** Each channel has its own clock.
* **Broadcast.** Every character goes to every channel. No per-channel
  addressing is described.
* **One direction only.** Only the MCU → sub-equipment direction exists.
  A return path from the sub-equipments to the MCU, and how several of
  them would share it, is not described and not built.
* **Receiver details.** Mid-bit sampling by restarting the receive baud
  counter. Stop-bit checking. False-start rejection. The input synchronizer.
* **Status buffer.** Its contents and the overflow policy (drop the
  character, set a sticky bit) are a choice. The specification names a
  status buffer and status detectors without defining them.
* **Flag polarity.** The FIFO flags are active high. A block diagram in the
  specification draws them active low, while its text describes them as
  active high.
* **Clear.** The FIFO clear input acts as an asynchronous reset.
* **No oversampling.** A block diagram labels the baud clock "×16"
  (oversampling). The RTL follows the textual description of one baud tick
  per bit, every four clocks.
* **Not built.** The CPU bus controller and the test/scan cells around the
  UART are not described in enough detail to build.

## Simulating

Every block has a self-checking testbench in `tb/`, named `tb_<module>`.
`tb/uart_line_monitor.sv` is a behavioural serial decoder that the
testbenches use as an independent reference receiver. It also checks that
every bit lasts exactly `DIV` clocks. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl rtl/uart_pkg.sv tb/tb_mc_uart_ctrl.sv \
    --top-module tb_mc_uart_ctrl
./obj_dir/Vtb_mc_uart_ctrl
```

`tb_mc_uart_ctrl` runs the whole controller at its default parameters in
about two seconds. It runs three phases:

1. 12 spaced characters, which every channel must deliver in order.
2. 40 back-to-back characters. The fastest channel must deliver all of
   them. The slower channels must deliver exactly the characters their
   FIFOs accepted, and their `overflow` bits must match the characters
   lost.
3. A character with bad parity, one with a bad stop bit, and a good one
   straight after.

It counts how often each mechanism happened (FIFO full, overflow, drained
to empty, parity error, framing error, three line rates). A mechanism that
never happened counts as a failure. `tb_mc_uart_scaled` builds the
controller with five channels (divisors 4, 6, 8, 12, 16) to show that
`N_CH` and `SUB_DIV` scale. `tb_reference_scenarios` replays three short
reference scenarios:

* Eight writes of 7'h67 into a FIFO, then reading them back.
* Transmitting 7'h2A.
* Receiving 7'h07.
