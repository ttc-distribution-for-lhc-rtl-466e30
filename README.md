# TTC distribution for an LHC detector partition

An LHC experiment has to give thousands of front-end controllers the same
40.08 MHz bunch-crossing clock, the level-1 trigger decision for every
crossing, the bunch and event number of each accepted crossing, and a stream of
commands: bunch-counter resets that must land on an exact crossing of the orbit,
test and calibration broadcasts, and parameters addressed to a single receiver.
This design does that with one serial signal. A transmitter multiplexes two
channels into one 160.32 MBaud line. A passive optical tree copies the signal
to up to 1024 receivers. Each receiver recovers the clock and both channels,
decodes the commands, and takes out its own fibre and detector delay. The delay
is removed in whole crossings and in 104 ps steps.

The RTL covers the digital logic along the whole path:

```
 TTCvi (VME module)                      encoder        optical tree          TTCrx (one per destination)          TTCsr (board)
 trigger select + emulator ─ A bit ─┐                                      ┌ decoder ─ A ─ coarse delay ─ bunch/event counters ─┐
 orbit / sync-cycle timing          ├─ TDM + biphase mark ─ line ─ ... ─ line ┤                                                    ├─ router ─ 3 FIFOs ─ host
 event counter + broadcast          │                                      └ decoder ─ B ─ frame rx ─ registers ─ broadcasts ──────┘
 B-channel arbiter/serializer ─ B ──┘                                                    └ fine deskew ─ deskewed clocks
```

`ttc_system` wires one TTCvi and one encoder to `N_RX` receivers (default 1024).
Receiver *i* answers to address *i*. Receiver 0 also feeds a TTCsr board, and
its address is taken from the board's configuration register. The optical path
(laser, fibre, couplers, photodiode and preamplifier) has no logic. It appears
as the ports `tx_line` and `rx_line[N_RX]`. A testbench connects them through a
different delay for each receiver.

## Clocking model

Everything runs from one clock, `clk`, at 160.32 MHz, which is four symbols per
bunch crossing (BX). In the real system each receiver recovers this clock from
the line with an analog PLL. Here all receivers share `clk`, and each one must
still find on its own where a BX begins in the symbol stream. Every block that
works per BX uses a one-clock strobe `bx_en`. The encoder makes this strobe on
the transmit side. Each receiver's decoder makes its own, with its own phase.
The BX-rate outputs change on `bx_en` and hold for one BX.

## Line code and how a receiver finds its phase

A BX is split into two cells of two symbols each. The first cell carries the A
channel: the level-1 accept, one bit per crossing. The second carries the B
channel: commands, one bit per crossing. The line code is biphase mark:

* the level flips at the start of every cell;
* it flips again in the middle of the cell if the bit is a 1.

There is therefore a transition at least every two symbols, whatever the data,
and the signal has no DC component.

A receiver that starts up does not know two things. It does not know which
sample is a cell start, and it does not know which cell is A and which is B.
`ttcrx_decoder` works out both from the data:

* **Cell phase.** A cell start always has a transition. If a sample the
  decoder labels as a cell start shows none, the labelling is one symbol off.
  The decoder then holds its symbol counter for one clock.
* **Channel phase.** An idle B channel sends 1s continuously. An accept can
  never repeat in consecutive crossings, because the trigger is inhibited for
  two crossings after each accept. So if the cell the decoder takes for A
  carries a 1 in two consecutive crossings, the channels are swapped. The
  decoder then moves its symbol counter by two.

`locked` rises after 32 crossings with no correction. It drops at any
correction. A receiver's outputs stay quiet until it has locked.

## B-channel frames

B-channel bits go out most significant bit first. The line sits at 1 between
frames, and at least two idle bits separate frames:

| format | bits | layout |
|---|---|---|
| short (broadcast) | 16 | `0 0 cmd[7:0] ham[4:0] 1` |
| long (addressed)  | 42 | `0 1 addr[13:0] E 1 sub[7:0] data[7:0] ham[6:0] 1` |

* The check bits form an extended Hamming code. It corrects any single error
  and detects any double error (`ttc_hamming_enc`, `ttc_hamming_dec`).
* The 14-bit address covers 16384 receivers. Address 0 reaches them all.
* The 8-bit subaddress selects a register. With `E` = 0 it is a register inside
  the TTCrx; with `E` = 1 the cycle is passed to the receiver's external bus.

The exact bit order is this design's own choice. With it, one event-number
broadcast takes 4 × 44 = 176 BX, or 4.39 µs.

`ttcrx_bframe` collects a frame and corrects it. It drops a frame that has an
uncorrectable error or a bad stop bit. It counts both corrected and dropped
frames.

## Synchronous bunch-counter reset

A bunch number is only meaningful if every receiver resets its counter on the
same crossing of the orbit. `ttcvi_sync_timing` counts the orbit, which is 3564
BX long, either from an external orbit pulse or from an internal generator.
At a programmable delay after each orbit it raises `sync_go`. `ttcvi_bchan`
then starts the synchronous short frame, normally command 0x01 (bunch-counter
reset), in exactly that BX.

To keep the channel free at that moment, a programmable hold-off window before
`sync_go` stops any new asynchronous frame from starting. If the window is
shorter than a long frame, a sync frame can still be late. It is then sent as
soon as the line is free, and `n_late` counts it.

The reset frame and the accepts travel the same fibre and pass through the same
coarse delay in the receiver. The bunch number of an accept therefore does not
depend on the fibre length:

    bunch number = (BX of the accept at the TTCvi) − (BX in which the reset frame starts) − 18

The constant 18 is the 16-bit frame plus two BX of decoding. Choose the sync
delay so that the crossing with this number is bunch 0 of the machine.

## Deskew

Every receiver has two deskew controls: a coarse delay in whole crossings and a
fine delay of the clock.

* **Coarse.** `ttcrx_coarse_delay` is a 16-stage shift register, clocked once
  per BX, with a tap selector for 0 to 15 BX. One instance delays the accept,
  the counter resets and the first group of user broadcasts (register `coarse1`).
  A second instance delays the second group (`coarse2`).
* **Fine.** Two delay loops each span one 25 ns period. One has 16 stages of
  25/16 ns and the other 15 stages of 25/15 ns. Taking tap i of the first and
  tap j of the second gives a delay of (15·i + 16·j) · 25/240 ns. The two
  loops together thus act as a vernier with a resolution of 25 ns / 240 =
  104.17 ps, finer than one stage. `ttcrx_fine_tapsel` maps the 8-bit setting
  *n* (0 to 239) to i = (−n) mod 16 and j = n mod 15. Since 15 ≡ −1 (mod 16)
  and 16 ≡ 1 (mod 15), this gives (15·i + 16·j) mod 240 = n steps.
* **Fine deskew model.** `ttcrx_deskew_pll` is a behavioural model of the two
  loops. It shifts each edge of the 40 MHz clock by tap16·25/16 + tap15·25/15
  ns, modulo 25 ns, using simulation delays. It is the only part of the design
  that is not synthesizable. In silicon the loops are analog phase-locked
  delay lines.

## The transmitter (TTCvi)

The VMEbus slave logic is replaced by a single-cycle write port (`we`, `addr`,
`wdata`):

| addr | register |
|---|---|
| 0 | trigger source: 0–3 external input, 4 emulator, 5 single shot, others off |
| 1 | emulator rate threshold (accept probability per BX = thr/65536) |
| 2 | control: [0] internal orbit, [1] event-number broadcast, [2] sync cycles on |
| 3 | sync delay after orbit, in BX (reset 3500) |
| 4 | hold-off length, in BX (reset 50) |
| 5 | sync command byte (reset 0x01) |
| 6 | write: queue an asynchronous short broadcast |
| 7 | write: queue a long cycle: [31] E, [29:16] address, [15:8] subaddress, [7:0] data |
| 8 | write: one single-shot trigger |
| 9 | write: reset the event counter |

More detail on the TTCvi blocks:

* **Trigger** (`ttcvi_trigger`):
  * blocks any source for the two crossings after an accept, and counts what it blocks;
  * has an emulator made of a 23-bit LFSR, advanced 16 steps per BX, compared with the threshold.
* **Event counter** (`ttcvi_evcnt`): counts accepts in 24 bits. If broadcasting is on, it queues the
  event number and the 8-bit trigger type of each accept in a 16-deep queue. It sends each one as four
  long cycles to address 0 with `E` = 1:
  * subaddress 0: trigger type;
  * subaddresses 1–3: the event number, most significant byte first.

  At 100 kHz an accept comes every 400 BX on average, so the broadcast uses 44% of the B channel.
  A burst that overflows the queue drops broadcasts and counts them in `n_dropped`.
* **Arbiter** (`ttcvi_bchan`): serves, in order of priority:
  1. the sync frame;
  2. short broadcasts;
  3. long cycles, event broadcasts before those written from the bus.

## The receiver (TTCrx)

`ttcrx_regs` holds the internal registers written by long cycles with `E` = 0:

| sub | register |
|---|---|
| 0 | fine delay 1 |
| 1 | fine delay 2 |
| 2 | coarse delays: [3:0] coarse1, [7:4] coarse2 |
| 3 | control: [0] counter outputs on, [1] bus outputs on, [2] broadcasts on, [3] external cycles on (reset 0xF) |
| 4 | read-back request (data ignored) |

A read-back request lets the controllers check what a receiver holds. In the
six BX that follow it, `rb_str` is high and `ext_sub`/`ext_data` carry the
index and value of:

* 0: fine 1;
* 1: fine 2;
* 2: coarse;
* 3: control;
* 4: address bits [7:0];
* 5: address bits [13:8].

`ext_str` stays low during a read-back. Addressed cycles are at least 44 BX
apart, so a read-back cannot overlap an external cycle.

A short broadcast `cmd` is split as follows:

* [0] bunch-counter reset;
* [1] event-counter reset;
* [5:2] user group 1;
* [7:6] user group 2.

The user groups come out on `brcst[5:0]` after their coarse delays. Cycles with
`E` = 1 appear on `ext_str`/`ext_sub`/`ext_data` for one BX.

`ttcrx_id_counters` holds a 12-bit bunch counter and a 24-bit event counter.
They share one 12-bit output bus:

* in the BX of a (delayed) accept, the bus carries the bunch number with `bc_str`;
* in the next BX, the low half of the event number with `evl_str`;
* in the BX after that, the high half with `evh_str`.

The two-BX trigger inhibit ensures that the next accept cannot collide with
these two BX.

The latency from the accept leaving the encoder to `l1a` is about 37 ns
(1.5 BX) plus the fibre and the coarse delay.

## The TTCsr board

`ttcsr_router` sorts the outputs of one TTCrx into three FIFOs:

1. trigger data: `{1, bunch}`, `{2, event low}`, `{3, event high}`;
2. addressed cycles: `{sub, data}`;
3. broadcasts: `{0x00, brcst, ev_reset, bc_reset}`, and read-back responses:
   `{0xF, index, value}`.

A response and a deskewed broadcast can fall in the same BX. When they do, the
broadcast is stored and the response is lost. Status word 3 counts lost
responses, so avoid read-back requests near broadcasts.

In crossings with nothing to store, the router writes the three FIFO fill
levels to a status memory instead.

Each FIFO (`ttcsr_fifo`) is a dual-clock memory with Gray-coded pointers. It
is written 16 bits at a time in the receiver's clock domain. It is read 32
bits at a time, older word in the low half, in the host clock domain. The PCI
target logic is not modelled: the host side is a plain synchronous read port.
A configuration register on the host side sets the TTCrx address.

## Sizes and limits

| quantity | built |
|---|---|
| receivers per transmitter | 1024 (`N_RX`), addresses up to 16383 |
| subaddresses | 256 |
| bunch counter | 12 bits, orbit 3564 BX |
| event counter | 24 bits (wraps after 16.8 M events, 168 s at 100 kHz) |
| coarse deskew | 0–15 BX |
| fine deskew | 240 steps of 104.17 ps |
| event-broadcast queue | 16 events |
| TTCsr FIFO | 512 × 16 bits each |

A fanout of 1:32768, which the optics can reach with three levels of 1:32
couplers, exceeds the 14-bit address range. Such a system still broadcasts to
every receiver, but only 16384 can be addressed individually.

## What is not here, and what is this design's own

Not modelled:

* the analog and optical parts: laser transmitter, clock PLL of the encoder,
  fibre tree, photodiode and preamplifier, the receiver's analog front end and
  clock recovery;
* the VMEbus and PCI slaves;
* the TTCrx test port (boundary scan);
* the timing calibration controller that scans fine deskew settings. It would
  be a user of the TTCvi long-cycle register.

Simplification: the TTCvi has one synchronous short cycle per orbit, with one
command byte and one delay. It normally sends the bunch-counter reset. Other
synchronous test commands can use the same cycle by reprogramming the command
byte, but not in addition to the reset within the same orbit.

This design's own choices, where no specification was available:

* the frame bit order;
* the phase-recovery rules;
* the register maps of the TTCvi, TTCrx and TTCsr, and the read-back sequence;
* the emulator;
* the FIFO depths;
* the word formats of the TTCsr;
* the use of address 0 for "all receivers".

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops. For example:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ttc_pkg.sv tb/tb_ttc_system.sv --top-module tb_ttc_system -o sim
    obj_dir/sim

The two end-to-end testbenches are:

* `tb_ttc_system`: 12 receivers with different fibre delays and a 600-BX orbit. It checks:
  * lock;
  * deskew programming by addressed cycles;
  * accepts aligned within one BX at every receiver;
  * bunch numbers against the relation above;
  * event numbers;
  * event broadcasts;
  * an addressed cycle that reaches only its receiver;
  * the read-back of receiver 0, both at the receiver and in the TTCsr
    broadcast FIFO;
  * a user broadcast;
  * the TTCsr trigger FIFO.

  An emulator burst at full rate makes the trigger inhibit and the broadcast
  queue overflow happen. The testbench counts each mechanism and fails if one
  never occurs.
* `tb_ttc_system_full`: the same sequence without the burst, at the default
  size (1024 receivers, full orbit). Simulating it takes about two minutes.

`tb_ttcvi_rate` runs the TTCvi at its default size with the emulator at
100 kHz for 20 ms, about 2000 accepts, with every event broadcast on. It
reassembles the broadcasts from the B channel bit stream. It checks the
following:

* no broadcast is dropped;
* no sync cycle is late;
* one broadcast on a free channel takes 174 BX (4.35 µs).

The testbenches include `tb_ttc_ref.svh`, an independent model of the frame
format and check bits, and `tb_ttc_system_body.svh`, the shared end-to-end
sequence.
