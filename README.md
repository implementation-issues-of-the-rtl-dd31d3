# LHCb Readout Supervisor in SystemVerilog

The Readout Supervisor is the central controller of the LHCb Timing and Fast Control system.
At each bunch crossing (40.08 MHz) it decides whether the event is read out. It takes the
Level-0 (L0) trigger decision and adds its own internal triggers, then applies inhibits and
buffer limits. It passes every accept to the front-ends on TTC channel A. Later it matches each
accept with its Level-1 (L1) decision. It broadcasts that decision, and the reset and
calibration commands, on TTC channel B. The two channels are multiplexed onto one
bi-phase-mark encoded line.

The original board puts each function in its own programmable logic device, so the modules
here follow that split. They are tied together by a small internal bus (IOBUS) and controlled
from a PC through a PCI local bus. This RTL covers all of that logic. It does not cover the
analog and vendor parts: the clock PLL, the delay lines, the LVDS and PECL translators, and the
PC with its PCI bridge.

## Trigger flow

```
 L0 decision unit ─► l0_pipe ─┐            rnd_gen ─┐  cmd_gen (periodic, calibration)
   (word + strobe)            ▼                     ▼       │
                         l0_handler ◄── l0_inhibit ─┴───────┘
                          │      │
               channel A ◄┘      ▼
                               AFIFO (rs_fifo)
 L1 decision unit ─► trig_phaser ─► l1_handler ─► TFIFO (rs_fifo) ─► t1b ─► gcs ─► channel B
                                                                      ▲       ▲
                                                     inhibits, buffer ┘       └ cmd_gen commands,
                                                     emulators                  BCR / ECR
 channel A + channel B ─► ttc_encoder (160 MHz) ─► ttc_out
 PCI local bus ─► iobus_if ─► IOBUS: CS1 rs_csr, CS2/CS3 ucnt ; jtag_dist
```

| Module | Board unit | Job |
|---|---|---|
| `iobus_if` | I/O interface & resets | local-bus slave, IOBUS master, own CSR, system reset |
| `jtag_dist` | same device | JTAG chain through the selected devices only |
| `trig_phaser` | inside L0/L1 input logic | moves strobed external data onto the bunch clock |
| `l0_pipe` | L0 phasing & pipelining | phaser, missing-strobe check, 16-stage pipeline of programmable depth |
| `l0_handler` | L0 trigger handling | sync check, priority, inhibit, gap generator, AFIFO write, channel A |
| `rs_fifo` | AFIFO, TFIFO | 8K x 9 FIFOs |
| `l1_handler` | L1 trigger handling | matches L1 decisions with the AFIFO, writes the TFIFO |
| `t1b` | L1 broadcasts & inhibits | broadcast rate control, combined inhibits, buffer emulators |
| `gcs` | generic command sender | channel-B arbitration, TTC shifter, bunch counter, orbit, status |
| `cmd_gen` | command generator | calibration sequence, periodic triggers, ECR, per-node resets |
| `rnd_gen` | random generator | random L0 triggers and random L1 forcing |
| `ucnt` | universal counters | 16 x 32-bit counters with a common prescaler (two instances) |
| `ttc_encoder` | TTC mezzanine | channel A/B time multiplexing and bi-phase mark coding |
| `rs_csr` | general CSR | run configuration and status registers |
| `rs_top` | whole board | the wiring |

`rs_pkg` holds the shared types: the trigger words, the FIFO entries, the IOBUS struct and the
configuration record.

## Getting external data onto the bunch clock

The L0 and L1 decision units send data with a strobe whose phase is not related to the local
clock. The board's approach is kept here. The data are first captured on the strobe's own
rising edge (first pipeline). Off-chip, the strobe is delayed by about 5 ns and OR-ed with
itself. This wider pulse (`*_tested_strobe`) is sampled on both edges of the local clock.
During timing alignment one edge is chosen (`l0_phase_neg`, `l1_phase_neg`):

* falling edge: data go to a second pipeline on that falling edge and reach the output
  register on the next rising edge;
* rising edge: the second pipeline is skipped.

`valid` is the wide strobe as seen on the chosen edge. For L1 it acts as the write enable of the
decision path. The delay and the OR are analog and stay outside, so the phaser has ports for
both the raw strobe and the widened one. Whatever the phase, a word is on `q` after the first
rising clock edge that follows its strobe, provided the right edge has been selected.
`tb_trig_phaser` checks this for one phase of each kind.

In `l0_pipe` the phased word then passes a 16-register pipeline, and `depth` picks the tap
(latency depth+1 cycles). The L0 strobe comes every crossing, so a crossing without it raises
`missing`, plus a sticky flag that is reported in the status register.

## The L0 decision (`l0_handler`)

Each crossing the handler does the following:

1. **Sync check.** A valid external word whose bunch ID differs from the local bunch counter is
   a sync error, and its accept becomes NO. The pipeline depth is set so that each word reaches
   the handler in the crossing its bunch ID names. With depth 0, a word launched at bunch *b* is
   checked against bunch *b*+3 (see `tb_rs_top`).
2. **Priority.** The order is external, then periodic (from `cmd_gen`), then random. The
   chosen source sets the L1 force bit: the external word's force bit, always for periodic and
   calibration triggers, or the random generator's choice.
3. **Refusal.** The trigger is refused while the combined L0 inhibit is set, while the gap
   generator is running, or when the AFIFO is full. After each accept the gap generator refuses
   the next `gap_len` crossings.
4. An accept goes out on channel A and writes `{force, external, event number[6:0]}` to the
   AFIFO. The event number counts accepts and is cleared by each ECR broadcast.

Outputs are registered, so the decision appears one cycle after its inputs. The sixteen count
enables follow counters 0–15 of the counter table below. There, "gated" means the trigger was
not refused.

## L1 matching and the internal path (`l1_handler`)

When the external L1 path is enabled, each external L1 decision pops the AFIFO head. The event
numbers (7 LSBs) are compared: a mismatch, or an empty AFIFO, is an L1 sync error. The
decision written to the TFIFO is *external accept OR force bit*.

When the external path is blocked (`l1_ext_en = 0`), the handler drains the AFIFO by itself, one
entry per cycle, and decides each entry by its force bit alone. Forced internal triggers
(periodic, calibration and the forced random subset) therefore still reach the front-ends.

## Broadcasts on channel B (`t1b`, `gcs`)

Channel B carries one TTC short broadcast at a time. Each is a 16-bit frame sent MSB first, one
bit per crossing: start bit 0, format bit 0, 8 data bits, 5 Hamming check bits, stop bit 1. The
line idles at 1. Because a frame lasts 16 crossings, the sender is often busy, and the
arbitration in `gcs` is the subtlest part of the design:

* **BCR** (data bit 0) goes out every turn at bunch `bcr_bx`. It can never be refused. To make
  sure of that, no other frame may start in the 16 crossings before `bcr_bx`. A pending **ECR**
  (bit 1) rides in the same frame. If BCR is disabled, a pending ECR goes out alone, ahead of
  everything else.
* A **command** is taken into a one-entry slot, together with the bunch number of its request.
  If the sender is free at that bunch, the command goes out. If not, it is postponed to the same
  bunch of the next turn, and so on. Some bunches lie in the window kept free for the BCR, or in
  the BCR frame itself. A command requested at one of those bunches could never be sent there,
  so it is moved to the first bunch after the BCR frame.
* An **L1 trigger broadcast** (from `t1b`) goes out whenever the sender is free and no command
  is due. Otherwise it simply waits. Its byte is `{1, accept, event number[3:0], 00}`.

`t1b` requests trigger broadcasts from the TFIFO and pops an entry when `gcs` acknowledges it.
It keeps at least `l1_spacing` crossings between broadcasts and holds them while the L1 inhibit
is set.

`gcs` also runs the bunch counter (0–3563). With internal synchronization the counter wraps by
itself. With external synchronization the phased external orbit pulse restarts it. The
external orbit counts as present if one arrived in the last two turns.

## Inhibits and buffer emulators (`t1b`)

The supervisor emulates the front-end buffers so that it never sends more than they can hold:

* **L0 de-randomizer:** +1 per L0 accept, −1 every `readout_cycles` crossings while not empty.
  It is full at `derand_thr` entries. The reset values are 15 and 36, the usual LHCb front-end
  figures.
* **L1 buffer:** +1 per positive L1 broadcast, −1 every `l1_drain` crossings. It is full at
  `l1buf_thr`.

`l0_inhibit` = ECS inhibit | enabled external L0 throttle | de-randomizer full | AFIFO or TFIFO
almost full. `l1_inhibit` = ECS inhibit | enabled external L1 throttle | L1 buffer full.

## TTC line (`ttc_encoder`)

A 25 ns bunch period holds two 12.5 ns cells: channel A while the bunch clock is low, then
channel B. Every cell starts with a line transition, and a 1 adds a second transition in the
middle of the cell (bi-phase mark). On the board this is ECL logic. Here it is clocked logic on
the 160 MHz clock: a 2-bit quarter counter toggles the line at quarters 0 and 2 always, and at
quarters 1 and 3 for A = 1 and B = 1. `clk4x` must rise together with `clk`. Reset, released by
a register on the bunch clock, sets the counter to 3. The first 160 MHz edge after reset then
comes 6.25 ns after a rising bunch-clock edge, so quarter 0, the start of cell A, falls on the
falling bunch-clock edge. `tb_rs_top` checks this alignment.

## Control

**Local bus.** `iobus_if` is a slave on the PCI bridge's multiplexed local bus (J mode).
`LAD[10:7]` selects the target: 0 is its own CSR, 1–10 are the chip selects CS1–CS10.
`LAD[6:2]` gives the register address. Write data are taken in the cycle after ADS#, and
READY# is given in that same cycle. A read samples the IOBUS for one cycle and drives LAD in
the next, with READY#. Bursts advance the register address. LHOLDA answers LHOLD.

Own CSR of `iobus_if`:

| reg | content |
|---|---|
| 0 | JTAG select, one bit per device |
| 1 | bit 0 H_EXT (clock source select), bit 1 soft reset, bit 2 user LED |
| 2 | user switch (read) |

**General CSR** (`rs_csr`, on CS1):

| reg | bits |
|---|---|
| 0 | 0 L0 ext enable, 1 L1 ext enable, 2 external orbit, 3 BCR enable, 4 random enable, 5/6 ECS L0/L1 inhibit, 7/8 obey L0/L1 throttle, 9/10 L0/L1 falling-edge phase, 15:12 pipeline depth, 17:16 random L1 mode |
| 1 | 7:0 gap length, 27:16 BCR bunch, 31:28 orbit delay line setting (1.5 ns steps, output `orbit_dly`) |
| 2 | 15:0 random L0 rate (probability × 2^16), 31:16 random L1 force rate |
| 3 | 15:0 periodic trigger period (0 = off), 23:16 L1 broadcast spacing |
| 4 | 11:0 calibration bunch, 23:16 every N turns (0 = off), 31:24 trigger delay |
| 5 | 7:0 calibration command byte, 12:8 de-randomizer threshold, 23:16 readout crossings |
| 6 | 7:0 L1 buffer threshold, 31:16 L1 drain crossings |
| 7 | 10:0 prescale factor of counter module 0, 26:16 of module 1 |
| 8 | prescale enable, one bit per counter 0–31 |
| 9 | write strobes: bit 0 ECR, bit 1 clear counters, 15:8 node resets |
| 16 | status (read): 0 external orbit present, 1 external orbit selected, 2 sender busy, 3 ECR pending, 4 command pending, 16 H_EXT, 17 missing L0 strobe seen, 18/19 AFIFO empty/full, 20/21 TFIFO empty/full, 22/23 de-randomizer / L1 buffer full |

**JTAG.** `jtag_dist` chains the glue-board TDI through the TDO/TDI of every selected device, in
index order, back to TDO. Selected devices get the board TMS. Unselected devices see TMS and TDI
held high and are left out of the chain. TCK does not pass through the logic.

**Counters** (CS2: 0–15, CS3: 16–31; RADR = counter number mod 16):

| # | counts | # | counts |
|---|---|---|---|
| 0/1 | external L0 sync errors, all / not refused | 16 | bunch clock |
| 2 | external L0 accepts turned to NO by a sync error | 17/18 | crossings with L0 / L1 inhibit |
| 3/4 | all L0 triggers / accepted | 19 | L1 sync errors |
| 5/6 | forced triggers / accepted | 20 | external L1 accepts |
| 7/8 | external L0 accepts / accepted | 22 | accepted random triggers forced at L1 |
| 9/10 | external L0 forces / accepted | 23 | AFIFO entries with the force bit |
| 11/12 | periodic triggers / accepted | 24/25 | TFIFO writes / positive ones |
| 13/14 | random triggers / accepted | 26 | L1 trigger broadcasts |
| 15, 21 | reserved | 27/28 | positive entries taken / broadcast |
| | | 29, 30, 31 | turns, crossings with L0 / L1 external throttle |

Each module has a single prescale factor. A counter whose prescale-enable bit is set steps once
every *factor* enables. The reset values set factor 4 on counters 3, 4, 7, 8, 13, 14, 16, 17,
18, 24 and 26. The original counter list proposes 2^10 for the bunch clock, which a factor
common to the whole module cannot give together with 4 on the others. Write register 7 to
change it.

## Where this RTL goes beyond the original

The original design gives the split into units, their tasks and the rules above (priorities,
postponement, the phasing method, the encoding, the counter list). It does not give the
following, so each is a choice made here:

* all word formats (L0 word: bunch ID [15:4], force [1], accept [0]; L1 word: event number
  [7:1], accept [0]; the FIFO entries);
* the register maps and the local-bus address map;
* the TTC frame layout and its Hamming code (the standard TTC short broadcast);
* the BCR guard window, and moving commands out of it;
* the random generator (per-crossing comparison of an LFSR with a threshold, which
  approximates Poisson arrivals);
* the emulator model and its reset thresholds;
* the calibration sequence.

Also note:

* Everything except the encoder runs on one clock. On the board the local bus has its own
  clock. Here the local bus is assumed to run on the bunch clock, so `iobus_if` needs a
  clock-domain crossing before it is used with a separate local-bus clock.
* The FIFOs show their head word without read latency, unlike the synchronous FIFO chips on
  the board.
* The JTAG chain runs in index order, because the original chain order is not available.
* In the original, the run configuration register sits in the interface device and the status
  register in the command sender. Here the configuration and the status read-back share one
  register block, `rs_csr`, reached over the IOBUS like any other unit. The status word itself
  is still assembled in `gcs`.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. The exception is the register block `rs_csr`, which is
exercised through `tb_rs_top`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rs_pkg.sv rtl/gcs.sv tb/tb_gcs.sv --top tb_gcs
./obj_dir/Vtb_gcs
```

Add the sub-modules a testbench needs (`l0_pipe` needs `trig_phaser`). The whole design:

```
verilator --binary --timing --assert -Irtl rtl/rs_pkg.sv $(ls rtl/*.sv | grep -v rs_pkg) \
          tb/tb_rs_top.sv --top tb_rs_top
./obj_dir/Vtb_rs_top
```

`tb_rs_top` runs the full-size design (3564 crossings per turn, 8K FIFOs, default parameters)
for about fifteen turns in a few seconds. It configures the design through the local bus, then
checks:

* every L0 accept gets exactly one L1 broadcast, in order;
* a BCR every turn and one ECR;
* the calibration commands and pulses;
* the minimum L1 spacing;
* the TTC line decoded back into A and B;
* the counters read over the bus;
* the JTAG chain;
* one turn with both trigger phasers on the falling clock edge. For this turn the decision-unit
  models strobe early enough that rising-edge sampling would lose every word. The run must see no
  missing strobe and no sync error, and every accept must be broadcast;
* the bunch counter following an external orbit signal, and the loss of that signal being
  reported two turns after its last pulse;
* clearing the counters, once by the clear strobe and once by their node reset;
* an ECS L0 inhibit that holds off every external trigger.

It also requires each mechanism to occur at least once. The mechanisms are a missing strobe, L0
and L1 sync errors, gap refusals, de-randomizer and L1 buffer inhibits, throttles, a postponed
command, the internal L1 path, the falling-edge phase, external orbit synchronization and
loss, and both ways of clearing the counters.

The block testbenches compare each module against reference models written independently in
the testbench, cycle by cycle where the timing is defined. The exceptions are `rnd_gen`, whose
rates and independence from one crossing to the next are checked statistically (within 5
standard deviations), and `trig_phaser` and `l0_pipe`, which are checked with real-time strobe
waveforms. The block testbenches of `rs_fifo`, `gcs`
and `cmd_gen` run at reduced depth or a short turn to reach full/empty and turn boundaries
quickly.

Not verified: timing on real devices, and the clock-domain crossing that a separate local-bus
clock would need.
