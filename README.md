# BLM surface card: real-time loss analysis in one FPGA

The Beam Loss Monitor protects a superconducting accelerator by measuring particle losses
with ionisation chambers along the ring. When a loss is too high, it withdraws the *beam
permit*, and the beam is dumped before a magnet quenches. The detectors are read in the
tunnel by current-to-frequency converters (CFC) and ADCs. Tunnel cards send the readings
to the surface over two redundant optical links. This repository holds the logic of the
surface card, which does the following every 40 µs:

1. Receives the packets of both links and checks them. It then chooses one copy.
2. Merges each detector's CFC count and ADC reading into one loss value.
3. Keeps 12 moving sums of that value per detector, with windows from 40 µs to 84 s.
4. Compares every sum with a threshold that depends on the detector, the window and the
   beam energy.
5. Drops the beam permit if a detector that may not be masked is over any threshold.
6. Keeps error counters and the maxima of the last second for the control system.
7. Records a post-mortem history in the board SRAM: the raw packets of the last 2000
   periods and 10 ms integrals. A freeze request keeps this history for analysis after
   a dump.

A slow, large loss and a short, huge loss are both caught. Each window has its own
threshold.

```
 link A ─┐                                                              ┌─ beam_permit
 link B ─┤ rcc ─ data_combine ─┐                                        │  dump_trig
 (card0) │                     ├─ sequencer ─ srs ─┬─ threshold_ ─ masking
 link A ─┤ rcc ─ data_combine ─┘   (1 ch/cycle)    │  comparator
 link B ─┘ (card1)                                 └─ max_values (1 s maxima)
             └──────── esr (error/status counters per card) ───────────┘
 all links + sequencer values ─ pm_recorder ─ board SRAM (post-mortem buffers)
```

One surface card serves 16 detectors: two tunnel cards of 8 detectors each.

## Packets and link checking (`link_rx`, `rcc`)

Each tunnel card sends a 320-bit packet every 40 µs. The packet is the same on both of
its links. After the deserialiser it arrives as 20 words of 16 bits, with a
start-of-frame flag on the first word:

| words  | content |
|--------|---------|
| 0      | card ID |
| 1      | frame ID (increments by one per packet) |
| 2–11   | 8 channels × {8-bit CFC count, 12-bit ADC}; channel *c* in bits [20c+19:20c] of words 2..11 taken as one 160-bit field (word 2 most significant) |
| 12–13  | 32 status bits (voltages, temperatures); 16 bits per link copy are reported |
| 14–17  | 8 DAC values of 8 bits, DAC 1 in the most significant byte |
| 18–19  | CRC-32 of words 0–17 |

The CRC uses polynomial 0x04C11DB7, starts from all ones, runs MSB first and has no final
inversion. `blm_pkg::crc32_word` computes it one word per clock.

`link_rx` assembles one link's packet and checks the CRC. A start-of-frame flag in the
middle of a packet restarts reception.

`rcc` (one per tunnel card) collects what each link delivered during one acquisition
period. It decides at the period's end (`acq_tick`):

* A copy with a good CRC is usable. If both copies are usable, link A is used.
* If both copies are usable but their CRCs differ, the *compare* error counts. The copies
  have then been corrupted in a way the CRC did not catch, or were sent differently.
* A copy with a bad CRC counts a CRC error for its link.
* A link that delivered nothing counts a lost frame.
* If the chosen copy carries the wrong card ID, an error counts and no data is used.
* If the frame ID is not the previous one plus one, an error counts but the data is used.

When no copy is usable, the period has no data. All 16 values of that card are then 0
for that step. No loss is invented, but none is seen either.

## Loss value (`data_combine`)

The CFC emits one count per fixed charge. The ADC samples its integrator, which is the
charge collected towards the next count. Taking one count as the ADC's full scale, the
charge of the last period is:

    value = count · 4096 + adc_now − adc_prev      (clipped to 0 … 2^20 − 1)

This gives resolution below one count at low loss rates. The first packet after reset has
no previous ADC value, so it counts whole counts only. This formula is this design's own
reading: the two measurements are to be merged into one value, but the rule is not given.

## Successive running sums (`srs`)

This block is the core of the design. It is also the least obvious part.

Twelve windows are kept per detector. A window of *N* steps is *refreshed* every *R*
steps. A long window may change only every *R* steps, so that its sum can be built from
the sums of shorter windows instead of from individual values:

| sum  | window (steps) | window time | refresh (steps) | bits | fed from |
|------|---------------:|------------:|----------------:|-----:|----------|
| RS00 | 1        | 40 µs   | 1     | 20 | value |
| RS01 | 2        | 80 µs   | 1     | 22 | SR1 |
| RS02 | 8        | 320 µs  | 1     | 22 | SR1 |
| RS03 | 16       | 640 µs  | 1     | 22 | SR1 |
| RS04 | 64       | 2.56 ms | 2     | 26 | SR2 |
| RS05 | 256      | 10.24 ms| 2     | 26 | SR2 |
| RS06 | 2048     | 82 ms   | 64    | 32 | SR3 |
| RS07 | 8192     | 328 ms  | 64    | 32 | SR3 |
| RS08 | 32768    | 1.31 s  | 2048  | 36 | SR4 |
| RS09 | 131072   | 5.24 s  | 2048  | 36 | SR4 |
| RS10 | 524288   | 21 s    | 32768 | 40 | SR5 |
| RS11 | 2097152  | 84 s    | 32768 | 40 | SR5 |

Five shift registers hold the history at growing granularity:

* **SR1** holds the last 16 single values.
* **SR2** receives RS01 every second step, so each entry is the sum of 2 values.
* **SR3** receives RS04 every 64 steps.
* **SR4** receives RS06 every 2048 steps.
* **SR5** receives RS08 every 32768 steps.

Each window sum is updated incrementally. The new sum is the old sum, plus the entry
entering the window, minus the entry leaving it. The entry leaving is read from a tap of
the register `window/granularity` places back. For example, RS05 adds the newest
2-step sum and subtracts the one written 128 pushes earlier.

The shift registers are circular buffers in RAM. Their write positions are bit fields of
a 21-bit step counter:

* SR1 uses `step[3:0]`.
* SR2 uses `step[7:1]`.
* SR3 uses `step[12:6]`.
* SR4 uses `step[16:11]`.
* SR5 uses `step[20:15]`.

So no pointers are stored. Their depths are 16, 128, 128, 64 and 64 entries per
detector, the smallest that hold each register's longest window.

A sum refreshed every *R* steps changes at steps *t* with (*t*+1) mod *R* = 0. After that
update it equals the sum of the values of steps *t*−*N*+1 … *t*.

The widths are those of the configuration table, and sums are kept modulo 2^width. These
widths do not cover every window at full scale. For example, RS02 = 8 × (2^20−1) needs
23 bits. A detector running at full scale for a whole window therefore wraps. The widths
were kept as specified. Widen `RS_WIDTH` in `blm_pkg` (and the SR entry widths) if this
matters.

The detectors are processed one per clock cycle, in order 0..15. All 12 sums of a
detector are read, updated and written in the same cycle, so the memories are read
combinationally. After reset, `srs` clears its memories in 16 × 128 cycles, with `ready`
low.

## Thresholds and scaling (`threshold_comparator`)

There is one threshold per detector, per running sum and per each of the 32 beam-energy
levels. RS00–RS07 use 32-bit thresholds and RS08–RS11 64-bit thresholds, which makes
4096 + 2048 values, or 256 Kbit (32 KB). The table is split into 12 RAM banks, one per
sum, each addressed by {detector, energy}. All 12 comparisons of a detector therefore
happen in the same cycle.

Each detector also has a 6-bit **shift**. Its thresholds are shifted right by that
amount, which divides them by 2, 4, 8 and so on. This lowers all thresholds of one
detector at once, for example after it has been moved, without reloading the table. A
sum is over its threshold when it is *strictly greater* than the scaled threshold.

The table and shifts are loaded through write ports. The design does not fix where they
come from: a configuration memory or the crate CPU. The permit stays low until
`config_done` says they are loaded. The `log_*` port reads back the scaled threshold in
use at the present energy, which the logging needs every second. With `log_table` set,
it returns the stored, unscaled entry at `log_energy` instead, so the whole 32 KB table
can be read back and verified at start-up.

## Masking and the beam permit (`masking`)

Each detector has two configuration bits:

* **connected:** an unconnected detector never asks for a dump.
* **maskable:** a connected, maskable detector over threshold asks for a dump only while
  masking is not allowed. Masking is allowed when both `safe_beam` (from the machine) and
  `mask_enable` are high. A connected, not-maskable detector always asks.

At the last detector of each step, the block does the following:

* It pulses `req_unmaskable` and `req_maskable` if any detector of that class was over.
  These pulses are taken before masking.
* If an effective request exists, `beam_permit` falls, `dump_trig` pulses and
  `dump_cause` latches the detectors that caused the dump.

The permit then stays low until `rearm`. It is also low until `config_done`.

## Logging side (`max_values`, `esr`)

`max_values` keeps, per detector and sum, the largest value of the current second. It
uses two banks that swap at every 1-second tick, so the last complete second can be read
at any time through the `max_rd_*` port, as 64-bit values. A valid bit per entry empties
a bank in one cycle.

`esr` holds 16 32-bit registers per tunnel card. The crate CPU reads them:

| addr | register | addr | register |
|-----:|----------|-----:|----------|
| 0 | 1-second max resets | 8  | wrong card ID (ERRD) |
| 1 | acquisitions        | 9  | wrong frame ID (ERRF) |
| 2 | frames processed    | 10 | {status A, status B} |
| 3 | beam dump triggers  | 11 | lost frames A |
| 4 | register reads      | 12 | lost frames B |
| 5 | CRC errors A (ERRA) | 13 | {frame ID, card ID} |
| 6 | CRC errors B (ERRB) | 14 | DAC 1–4 |
| 7 | A/B compare (ERRC)  | 15 | DAC 5–8 |

On the VME bus they sit at byte address 0x00FFC400 + 4·addr. The second tunnel card's
block follows at +0x40. The VME interface is not part of this RTL: `esr_rd_en`,
`esr_card` and `esr_addr` form a plain read port, and every read counts in register 4.

## Post-mortem recording (`pm_recorder`)

After a dump, the experts want to see what led to it. The recorder writes two circular
buffers into a 512K × 32 board SRAM:

* **Buffer A** holds every period's packets from all four links, exactly as received,
  including both redundant copies, the CRC and any corruption. It keeps the last 2000
  periods. Each record is 40 words: 10 words per link, two 16-bit link words per SRAM
  word, first word in the upper half. Words that never arrived are recorded as zero.
* **Buffer B** holds, per detector, the sum of its combined values over 250 periods
  (10 ms). It keeps the last 2000 such integrals (20 s), in records of 16 words.

Each buffer exists twice.

* **Never stopped:** recording runs continuously from reset; there is no start input.
* **Freeze:** a freeze request (`pm_freeze`, from the machine timing system or a test)
  switches writing to the other half at the next period boundary. The half that was
  being written then holds the history up to the freeze, and is kept until the next
  freeze.
* **Freeze report:** `pm_frz_*` gives the frozen half, its next record index (its
  oldest record, if it has wrapped) and whether it has wrapped. `pm_frz_count` counts
  freezes.
* **Reading:** the crate CPU reads the SRAM and adds the time stamp. That access path
  is not part of this RTL.

SRAM word addresses, with A = 2000·40 words and B = 2000·16 words per half:

| buffer | address |
|---|---|
| A, half h, record r, link l, word i | `h·A + 40·r + 10·l + i` (link order A0, B0, A1, B1) |
| B, half h, record r, detector c     | `2·A + h·B + 16·r + c` |

The two buffers take 224,000 words, less than one SRAM chip.

A record of A is written in the 40 cycles after the period's tick. A record of B takes 16
more cycles once A has finished. The period must therefore be at least 64 cycles; the top
checks this at elaboration.

## Timing of the top (`blmtc_top`)

* The clock is assumed to be 40 MHz, so a period is `ACQ_CYCLES` = 1600 cycles.
* The period timer starts once `srs` has cleared its memories and `config_done` is high.
  Every `ACQ_CYCLES` it pulses `acq_tick`, which closes the period.
* The `rcc` blocks decide 1 cycle later and `data_combine` 1 cycle after that.
* Detector *c* enters `srs` at cycle 3+*c* after the tick. Its comparison result is ready
  4 cycles later.
* `beam_permit` falls at most 23 cycles after the tick that closed the period of the
  offending packet.
* `sec_tick` marks every `STEPS_PER_SEC` = 25000 steps (1 s) and swaps the maxima banks.
* The post-mortem records of a period take 56 SRAM writes after its tick, so
  `ACQ_CYCLES` must be at least 64. This is checked at elaboration.

In a generic Yosys synthesis, the whole card comes to about:

* 7,400 flip-flops;
* 463 Kbit of RAM: 256 Kbit of thresholds, 173 Kbit of shift registers, plus the sums,
  maxima and capture buffers.

The Stratix EP1S40 it is meant for has 3.4 Mbit of block RAM.

The ports are plain signals:

* the link words of both cards;
* the expected card IDs;
* energy, `safe_beam`, `mask_enable` and `rearm`;
* `config_done` and the three table write ports;
* the permit outputs;
* the ESR, maxima and threshold read ports;
* the post-mortem freeze input, SRAM write port and freeze report.

## Where the design is its own

These follow the specification this design implements:

* the processing chain;
* the 320-bit packet every 40 µs on redundant links;
* the error counters and their addresses;
* the 12 windows with their refresh periods, grouping and widths;
* the threshold table's organisation and size;
* the shift-right scaling;
* the connected/maskable table with masking only when safe;
* the maxima of the last second;
* the doubled post-mortem buffers (2000 periods of packets, 10 ms integrals, toggled by
  the freeze trigger, never stopped).

These are choices made here:

* the packet's field layout and CRC;
* the clock frequency;
* the period-based A/B decision and the preference for link A;
* the combine formula;
* the shift-register depths and the one-detector-per-cycle schedule;
* modulo arithmetic;
* strict comparison;
* the latching permit with `rearm`;
* recording all four link copies rather than one packet per card;
* the depth of the integral buffer, the SRAM layout, and freezing at a period boundary;
* all configuration and read-out ports.

Not built:

* the analog front end;
* the tunnel-card FPGA (only modelled in the testbenches);
* the optical transceivers;
* the VME interface;
* the configuration memories;
* the board SRAM itself, and the CPU's access to it.

## Simulating

Each block has a self-checking testbench in `tb/`, named `tb_<block>`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Build one with Verilator 5, for
example:

    verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_srs \
        rtl/blm_pkg.sv rtl/srs.sv tb/tb_srs.sv && ./obj_dir/Vtb_srs

For the whole card, list every `rtl/*.sv` file (package first) plus `tb/tb_pkt_pkg.sv`,
`tb/tb_blmtc_env.sv` and then `tb/tb_blmtc_top.sv` or `tb/tb_blmtc_full.sv`:

* **`tb_blmtc_top`** runs 34,000 steps with a short period (64 cycles) and a short second
  (200 steps), so that even the 84 s window refreshes. Every running sum, threshold
  decision, permit and ESR register is checked against a reference model in
  `tb_blmtc_env`. The model generates packets with random CRC errors, missing and
  mismatching copies, wrong IDs, loss spikes, energy changes, masking changes and
  post-mortem freezes. At the end it compares the whole SRAM with the expected
  post-mortem buffers; buffer B is cut to 8 integrals so that it wraps. The test counts
  each mechanism and fails if one never occurred.
* **`tb_blmtc_full`** runs the top at its real parameters (1600-cycle periods) for
  25,100 periods, just over one second: the once-per-second maxima handover, two
  post-mortem freezes (one after buffer A has wrapped at its full 2000 records) and a full
  SRAM comparison. It takes under a minute with verilator.
* **`tb_pm_recorder`** exercises the recorder with tiny buffers against a model of
  the SRAM, using truncated, restarted, missing and surplus link words.
* **`tb_blm_pkg`** checks the package's CRC function and packet unpacking against the
  bit-serial transmitter model, and its configuration tables against the window table.
* **`tb_srs`** runs the running sums alone for 2^21 + 40000 steps, past a full 84 s
  window, against a prefix-sum model.

The testbenches drive inputs and sample outputs at the falling clock edge.
