# Fast hit-count trigger for limited streamer tube detectors

A limited streamer tube (LST) detector is read out bus by bus: each front-end
bus is a daisy chain of shift registers, 1024 channels long, shifted out
serially by a read-out controller. This processor counts the hit channels
*while* the buses are being shifted out. A few microseconds after the
read-out it then knows how many channels fired in each programmed region of
the detector and in the whole detector, and it fires a trigger or a fast
clear on that basis. Typical uses are rejecting low-activity beam background
and events with discharging (crowded) buses before the slow data acquisition
starts.

The work is split into two phases and two kinds of card:

* **Pre-adders (PA)**, up to 7, each spying on 16 buses. Every bus has its
  own 8-bit counter, so all 112 buses are counted in parallel, in step with
  the read-out. The count is complete when the read-out ends.
* **One master adder (MA)**. When the read-out gate falls, it walks through a
  programmed list of buses at one bus per 100 ns. It adds the bus counts into
  up to 16 *groups* (partial sums) and into a global sum, then takes the
  decision.

All sums are 12 bits wide. The whole design runs from one 10 MHz clock.

## Phase 1: counting in the pre-adders (`pre_adder`)

The gate from the read-out controller is high during the read-out. Its rising
edge clears all 16 counters of a card. While the gate is high, each read-out
clock period (5 MHz in the original system) arrives as a one-cycle strobe
`ro_stb`. At each strobe, the counter of every bus whose `hit` line is active
increments. A 1024-channel read-out takes 2048 clocks, which is 204.8 µs.

An 8-bit counter covers 25 % of a bus. More hits than that means a discharge
or a faulty bus, and such a bus is thrown away later. So the counters
**saturate** at 255 instead of wrapping. A crowded bus therefore always reads
high and never wraps around to a small, plausible number.

The pre-adders share one bus to the master adder:

* one select line per card (`pa_sel`, one-hot);
* a 4-bit counter address (`cnt_addr`);
* 8 data bits.

A card that is not selected drives 0, and the top level ORs the cards' data
outputs together. Reading is combinational, so the master adder gets the
count in the same clock in which it drives the address.

## Phase 2: the master adder cycle (`master_adder`)

### The pattern memory: what the MA adds, and in what order

The hardest part to grasp is how the adder is programmed. A 256 × 8 RAM, the
*pattern unit* (`pattern_unit`), holds the sequence of buses the MA visits.
Each word describes one step:

| bits | field | meaning |
|------|-------|---------|
| 3..0 | `bus` | counter address within the card |
| 6..4 | `pa`  | pre-adder card 0..6; **7 = STOP**, end of the sequence |
| 7    | `eog` | this bus is the **last one of its group** |

A group is simply the run of buses up to and including the next word with
`eog` set. Groups are numbered 0, 1, 2, … in the order in which they close.
A bus may appear in several groups, and buses can be left out entirely.
Example: group 0 = buses 0–6 of card 0, group 1 = bus 3 of card 5:

```
0x00 0x01 0x02 0x03 0x04 0x05 0x86   0xD3   0x70
 card 0, buses 0..6, last has eog    5/3+eog STOP
```

Buses after the last `eog` and before STOP are read but belong to no group,
so they are lost. The last RAM address always acts as STOP, so a sequence
with no STOP word still ends.

### One step per clock

The cycle starts when the gate line falls, if START is enabled. From the
next clock on, the MA handles one pattern word per clock:

1. **Partial sum** (`partial_sum_unit`): the bus count Σ_B from the selected
   card is added to the running partial sum Σ. This happens only if Σ_B is no
   larger than the programmed *maximum meaningful hits per bus*, so crowded
   buses are skipped.
2. **End of group**: the updated Σ, including this bus, is handled in the same
   clock:
   * it is written into the partial sum RAM (`partial_sum_memory`) at the
     group's address;
   * it is added to the global sum Σ_tot (`global_sum_unit`);
   * it is compared with the group's upper threshold, and the *block
     overflow* flag is set if Σ is larger;
   * the Σ latch is then cleared for the next group.
3. **STOP**: one clock later the decision is made:
   * `trigger` if `lo ≤ Σ_tot ≤ hi` and no block overflow occurred;
   * otherwise `clear`, unless the CLEAR output is inhibited.

   `trigger`, `clear` and `done` are one-clock pulses.

Timing: with *n* bus words before STOP, the decision pulse comes **n + 2
clocks after the gate falls**. For all 112 buses that is 11.4 µs at 10 MHz.
With the read-out of the original experiment (775 channels, 155 µs), the
decision comes 166.5 µs after the read-out started.

Partial and global sums saturate at 4095. Group ends after the 16th are
ignored: nothing is stored, added or compared for them. A falling gate while
a cycle is running does not start a new cycle.

## Host interface: CAMAC functions (`camac_if`)

The MA is programmed and read through a simplified CAMAC dataway port:

* `cmd` is a one-clock strobe for a command addressed to this station;
* `f`, `a` and `w` (24 bits) are valid together with `cmd`;
* `r`, `q` and `x` are combinational and valid while `cmd` is high.

| F, A | action |
|------|--------|
| F16 A0 | maximum meaningful hits per bus, 0–255 (`w[7:0]`) |
| F16 A1 | store the next pattern word (`w[7:0]`); Q = 0 once the RAM is full |
| F16 A2 | next group upper threshold, group 0 first (`w[11:0]`); Q = 0 after 16 |
| F16 A3 | global lower threshold (`w[11:0]`) |
| F16 A4 | global upper threshold (`w[11:0]`) |
| F2 A0  | read: global sum in `r[11:0]`, trigger status in `r[12]`, block overflow in `r[14]` |
| F2 A1  | read the next partial sum, group 0 first; Q = 0 past the last group of the cycle |
| F9     | reset (see below) |
| F24 / F26 | inhibit / enable the START input |
| F25    | inhibit the CLEAR output |

The results stay readable until the next cycle starts. Because Q goes low
after the last valid group, the F2-A1 reads can be run as one Q-stop
block transfer.

What F9 does:

* it sets the pattern and threshold write pointers back to the start, so a
  new table is written with F9 followed by a series of F16 writes;
* it sets the partial-sum read pointer back to group 0;
* it lifts the CLEAR inhibit;
* it aborts a running cycle, with no decision;
* it leaves the tables and the thresholds as they are.

F26 or the reset input gives the START enable back.

Reset values: bus maximum 255, global window 0–4095, group thresholds 4095,
START enabled, CLEAR not inhibited.

## Hierarchy and files

```
lst_trigger_processor        top: N_PA pre-adders + master adder + common bus
├── pre_adder [N_PA]         16 saturating bus counters, bus read port
└── master_adder             START logic and wiring of the MA
    ├── camac_if             function decoder, registers, read word, Q/X
    ├── pattern_unit         256 x 8 pattern RAM, sequencer, decoder A, STOP
    ├── partial_sum_unit     bus threshold, partial adder/latch, group thresholds, block overflow
    ├── partial_sum_memory   16 x 12 partial sum RAM, auto-increment read pointer
    └── global_sum_unit      total adder/latch, acceptance window, trigger/clear
lst_pkg                      widths, pattern word struct, CAMAC function codes, saturating add
```

Parameters of the top: `N_PA` (default 7) and `DEPTH`, the pattern RAM
depth (default 256). The fixed sizes are in `lst_pkg`:

* 16 buses per card and 8-bit counters;
* 12-bit sums and 16 groups;
* the 8-bit pattern word.

The top's ports:

* `hit` is an unpacked array `[N_PA]` of 16-bit vectors;
* `gate` and `ro_stb` are the signals of the read-out controller after level
  conversion;
* the CAMAC port and `trigger`, `clear`, `done`, `busy` are brought out
  unchanged.

Every module starts with a comment on its function, interface and timing.

## How closely this follows the original hardware

Taken from the original design:

* the two-phase structure and the counting scheme;
* all sizes: 7 cards × 16 buses × 1024 channels, 8-bit counters, 12-bit sums,
  16 groups;
* the pattern word layout, including decoder output 8 as STOP;
* the per-bus and per-group thresholds, the global window and the decision
  rule;
* the CAMAC function set and the status word bits;
* the 10 MHz sequencing rate.

Choices made here where the original is silent or hardware-specific:

* **Clocking.** The original counters are clocked by the gated read-out
  clock, and the cards are reset by a capacitor-coupled gate pulse. Here
  everything is synchronous to one clock: the read-out clock is a strobe and
  the reset is an edge detector.
* **Pipelining.** There is none: the original resets the partial sum latch
  20 ns after the group write, and here the group write and the latch reset
  happen on the same clock edge.
* **Per-bus test.** A bus is kept when its count is ≤ the programmed maximum.
  The maximum is read as "maximum meaningful hits", so equality counts as
  meaningful.
* **Group test.** A group overflows when its sum is strictly greater than its
  threshold.
* **Group window.** Groups have an upper threshold only. The original's
  overview speaks of acceptance windows for every partial sum, but its
  function list only provides upper thresholds per group.
* **Saturation.** Counters and sums saturate. How the original handles sums
  beyond 12 bits is not specified.
* **Undefined details:**
  * the pattern RAM depth;
  * the auto-increment table pointers;
  * the scope of F9;
  * the reset values;
  * the pulse widths;
  * the meaning of status bit 13, which reads 0 here;
  * the CAMAC timing, reduced to a synchronous strobe.
* **Decision time.** The decision time for 112 buses is 11.4 µs. The
  original quotes "11 µs maximum" for the same 100 ns-per-bus sequencing.
* **Not modelled:**
  * the ECL/TTL adapter board, which only converts levels;
  * the read-out controller and the front-end cards, which belong to the
    detector;
  * the CAMAC crate controller.

  Their signals are the top's ports.

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_pre_adder` | random read-outs up to 1024 channels; saturation; clearing on a new gate |
| `tb_pattern_unit` | clock-by-clock check of decoded words; STOP, full RAM, no-STOP wrap |
| `tb_partial_sum_unit` | random groups against a model; discards, overflow, saturation, >16 groups |
| `tb_partial_sum_memory` | group write and ordered read-back with Q |
| `tb_global_sum_unit` | window decision, pulse timing, CLEAR inhibit |
| `tb_camac_if` | every function, the read word layout, Q and X |
| `tb_master_adder` | MA with behavioural cards, against a reference model; latency n+2, START inhibit, F9 abort |
| `tb_lst_trigger_processor` | whole design at default size, 1024-channel read-outs of 112 buses; every mechanism above |
| `tb_workload_nnbar` | N-N̄ configuration: 16 groups of 7 buses, 155 µs read-out, windows with 2500- and 400-hit upper cuts |

The model behind the expected values is in `tb/tb_lst_model.svh`. It walks the
pattern list exactly as described above.

To run one testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lst_trigger_processor \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/lst_pkg.sv tb/tb_lst_trigger_processor.sv
./obj_dir/Vtb_lst_trigger_processor
```

The full-size end-to-end test simulates about 2 ms of the system and
finishes in well under a second.
