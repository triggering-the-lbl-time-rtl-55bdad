# A synchronous track trigger for a time projection chamber

A time projection chamber (TPC) records a charged track as a trail of
ionisation. An electric field drifts the trail onto wire planes at the two
endcaps. The drift takes up to 16 µs, so the arrival time of each piece
gives its distance from the endcap. The trigger in this repository watches
the discriminated signals of 2 × 6 × 184 sense wires while the ionisation
arrives. It decides whether a track came from the beam intersection, and the
decision is ready 16.8 µs after the beam crossing.

The design is a SystemVerilog reconstruction of the dE/dx wire trigger of
the LBL TPC in the PEP-4 detector at SLAC. The original idea behind it, kept
here, is to make a pattern trigger with thousands of time-varying inputs
**fully synchronous**. The 16 µs drift time becomes 64 time slices of 250 ns.
Every stage does a fixed amount of work per slice. This makes the trigger
testable: a pattern stored in memory replays a full event slice by slice, and
memories at every stage record what passed through.

## The chain of decisions

```
wires (or test RAM) --> sector ORing + synchroniser --> majority units (M)
    M --> pretrigger  (prompt track + inner drift chamber, TF window)
    M --> ripple trigger (track followed from outer to inner radius, TS window)
    M --> majority trigger (many units on at once, 90-degree tracks, TM window)
        --> final decision over 12 supersectors
```

* **Supersectors.** Each endcap has six 60° sectors. Supersector *s* is
  sector *s* ORed wire by wire with sector *s*−1. The supersectors overlap,
  so a track that curves across a sector boundary in the magnetic field stays
  inside one of them.
* **Radial groups.** The 184 wires of a supersector form 23 groups of 8
  wires, numbered from the inside (0) to the outside (22).
* **Majority bit M(n).** M(n) is set when more than T_n wires of group *n*
  were hit within the last Δ_n time slices. This is a short piece of track.
* **Pretrigger TPCF.** A track leaving through the endcap gives prompt
  signals. During the first ~2 µs (window TF), a majority bit at a radius
  enabled by the mask, in coincidence with one of the two 30° inner drift
  chamber sections covering that supersector, gives the pretrigger. Without
  any pretrigger the cycle is aborted and the analog chain is cleared.
* **Ripple trigger TPCS.** It checks that a track is continuous from the
  outer radius to the inner radius (see below).
* **Majority trigger TPCM.** It catches tracks at about 90° to the beam,
  which reach all radii at the same time and cannot ripple.

## Time slices and the pipeline

One system clock period is a quarter of a time slice (16 MHz clock, 250 ns
slice). The `master_sequencer` starts a cycle on a beam crossing `bx`. It then
numbers the slices k = 0…66 and the clocks within a slice (`phase` 0–3).
`slice_end` marks the last clock of each slice. Each stage adds one slice of
latency. For hits that arrive in drift slice *d*:

| slice | what is valid |
|---|---|
| d   | the wire pulse arrives; the synchroniser flag is set |
| d+1 | second-rank storage holds the hit bits; the majority units process them |
| d+2 | M bits and TPF/TPCF (combinational) |
| d+3 | ripple one-shots, TPCM latch and comparison |

This is why a cycle lasts 64 + 3 slices. The decision (`trig_valid`) comes
269 clocks = 16.81 µs after the crossing. The windows TF, TS and TM are
programmed in sequencer slice numbers (`windows_t`), so they include this
latency. The defaults are TF = slices 2–7, which covers drift slices 0–5
and lets the abort come 2.0 µs after the crossing. TS = 51–66 and TM = 50–66
cover drift time from about 12 µs to 16 µs.

When TF ends with no pretrigger (TPCF, or the external drift-chamber
pretrigger `ext_pretrig`), the sequencer raises `aborted`. It then keeps
`analog_clear` high for two slices (500 ns) before it accepts another
crossing. `hold` (for example, readout busy) blocks new cycles.

## Majority units: counting down from the threshold

This is the least obvious part of the design, and the hardware is shared in
time. A direct implementation would keep a sliding-window sum of hit counts
and compare it with T_n. The majority unit instead keeps
R = T_n − (hits in the window) in an 8-bit register:

* at the start of a cycle: R = T_n;
* each slice k: R ← R + N(k−Δ) − N(k), where N(k) is the number of the
  group's 8 wires hit in slice k. During the first Δ slices (the
  accumulation period) nothing is added back;
* M = the sign bit of R. R < 0 means more than T_n hits in the window.

So the comparison costs nothing: it is the sign bit of an adder that is
needed anyway. N(k−Δ) comes from a FIFO that delays the hit counts.

Example with T = 4 and Δ = 3, for the hit counts 0 0 1 2 3 2 1 0 0 0 0:

| k | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| R | 4 | 4 | 3 | 1 | −2 | −3 | −2 | 1 | 3 | 4 | 4 |
| M | 0 | 0 | 0 | 0 | 1 | 1 | 1 | 0 | 0 | 0 | 0 |

`tb_majority_au` checks exactly this sequence.

One `majority_au` serves the same radial group of two supersectors (2j and
2j+1). It has one encoder, one FIFO and one adder, plus one R register per
supersector. The four clocks of a slice are:

| phase | operation |
|---|---|
| 0 | R_a += N_a(k−Δ) |
| 1 | R_a −= N_a(k); store N_a(k) in the FIFO |
| 2 | R_b += N_b(k−Δ) |
| 3 | R_b −= N_b(k); store N_b(k); register both M bits |

So each endcap has 3 sector pairs × 23 groups = 69 units. The FIFO is a ring
of 16 entries per lane, and Δ can be 1…15 slices. T_n must stay within
0…127, so that R cannot wrap.

## Ripple trigger

The ripple follows a track from the outside in. Radial group *n* fires its
ripple signal R_n when M(n) is set **and** group *n* is enabled:

    enable(n) = (TF and Mask(n)) or R(n+1) or R(n+2) or R(n+3)

Groups above the top count as R = 1. So the outermost groups 20–22 can
always start a ripple. During TF, a group enabled by the mask can also
start one: a track that left through the endcap carries no ionisation at
the larger radii. Reaching three radii down bridges groups that lose their
hits in the gaps between sectors.

Each R_n is a retriggerable digital one-shot of `cfg.os_width[n]` slices.
This is the "2–3 µs window" (8–12 slices) during which a group keeps its
lower neighbours enabled. The one-shots update once per slice, so a ripple
moves inwards by at most one group per slice. A supersector's result is
TPCS_ij = R_0 or R_1. R_1 takes part only when `cfg.r1_enable` is set. The
final TPCS is the OR over the 12 supersectors, gated by TS. TS only opens
near the end of the drift time, so a ripple must arrive at the inner radius
late enough for the track to come from the intersection region. Tracks with
the wrong slope, and random hits such as synchrotron radiation, do not build
a continuous chain.

## Majority trigger

Each supersector's 23 M bits form three sections (units 0–7, 8–15 and
16–23). Unit 23 does not exist and reads 0. Once per slice a latch takes the
M bits. Outside TM the latch follows M. Inside TM it keeps every unit that
has turned on. An encoder counts the latched units of each section, and a
comparator tests count > `cfg.tpcm_thresh[s]`. TPCM_ij is the AND of the
three comparisons: the track must show in the inner, middle and outer
thirds. The final TPCM is the OR over the supersectors, gated by TM.

## Test patterns and recording memories

`cfg.acq_test = 1` replaces every discriminator input with a bit from a
test-pattern memory. There is one per sector: 64 slices × 184 wires, loaded
through `tp_we/tp_endcap/tp_sector/tp_addr/tp_data`. The bit drives the
wire for its whole slice. The synchroniser counts rising edges, so a wire
that is high in two consecutive slices counts only once. This is the one-slice
dead time of the synchroniser, and it applies to real wire pulses as well.
The pattern drives the inputs only while a cycle runs. Between cycles the
inputs are low, so a hit in slice 0 is a rising edge like any other.

Each endcap records four levels, one word per drift slice. A host reads them
back as 32-bit words through `rd_endcap/rd_level/rd_addr/rd_word`, and
`rd_data` follows one clock later.

| level | content per supersector | words |
|---|---|---|
| 0 `LVL_WIRES`  | 184 synchronised wire bits | 35 |
| 1 `LVL_MAJ`    | 23 M bits, TPF in bit 23 (24-bit fields) | 5 |
| 2 `LVL_RIPPLE` | {TPCS_ij, R18, R17, R16, R10, R9, R8, R2, R1, R0} (10-bit fields) | 2 |
| 3 `LVL_TPCM`   | {TPCM_ij, above[2:0], count2, count1, count0} (16-bit fields) | 3 |

Field *s* of each word holds supersector *s*, starting at bit 0. A host can
check each stage against the recording of the stage before it, and can turn
a recorded event into a test pattern and replay it.

## Parameters

All sizes come from `rtl/tpc_trig_pkg.sv`. The values that a host sets
before a run are the `config_t` and `windows_t` ports of the top:

| field | meaning | default used in the testbench |
|---|---|---|
| `au_thresh[n]` | T_n, 0…127 | 3 |
| `delta[n]` | coincidence window Δ_n, slices 1…15 | 4 (1 µs) |
| `pre_mask[n]` | radial groups that may pretrigger or start a ripple | groups 12–22 |
| `os_width[n]` | ripple one-shot width, slices | 12 (3 µs) |
| `tpcm_thresh[s]` | majority-trigger threshold per section | 4 (that is, more than 4 of 8) |
| `r1_enable` | let R_1 end a ripple | 1 |
| `acq_test` | 1 = test-pattern memories | — |
| `win` | TF/TS/TM start and stop slices | `WINDOWS_DEFAULT` |

All supersectors share one value per radius.

## What follows the original and what does not

These parts follow the original trigger:

* the 64 slices of 250 ns;
* the supersector ORing;
* the 23 groups of 8;
* the count-down majority arithmetic, with its order of operations and
  two-supersector time multiplexing;
* the pretrigger, ripple and majority-trigger equations, including the span
  of three radii and the 3 × 8 sections;
* TPCS from R_0/R_1 with the R_1 switch;
* test-pattern injection and the recording at four levels.

These are choices of this design:

* the 16 MHz clock, with four clocks per slice;
* the two-flop synchroniser with edge detection, which stands in for the
  original's edge-set flip-flop;
* the widths of Δ (4 bits) and of the one-shot (5 bits);
* the window registers, their defaults and the abort rule at the end of TF;
* the TPCM latch reading (it follows M outside TM and accumulates inside);
* the recording formats and memory sizes. They hold 5760 words of 32 bits
  for both endcaps, while the original had about 11K words, with contents
  not specified here;
* plain ports in place of the original computer interface and register map;
* one sequencer for both endcaps. The original had one per endcap, both
  locked to the same central timing.

### Differences in behaviour

* The original counted "four or more" hits in one place, while its equations
  and worked example use "more than the threshold". This design uses "more
  than T_n".
* Above the top radius R counts as 1, which makes groups 20–22 free starters.
* With the default windows an aborted cycle ends 2.5 µs after the crossing.
  At the PEP crossing interval of 2.44 µs, the next crossing is therefore
  missed. A one-slice clear, or a shorter TF, avoids this.

### Not included

* the analog front end (preamplifiers, shapers, discriminators);
* the inner and outer drift chamber trigger logic. Only its outputs A0–A11
  (`idc_a`) and an external pretrigger input are used;
* the per-bin clock generators (replaced by clock enables);
* the host computer and its software;
* the CCD readout.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/tpc_trig_pkg.sv tb/tb_tpc_trigger_top.sv --top-module tb_tpc_trigger_top
./obj_dir/Vtb_tpc_trigger_top
```

`tb_tpc_trigger_top` runs the whole design at full size in four cycles:

1. an inclined test-pattern track gives a prompt pretrigger and a ripple
   trigger, and the recordings are checked against the pattern;
2. an empty event aborts;
3. a 90° track on the discriminator inputs, with the external pretrigger,
   gives a majority trigger;
4. a crossing during `hold` is ignored.

It counts each mechanism and fails if any of them never occurs. It also
checks the 16.81 µs decision time.

`tb_workload_events` is a second full-size testbench with three events
shaped after the paper's figures: five tracks of different inclination with
synchrotron-like background in one sector, a near-vertical cosmic ray with
a delta ray, and background alone in all sectors. A behavioural model of
the whole chain predicts the recorded M, ripple and TPCM levels of every
supersector and slice, and the final decision. The testbench compares all of
them. The five-track event gives a ripple trigger. The cosmic ray gives
only the majority trigger. Background alone gives no trigger.

`tb_endcap_trigger` compares the recorded wire bits and M bits of one endcap
with a sliding-window model of two test events. The smaller testbenches
check each unit against an independent model. For example, `tb_ripple_trigger`
covers gaps of two and three missing groups, and `tb_sector_sync` covers the
dead time.

## Files

| file | block |
|---|---|
| `tpc_trig_pkg.sv` | sizes, types, default windows |
| `master_sequencer.sv` | slice counter, phases, windows, abort/clear |
| `test_pattern_ram.sv` | per-sector test patterns |
| `sector_sync.sv` | test/wire select, sector ORing, synchroniser, second rank |
| `hit_encoder.sv` | hit count of 8 wires |
| `n_fifo.sv` | Δ-slice delay of hit counts, two lanes |
| `majority_au.sv` | count-down majority unit for two supersectors |
| `pretrigger.sv` | TPF / TPCF of a supersector |
| `digital_oneshot.sv` | retriggerable one-shot |
| `ripple_trigger.sv` | ripple chain and TPCS of a supersector |
| `tpcm_trigger.sv` | latch, counts and comparisons, TPCM of a supersector |
| `record_ram.sv` | recording memory with 32-bit readout |
| `endcap_trigger.sv` | one endcap: all of the above |
| `final_decision.sv` | TF/TS/TM gating, OR over endcaps, per-cycle decision |
| `tpc_trigger_top.sv` | sequencer + 2 endcaps + final decision |
