# Two-stage poly-phase 1-D discrete wavelet transform

This is a pipelined hardware 1-D discrete wavelet transform (DWT) for FPGA. It rests on two ideas.

- **Poly-phase filtering.** A DWT level filters the signal with a low-pass and a high-pass filter and then throws away every second output. This design splits the input into its even and odd samples *before* filtering, and splits each filter into an even-tap and an odd-tap sub-filter. No product is ever discarded, and the filter bank takes two input samples per clock. An 8-sample frame therefore enters in 4 clocks instead of 8.
- **Stage-equalised two-stage pipeline.** Level 1 is half of all the filtering work. Levels 2, 3, … together are less than the other half. Stage 1 computes level 1. Stage 2 computes every later level, interleaving them. Both stages use the same processing unit. Only their control units differ.

The default build is the configuration of the worked example: 8-sample frames of 8-bit signed samples, a 2-level transform, and the 2-tap Haar filter (coefficients ±1/√2). The filter length, the number of levels, the frame size, the word widths and the coefficients are all parameters.

## Block diagram

```
 frame[N] ──► even_odd_split ──(x[2n], x[2n+1]) per clock──► dwt_stage1 ──► a1, d1 (out)
                                                                │ a1
                                                                ▼
                                         ┌──────────────── dwt_stage2 ─────────────────┐
                                         │ dwt_buffer ──► control unit ──► dwt_pu ───────┼──► a_j, d_j, level j (out)
                                         │  ▲   (lowest pending level first)    │       │
                                         │  └──────── a_j for j < LEVELS ───────┘       │
                                         └──────────────────────────────────────────────┘
 dwt_pu      = mac_network (low pass) + mac_network (high pass) + round/saturate register
 mac_network = chain of L/2 mac_cell, each: acc + x_even*c_even + x_odd*c_odd
 mac_cell    = 2 array_mult + carry-save row of full_adder + csel_adder + register
 array_mult  = carry-save rows of full_adder + csel_adder
 csel_adder  = ripple blocks of full_adder, duplicated for carry-in 0/1, selected by block carry
```

## Arithmetic

For an L-tap analysis filter pair (LO, HI), level j is computed from the level j-1 approximation x:

```
a[n] = round_sat( sum_{k=0}^{L-1} LO[k] * x[2n+1-k] )
d[n] = round_sat( sum_{k=0}^{L-1} HI[k] * x[2n+1-k] )
```

- Samples before the start of the signal count as zero.
- Split into phases, with `x_even[n] = x[2n]` and `x_odd[n] = x[2n+1]`:
  - the odd phase meets the even-numbered taps `LO[0], LO[2], …`;
  - the even phase meets the odd-numbered taps `LO[1], LO[3], …`.
- Each phase uses its own delay of m pairs.
- For the Haar default, `LO = {c, c}` and `HI = {-c, c}` with `c = 1/√2`. So `a[n] = c·(x[2n] + x[2n+1])` and `d[n] = c·(x[2n] − x[2n+1])`.

**Number formats.** These are this design's choice.

| quantity | format | parameter |
|---|---|---|
| input sample | 8-bit signed integer | `XW = 8` |
| stage word (every level's input and output) | 16-bit signed, 4 fractional bits | `DW = 16`, `FRAC = 4` |
| coefficient | 16-bit signed, 14 fractional bits (1/√2 → 11585) | `CW = 16`, `CF = 14` |
| MAC sum | full precision, `DW + CW + clog2(L) + 1` bits | — |

- An input sample enters as `sample << FRAC`.
- Each filter output is rounded half-up by `CF` bits and saturated to 16 bits. All levels therefore share one word format, and an output word means `word / 16`.
- For the worked example, the level-1 results come within 1/16 of the exact real values: for example a1 = 147.8125 against 147.7839. The level-2 results come within 2/16: a2 = 208.0 against 207.996.
- The 4 fractional bits leave 11 integer bits. With 8-bit inputs and the Haar filter, the low-pass gain of √2 per level keeps a level-8 approximation in range. Deeper transforms, or other filters, saturate sooner. If that matters, raise `DW` or lower `FRAC`.

## The stage-2 buffer and scheduler

This is the least obvious part of the design.

Stage 1 delivers one level-1 approximation per input pair, so at most one per clock. Stage 2 has to filter:

- level 2 at one pair per 2 clocks;
- level 3 at one pair per 4 clocks;
- and so on.

That is less than one pair per clock in total, so one processing unit is enough if the levels take turns.

`dwt_buffer` keeps one entry per level 2 … LEVELS. Each entry has:

- **hold**: the first (even) sample of a pair still waiting for its partner;
- **window**: the newest complete pair and the L/2 − 1 pairs before it. These are the delay lines of that level's sub-filters;
- **pend**: the newest pair has not been filtered yet.

The buffer works like this:

- Entry 0 (level 2) is written by stage 1.
- Entry j − 1 (level j > 2) is written by stage 2's own level j − 1 approximations. This is the feedback path.
- The second sample of a pair shifts the pair into the window and sets pend.
- Each clock, the stage-2 control unit reads the **lowest** level whose pend is set. The read returns that level's window, clears pend, and starts the processing unit on it with the level as a tag.
- The tag travels through the processing unit's pipeline. It decides whether the resulting approximation goes back to the buffer or only to the output.

Why this never loses data:

- Level 2 has priority, so its pair is read the clock after it completes. The next level-2 pair completes two clocks later at the earliest.
- Higher levels use the clocks level 2 leaves free. These are at least every second clock, and the higher levels need fewer than that in total.
- If a pair were ever overwritten while still pending, the sticky `overflow` output would rise. The testbenches run 4-level transforms with gap-free input and check that it stays low, and also that two levels really do wait at the same time (about 60 such clocks per test).

## Modules (`rtl/`)

| module | what it is | latency |
|---|---|---|
| `dwt_pkg` | widths, formats, Haar coefficients, MAC-sum width function | — |
| `full_adder` | one-bit full adder | comb. |
| `csel_adder` | carry-select adder: blocks of `BLK` (4) ripple-carry full adders. Each upper block is computed for carry-in 0 and 1, and the carry of the block below selects the result. | comb. |
| `array_mult` | signed array multiplier. Both operands are sign-extended to the product width P. P partial products are summed by carry-save rows of full adders, then by `csel_adder`. The result is exact modulo 2^P, and the signed product always fits. | comb. |
| `mac_cell` | `acc_out <= acc_in + x_even·c_even + x_odd·c_odd`. The products come from two `array_mult`s (or from `*` when `ARRAY_MULT = 0`). The two products and the partial sum are reduced by a carry-save row of `full_adder`s, then resolved by a `csel_adder`. | 1 |
| `mac_network` | L-tap poly-phase filter: L/2 registered `mac_cell`s in a chain, with input skew registers so pair m reaches cell m m clocks late. The critical path is one multiply-add for any L. | L/2 |
| `dwt_pu` | processing unit: low-pass and high-pass `mac_network`s on a shared window, plus a rounding/saturating output register; carries a tag | L/2 + 1 |
| `even_odd_split` | loads an N-sample frame and streams it as N/2 (even, odd) pairs, one per clock. `ready` is also high in the last-pair clock, so frames can follow back to back. | first pair 1 clock after `load` |
| `dwt_stage1` | control unit (a shift register of the last L/2 pairs) plus `dwt_pu`: level 1 | L/2 + 2 |
| `dwt_buffer` | stage-2 buffer, described above | read is comb. |
| `dwt_stage2` | `dwt_buffer` + lowest-level-first control unit + `dwt_pu` + feedback: levels 2 … LEVELS | L/2 + 3 from the sample that completes a pair, if not waiting |
| `dwt_top` | splitter → stage 1 → stage 2 | — |

All registers use a synchronous, active-high `rst`. Nothing stalls: the pipelines advance every clock, and `valid` bits travel with the data.

### `dwt_top` ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous reset |
| `load` | in | 1 | take `frame` (honoured when `ready`) |
| `frame` | in | N × XW | `frame[i]` is sample i of the frame |
| `ready` | out | 1 | a `load` is accepted this clock |
| `s1_valid`, `s1_approx`, `s1_detail` | out | 1, DW, DW | level-1 coefficients |
| `s2_valid`, `s2_level`, `s2_approx`, `s2_detail` | out | 1, clog2(LEVELS+1), DW, DW | coefficients of level `s2_level` (2 … LEVELS) |
| `overflow` | out | 1 | sticky stage-2 buffer overwrite flag (never set in correct use) |

Frames loaded one after another form a single continuous signal. The filter delay lines are not cleared between frames; assert `rst` to start a new signal. With the defaults:

- a frame enters in the 4 clocks after `load`;
- a level-1 result appears 3 clocks after its input pair;
- a level-2 result appears 7 clocks after the second of its two input pairs.

### Parameters of `dwt_top`

| parameter | default | meaning |
|---|---|---|
| `XW` | 8 | input sample width |
| `N` | 8 | frame length (even) |
| `DW`, `FRAC` | 16, 4 | stage word width and fractional bits |
| `CW`, `CF` | 16, 14 | coefficient width and fractional bits |
| `L` | 2 | filter length (even) |
| `LEVELS` | 2 | decomposition levels (≥ 2) |
| `LO`, `HI` | Haar | packed `[L-1:0][CW-1:0]` coefficient vectors; element k multiplies `x[2n+1-k]` |
| `ARRAY_MULT` | 1 | 1: multipliers built as full-adder arrays. 0: `*` operator, so FPGA synthesis can use hard multipliers. Both give identical results. |

Another wavelet needs only new `L`, `LO` and `HI`. The testbenches use the 4-tap Daubechies filter (see `tb/dwt_ref_pkg.sv`) this way.

## Where this design departs from the source material, or fills gaps

- **What the source gives and what it does not.** The source fixes:
  - the poly-phase split;
  - the two-stage, stage-equalised organisation with identical processing units and different control units;
  - a stage-2 buffer holding outputs of both stages;
  - single-cycle MAC cells built from full adders, with carry-save or carry-select adders;
  - the Haar worked example.

  It does not describe these, which are this design's own:
  - the insides of the control units;
  - the buffer organisation;
  - the scheduler;
  - the frame handshake;
  - the number formats;
  - rounding;
  - reset.
- **Word widths.** The source's resource tables mention 8×8-bit multipliers for level 1 and 16×16-bit multipliers, 16-bit adders and 16-bit registers for the 2-level design. Here every stage uses 16-bit words and 16-bit coefficients, so that both stages really are identical.
- **Multiplier and adder style.** The source builds its MAC from one-bit full adders and names array multipliers and carry-save and carry-select adders. By default the whole MAC is built that way, with the block size and array organisation chosen here. `ARRAY_MULT = 0` swaps the array multipliers for `*`, which maps to DSP blocks on an FPGA. The source also names static and dynamic full-adder circuits; that is a transistor-level distinction with no meaning in RTL.
- **MAC accumulation.** The source describes the MAC as multiplier, adder and accumulator, fetching operands from memory. Here the accumulation runs along a chain of registered cells, one tap pair per cell. It gives one full filter output per clock rather than one per L clocks.
- **Phase alignment.** The source's matrix equation puts a one-sample delay on the odd phase. Its worked example, however, pairs x[0] with x[1] (a = 0.7071·(104 + 105)). This design follows the worked example.
- **Resource counts** differ from the source's synthesis report. This design uses 4 multipliers per stage, 8 in total for 2 levels. The source reports 9 for one level and 14 for two.
- **Not built:**
  - the direct-form DWT and the direct-form FIR, which are only comparison baselines;
  - the inverse transform and a 2-D transform, which are mentioned only as future work.

## Testbenches (`tb/`)

Each testbench checks its block against values worked out independently, then prints `TB_RESULT checks=… failures=…`. Each has a watchdog.

| testbench | what it checks |
|---|---|
| `full_adder_tb` | all 8 input combinations |
| `csel_adder_tb` | 34-bit/4-bit-block and 10-bit/3-bit-block adders: carry-chain corner cases, random and swept operands |
| `array_mult_tb` | 16×16 (extreme and random operands) and 5×3 (exhaustive) signed products |
| `mac_cell_tb` | the MAC worked example (16.5, 34.5, 26.875, 25.75 → words 132, 276, 215, 206), then 500 random signed operand sets, for both multiplier styles |
| `mac_network_tb` | 6-tap network (3 cells) with random windows and gaps, bit-exact, latency 3 |
| `dwt_pu_tb` | Haar outputs for the worked example's level-1 pairs against the published reals; random windows bit-exact; tag and latency; saturation |
| `even_odd_split_tb` | the example frame's even/odd split, 4 clocks per frame, back-to-back and gapped frames |
| `dwt_stage1_tb` | Haar and 4-tap Daubechies level 1 against the reference model, with junk on the bus in idle clocks; latency 3 |
| `dwt_buffer_tb` | pending flags and windows against a model under random reads and simultaneous writes; overflow flagged on a forced overwrite |
| `dwt_stage2_tb` | default 2-level Haar (latency 4) and 4-level Daubechies, all levels bit-exact; levels must really interleave; no overflow |
| `dwt_top_tb` | end to end, N = 16, L = 4, 4 levels, 64 random frames. Counts back-to-back frames, gaps, level interleaving and feedback; each must occur. |
| `dwt_top_full_tb` | all defaults. The worked example against the published a1/d1/a2/d2, then a 1000-sample synthetic signal as 125 back-to-back frames: bit-exact, and 500 clocks for 1000 samples. |

`tb/dwt_ref_pkg.sv` holds the integer reference model: the formula above, with the same rounding and saturation.

To simulate with Verilator, for example the full-size test:

```
verilator --binary --timing --assert -Wno-fatal --top-module dwt_top_full_tb \
  -y rtl -y tb +libext+.sv rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/dwt_top_full_tb.sv
./obj_dir/Vdwt_top_full_tb
```

Every simulation runs in well under a second. Building the larger testbenches takes Verilator about a minute, mostly for the bit-level multipliers. Setting `.ARRAY_MULT(1'b0)` on the `dwt_top` instance builds faster and gives the same results.

## Trust and limits

- Every output word of every level is checked bit for bit against an independent integer model:
  - for the default Haar build;
  - for a 4-tap, 4-level build.
- The default build also reproduces the published worked example to within the rounding of 16-bit words with 4 fractional bits.
- Not verified:
  - timing closure on any FPGA;
  - behaviour for `L` > 2 with `LEVELS` large enough to make saturation frequent;
  - stage 2 for filters longer than 4 taps. The scheduling argument above does not depend on L, but stage 2 was simulated only with L = 2 and L = 4; the MAC network alone was also simulated with L = 6.
