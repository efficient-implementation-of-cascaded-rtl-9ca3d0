# Configurable cascaded IIR filter and partition multiplier

This repository holds two pieces of arithmetic hardware that belong together in purpose but not in wiring:

1. **A configurable IIR filter** built from three biquad sections. Each section has a single shared multiplier-accumulator (MAC). A set of multiplexer select lines ties the three sections together. Depending on how they are set, the same hardware computes
   * one 6th-order filter, or
   * one 4th-order filter and one independent 2nd-order filter, or
   * three independent 2nd-order filters in parallel.
2. **A partition multiplier**: a 32 × 32 unsigned multiplier. It cuts both operands into 8-bit segments and multiplies the segments in small component multipliers. It then puts the products together so that no carry ever runs between neighbouring partial products. Carries appear only in a short adder tree.

The two designs are independent: the filter's MAC units use an ordinary signed multiplier. They sit side by side in the top module `iir_partition_top`, each with its own ports.

The design follows the paper *Efficient Implementation of Cascaded IIR Filter Design and a Partition Multiplier*. That paper gives the block structure but leaves out the number format, the cycle-by-cycle schedule and the interface. Those parts are this design's own; the section "What is taken from the paper and what is not" lists each one.

---

## 1. The configurable IIR filter

### 1.1 What it computes

A direct-form IIR filter of order K computes

    y(n) = b0·x(n) + b1·x(n-1) + … + bK·x(n-K) + a1·y(n-1) + … + aK·y(n-K)

Note the sign convention: every term is **added**, including the feedback terms. For K = 6 that is 13 products per output sample. They are split among three sections:

| section | terms in 6th-order mode                          | own coefficients (port)       |
|---------|--------------------------------------------------|-------------------------------|
| F1      | b0·x(n), b1·x(n-1), b2·x(n-2), a1·y(n-1), a2·y(n-2) | `c1 = {b0, b1, b2, a1, a2}`   |
| F2      | b3·x(n-3), b4·x(n-4), a3·y(n-3), a4·y(n-4)       | `c2 = {b02, b3, b4, a3, a4}`  |
| F3      | b5·x(n-5), b6·x(n-6), a5·y(n-5), a6·y(n-6)       | `c3 = {b03, b5, b6, a5, a6}`  |

F2 and F3 each have one coefficient that the 6th-order filter does not use: `b02` and `b03`. That is their b0 when they run as a biquad of their own. The input of that biquad is `z1` for F2 and `z2` for F3.

### 1.2 The two delay lines and their select lines

The filter keeps its past samples in two six-stage delay lines:

* an **input line** holding x(n-1) … x(n-6), with stages s1…s6;
* an **output line** holding y(n-1) … y(n-6), with stages s7…s12.

Each stage is a multiplexer in front of a register (`delay_stage`). The register's output is fed back into one multiplexer input, so one select code means "hold". The operating mode is set only by how the stages at the section boundaries are selected:

| stage | register | inputs (select code)                                    |
|-------|----------|---------------------------------------------------------|
| s1, s2, s4, s6, s8, s10, s12 | | 0 = previous stage (shift), 1 = hold         |
| s3    | x(n-3)   | 0 = `z1` (F2's own input), 1 = x(n-2) (continue), 2 = hold |
| s5    | x(n-5)   | 0 = `z2` (F3's own input), 1 = x(n-4) (continue), 2 = hold |
| s7    | y(n-1)   | 0 = F1 output, 1 = F2 output, 2 = F3 output, 3 = hold   |
| s9    | y(n-3)   | 0 = F2 output, 1 = y(n-2) (continue), 2 = hold          |
| s11   | y(n-5)   | 0 = F3 output, 1 = y(n-4) (continue), 2 = hold          |

Each mode uses these settings on its update cycle:

| mode (`iir_mode_e`) | s3, s9 | s5, s11 | s7 | result on |
|---------------------|--------|---------|----|-----------|
| `MODE_6TH`   (0)    | 1      | 1       | 2 (F3) | `y1` |
| `MODE_4_2`   (1)    | 1      | 0       | 1 (F2) | `y1` (4th order), `y3` (2nd order on `z2`) |
| `MODE_2_2_2` (2)    | 0      | 0       | 0 (F1) | `y1` (on `x`), `y2` (on `z1`), `y3` (on `z2`) |

When registers 3–4 of both lines take `z1` and F2's output instead of continuing, they become the private history of F2's biquad. Registers 5–6 do the same for F3. The outputs `y1`, `y2` and `y3` are simply the registers y(n-1), y(n-3) and y(n-5).

### 1.3 How three sections add up to one filter

This is the least obvious part of the design. Each section's MAC (`biquad_mac`) has two 5-to-1 multiplexers:

* a coefficient multiplexer, `se1`, choosing b0, b1, b2, a1 or a2;
* a sample multiplexer, `se2`, choosing x(n), x(n-1), x(n-2), y(n-1) or y(n-2) from the section's own taps.

The MAC adds one product per clock cycle. To chain sections, the MAC can add a `chain_in` value instead of a product: the full-precision partial sum of the previous section. In the 6th-order mode:

* F1 sums its five terms.
* F2 sums its four terms (its b0 slot is not used) and then adds F1's sum.
* F3 sums its four terms and then adds F2's sum. The result is y(n).

The partial sums pass between sections **unrounded**. The 6th-order output is therefore rounded only once, exactly like a single direct-form filter.

### 1.4 Schedule of one sample (`iir_ctrl`)

A sample is processed in a frame. The frame always has the same structure; the mode decides only when it ends. Cycle numbers count from the first cycle after the sample is accepted.

| cycle | F1            | F2 alone      | F2 chained           | F3 alone      | F3 chained           |
|-------|---------------|---------------|----------------------|---------------|----------------------|
| 0     | b0·x(n), new sum | b02·z1(n), new sum | –                | b03·z2(n), new sum | –                |
| 1     | b1·x(n-1)     | b3·x(n-3)     | b3·x(n-3), new sum   | b5·x(n-5)     | b5·x(n-5), new sum   |
| 2     | b2·x(n-2)     | b4·x(n-4)     | b4·x(n-4)            | b6·x(n-6)     | b6·x(n-6)            |
| 3     | a1·y(n-1)     | a3·y(n-3)     | a3·y(n-3)            | a5·y(n-5)     | a5·y(n-5)            |
| 4     | a2·y(n-2)     | a4·y(n-4)     | a4·y(n-4)            | a6·y(n-6)     | a6·y(n-6)            |
| 5     |               |               | + F1 sum             |               | –                    |
| 6     |               |               |                      |               | + F2 sum             |

After the last compute cycle (4, 5 or 6), one **update cycle** shifts or loads every delay-line stage at once. In every other cycle the stages hold. `out_valid` pulses in the next cycle.

| mode         | compute cycles | accept → `out_valid` | samples per cycle (back to back) |
|--------------|----------------|----------------------|----------------------------------|
| `MODE_2_2_2` | 5              | 7 cycles             | 1/7 (three filters)              |
| `MODE_4_2`   | 6              | 8 cycles             | 1/8 (two filters)                |
| `MODE_6TH`   | 7              | 9 cycles             | 1/9                              |

A new sample can be accepted in the same cycle that `out_valid` is high.

### 1.5 Number format

The default sizes are 4-bit samples (`DATA_W = 4`), the width of the paper's synthesized filter ports. The other defaults are 4-bit coefficients (`COEF_W = 4`) with 2 fraction bits (`FRAC = 2`, range −2.0 … +1.75).

* Samples are signed integers. Coefficients are signed fixed-point values with `FRAC` fraction bits.
* Products and sums are kept at full precision in an `ACC_W = DATA_W + COEF_W + 4`-bit accumulator. That holds 13 products plus margin.
* A section's output is `sum >>> FRAC` (rounding toward −∞), saturated to `DATA_W` bits. This quantised value is what enters the output delay line and appears on `y1`…`y3`.

With 4-bit samples the filter is a demonstration size. For real audio use, set for example `DATA_W = 16, COEF_W = 16, FRAC = 14`. The tests run the filter at 16/16/12 as well as at the defaults.

### 1.6 Interface (`cascaded_iir`, same ports on `iir_partition_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, active-low asynchronous reset (clears all registers) |
| `mode` | in | 2 | `iir_mode_e`, taken with each sample |
| `in_valid` / `in_ready` | in / out | 1 | sample handshake; `in_ready` is high only while idle |
| `x`, `z1`, `z2` | in | `DATA_W` | new inputs; `z1`/`z2` are used only by sections running alone |
| `c1`, `c2`, `c3` | in | 5 × `COEF_W` | coefficients as in 1.1; keep them stable during a frame |
| `out_valid` | out | 1 | one-cycle pulse: `y1`…`y3` hold the new results |
| `y1`, `y2`, `y3` | out | `DATA_W` | registers y(n-1), y(n-3), y(n-5) |

When the mode changes, the delay lines keep whatever the old mode left in them. Assert `rst_n` between modes if the new filters should start from rest. An assertion in `cascaded_iir` flags a sample accepted with the undefined mode code 3.

---

## 2. The partition multiplier (`partition_mult`)

Parameters: `R` is the segment width (default 8) and `S` is the number of segments (default 4). The operands are therefore `N = R·S = 32` bits and the product is `2N = 64` bits. The multiplier is purely combinational.

**Main idea.** Write A = A0 + A1·2^8 + A2·2^16 + A3·2^24. Then look at one segment Bj of B:

* A0·Bj and A2·Bj are 16-bit numbers whose weights are 2^16 apart. They do not overlap, so `{A2·Bj, A0·Bj}` is *exactly* (A0 + A2·2^16)·Bj, with no addition at all.
* The same holds for the odd segments: `{A3·Bj, A1·Bj}` = (A1 + A3·2^16)·Bj.

So the 16 component products (`component_mult`, an 8 × 8 array multiplier) collapse without carries into 2 × 4 32-bit words:

* even group: shifted by 0, 8, 16, 24 bits for B0…B3;
* odd group: shifted by 8, 16, 24, 32 bits.

**Adder tree.** Two binary trees sum each group: the even group gives A_E·B and the odd group A_O·B. A last adder gives A·B. Every adder works only where its operands overlap and passes the low bits of the lower operand straight through:

* first level: 33-bit carry chains;
* second level: 41 bits plus a carry bit that is always 0;
* final adder: 56 bits.

No adder in the design is a 64-bit carry chain. The odd tree is summed without its 8-bit offset; that offset is applied at the final adder.

The component multiplier can be swapped for any other R × R multiplier, for example a Wallace or Dadda tree. This is the trade-off the structure is meant to offer. `S` must be a power of two.

Example, checked in the tests: 44742143 × 179044224 = 8010822273532032. Its component products are A0·B0 = 32640, A2·B0 = 21760 and A0·B1 = 65025.

---

## 3. What is taken from the paper and what is not

Taken from the paper:

* The biquad as one MAC fed by a 5-to-1 coefficient multiplexer and a 5-to-1 sample multiplexer, in the input order b0, b1, b2, a1, a2 / x(n), x(n-1), x(n-2), …
* The three sections and which taps and coefficients each one uses.
* The two six-stage delay lines with two- and three-input stages and a four-input stage at y(n-1).
* The codes of stages s3 and s5 for the three modes.
* The 4-bit sample ports.
* For the multiplier: the segmentation, the even/odd concatenation, the shifts, the pairwise adder tree with its 33- and 41-bit adders, and the test vector.

This design's own choices:

* How a section's sum is passed to the next one: full-precision `chain_in`, added in an extra cycle.
* The term order in time and the frame length: 7/8/9 cycles.
* The valid/ready handshake and the input registers for `x`, `z1` and `z2`.
* The select codes of s7, and s9/s11. The latter mirror s3/s5.
* The coefficient width, fraction bits, accumulator width, truncation and saturation.
* Reset behaviour.
* The array multiplier as component multiplier.
* Generalising the adder tree to any power-of-two `S`.

The paper reports no throughput, latency, area or timing to compare against, so none of those numbers here can be matched to it.

Not built: using the partition multiplier inside the filter's MACs. The paper names that only as a direction for further work.

---

## 4. Files

| file | contents |
|------|----------|
| `rtl/iir_pkg.sv` | mode enum, select codes, control structs |
| `rtl/biquad_mac.sv` | one section's coefficient/sample multiplexers, multiplier, accumulator |
| `rtl/delay_stage.sv` | multiplexer + register stage of the delay lines |
| `rtl/iir_ctrl.sv` | frame sequencer, generates every select line |
| `rtl/cascaded_iir.sv` | the configurable filter |
| `rtl/component_mult.sv` | R × R array multiplier |
| `rtl/partition_mult.sv` | the partition multiplier |
| `rtl/iir_partition_top.sv` | top: filter and multiplier side by side |
| `tb/iir_ref_pkg.sv` | integer reference model of a direct-form IIR filter of order ≤ 6 |
| `tb/*_tb.sv` | one self-checking testbench per module |

## 5. Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog. Example with plain Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/iir_pkg.sv tb/iir_ref_pkg.sv tb/iir_partition_top_tb.sv \
        --top-module iir_partition_top_tb -Mdir obj
    ./obj/Viir_partition_top_tb

Use the same pattern for the others (`component_mult_tb`, `partition_mult_tb`, `delay_stage_tb`, `biquad_mac_tb`, `iir_ctrl_tb`, `cascaded_iir_tb`). Testbenches that do not use the packages can leave them out of the command.

What the tests cover:

* `component_mult_tb`: all 65536 input pairs.
* `partition_mult_tb`: the paper's example including its component products, the A_E·B and A_O·B partial results, corner cases, and 5000 random pairs. It runs at 32 bits as 8 × 4 segments and as 4 × 8 segments.
* `biquad_mac_tb`: a hand-computed biquad sum, restart, the chained addition, and random control sequences.
* `iir_ctrl_tb`: the full select-line sequence and frame length of every mode, that the frame ignores `mode` changes after acceptance, and throughput.
* `cascaded_iir_tb`: at 16-bit samples, 200 random samples per mode against the reference filters, with stable coefficients. It also runs a saturation run and checks frame lengths and throughput.
* `iir_partition_top_tb`: default sizes, all three modes twice, random gaps, stalled and back-to-back input, and the multiplier checked every cycle. It counts each mechanism (every mode, F2 and F3 chaining, stall, back-to-back, saturation) and fails if one never occurred. It runs in well under a second.

## 6. Changing it

* **Wider samples or coefficients:** change `DATA_W`, `COEF_W` and `FRAC` on `iir_partition_top` or `cascaded_iir`. `ACC_W` follows automatically.
* **Different multiplier sizes:** change `R` and `S`. For example, `R = 16, S = 4` or `R = 8, S = 8` gives a 64 × 64 multiplier.
* **Different component multiplier:** replace the body of `component_mult`; its interface is just `a`, `b` → `p`.
* **Different schedule:** change `iir_ctrl` only. The datapath follows whatever select lines it receives.
