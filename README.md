# 8×8 forward 2-D integer cosine transform processor, ICT(10,9,6,2,3,1)

This is a streaming processor that computes the forward 2-D integer cosine
transform (ICT) of 8×8 image blocks. It takes one sample per clock and gives
one coefficient per clock, with blocks following each other without gaps.
The ICT replaces the real cosine basis of the DCT with the integer kernel
ICT(10,9,6,2,3,1). Every product in the transform is then a sum of shifted
operands, so the datapath has only adders and subtractors. The only rounding
is a final, optional normalisation step, where each coefficient is multiplied
by a constant.

The design follows a published parallel-pipeline architecture:

- two identical 1-D transform processors (rows, then columns);
- a flip-flop transpose buffer between them;
- an output multiplier that can be switched in or out.

All adders run at half the sample rate and are busy in every one of their
cycles. The block diagram, unit counts and word lengths come from that
architecture. The cycle-level schedule, the control handshake and a few
widths are this implementation's own; they are listed under "Departures and
own choices" below.

## The transform

For an 8-sample vector x the un-normalised 1-D transform is Y = J·x, where J
is the 8×8 integer matrix (rows k = 0..7, natural order):

```
 1   1   1   1   1   1   1   1
10   9   6   2  -2  -6  -9 -10
 3   1  -1  -3  -3  -1   1   3
 9  -2 -10  -6   6  10   2  -9
 1  -1  -1   1   1  -1  -1   1
 6 -10   2   9  -9  -2  10  -6
 1  -3   3  -1  -1   3  -3   1
 2  -6   9 -10  10  -9   6  -2
```

The rows are orthogonal but have different norms: √8 (rows 0 and 4), √40
(rows 2 and 6) and √442 (odd rows). The orthonormal transform is
X = K·J·x·Jᵗ·K with K = diag(1/norm). In 2-D this is an element-by-element
product X(u,v) = K_H(u,v)·Y(u,v), where K_H(u,v) = k(u)·k(v). K_H takes only
six distinct values: 1/8, 1/40, 1/442, 1/(8√5), 1/(4√221) and 1/(4√1105).

The 1-D kernel is split in the usual even/odd way:

- **Butterflies:** a_n = x_n + x_(7−n) and a_(n+4) = x_n − x_(7−n), for
  n = 0..3.
- **Even half:** Y0, Y4, Y2, Y6 come from a0..a3. With b0 = a0+a3, b1 = a1+a2,
  b3 = a0−a3 and b2 = a1−a2:
  - Y0 = b0+b1
  - Y4 = b0−b1
  - Y2 = 3b3+b2
  - Y6 = b3−3b2
- **Odd half:** Y1, Y3, Y5, Y7 come from a4..a7 through the 4×4 matrix
  [10 9 6 2; 9 −2 −10 −6; 6 −10 2 9; 2 −6 9 −10]. The implementation splits
  this matrix into two input pairs, A = (a4, a7) and B = (a6, a5). Each pair
  (x, y) only ever appears in four linear forms:

  | form | value     | stage 1 (one add each)   | stage 2 (one add each) |
  |------|-----------|--------------------------|------------------------|
  | F1   | 10x + 2y  | s = x + y                | 8x + 2s                |
  | F2   | 2x − 10y  | t = x − y                | 2t − 8y                |
  | F3   | 9x − 6y   | u = x + 2y               | 8t + u                 |
  | F4   | 6x + 9y   | v = 2x − y               | 8s − v                 |

  The outputs are then Y1 = F1A + F4B, Y3 = F3A − F1B, Y5 = F4A + F2B and
  Y7 = F2A + F3B. Every weight is ×1, ×2 or ×8, so each step is a single
  addition or subtraction of wired shifts.

## The 1-D processor and its half-rate schedule

This is the part that takes the most care to follow.

`ict_j1d` receives samples x0..x7 of a row in natural order, one per clock.
It returns Y0..Y7 in natural order, one per clock, 28 clocks later (x0 to
Y0). A 3-bit sample counter gives the row phase p = 0..7. Time is grouped
into two-clock *slots*, four per row. Each slot has a *class* p[2:1] = 0..3.
Every arithmetic element (`ict_ae`) is a two-stage pipelined adder/subtractor,
split at the middle bit, and both stages are enabled only in the second clock
of a slot (p[0] = 1). This clock enable plays the role of the half-rate clock:

- an operation presented in slot g has its result on the element's output
  during slot g+2;
- a new operation can start in every slot.

Each element does exactly four operations per row, one in each slot class.
The table shows, for row r, which operation each element starts in which
slot. Slots are numbered 4r+0..4r+3 for the slots in which row r's samples
arrive. The operations of one element repeat every four slots, so its four
slot classes hold operations of different rows.

| element | operation (slot started)                                                          | kind     |
|---------|-----------------------------------------------------------------------------------|----------|
| AE1     | a3 (4r+2), a2 (4r+3), a1 (4r+4), a0 (4r+5)                                        | add      |
| AE2     | a7, a6, a5, a4 in the same slots                                                  | subtract |
| AE3     | b1 (4r+6), b0 (4r+7), Y0 (4r+9), Y2 (4r+12)                                       | add      |
| AE4     | b2 (4r+6), b3 (4r+7), Y4 (4r+9), Y6 (4r+12)                                       | subtract |
| ×3      | 3·b2 (4r+8), 3·b3 (4r+9), as b + 2b                                               | add      |
| AE5     | pair A: s (4r+7), u (4r+8), F1 (4r+9), F3 (4r+10)                                 | add      |
| AE6     | pair A: t, v, F2, F4 in the same slots                                            | subtract |
| AE7     | pair B: s (4r+6), u (4r+7), F1 (4r+8), F3 (4r+9)                                  | add      |
| AE8     | pair B: t, v, F2, F4 in the same slots                                            | subtract |
| AE9     | Y1 (4r+11), Y3 (4r+12, subtract), Y5 (4r+13), Y7 (4r+14)                          | add/sub  |

The input processor holds the samples in an 11-word shift register. Eleven
words is exactly what lets a0 = x0 + x7 be formed in the slot after the next
row's x1 has arrived. Operands that are needed after they leave an element's
output sit in short shift registers (SRA1, 4 words; SRA2, 5 words) or in
single holding registers.

The coefficients leave the elements in a scattered order. The **output
mixer** (`ict_out_mixer`) is a 9-word shift register that moves one word
towards the output every clock. In the clock where a coefficient is valid,
the mixer loads it into the word whose distance from the output makes it
leave at its natural position. For example, Y0 is loaded into word 4 in
phase 7, and Y2 into word 0
in phase 5, so that it appears on the output in the very next clock. Nine words is the
least this schedule allows.

`in_sync` marks x0 of a row and resets the sample counter. One pulse is enough
for any number of back-to-back rows. A pulse that moves the phase corrupts the
rows still in the pipeline, so it must come at least 36 clocks after the last
row began. The intermediate width OW must be at least IW + 6, because the
largest row gain of J is 54 < 64.

## Transpose buffer

`ict_transpose` has eight shift registers of eight 16-bit words. In any clock
exactly one of them shifts: its write enable W_j is one-hot. The word at the
head of that register is read and the incoming word enters at its tail, so
one shift serves both the read and the write. The index of the register
that shifts also drives the read select R. The three bits of R steer a
three-level pipelined 8:1 multiplexer, one bit per level.

Two enable patterns alternate from one 64-clock block to the next. Bit 6 of
a 7-bit counter chooses the pattern:

- mode 0: in clock n of a block, register n mod 8 shifts;
- mode 1: in clock n of a block, register n div 8 shifts.

A block written in mode 1 leaves register k holding row k. In mode 0, the
next block then reads these rows one word per register in turn, which
produces the columns. At the same time it writes the new block into the
registers column by column, ready to be read row-register by row-register
in mode 1. Element (r, c) of a block that starts entering in clock T enters
in clock T + 8r + c and leaves in clock T + 67 + 8c + r. The 67 is one block
of 64 clocks plus the three multiplexer stages, and it is the latency from
the first word in to the first word out.

## Normalisation

`ict_normalizer` multiplies each un-normalised coefficient (23 bits) by its
K_H entry.

- **Quantisation.** Each K_H entry is quantised to 18 fraction bits, C =
  round(K_H·2¹⁸), and stored as a 13-bit mantissa and a left shift of 0..3.
  1/8 is 4096 << 3, 1/(8√5) is 7327 << 1, and the other four values fit in
  13 bits. This makes the multiplier 23 × 13.
- **Pipeline.**
  - One register stage for the operands.
  - Thirteen shift-and-add stages, one per mantissa bit.
  - One stage that applies the shift and rounds to the nearest integer,
    with halves away from zero.
  - One stage that saturates to 12 bits, [−2048, 2047].
- **Why halves go away from zero.** Two entries, 1/8 and 1/40, often produce
  exact halves. Rounding halves upward gave a visible bias there against a
  symmetric reference, with peak mean error 0.066 against a limit of 0.015.
- **Coefficient choice.** A 6-bit position counter, re-aligned by `in_sync`
  at X(0,0), picks the entry. K_H is symmetric, so the column-major order of
  the 2-D output needs no special handling.

Measured accuracy: `tb_ict_accuracy` runs 10,000 random blocks per range in
the style of IEEE 1180-1990. Every range meets the limits, and the peak
error is 1 everywhere:

| input range       | PMSE (< 0.06) | OMSE (< 0.02) | PME (< 0.015) | OME (< 0.0015) |
|-------------------|---------------|---------------|---------------|----------------|
| [−5, 5]           | 0.0031        | 0.0007        | 0.0014        | 0.00003        |
| [−256, 255]       | 0.034         | 0.0153        | 0.0037        | 0.00005        |
| [−300, 300]       | 0.038         | 0.0177        | 0.0036        | 0.00018        |

These figures are close to those reported for the original chip
(PMSE 0.029–0.038, OMSE 0.002–0.019).

## Top level: `ict2d_top`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | sample clock |
| `rst`       | in  | 1     | synchronous, active high; also fixes the block grid |
| `in_valid`  | in  | 1     | marks real data; may change only at block boundaries (checked by an assertion) |
| `in_data`   | in  | 10    | two's complement samples, rows of a block in natural order |
| `norm_en`   | in  | 1     | 1: normalised 12-bit output (sign-extended); 0: raw 23-bit Y |
| `out_valid` | out | 1     | coefficient on `out_data` is valid |
| `out_first` | out | 1     | coefficient is X(0,0) of a block |
| `out_norm`  | out | 1     | format of `out_data` (a copy of `norm_en`) |
| `out_data`  | out | 23    | coefficients column by column: X(0,0), X(1,0), …, X(7,0), X(0,1), … (u = vertical, v = horizontal frequency) |

Block timing:

- The first clock after `rst` falls carries x(0,0) of a block, and so does
  every 64th clock after it.
- If x(0,0) enters in clock T, X(0,0) leaves in clock T + 123
  (28 + 67 + 28) when output is un-normalised, or T + 139 when it is
  normalised.
- The remaining 63 coefficients follow, one per clock.

Change `norm_en` only while no block is in flight: the two formats have
different latencies.

Word lengths along the pipeline:

- 10-bit input;
- 16-bit words between the stages, since |Y| ≤ 54·512 < 2¹⁵;
- 23-bit un-normalised 2-D coefficients;
- 12-bit normalised coefficients.

## Departures and own choices

- **Latency.** The original chip needs 214 clocks per 2-D transform without
  normalisation and 260 with it. This design needs 123/139 clocks to the
  first coefficient and 186/202 to the last. It is not known how the
  original figure is split between the stages; only the transpose buffer's
  67 clocks is the same here.
- **Schedule.** The slot schedule of the 1-D processor, the odd-half
  decomposition (the F1..F4 table above) and the output mixer are this
  design's own. They keep the published unit counts (AE1..AE9 plus a ×3
  unit) and the rule that every element is busy in every slot.
- **One mixer.** The original gives the even processor its own small
  output mixer for Y0, Y2, Y4, Y6 and then merges the two halves. Here one
  9-word mixer takes the outputs of AE3, AE4 and AE9 directly.
- **Clocking.** The half-rate clock is a clock enable, so the design has one
  clock domain. The original's S1/S2 multiplexer selects correspond to bits
  of the sample counter.
- **Transpose buffer.** The two alternating access modes are one consistent
  way for serial shift registers to transpose on the fly.
  The 7-bit counter that drives W_j and R_k is a plain registered counter
  with combinational decode. The original pipelines this logic finely and
  buffers the fan-out of W_j and R_k; here that is left to synthesis.
- **Own signals.** The input width (10 bits), the reset, the block grid fixed
  by reset, the valid and first flags, the output format mux, the
  saturation and the normaliser's depth (16 stages) are all this design's
  own choices.
- **Not modelled.** Pads and package are not modelled; the top's ports stand
  in for them.

## Files

| file | contents |
|------|----------|
| `rtl/ict_pkg.sv` | widths, K_H coefficient table and its class function |
| `rtl/ict_ae.sv` | two-stage pipelined adder/subtractor (every AE) |
| `rtl/ict_input_proc.sv` | butterflies, 11-word input register, AE1/AE2 |
| `rtl/ict_j4e_proc.sv` | even half: AE3, AE4, ×3 unit |
| `rtl/ict_j4o_proc.sv` | odd half: AE5..AE9 |
| `rtl/ict_out_mixer.sv` | natural-order output serialiser |
| `rtl/ict_j1d.sv` | 1-D processor (the four blocks above plus the counter) |
| `rtl/ict_transpose.sv` | transpose buffer |
| `rtl/ict_normalizer.sv` | K_H multiplier with rounding and saturation |
| `rtl/ict_delay.sv` | flag delay line |
| `rtl/ict2d_top.sv` | top level |
| `tb/ict_tb_pkg.sv` | reference models: J as a plain matrix, exact 2-D transform, K_H in floating point |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ict_accuracy` |

Each testbench prints `TB_RESULT checks=N failures=M` and stops. The
block testbenches compare against models written independently of the RTL,
such as the plain matrix product, and also check the cycle in which every
result appears. `tb_ict2d_top` runs the whole processor at its default sizes.
It sends blocks in both buffer modes, idle blocks, both output formats and
saturating inputs, and it counts each of these cases.

## Simulating

With Verilator 5 (any testbench; replace the top module name):

```
verilator --binary --timing -Wno-fatal --top-module tb_ict2d_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/ict_pkg.sv tb/ict_tb_pkg.sv tb/tb_ict2d_top.sv
./obj_dir/Vtb_ict2d_top
```

`tb_ict_accuracy` takes a few seconds; all other testbenches take well
under a second. To change a width, override `IW`/`OW` on `ict_j1d`, `W` on
`ict_transpose` or `YW` on `ict_normalizer`. Keep OW ≥ IW + 6 in each 1-D
processor.
