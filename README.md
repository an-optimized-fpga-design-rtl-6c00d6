# HEVC inverse quantisation and inverse transform (IQ/IT) in SystemVerilog

An HEVC decoder turns the quantised coefficient levels of every transform
unit (TU) back into a residual block in two steps: it scales each level by a
QP-dependent step (inverse quantisation), then applies a separable 2D
inverse DCT (or, for intra 4x4 luma blocks, an inverse DST). TUs come in four
sizes, 4x4, 8x8, 16x16 and 32x32, and larger sizes cost quadratically more
arithmetic.

This RTL implements both steps for all four sizes in one block, following the
architecture of *"An optimized FPGA design of inverse quantization and
transform for HEVC decoding blocks and validation in an SW/HW environment"*.
Its main ideas:

* **No multipliers in the transform.** Every constant of the HEVC transform
  matrices is built from seven shift-and-add multiples (2, 4, 9, 18, 36, 64,
  90 times the input) plus one or two further additions.
* **One 1D transform for all sizes.** By even-odd decomposition the 4-point
  IDCT is the even half of the 8-point one, which is the even half of the
  16-point one, which is the even half of the 32-point one. One datapath does
  all four sizes. The 4x4 inverse DST has a small datapath of its own, and a
  multiplexer selects it in place of the 4-point core.
* **Columns, then rows, through the same unit.** The column results are
  parked in a transpose memory built from 32 FIFOs of 128-bit words. The row
  pass then reads them back across the FIFOs.
* **Quantiser and transform overlap.** Column c+1 is de-quantised while
  column c is being transformed.

The whole design is wrapped as a stream coprocessor with AXI4-Stream ports,
ready to sit behind a DMA engine next to an application processor.

## Block structure

```
iqit_axis                 stream coprocessor (top)
 └─ iqit                  IQ/IT component and its control
     ├─ inverse_quant     four dequant_unit + IQ control unit
     │   └─ dequant_unit ×4
     │       └─ iq_rom    IQstep and QP/6 ROMs
     ├─ column_buffer     assembles a column from groups of four
     └─ idct2d            2D transform + its control unit
         ├─ idct1d        shared 1D IDCT 4/8/16/32 and IDST 4
         │   ├─ xcoeff ×32      most frequent constant multiples
         │   ├─ coeff_refine ×32 all remaining multiples
         │   └─ idst4           4-point inverse DST
         └─ transpose_mem 32 × transpose_fifo (4 × 128 bit each)
```

`iqit_pkg` holds the shared types (`coef_t`, `tu_size_e`, `xbase_t`), the
widths, and the constant functions that produce the transform matrices.

## Conventions

| item | value |
|---|---|
| TU size code `sel` | 0: 4x4, 1: 8x8, 2: 16x16, 3: 32x32 |
| levels, coefficients, residuals | signed 16 bit |
| QP | 0..51 (52..63 read as 51) |
| bit depth B | parameter `BIT_DEPTH`, default 8 |
| level order | column by column; four consecutive rows of one column per group |
| reset | `rst_n`, asynchronous, active low |

## Inverse quantisation

Each `dequant_unit` computes the flat-scaling HEVC formula

```
coeff = clip16( ((level * IQstep[QP%6]) << (QP/6)) + (1 << (M-2+B-8)) ) >> (M-1+B-8) )
IQstep = {40, 45, 51, 57, 64, 72},  M = log2(N)
```

Two small ROMs (`iq_rom`), addressed by QP, hold IQstep and QP/6, so no
divider or modulo is needed. The unit has two register stages: ROM read,
then multiply/shift/round. `inverse_quant` runs four units side by side. Its
control unit takes one group of four levels at most every second cycle. With
a free consumer that is exactly one group every two cycles, so a column of N
levels takes N/2 cycles.

The quantiser's output is a strobe (`done_iq`) without back-pressure.
Whoever consumes it grants each issue in advance through `issue_ok`.

## The 1D transform unit (`idct1d`)

### Constant multiplication

For every input lane, `xcoeff` forms

```
X2 = x<<1   X4 = x<<2   X9 = (x<<3)+x   X18 = (x<<4)+X2
X36 = X4+(x<<5)   X64 = x<<6   X90 = X64+X18+(x<<3)
```

`coeff_refine` then derives every other constant with one or two adds, for
example X89 = X90−x, X83 = X64+X18+x, X57 = X64−X9+X2 and X43 = X36+X9−X2.
The products are indexed by angle:
`prod[t] = x·C[t]`, where C[t] is HEVC's integer value of
64·√2·cos(tπ/64). Each matrix entry of the N-point transform is ±C[t] for a
t fixed at elaboration time (`iqit_pkg::t32_index/t32_sign`). Selecting a
product is therefore only wiring, and synthesis drops the products a lane
never uses.

### Even-odd datapath and routing

The 32 input lanes are routed by size to four groups:

| group | lanes | used for | constants |
|---|---|---|---|
| odd part of 32 | x[1,3,..,31] | N = 32 | 90 … 4 (odd t) |
| odd part of 16 | odd inputs of the 16-point core | N ≥ 16 | 90, 87, … 9 |
| odd part of 8 | odd inputs of the 8-point core | N ≥ 8 | 89, 75, 50, 18 |
| 4-point core | even-even inputs | all | 64, 83, 36 |

With N = 32 the 16-point core takes x[0,2,…]; with N = 16 it takes
x[0..15] directly, and the same holds for the smaller cores. The
outputs recombine with butterflies `y[k] = E[k] + O[k]` and
`y[N-1-k] = E[k] − O[k]`.

The inverse DST (`idst4`) works on the same four inputs as the 4-point core.
It uses the factored equations of the HEVC reference decoder:

```
c0 = x0+x2   c1 = x2+x3   c2 = x0−x3   c3 = 74·x1
y0 = 29·c0 + 55·c1 + c3        y1 = 55·c2 − 29·c1 + c3
y2 = 74·(x0 − x2 + x3)         y3 = 55·c0 + 29·c2 − c3
```

Each constant is a shift-add form, for example 29v = (v<<5) − (v<<1) − v.
Its sums are registered next to the products, and the multiplexer in
cycle 3 picks them in place of the 4-point IDCT sums.

### Pipeline and latency

| cycle | work |
|---|---|
| 1 | input routing registered |
| 2 | signed constant products (and IDST sums) registered |
| 3 | 4-point sums, odd sums, 8-point butterfly; N ≤ 8 result rounded → **out after 3 cycles** |
| 4 | 16-point butterfly |
| 5 | 32-point butterfly, rounding → **N ≥ 16 out after 5 cycles** |

Rounding is `(v + 2^(s−1)) >> s` with a 16-bit clip. The shift s is 7 after
the column pass and 20 − B after the row pass, as in HEVC. Inputs of the
same size may enter every cycle, but the 2D control issues one vector at a
time (see below).

## 2D transform and transpose memory (`idct2d`, `transpose_mem`)

The control unit runs the single 1D unit sequentially. It issues column 0,
waits for the result, and issues the next column in the cycle the previous
result leaves the unit. Each column result goes to its own FIFO (column c →
FIFO c) as 128-bit words of eight coefficients:

| N | words per column | write cycles | FIFOs used |
|---|---|---|---|
| 4 | 1 (half filled) | 1 | 4 |
| 8 | 1 | 1 | 8 |
| 16 | 2 | 2 | 16 |
| 32 | 4 | 4 | 32 |

The first word is written in the cycle the result appears, and the others
during the next column's computation. The row pass starts one cycle after
the last word is written. Row r is element r mod 8 of the head word of every
FIFO 0..N−1. The FIFOs have first-word fall-through, so the head is always
readable, and all heads are popped together after every eighth row (after
the fourth for N = 4). 32 FIFOs × 4 words × 128 bits make 16 Kbit.

Cycles from `start_idct` to `done_idct` inclusive, with columns supplied
without wait:

| TU | this RTL | published figure |
|---|---|---|
| 4x4 | 28 | 28 |
| 8x8 | 52 | 54 |
| 16x16 | 165 | 165 |
| 32x32 | 327 | 327 |

## IQ/IT pipelining (`iqit`, `column_buffer`)

This part is the hardest to follow. The quantiser produces four
coefficients per two cycles. The 1D unit wants a whole column at once and is
busy for 3 or 5 cycles per vector. `column_buffer` sits between them with
two registers:

* **F (fill)** collects the N/4 groups of the column now being de-quantised.
* **H (hold)** keeps a complete column until `idct2d` takes it
  (valid/ready).

When the last group of a column arrives, F moves to H in the same cycle,
and F starts on the next column. Because the quantiser's results cannot be
refused, a group is issued only if it is sure to find room when it arrives
two cycles later. Let pend be the number of groups in F plus those in
flight, and G = N/4. A new group is safe if it does not complete a column,
i.e. (pend+1) mod G ≠ 0. It is also safe if it completes the only pending
column (pend+1 = G) while H is empty now: nothing else can fill H before
the group arrives. An assertion in `column_buffer` checks that H is never
overwritten.

For N ≥ 16 the column pass runs at the quantiser's rate (N/2 cycles per
column, against the 1D unit's 5). For N ≤ 8 it runs at the 1D unit's rate.
The row pass follows. Cycles from `start` to `done` inclusive:

| TU | this RTL | published figure |
|---|---|---|
| 4x4 | 34 | 34 |
| 8x8 | 64 | 63 |
| 16x16 | 219 | 218 |
| 32x32 | 685 | 684 |

The first column reaches the 1D unit 4, 6, 10 and 18 cycles after `start`
for 4x4, 8x8, 16x16 and 32x32. The published timing gives 6 cycles for 8x8,
12 for 16x16 and 24 for 32x32. Here the column is issued as soon as its last
group of four is de-quantised. `tb_iqit` checks these values.

`iqit` handles one TU at a time: `start` is accepted when `busy` is low. The
residual rows come out on `row_out` with `row_valid` and `row_idx`, one row
per strobe, at most one every three cycles, with no back-pressure.

## Stream coprocessor (`iqit_axis`)

The input stream carries 64-bit beats. Each TU is one header beat followed
by N·N/4 level beats:

```
header: [5:0] QP   [7:6] size code   [8] inverse DST (4x4 only)
levels: four signed 16-bit levels, level i in bits 16i+15:16i,
        column by column (beat b = rows 4(b mod N/4)..+3 of column b/(N/4))
```

`s_axis_tlast` is not interpreted, because the header fixes the length. The
output stream sends the residual block row by row, N/4 beats per row with
column 0 in the low bits, and `m_axis_tlast` on the TU's last beat.

The core cannot be stalled, so rows enter a 32-row FIFO (512 bits each) that
`m_axis` drains. A header is accepted only when the core is idle and the FIFO
has room for all N rows of the new TU. A slow sink therefore holds back the
input stream, and data is never lost. The header layout, the beat packing
and this FIFO belong to this RTL; the published design states only that the
block is attached through AXI4-Stream and a DMA engine.

## Throughput

At one TU at a time, the worst case is a picture made only of 4x4 TUs
(34 cycles per 16 pixels). A 1920x1080 luma frame then takes 129,600 × 34 =
4.41 M cycles. That gives 33 frames/s at 146 MHz and 25 frames/s at 110 MHz,
the rates published for the FPGA and the 180 nm standard-cell
implementations. 32x32 TUs need only 0.67 cycles per pixel. A stream run of
100 TUs of 4x4 to 16x16 at QP 22/27/32/37 takes 9,992 cycles, so the 16x16
TUs dominate.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
(`tb/iqit_ref_pkg.sv`) works from the definitions only: it applies the
quantisation formula and then full N×N matrix products. The matrix takes its
signs from a floating-point cosine and its magnitudes from HEVC's constant
list, and it is checked against literal rows of the HEVC matrices.

| testbench | covers |
|---|---|
| tb_iq_rom | all 64 QP addresses, read latency |
| tb_xcoeff, tb_coeff_refine | every product against `x*c`, corner and random inputs |
| tb_idst4 | DST sums against the written-out DST matrix |
| tb_dequant_unit | random level/QP/size at full rate, 2-cycle latency |
| tb_inverse_quant | TUs of every size, order, 2-cycle rate, `issue_ok` hold |
| tb_idct1d | all transforms, both shifts, 3/5-cycle latency, same-size bursts |
| tb_transpose_fifo, tb_transpose_mem | queue model; write columns, read rows, for every size |
| tb_idct2d | random blocks of every size and IDST, cycle counts, input stalls |
| tb_iqit | IQ/IT of every size and IDST, cycle counts, input gaps, quantiser hold |
| tb_iqit_axis | end to end at default parameters: 24 TUs, random gaps and back-pressure, slow sink filling the row FIFO; counts each mechanism |
| tb_validation_100tu | 100 TUs 4x4..16x16 at QP 22/27/32/37 through the stream interface |

To run one, for example the end-to-end test, with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/iqit_pkg.sv \
          tb/tb_iqit_axis.sv --top-module tb_iqit_axis -Mdir obj -o sim
./obj/sim
```

All testbenches finish in well under a second of simulation time.

## Departures and limits

* The quantiser uses flat scaling (HEVC's default scaling factor 16).
  Scaling lists, transform skip and transquant bypass are not implemented.
* The 16-bit clip after de-quantisation and between the passes is HEVC's
  rule. The published description does not state it.
* Cycle counts differ from the published ones by one cycle for 8x8, 16x16
  and 32x32 IQ/IT, and by two cycles for the 8x8 2D transform. The overlap
  details of the published controller are not known.
* The published design groups the refinement adders into four blocks
  (R0–R3), but it does not say how. Here one `coeff_refine` per lane forms
  every refined product, and synthesis removes the unused ones.
* Only `BIT_DEPTH = 8` is simulated. The shifts follow B for other depths,
  but the 16-bit datapath was not checked at higher depths.
* TUs do not overlap: a new TU starts after the previous one's last row.
* The processor, DMA engine and external memory of the complete system are
  not part of the RTL.
