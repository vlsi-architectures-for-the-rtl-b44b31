# Steerable DCT (SDCT) accelerator in SystemVerilog

The steerable DCT is a directional block transform for video and image coding.
A plain 2D DCT analyses a residual block with horizontal and vertical basis
functions. The SDCT rotates those basis functions by an angle θ that fits the
direction of the block's content, so the energy ends up in fewer coefficients.
The transform is not separable, but it factors into two parts:

    SDCT(x) = R(θ) · DCT2D(x)

First comes the ordinary separable 2D DCT. Then each pair of coefficients that
mirror each other across the main diagonal, (u,v) and (v,u) with u ≠ v, is
rotated by the same angle θ. Diagonal coefficients (u,u) are left alone. θ = 0
gives the plain DCT. One of eight angles is chosen per block.

This RTL implements that factorisation for HEVC block sizes 4×4, 8×8, 16×16 and
32×32. An integer HEVC DCT is followed by a steering unit that rotates
coefficient pairs with lifting steps. A dual-clock FIFO sits between the two
parts so the steering unit can run on a faster clock. At its default size
(`N_MAX = 32`) the DCT handles 16 samples per clock cycle on 32×32 blocks. At
about 188 MHz that is the ≈3 Gsample/s needed for 7680×4320 video at 60 fps in
4:2:0.

## Block chain

```
             clk domain                  |              clk_st domain
 data_in ──► CU-1 ─► 2D-DCT (folded) ──► FIFO ──► CU-2 ─► CU-3 ─► steerable ──► data_out
 (rows)         done_1 ───────(last bit of the FIFO word)──► done_2      IM ► lifting×LANES ► OM
                                                                          (columns)  done_3 = done
```

| module | role |
|---|---|
| `sdct_top` | wires the chain; two clocks `clk` (DCT) and `clk_st` (steering) |
| `sdct_cu1` | CU-1: DCT controller (IDLE → ROW → COL) |
| `sdct_dct2d` | folded 2D-DCT datapath with a transposition memory |
| `sdct_dct1d` | reconfigurable 4/8/16/32-point HEVC 1D DCT (recursive) |
| `sdct_async_fifo` | dual-clock FIFO, Gray-coded pointers |
| `sdct_cu2` | CU-2: hands FIFO words to the steering unit and turns the *last* bit into `done_2` |
| `sdct_cu3` | CU-3: all address and strobe sequencing of the steering unit |
| `sdct_steerable` | input memory (IM), `LANES` lifting rotators with bypass multiplexers, output memory (OM), constant ROM |
| `sdct_im`, `sdct_om` | the two block memories, with zig-zag reordering |
| `sdct_lifting` | one pair rotator (three lifting steps) |
| `sdct_rom` | lifting constants for the eight angles |
| `sdct_pkg` | shared types, the HEVC coefficient function, the zig-zag schedule generator |

## The steering unit

This is the part that is new compared with an ordinary DCT core, and the part
that takes most explaining.

### What has to be computed

After the DCT, a block of N×N coefficients Y has N(N−1)/2 off-diagonal pairs.
For each pair with r > c:

    (Y'[r][c], Y'[c][r]) = R(θ) · (Y[r][c], Y[c][r]),   R(θ) = [ cos θ  sin θ ; −sin θ  cos θ ]

and Y'[u][u] = Y[u][u]. The element below the diagonal is the rotator's `x1` and
its mirror is `x2`. That choice fixes the sign convention of θ.

### Lifting rotation

A rotation normally takes four multipliers. Instead it is written as three
shears, so each pair needs three multiplications by constants:

    a  = x1 + (P·x2 >> 8)
    y2 = x2 + (U·a  >> 8)            P = (1 − cos θ)/sin θ,  U = −sin θ
    y1 = a  + (P·y2 >> 8)

P and U are Q8 constants. Each product is formed by shift-and-add over the bits
of the constant. `>>` is an arithmetic shift (floor), and results saturate to 16
bits. The eight angles are θ_i = i·π/16, i = 0…7; angle 0 is no rotation.

| i | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| P (Q8) | 0 | 25 | 51 | 78 | 106 | 137 | 171 | 210 |
| −U (Q8) | 0 | 50 | 98 | 142 | 181 | 213 | 237 | 251 |

With Q8 constants, an output differs from the exact rotation by up to about
|x|/128 + 4 LSB.

### Pair schedule (custom zig-zag)

The DCT delivers a block column by column, but the rotators need mirrored pairs.
The IM holds the whole block and reads it back in a fixed *slot* order:

* slots 0 … N(N−1)/2 − 1 are the off-diagonal pairs (r,c)/(c,r), r > c. They are
  visited one anti-diagonal at a time (r + c = 1, 2, …, 2N−3), and the direction
  of travel alternates between neighbouring anti-diagonals. This is a zig-zag
  confined to the lower triangle;
* the last N/2 slots each carry two diagonal elements, (2j,2j) and (2j+1,2j+1).
  These slots pass through the bypass multiplexer unrotated.

That makes N²/2 slots. With N/2 rotators working in parallel, one block is
exactly N read steps. Step s, lane l handles slot s·N/2 + l, and only the last
step holds diagonal elements. In general the unit has `LANES` rotators, and an
N×N block uses L = min(LANES, N/2) of them. It then takes S = N²/(2L) steps,
step s lane l handles slot s·L + l, and the last N/(2L) steps are diagonal. The schedule is built at elaboration by
`sdct_pkg::zz_table()`, one table per size. The IM looks it up to gather pairs;
the OM looks it up to scatter the results back to their positions. Both the
input and the output of the unit are in natural column order. The schedule only
decides the order in which pairs are processed, not the result.

### Timing

CU-3 runs three overlapping counters:

1. **load**: columns from the FIFO are written into the IM (`w_r_n1 = 1`,
   `add_w1` = column). `done_2` marks the last one.
2. **rotate**: once the IM is full and the OM is free, `add_r1` steps through
   0…S−1 on consecutive cycles (S = N with the default `LANES`). Each step goes through four registers: the IM
   read register, two lifting registers, and the OM write. `w_r_n2`, `add_w2`
   and `mux_sel` come out of a 3-stage delay line, lined up with their data.
   The bypass multiplexers are selected for angle 0 and for the diagonal steps.
3. **output**: after the last OM write, `rd_en` reads columns 0…N−1. The OM's
   output register delivers them with `data_out_valid`, and the last one comes
   with `done`.

If columns arrive back to back, the first output column appears **2N + 4**
cycles after the first input column: N cycles to load, N to reorder and rotate,
and 4 pipeline cycles. That is 68 cycles for 32×32. The next block is loaded
into the IM while the OM is read out, but its rotation waits until the OM is
empty. A block therefore occupies the steering unit for 2N + 3 `clk_st` cycles,
against 2N `clk` cycles in the DCT. That is why the steering clock has to be
somewhat faster than the DCT clock: at least 67/64 × `clk` for a continuous
stream of 32×32 blocks. If it is slower, the FIFO fills and CU-1 stalls the
DCT's column pass. No data is lost.

### Steering clock regimes

A faster steering clock can trade rotators for time. `LANES` = 8, 4 or 2 with
`clk_st` at 2, 4 or 8 times `clk` gives the 2x, 4x and 8x regimes. The IM read
ports, the OM write ports and the number of lifting units shrink by the same
factor. A block costs S + 3 + N `clk_st` cycles. For a 32×32 block that is 99,
163 or 291 cycles, i.e. 49.5, 40.8 or 36.4 `clk` cycles, all within the DCT's
64. The latency from the last IM write to the first output is S + 5: 69, 133
or 261 `clk_st` cycles. The block memories still take and give whole 32-entry
columns, and the FIFO is unchanged.

## The folded 2D DCT

`sdct_dct2d` computes Y = C·X·Cᵀ with a single N-point 1D DCT, used twice:

* **row pass** (N cycles): one residual row per cycle goes through the 1D DCT.
  The result is rounded, shifted right by log2N − 1, saturated to 16 bits, and
  written into row r of a 32×32 transposition memory;
* **column pass** (N cycles): column v of that memory goes through the same 1D
  DCT and is rounded and shifted by log2N + 6. The output is column v of Y.

These are the shifts of the HEVC forward transform for 8-bit video. The 1D DCT
(`sdct_dct1d`) uses the standard even/odd recursion. A 32-point unit consists of
an input butterfly, a 16-point unit for the even outputs, and constant
multipliers for the odd outputs; the 16-point unit is built the same way, down
to a 4-point core. For smaller sizes the outer butterflies are bypassed. The
coefficients are the HEVC integer matrix. Entry (k,n) of the 32-point matrix is
64 for k = 0. Otherwise it is ±T[i], where m = k(2n+1) mod 128, i is m folded
into 0…32, and T = 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13, 9, 4, 0 for i = 1…32.
The sign is that of cos(mπ/64). The N-point matrix is rows k·32/N of the
32-point one.

A block occupies the DCT for 2N cycles: N² samples, i.e. N/2 samples per cycle.
That is 16 samples per cycle for 32×32 blocks. During the column pass
`data_in_ready` is low.

## Clocks, FIFO and control units

* `clk` drives CU-1, the DCT and the FIFO's write side. `clk_st` drives the
  FIFO's read side, CU-2, CU-3 and the steering unit. Both share `rst_n`, which
  is asserted asynchronously; release it synchronously to each clock.
* Each FIFO word is one DCT output column (32 × 16 bits) plus the block's size
  code, angle and a *last* bit (518 bits). The default depth of 32 words is one
  32×32 block. The pointers cross clock domains Gray-coded through two flops.
* CU-1 raises `done_1` with the DCT's last column, and that pulse is the
  word's *last* bit. CU-2 turns it into `done_2` when the word is handed to
  CU-3, and checks with an assertion that it arrives after exactly N columns.
  `done_3` is the OM's `done` and is the top's `done` output.

## Interface (`sdct_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `clk_st`, `rst_n` | in | 1 | DCT clock, steering clock, active-low reset |
| `start` | in | 1 | one-cycle pulse while `data_in_ready` is high and CU-1 is idle: latches size and angle |
| `sel_dct_in` | in | 2 | size code 0:4×4, 1:8×8, 2:16×16, 3:32×32 |
| `z_in` | in | 3 | angle index 0…7 (0 = plain DCT) |
| `data_in_valid`, `data_in` | in | 1, 32×9 | one residual row, lanes 0…N−1, signed |
| `data_in_ready` | out | 1 | start/rows accepted (low during the column pass) |
| `data_out_valid`, `data_out` | out | 1, 32×16 | one coefficient column: `data_out[u]` = coefficient (u, column); lanes ≥ N are 0 |
| `done` | out | 1 | with the block's last column |
| `sel_dct_out`, `z_out` | out | 2, 3 | size and angle of the block on `data_out` |

The sequence for one block (clk domain): `start` with `sel_dct_in`/`z_in`, then
N cycles with `data_in_valid` carrying rows 0…N−1 (gaps are allowed). Output
(clk_st domain): N consecutive `data_out_valid` cycles, columns 0…N−1.

## Parameters and the reduced units

* `N_MAX` (default 32): the largest transform size. It sets the data lanes, all
  three block memories (N_MAX × N_MAX × 16 bits each) and the supported size
  codes. `N_MAX = 16` (sizes 4…16)
  and `N_MAX = 8` (sizes 4, 8) give the two reduced units. They are meant to run
  on a single clock: tie `clk_st` to `clk`. Their throughput is 8 and 4 samples
  per cycle.
* `FIFO_DEPTH` (default 32): FIFO words, a power of two.
* `LANES` (default N_MAX/2): lifting rotators in the steering unit, a power of
  two up to N_MAX/2 (simulated with 16, 8, 4 and 2). See the steering clock
  regimes above.

## What follows the published architecture and what is filled in

Taken from the published SDCT architecture:

* the DCT-then-rotation structure;
* the folded 2D-DCT for sizes 4–32 and the 16 samples/cycle rate;
* two clock regimes joined by a FIFO;
* the three control units and their done chain;
* the IM / lifting / bypass-mux / OM organisation of the steering unit;
* the lifting factorisation with three multipliers, shift-and-add products and
  `>> 8`;
* eight angles with 0 meaning no rotation;
* a pair order through the lower triangle;
* the 2N + 4 latency (68 cycles at N = 32);
* the reduced 16 and 8 units on one clock;
* steering regimes that trade rotators for a faster steering clock.

Chosen here, because the source does not give it:

* word widths: 9-bit residuals, 16-bit coefficients, with saturation;
* the HEVC matrix and shift values;
* the angle values i·π/16 and the Q8 rounding of P and U;
* which element of a pair is `x1`;
* the exact zig-zag turning points and where the diagonal elements go;
* the handshakes: `data_in_ready`, OM `rd_en`/`rd_last`;
* the meaning of `sel_dct` (size) and `z` (angle);
* the FIFO depth and its Gray-pointer design;
* the separate `clk_st` input (the top-level drawing of the architecture shows
  one clock, while its text asks for two);
* the rotator counts of the 2x/4x/8x regimes (16/k), and keeping the memory
  column ports and FIFO at full width in those regimes;
* where the pipeline registers go;
* that the ROM holds the lifting constants.

Known departures and limits:

* **Throughput for small blocks.** The folded DCT does one N-point transform per
  cycle, so 4×4, 8×8 and 16×16 blocks run at 2, 4 and 8 samples per cycle.
  Reaching 16 samples per cycle for every size would need several small
  transforms side by side in the 32-point unit; that is not built.
* **Clock rate.** The 1D DCT and the rounding are combinational, and every IM/OM
  lane has a full 1024:1 read or write multiplexer. The RTL is functionally
  complete, but it is not pipelined for a 188 MHz target. A timing-driven
  implementation would register the 1D DCT and store the IM in zig-zag order.
  Synthesis is slow on the full-size steering unit for the same reason.
* Clock gating is left to synthesis tools.

## Simulation

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Reference models are in
`tb/sdct_tb_pkg.sv` and are independent of the RTL tables:

* the HEVC matrix is rebuilt from the first column of the 32-point matrix, with
  the sign taken from a real cosine;
* the lifting constants are computed from real `tan`/`sin`;
* the expected output is the 2D DCT with HEVC rounding, followed by the integer
  lifting rotation.

| testbench | what it shows |
|---|---|
| `tb_sdct_top` | full size, two clocks: 36 blocks of all sizes and angles checked coefficient by coefficient. It runs three clock regimes (fast, slow and equal `clk_st`) and counts DCT stalls on a full FIFO, steering idle on an empty FIFO, input hold-off, bypass and rotated blocks. It also checks the 2N-cycle DCT block time and the steering latency. |
| `tb_sdct_reduced` | the 16 and 8 units on one clock, with FIFO stalls and latency S + 5 (through the driver `sdct_unit_run`) |
| `tb_sdct_regimes` | full size with 8, 4 and 2 rotators and a 2×, 4×, 8× steering clock: all sizes and angles, latency 69/133/261 |
| `tb_sdct_steerable` | CU-3 + steering unit: 16 blocks, latency 2N + 4 = 68 |
| `tb_sdct_cu3` | cycle-exact control sequence, overlap of load and read-out |
| `tb_sdct_im`, `tb_sdct_om` | schedule coverage: every pair once, anti-diagonal order, diagonal slots |
| `tb_sdct_dct1d`, `tb_sdct_dct2d` | all sizes against the HEVC reference, including ±255 blocks |
| `tb_sdct_lifting`, `tb_sdct_rom` | exact lifting arithmetic, distance to the ideal rotation, constants |
| `tb_sdct_cu1`, `tb_sdct_cu2`, `tb_sdct_async_fifo` | sequencing, back-pressure, CDC ordering |

Run a testbench with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_sdct_top \
    rtl/sdct_pkg.sv tb/sdct_tb_pkg.sv rtl/*.sv tb/tb_sdct_top.sv -o sim
./obj_dir/sim
```

The same pattern works for any other testbench. Add `tb/sdct_unit_run.sv`
for `tb_sdct_reduced` and `tb_sdct_regimes`. The full-size end-to-end run builds in about 20 s and
simulates in under a second.
