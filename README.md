# CRAFFT in SystemVerilog: a million-point FFT computed inside memory arrays

CRAFFT computes very large fixed-point FFTs (up to 2^20 points by default)
without moving the data to an arithmetic unit. The data sit in computational
RAM (CRAM) arrays. A CRAM array is a memory that can also form a logic gate in
every column at once. Each column of an array holds one radix-2 butterfly,
stored bit by bit down the column. A *tile controller* then steps all columns
through the same sequence of gates: AND, NOT and majority gates that build full
adders, adders that build multipliers. In that way every column computes its
butterfly at the same time. A 2^20-point FFT has 2^19 butterflies per stage,
and the design spreads them over 512 tiles of 1024 columns each. A global
controller runs the 20 stages. It feeds each tile the twiddle factors of the
stage and moves the results between tiles over a fixed network.

The FFT variant is Singleton's constant-geometry radix-2 FFT. It takes its
input in bit-reversed order and returns its output in natural order. Every
stage has the same data movement, so the wiring between tiles never changes:

    y_j       = x_{2j} + w^e * x_{2j+1}
    y_{j+N/2} = x_{2j} - w^e * x_{2j+1}      j = 0 .. N/2-1
    e = (j >> (log2N - k)) << (log2N - k)    in stage k = 1 .. log2N,  w = exp(-2*pi*i/N)
    x <- y

This RTL follows the architecture of the CRAFFT accelerator published by
Cilasun et al. (University of Minnesota). That covers the tiled organisation,
the twiddle tile, the tile connectivity, the arithmetic steps, the rounding and
the bit growth. The cycle-level schedule, the row layout, the gate sequences
and all interfaces are this implementation's own choices. Departures from the
published design are listed at the end.

## The arithmetic inside one column

Everything a tile computes comes from one primitive. One gate, formed in every
selected column at once, reads up to five rows and overwrites one row
(`cram_array`). The gates are COPY, NOT, AND2, NAND2, MAJ3 and MAJ5. One gate
takes one clock cycle. On the device it is a preset of the output cell followed
by a switching pulse; here the preset is folded into that cycle.

### Row layout (`crafft_pkg`)

Numbers are two's complement and stored vertically, LSB in the lowest row of
the field. WMAX = XW + LOG2N_MAX = 36 is the widest operand.

| rows | contents |
|---|---|
| 0, 1 | constant 0, constant 1 (written at the start of every FFT) |
| 2 | TMP: partial-product bit or negated operand bit |
| 3, 4 | carry, ping-pong between adjacent bit positions |
| 5, 6 | two copies of the inverted carry |
| 8 .. | X: x_{2j} real, x_{2j} imag, x_{2j+1} real, x_{2j+1} imag (WMAX rows each) |
| then | W: twiddle real, twiddle imag (TW rows each) |
| then | Y: y+ real, y- real, y+ imag, y- imag (WMAX rows each) |
| then | ACC: two accumulators of TW-2+WMAX rows (ping-pong) |

At the defaults this uses 428 of the 1024 rows.

### Full adder: five gates

For operand rows A and B and carry row Cin:

    TMP  = AND/NAND(x, w) or NOT(t)     only when B must be formed first
    Cout = MAJ3(A, B, Cin)
    CN1  = NOT(Cout),  CN2 = NOT(Cout)
    Sum  = MAJ5(A, B, Cin, CN1, CN2)

A gate cannot use its own output cell as an input. So each sum goes to a
different row from its operands (hence the ping-pong accumulators), and the
carry alternates between two rows.

### One butterfly stage (`tile_ctrl`, command TC_RUN)

Inputs of stage k are W = XW + k - 1 bits wide, and outputs are W + 1 bits.
Twiddles are TW = 16 bits with 14 fraction bits, so +1 and -1 are exact. The
real part is computed first, then the imaginary part:

1. **MUL**: 2·TW shift-and-add passes. Each pass adds one partial product,
   `x_{2j+1} AND w[b]` (sign-extended, shifted by b), into the accumulator.
   The pass subtracts it instead (NAND, carry-in 1) for the twiddle's sign bit,
   and for the `-x_i·w_i` term of the real part. Bits below b are only copied.
   The accumulator then holds `x_r·w_r - x_i·w_i` (or `x_r·w_i + x_i·w_r`),
   modulo 2^(TW-2+W+1).
2. **RND**: add 2^13 (round half up). Bits 14 .. 14+W are then the rounded
   product t.
3. **YP**: y+ = x_{2j} + t.
4. **YM**: y- = x_{2j} + NOT(t) + 1. The sign change is a NOT row, and its +1
   is the adder's carry-in.

One bit of growth per stage makes the FFT unscaled: the outputs equal the true
DFT to within the rounding error. This holds when the inputs lie inside the
unit circle of their 16-bit format (|x| < 2^15). Outside it the results wrap.
The stage takes a fixed number of cycles that does not depend on the data:

    G(W) = 2 · [ Σ_{n<2TW} (b + 5·(TW-2+W+1-b)), b = n mod TW
                 + 4·(W+2) + 4·(W+1) + 5·(W+1) ]

This gives 8,450 cycles for the first stage (W = 16) and 15,024 for the last
stage of a 2^20-point FFT (W = 35). Multiplication dominates.

## Tiles, twiddles and the network

**Compute tile** (`compute_tile` = `cram_array` + `tile_ctrl`). Butterfly j
lives in tile `j / COLS`, column `j mod COLS`. Between stages the tile serves
row reads and row writes. A write is masked by column.

**Twiddle tile** (`twiddle_tile`). It holds w^e for e < N/2, real and imaginary
parts, in the same transposed layout: block b, row r holds bit r of twiddles
bL .. bL+L-1. In stage k, column c of tile t needs
e = ((tL+c) >> m) << m, with m = log2N - k. A distribution read returns that
row already spread across the columns:

* if 2^m < L, column c copies column (c >> m) << m of the tile's own block;
* otherwise one value covers the whole tile. That value is column 0 of block
  (t >> (m - log2 L)) << (m - log2 L).

The controller reads 2·TW rows per tile per stage, at 2 cycles per row.

**Network** (`tile_xbar`). Output y_n of a stage becomes input x_n of the next
stage, and x_n belongs to butterfly n/2, slot n mod 2. With T active tiles,
half h of destination tile t is fed by tile (2t+h) mod T. The data are that
tile's sum outputs if 2t+h < T, and its difference outputs otherwise. Even
columns go to slot 0 and odd columns to slot 1. This is the published
connectivity, t → t/2 and t → t/2 + T/2, extended to T = 1 and to any power of
two T. A transfer beat takes 3 cycles:

1. every tile reads one output row;
2. every tile writes the network's slot-0 row;
3. every tile writes the slot-1 row.

The column masks of the writes select the halves whose source kind (sum or
difference) matches the beat. There are 4·(W+1) beats after each stage except
the last.

**Global controller** (`crafft_ctrl`) runs this sequence:

1. Write the constant rows.
2. For each stage: distribute the twiddles, issue TC_RUN to all active tiles,
   wait for the done pulse (the tiles run in lockstep, which an assertion
   checks), then transfer the outputs.
3. Pulse `done`.

Tiles t ≥ T receive no commands.

### Cycle count

    total = 4 + Σ_k [ T·2·TW·2  +  G(XW+k-1) + 2  +  (k < log2N ? 12·(XW+k) : 0) ]

| FFT size | active tiles | cycles | of which twiddle distribution |
|---|---|---|---|
| 2^20 | 512 | 896,072 | 655,360 |
| 2^15 | 16 | 182,422 | 15,360 |
| 2^11 | 1 | 115,290 | 704 |

At 2^20 points most of the time goes into distributing the twiddles, because
that step is serial over tiles.

## Using the RTL

`crafft_top` ports (the host port is honoured only while `busy` is low):

1. **Twiddle table.** Write the table for the chosen N through `h_tw_we`,
   `h_tw_row` and `h_tw_wdata`. The row address is block·2·TW + bit; bits
   0..TW-1 are the real part and TW..2TW-1 the imaginary part. Entries are
   round(cos(2πe/N)·2^14) and round(-sin(2πe/N)·2^14).
2. **Inputs.** Write the inputs in bit-reversed order into the X rows through
   `h_we`, `h_tile`, `h_row` and `h_wdata`. Butterfly j holds x_{2j} in slot 0
   and x_{2j+1} in slot 1. Only the low XW bits are needed.
3. **Run.** Pulse `start` with `log2n`, where log2(2·COLS) ≤ log2n ≤ LOG2N_MAX.
   Then wait for the one-cycle `done` pulse.
4. **Results.** Read y_n from the Y rows (`h_re`; `h_rdata` is valid a cycle
   later). For n < N/2 it is the sum output of butterfly n; for n ≥ N/2 it is
   the difference output of butterfly n - N/2. The width is XW + log2n bits.

To run a smaller FFT, load a smaller table and give a smaller `log2n`. No
other change is needed.

Parameters of `crafft_top`, with their defaults:

| parameter | default | meaning |
|---|---|---|
| COLS | 1024 | columns per array = butterflies per tile |
| ROWS | 1024 | rows per array (must be at least the 428 the layout needs) |
| LOG2N_MAX | 20 | largest FFT, 2^20 points; sets 512 compute tiles |
| XW | 16 | input width |
| TW | 16 | twiddle width (fraction bits TW-2) |

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The shared reference model is in
`tb/crafft_ref_pkg.sv`: a bit-exact butterfly, the twiddle quantisation, bit
reversal and G(W).

| testbench | what it checks |
|---|---|
| tb_cram_array | random writes, reads and gates against a shadow array; the NAND truth table; read latency |
| tb_tile_ctrl | butterfly results for W = 16, 17, 20, 23; exactly one gate per busy cycle; gate count = G(W) |
| tb_compute_tile | the same stages through the tile wrapper; latency G(W)+1 |
| tb_twiddle_tile | the spread read for every tile, row and shift |
| tb_tile_xbar | every destination bit and mask against the butterfly-level rule, for T = 1..8 |
| tb_crafft_ctrl | the command sequence and the cycle total against a behavioural tile |
| tb_crafft_top | 64-, 32- and 16-point FFTs on 4 small tiles, bit-exact; SQNR against a double DFT; cycle total; mechanism counts |
| tb_crafft_large | one 2^15-point FFT on 16 full-size (1024×1024) tiles, bit-exact, SQNR 84.9 dB, 182,422 cycles as predicted |

The small end-to-end run covers every mechanism: twiddle broadcast from
another block, spreading within a block, disabled tiles, a single tile routed
onto itself, and multi-tile transfers. Its measured SQNR is about 91–98 dB.
The largest configuration simulated is 16 tiles of the default 1024×1024
geometry (a 2^15-point FFT). The full 512-tile, 2^20-point configuration
compiles and lints. Verilator inlines every tile, though, so building a
simulator for it takes more than half an hour, and it has not been simulated.
Its behaviour follows from the per-tile and network tests above, because all
tiles are identical and every tile count from 1 to 16 has been run.

Simulate, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/crafft_pkg.sv tb/crafft_ref_pkg.sv \
        rtl/*.sv tb/tb_crafft_top.sv --top-module tb_crafft_top
    ./obj_dir/Vtb_crafft_top

## Where this departs from the published design

* **Cells.** The arrays are flip-flop models of the SHE (spin-Hall) CRAM cell:
  any row can be an input or an output. The STT cell's restriction (inputs in
  even rows, output in an odd row, or the reverse) is not modelled. MTJ
  physics, currents, preset energy and the sense and drive circuits are
  outside the RTL.
* **Full adder.** This design uses five gates per full adder. The published
  design uses a three-gate full adder whose gates are not given.
* **Multiplier.** Multiplication is shift-and-add, not the Wallace–Dadda
  schedule of the published design.
* **Order of steps.** The four products are formed per output part (real, then
  imaginary) into one accumulator. The published sequence forms all four
  multiplications first. The operations are the same: multiply, add, round,
  sign change, add.
* **Twiddle format.** Q2.14 is this design's choice.
* **Twiddle table size.** The table stores both parts of N/2 twiddles (2 MB at
  2^20 points). The published figure for the fixed-point table is 1 MB.
* **Array dimension.** Only the 1024×1024 array (the "F" configurations) is
  supported at 2^20 points. The layout needs 428 rows there, so 256×256 arrays
  would need row reuse, which is not implemented.
* **FFT sizes.** Sizes below 2·COLS points (less than one full tile) are not
  supported.
* **Floating point.** The single-precision floating-point extension (IEEE-754
  add and multiply mapped to gates) is not implemented.
* **Timing.** Timing is in clock cycles only. The published execution times
  depend on device switching times that are not modelled here.
