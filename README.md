# Offset-binary-coded distributed-arithmetic MAC cores

These cores compute a four-term inner product

    z = a0*y0 + a1*y1 + a2*y2 + a3*y3

with no multiplier. The coefficients `a_k` are stored once. The data words
`y_k` are fed in bit-serially, one bit of every word per clock. Each bit slice
(one bit from each of the four words) addresses a small look-up section that
returns a precomputed partial sum of coefficients. A shifting accumulator
weights these partial sums by powers of two. This is distributed arithmetic
(DA).

Offset binary coding (OBC) changes what the look-up section stores. A
conventional DA table holds `sum(a_k where bit k = 1)`. The OBC table holds
half of a signed sum in which every coefficient appears with a sign:
`+a_k` for a 1 bit and `-a_k` for a 0 bit. This makes the table
antisymmetric, and it lets the table be split into banks or replaced by
multiplexers.

The RTL builds the MAC with four interchangeable look-up sections, the four
variants of the OBC-DA MAC in *"VLSI Implementation of Multiply and Accumulate
Unit Using Offset Binary Coding Distributed Arithmetic"*:

| core (`obc_arch_e`) | look-up section | storage for K = 4 | adders after storage |
|---|---|---|---|
| 0 `ARCH_SINGLE_LUT` | one OBC table, 2^K rows | 16 rows | none |
| 1 `ARCH_TWO_LUT` | two OBC tables of 2^(K/2) rows, one per half of the coefficients | 2 x 4 rows | 1 |
| 2 `ARCH_FOUR_LUT` | four OBC tables of 2^(K/4) rows | 4 x 2 rows | 3 (tree) |
| 3 `ARCH_LUT_LESS` | no table: 2:1 multiplexers pick +a_k/2 or -a_k/2 | 4 coefficient registers | 3 (tree) |

All four produce bit-identical results with the same latency. `obc_mac_top`
places one of each side by side on shared inputs.

## The arithmetic

Let every data word `y_k` be an N-bit two's-complement integer (N = `DATA_W`)
with bits `b_kj`. Because `-y = ~y + 1`,

    2*y_k + 1 = y_k - ~y_k = sum_j s_kj * w_j,   s_kj = +1 if b_kj = 1, -1 if b_kj = 0,
    w_j = 2^j for j < N-1,  w_(N-1) = -2^(N-1)   (the sign bit)

Substituting into the inner product gives

    z = sum_j w_j * Q(slice_j) + Q(0...0)
    Q(slice) = 1/2 * sum_k s_k * a_k   = -1/2 * sum_k (bit_k ? -a_k : +a_k)

- `Q(slice)` is the table. Its row 0000 is `-1/2(a0+a1+a2+a3)` and its row 1111
  is `-1/2(-a0-a1-a2-a3)`. Row 0011 is `-1/2(a0+a1-a2-a3)`.
- The address bit order is `b1 b2 b3 b4`. `b1`, the most significant address
  bit, comes from `y0` and sets the sign of `a0`.
- `Q(0...0)` is a constant offset. It is the table's own row 0, so no extra
  storage is needed for it.
- Rows with complementary addresses are negatives of each other. With
  `HALF_ROWS = 1` (`SINGLE_HALF_ROWS` on the top), the single-table core
  stores only the rows whose address MSB is 0. It reads a row `r` whose MSB is
  1 as the complement of the stored row `~r`, plus `1 - p`. Here `p` is the
  parity of `a0+a1+a2+a3`, stored with the table. The correction is needed
  because the stored halves are rounded (see below); with `FRAC = 1`, `p` is
  treated as 0. This halves the table at the cost of an incrementer and a
  multiplexer. It is off by default, because the source's single-LUT design
  stores all rows.

**Halving and rounding.** With the defaults (`FRAC = 0`), every stored half is
rounded toward minus infinity. For example, with a = 2,3,4,5 and slice 0011 the
four-table variant stores `-1/2*a1 = -2` and `-1/2*(-a3) = 2`.

This loses nothing in the final result. Every sum `±a0 ±a1 ±a2 ±a3` has the
parity of `a0+a1+a2+a3`, whatever the address. So either every slice is exact,
or every slice is low by exactly 1/2, and that includes the offset slice. The
weights that multiply this constant error are `1` (offset) plus
`1 + 2 + ... + 2^(N-2)` (ordinary slices) minus `2^(N-1)` (sign slice), and they
add up to zero. The same argument holds per bank, so the two-table, four-table
and LUT-less variants are exact too.

`FRAC = 1` keeps the half bit instead (one more bit in every stored value). It
is there for anyone who wants to see the unrounded table values.

## Bit-serial schedule

The accumulator (`obc_accumulator`) is the classic right-shifting DA
accumulator. Bits are processed least significant first. With `A = Q * 2^N`
(the table value aligned to the top of the register), the register `T` goes
through these steps:

| cycle | address | register update |
|---|---|---|
| start | forced to 0000 | `T <= A` (offset `Q(0)`), or `T <= A + T*2^N` when accumulating |
| 1 .. N-1 | slice of bit 0 .. N-2 | `T <= (T + A) >>> 1` |
| N | slice of bit N-1 (sign bits) | `T <= (T + ~A + 1) >>> 1` |

After N steps every term has the right weight and `T` is the inner product;
`z` is its low `OUT_W` bits. With `accumulate`, the previous result is shifted
up by N in the start cycle, and the N right shifts bring it back to weight 1,
so the new product is added on top of it. This is the multiply-accumulate
`z = z + a*y` of a DSP MAC unit. A sum that leaves the `OUT_W` range wraps
around in two's complement. The sign slice is subtracted by inverting the
addend and setting the adder's carry-in. The register is
`OUT_W + FRAC + DATA_W + 1` bits wide, so nothing is lost to the shifts.

The input data section (`obc_input_section`) is four parallel-in shift
registers. They are loaded at start, and each presents its bit 0 as one
address bit.

## Interface and timing (`obc_da_mac`, `obc_mac_top`)

| signal | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `clr` | in | synchronous clear: result to 0, controller to idle (aborts a running product) |
| `load`, `a[K]` | in | one-cycle pulse: store the signed `A_W`-bit coefficients (fills the tables) |
| `start`, `y[K]` | in | begin an inner product of the signed `DATA_W`-bit words `y`; ignored while busy |
| `accumulate` | in | sampled with `start`: 1 adds the new inner product onto the current `z` (`z = z + sum a*y`), 0 starts from zero |
| `busy` | out | high during the N accumulate cycles |
| `done` | out | one-cycle pulse N cycles after the start edge; `z` is valid from then on |
| `z` | out | signed `OUT_W`-bit result, held until the next start or clear |

- `start` is accepted again in the `done` cycle, so products can run back to
  back every N+1 cycles.
- `load` must not coincide with `start` or fall in a busy period. An immediate
  assertion in `obc_da_mac` reports it if it does.
- The top brings out `busy`, `done` and `z` per core as arrays, indexed by
  `obc_arch_e`.

Each look-up section module (`obc_lut`, `obc_lut_two`, `obc_lut_four`,
`obc_lut_less`) can also be used on its own. Its contents are written on
`load`, and its outputs follow `addr` combinationally. The intermediate values
are outputs as well: `out1`/`out2` for the two-table section, and
`outk[0..3]`, `x = out1+out2`, `y = out3+out4` for the four-table and LUT-less
sections.

## Parameters

Defined in `obc_pkg` and passed down as module parameters:

| parameter | default | origin |
|---|---|---|
| `K` | 4 | number of terms, as in the source design (a0..a3, address b1..b4). The two-table section needs K even, the four-table and LUT-less sections need K divisible by 4. |
| `A_W` | 4 | coefficient width, as in the source design's simulations |
| `OUT_W` | 16 | result width (16-bit MAC core), as in the source design |
| `DATA_W` | 8 | data word width N. **Own choice**: the source does not give it. 8 bits keep every 4-term product of 4-bit coefficients inside 16 bits. |
| `FRAC` | 0 | fractional bits per stored half. 0 reproduces the source's rounded table values. |
| `HALF_ROWS` (`obc_lut`, `obc_da_mac`), `SINGLE_HALF_ROWS` (top) | 0 | store half of the single table and mirror the rest; 0 as in the source's single-LUT table |
| `ARCH` (`obc_da_mac`) | `ARCH_LUT_LESS` | look-up section of a single core. The source found the LUT-less variant the smallest and fastest. |

## Files

| file | contents |
|---|---|
| `rtl/obc_pkg.sv` | constants, `obc_arch_e`, the term and halving functions |
| `rtl/obc_lut.sv` | one OBC table of 2^M rows (single-LUT section; bank of the split sections) |
| `rtl/obc_lut_two.sv`, `rtl/obc_lut_four.sv` | split tables with their adders |
| `rtl/obc_lut_less.sv` | multiplexer and adder-tree section |
| `rtl/obc_input_section.sv` | data shift registers |
| `rtl/obc_accumulator.sv` | shift-accumulator with clear, offset load (optionally on top of the previous result) and subtract |
| `rtl/obc_da_mac.sv` | one core: the sections above plus the bit counter and controller |
| `rtl/obc_mac_top.sv` | the four cores side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_obc_mac_top_half.sv` | the top end to end with the half single table |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs.

- `tb_obc_lut`, `tb_obc_lut_two`, `tb_obc_lut_four`, `tb_obc_lut_less` use
  a = 2,3,4,5 and check the table values of the source design's simulations:
  - slice 0011: single table 2; two tables out1 = -3, out2 = 4, out = 1; four
    tables and LUT-less out1..out4 = -1,-2,2,2, x = -3, y = 4, out = 1.
  - slice 0010: -3 (single table) and -4 (split sections).
  - They then check every address for 200 random coefficient sets, at
    `FRAC` 0 and 1.
- `tb_obc_input_section` and `tb_obc_accumulator` check bit order, hold,
  priority, clear, carry-in and whole shift-accumulate sequences against
  directly computed sums.
- `tb_obc_da_mac` runs all four architectures at both `FRAC` values, plus the
  half-table single-LUT core, on corner cases and 300 random products. It
  checks the exact result and the N-cycle latency. It also checks chains of
  accumulated products, including one that wraps past the 16-bit range.
- `tb_obc_mac_top` runs the top at its default sizes. It counts coefficient
  reloads, back-to-back starts, starts ignored while busy, aborts by `clr`,
  negative data, negative results and accumulated products, and fails if any
  of these never happened.
- `tb_obc_mac_top_half` runs the same test with `SINGLE_HALF_ROWS = 1`. It also
  counts the products that read mirrored rows.

Run any testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -y rtl -y tb rtl/obc_pkg.sv \
        tb/tb_obc_mac_top.sv --top-module tb_obc_mac_top
    ./obj_dir/Vtb_obc_mac_top

Every testbench finishes in well under a second.

## How far this follows the source design

Taken from the source design:
- the OBC table contents and their address bit order;
- the split into two and four banks with their adder trees;
- the LUT-less multiplexer structure with `+1/2 a_k` on input 1 and
  `-1/2 a_k` on input 0;
- the rounding of each half toward minus infinity;
- the 4-term, 4-bit-coefficient, 16-bit-result configuration;
- a result after N accumulation cycles;
- a clear that zeroes the result, with accumulation otherwise;
- the option of storing only half of the single table, using its
  antisymmetry (how the mirrored rows are read is this design's own).

Choices made here where the source is silent or unclear:
- the data width `DATA_W = 8`;
- feeding bits least significant first;
- the shift-right accumulator and the way it subtracts the sign slice (the
  carry-in of the adder);
- loading the offset `Q(0)` from table row 0 in the start cycle;
- filling the tables with a one-cycle `load` from coefficient inputs, and
  holding the LUT-less coefficients in registers;
- the `start`/`busy`/`done` handshake, the `accumulate` control and the port names;
- treating coefficients as signed.

Where the source is inconsistent, this RTL follows the reading below:
- Its simulation waveforms show some negative 16-bit values with bit 15
  clear. Here all values are ordinary two's complement, so for example
  `-3 = 16'hFFFD`.
- The last row of the second two-LUT table reads `-1/2(-a2-a1)`. It is built
  as `-1/2(-a2-a3)`, as the row pattern and the printed values require.
- The fourth LUT-less multiplexer is labelled with `a(2)`. It is built with
  `a(3)`.

Not included:
- The conventional (non-OBC) DA table, which serves only as the starting
  point for comparison.
- The DSP processor around the MAC.
- The source's FPGA area, delay and power figures. They cannot be reproduced
  from RTL.

The design is verified only in simulation. It has not been synthesized for an
FPGA or ASIC, and no timing figures are claimed.
