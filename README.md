# CSDA-MST: a multi-standard 2-D transform core built on common sharing distributed arithmetic

Video codecs each define their own block transform. MPEG-1/2/4 use the 8x8 DCT,
H.264 uses 8x8 and 4x4 integer transforms, and VC-1 uses its own 8x8 and 4x4
integer transforms. All of them share one structure: an 8-point transform splits
into an even and an odd 4-point half, and each standard only changes seven
coefficient magnitudes C1..C7. This core builds one datapath for all five
transforms. It computes the matrix products by *distributed arithmetic* (DA):
each product is a sum of input combinations weighted by powers of two, one
combination per coefficient bit. It uses *factor sharing* (FS) so that the
combinations common to several outputs are formed only once. This combination of
DA and FS is called common sharing distributed arithmetic (CSDA).

The 2-D core is two 1-D cores joined by a transposition memory. The first core
transforms the rows of one block while the second core transforms the columns of
the block before it. Each core takes eight samples per cycle, so an 8x8 block
enters in 8 cycles and leaves in 8 cycles.

```
 x[0..7] 9b      +-------------+ 12b  +-----------------+ 12b +-------------+ 14b   +-----+
 ---row--------->| 1-D core 1  |----->| transposition   |---->| 1-D core 2  |------>| reg |--> y[0..7]
 in_valid/ready  | (rows)      |      | memory 8x8x12b  |     | (columns)   |       +-----+   out_col
                 +-------------+      +-----------------+     +-------------+
 1-D core: selected butterfly -> even part / odd part -> 8 ECATs -> permutation
```

## The transform family

Each output of a 1-D pass is `round(C . x / 2^s)`. C is the standard's matrix and
`s` is the scaling shift of the standard. In even/odd form:

```
a_i = x_i + x_(7-i),  b_i = x_i - x_(7-i)           (i = 0..3)
[Z0 Z2 Z4 Z6] = [C4 C4 C4 C4; C2 C6 -C6 -C2; C4 -C4 -C4 C4; C6 -C2 C2 -C6] . a
[Z1 Z3 Z5 Z7] = [C1 C3 C5 C7; C3 -C7 -C1 -C5; C5 -C1 C7 C3; C7 -C5 C3 -C1] . b
```

The even half splits again, with A = (a0+a3, a1+a2) and B = (a0-a3, a1-a2):

```
Z0 = C4 (A0+A1)   Z4 = C4 (A0-A1)   Z2 = C2 B0 + C6 B1   Z6 = C6 B0 - C2 B1
```

| `mode_e`      | transform              | C1  | C2  | C3  | C4 | C5 | C6 | C7 | s |
|---------------|------------------------|-----|-----|-----|----|----|----|----|---|
| `MODE_MPEG8`  | 8-point DCT            | 126 | 118 | 106 | 91 | 71 | 49 | 25 | 8 |
| `MODE_H264_8` | H.264 8-point          | 12  | 8   | 10  | 8  | 6  | 4  | 3  | 5 |
| `MODE_VC1_8`  | VC-1 8-point           | 16  | 16  | 15  | 12 | 9  | 6  | 4  | 5 |
| `MODE_H264_4` | two H.264 4-point      | -   | 2   | -   | 1  | -  | 1  | -  | 1 |
| `MODE_VC1_4`  | two VC-1 4-point       | -   | 22  | -   | 17 | -  | 10 | -  | 5 |

The MPEG values are `round(256 * cos(k*pi/16) / 2)`, so with s = 8 the MPEG mode
is the orthonormal DCT. The integer-transform values are the standards' own
matrix entries. The scaling shifts are this design's choice. They keep 9-bit
input within 12 bits after the first pass and 14 bits after the second. The
largest gain of any mode is 3, and 2048 x 3 < 8192.

**4-point modes.** The selected butterfly is bypassed. x0..x3 goes to the even
part and x4..x7 goes to the odd part, and each gets its own 4-point transform.
The odd part then uses the 4-point matrix (C4/C2/C6 with the even sign pattern).
The permutation block puts the first transform on T0..T3 and the second on
T4..T7. An 8x8 input block therefore holds four 4x4 blocks:
`[[P, Q], [R, S]]`. The row pass transforms the rows of P|Q and R|S. After
transposition, the column pass transforms the columns of P over R and of Q
over S. Each of the four 4x4 blocks gets its full 2-D transform in place.

## Distributed arithmetic with shared factors

Write each coefficient in binary, `C = sum_w c[w] 2^w` with w = 0..6. A row
product then becomes

```
Z_r = sum_w 2^w * D_r,w      with   D_r,w = sum_j sign_rj * c_rj[w] * v_j
```

The term `D_r,w` depends only on which coefficients of row r have bit w set. It
is a sum of inputs, not a product. Forming all terms needs only adders and
multiplexers driven by the coefficient bits of the selected standard.

* **Even part** (`even_part`). A two-stage butterfly forms A0, A1, B0, B1. It
  then forms the shared factors A0+A1, A0-A1, B0+B1 and B0-B1. Every term is
  one of these values, chosen by a 4:1 multiplexer:
  * row Z0: `c4[w] ? A0+A1 : 0`
  * row Z4: `c4[w] ? A0-A1 : 0`
  * row Z2: {c2[w],c6[w]} selects 0, B1, B0 or B0+B1
  * row Z6: {c6[w],c2[w]} selects 0, -B1, B0 or B0-B1

  No multiplier and no per-term adder remain.
* **Odd part** (`odd_part`). Each row takes the four inputs with its signs.
  Every term is a 4-input adder whose inputs are gated by the coefficient bits.
* **Term widths.** For a W-bit core input, a and b are W+1 bits and every term
  is W+3 bits (12 bits in core 1, 15 bits in core 2).

## Error-compensated adder tree (ECAT)

Eight ECATs (`ecat`), one per output, add the seven terms with weights 2^w and
divide by 2^s. Columns below 2^s are not summed. Every term with w < s is
truncated, and the lost carry is replaced by an estimate:

```
kept  = sum_w floor(D_w * 2^(w-s))
p     = number of ones among the truncated terms in column s-1
n     = number of truncated terms = min(s, 7)
y     = saturate( kept + ((p + floor(n/2) + 1) >> 1) )
```

The estimate counts the top truncated column exactly, as p/2. It assumes a
quarter LSB for each term's lower columns, and adds one half for rounding. In
hardware each term passes through one variable shifter,
`u = floor(D_w * 2^(w+1) / 2^s)`: `u >>> 1` is the kept part and `u[0]` is the
column-(s-1) bit.

Random tests show that the result never differs by more than 2 LSB from the
exactly rounded product. This holds for every standard and for random term
vectors at every shift from 0 to 8. The H.264 4-point mode (s = 1) has a single
truncated term and its estimate is exact rounding. In the MPEG mode, the
combined error of the 8-bit coefficients and the adder tree stays within 5 LSB
of the floating-point orthonormal DCT over the random tests. Results outside the output
range saturate. That cannot happen for 9-bit inputs in any mode.

## Transposition memory

`tmem` is an 8x8 array of W-bit registers, 64 words of 12 bits by default. Each
cell has a 2:1 multiplexer that selects its left or its upper neighbour. The
shift direction alternates from block to block:

* **dir = 0.** Each accepted row enters at the top and the array shifts down.
  The block stored before leaves through the bottom row.
* **dir = 1.** Each row enters at the left and the array shifts right. The
  stored block leaves through the right column.

A block entered in one direction is therefore read out across the other, which
is the transposition. The next block fills the cells as they are vacated, so the
memory needs no second buffer. Element order is reversed on entry:
`arr[0][j] <= din[7-j]` or `arr[i][0] <= din[7-i]`. Read-out is
`dout[k] = arr[7][7-k]` or `arr[7-k][7]`. With these maps, step s of the
read-out always delivers column s of the stored block with element k in
`dout[k]`.

Flow control:

* **Pause inside a block.** A gap in `in_valid` freezes the whole array, so both
  the loading and the read-out pause.
* **Drain.** A block finishes and no row is offered on the next cycle. The
  memory then drains the stored block by itself with 8 shifts of zeros and holds
  `in_ready` low during them. A block is therefore never stranded when the input
  stops. After a drain, the zero-filled contents are marked invalid.
* **Mode.** The mode of a block is sampled with its first row and travels with
  the block. Core 2 uses the mode of the block being read out, so consecutive
  blocks may use different standards.

## Top-level interface and timing (`csda_mst_2d`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | row handshake; a block is 8 accepted rows |
| `in_mode` | in | `mode_e` | standard, sampled on the first row of a block |
| `x[8]` | in | 9 | one row, signed |
| `out_valid` | out | 1 | a column of results is valid |
| `out_mode`, `out_col` | out | `mode_e`, 3 | standard and column index of the result |
| `y[8]` | out | 14 | `y[k]` = 2-D coefficient (k, `out_col`) |

* Neither 1-D core contains a register. The transposition array and the output
  register are the only storage.
* In an unbroken stream, column s of block n appears at `y` one cycle after row
  s of block n+1 is accepted. Counted from the first row of a block, its column
  j appears j + 9 cycles later.
* The sustained rate is one 8-sample row in and one 8-coefficient column out
  per cycle.

## How this relates to the original CSDA-MST description

What this design takes from it:

* the five-part 1-D core: selected butterfly, even part, odd part, eight ECATs
  and permutation
* the 9/12/14-bit widths
* the 64-word x 12-bit transposition register array with a multiplexer per cell
* register-free 1-D cores, with buffers instead of pipeline registers
* concurrent row and column passes

This design's own choices:

* **Coefficient values and shifts.** Taken from the standards. The description
  gives only the symbolic matrices.
* **Datapath details.** The exact term structure of the even and odd parts is
  not copied. The description's shift/multiplexer network is replaced by the
  bit-plane form above. It computes the same products, but the gate count
  differs.
* **No ROM.** The description mentions ROM-based DA. Here every DA term comes
  from adders and coefficient-bit multiplexers, with no ROM.
* **ECAT estimate.** The description shows a small full/half-adder counter fed
  with a constant 1. The formula above is this design's own.
* **Transposition memory.** The description quotes a 52-cycle latency for a
  serial schedule that is not described. It also mentions 16-bit words in one
  place, against 12 bits elsewhere; this design uses 12 bits. Here the latency
  is one block of rows. The drain logic, the handshake and the bottom-row
  read-out port are additions.
* **Accuracy.** Results are not bit-identical to any standard's reference
  software. They are within 2 LSB of `round(C.x/2^s)` per pass.
* **Not built.** VC-1's 8x4 and 4x8 transforms and all inverse transforms.

Resource comparison: this RTL has 64x12 + 8x14 + about 20 flip-flops, about 900
in all. The FPGA results quoted for the original were 704 to 1259 flip-flops on a
device with 7168. The top uses about 198 I/O pins.

## Simulation

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`. The
reference model `tb/mst_ref_pkg.sv` builds each standard's full matrix from
cosine indices and evaluates the ECAT formula in integer arithmetic. It does not
reuse the RTL datapath. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mst_pkg.sv tb/mst_ref_pkg.sv \
          tb/tb_csda_mst_2d.sv --top-module tb_csda_mst_2d -Mdir obj && ./obj/Vtb_csda_mst_2d
```

Replace `csda_mst_2d` with `sbf`, `even_part`, `odd_part`, `ecat`,
`permutation`, `csda_mst_1d` or `tmem` for the unit tests. `tb_csda_mst_2d` runs
the top at its default sizes. It streams 10 blocks back to back through all five
standards and checks the cycle of every output. It then runs 30 blocks with
random modes, pauses inside blocks and idle gaps that force drains and input
stalls. It compares every coefficient with the reference, and it fails if any of
these never occurs:

* a mode switch
* a 4-point block
* a drain
* a stall
* a pause

`tb_uhd_frame` streams a complete 4928x2048 frame of synthetic residual data:
157,696 blocks, with its 256 eight-line bands cycling through the five
standards. It checks every coefficient and checks that the frame takes exactly
157,696 x 8 + 9 cycles. It runs in under a minute.

## Changing the design

* **A standard.** Add an enumerator to `mode_e` and extend `coef()` and
  `out_shift()` in `rtl/mst_pkg.sv`. Mirror the values in `ref_c`/`ref_shift` of
  the testbench package. Coefficients must fit `CW` = 7 bits.
* **Widths.** `IN_W`/`MID_W`/`OUT_W` on `csda_mst_2d`. The ECAT saturates if a
  pass overflows.
