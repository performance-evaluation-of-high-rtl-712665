# Radix-8 Booth Wallace-tree multiplier (MBE_RADIX_8)

A 16 × 16-bit multiplier that works on signed (two's complement) or unsigned
operands and gives the full 32-bit product. It is fast for two reasons:

* **Radix-8 Booth recoding.** The multiplier is recoded three bits at a time into
  digits in −4…+4. This gives 6 partial products instead of 16.
* **A Wallace tree of carry-save adders.** The partial products are added with no carry
  propagation until a single carry-look-ahead adder at the end.

The multiplier core is purely combinational. The top level, `mbe_radix_8`, puts a
register in front of it and one behind it. A new operand pair can enter on every clock
cycle, and each product comes out two rising edges later.

## Interface and timing of `mbe_radix_8`

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1     | clock; all registers capture on the rising edge |
| `rst_n` | in  | 1     | asynchronous, active-low reset; clears the input and product registers |
| `tc`    | in  | 1     | `1` = operands are two's complement, `0` = operands are unsigned |
| `a`     | in  | N     | multiplicand |
| `b`     | in  | N     | multiplier |
| `p`     | out | 2N    | product of the `a`, `b`, `tc` present two rising edges earlier |

`N` is 16 by default, which gives 16 + 16 + 32 + 3 = 67 pins. Every path from register
to register passes through the whole multiplier once, so the core's delay sets the
clock rate. The design has no handshake: the input is taken on every cycle.

Example: with `tc = 0`, `a = 1203` and `b = 1004`, `p = 1207812` two cycles later.
With `tc = 1`, `a = 12` and `b = -13` (16-bit two's complement), `p = -156`.

## How a product is formed (`r8_tree_multiplier`)

### 1. One datapath for signed and unsigned

Both operands are widened to N+1 bits:

* when `tc = 1`, with their sign bit;
* when `tc = 0`, with a zero.

From then on, everything is N+1-bit two's complement arithmetic. An unsigned 16-bit
value is simply a non-negative 17-bit value. The product of two such values always fits
in 2N bits, so the datapath works modulo 2^(2N) and drops every carry above bit 2N−1.

### 2. Radix-8 recoding (`booth_r8_encoder`)

The widened multiplier is prepared in two steps:

1. A 0 is appended below its least significant bit.
2. It is sign-extended to a multiple of three bits (18 bits for N = 16).

It is then read as 4-bit groups that step by three bits and overlap by one. Group i
holds `b[3i+2] b[3i+1] b[3i] b[3i−1]`, and its digit is

    d_i = −4·b[3i+2] + 2·b[3i+1] + b[3i] + b[3i−1]

so that `b = Σ d_i · 8^i`:

| group | digit | group | digit |
|-------|-------|-------|-------|
| 0000  | 0     | 1000  | −4    |
| 0001, 0010 | +1 | 1001, 1010 | −3 |
| 0011, 0100 | +2 | 1011, 1100 | −2 |
| 0101, 0110 | +3 | 1101, 1110 | −1 |
| 0111  | +4    | 1111  | 0     |

The recoder outputs a digit as a sign flag plus a one-hot select of 1y, 2y, 3y or 4y
(`mbe_pkg::booth_digit_t`). A zero digit selects nothing. With N = 16 there are
ceil(17/3) = 6 digits. A signed-only multiplier would need ceil(16/3) = 6 as well, so
supporting unsigned operands adds no partial product at this width.

### 3. Multiples and the hard multiple 3y (`booth_multiples`, `carry_select_adder`)

Four multiples of the multiplicand y are needed:

* 1y, 2y and 4y are wiring: y, shifted left by 0, 1 or 2 places.
* 3y = y + 2y needs a real addition. This is the only carry-propagating addition
  before the final adder.

The 3y addition uses a carry-select adder with 4-bit blocks. Each block computes its
sum for a carry-in of 0 and for a carry-in of 1, and the carry arriving from the block
below picks one of the two. All multiples are N+3 bits wide (19 bits), which holds ±4y.
The multiples are formed once and shared by all six digits.

### 4. Partial products and negative digits (`booth_pp_gen`)

Each digit selects its multiple with an AND-OR multiplexer. For a negative digit, every
bit of the multiple is inverted. Inverting gives −m−1, not −m, so the missing +1 leaves
the selector as a `neg` bit. This avoids an incrementer in each partial product. An
assertion checks that at most one multiple is selected.

### 5. Placing the rows

These are the details to keep in mind when changing widths:

* Partial product i is sign-extended to the full 2N bits and shifted left by 3i places.
  Bits beyond 2N are dropped.
* A seventh row holds the `neg` bit of digit i at bit position 3i. These positions are
  all different, so the bits fit into one row.
* The sum of the seven rows modulo 2^(2N) is the product.

Full sign extension was chosen because it is simple and obviously correct. The
constant-bit sign-extension trick would save a few adder cells in the tree, and it is
not used here.

### 6. Wallace tree (`wallace_tree`, `carry_save_adder`)

At each level, the rows present are taken in groups of three. A carry-save adder (a row
of independent full adders) turns each group into a sum row and a carry row shifted one
place left. One or two rows left over at a level pass to the next level unchanged. This
repeats until two rows remain: 7 → 5 → 4 → 3 → 2, which is four full-adder delays.

Bit positions where a row holds a constant zero become half adders or plain wires after
synthesis. So the row-wide description is equivalent to the usual dot-diagram Wallace
tree.

`wallace_tree` is generic in the number of rows `R` and the width `W`. The number of
levels and the rows per level come from constant functions.

### 7. Final adder (`cla_adder`)

The two remaining rows are added by a two-level carry-look-ahead adder:

* Bits are grouped by four, and each group forms a group generate and a group propagate.
* One look-ahead unit computes the carry into every group as a sum of products.
* Each group then derives its internal carries the same way.

The carry out of bit 31 is discarded.

## Sizes and parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `mbe_radix_8`, `r8_tree_multiplier` | `N` | 16 | operand width; product is 2N |
| `booth_multiples` | `W` | 17 | widened multiplicand width (N+1) |
| `booth_pp_gen` | `W` | 19 | multiple width (N+3) |
| `carry_select_adder` | `W`, `BLK` | 19, 4 | width, block size |
| `wallace_tree` | `R`, `W` | 7, 32 | rows, width |
| `carry_save_adder` | `W` | 32 | width |
| `cla_adder` | `W`, `G` | 32, 4 | width, group size |

`N` can be changed at the top, and every internal size follows from it. This has been
checked exhaustively at N = 8 and by random test at N = 16. At N = 16, a generic
synthesis gives 65 flip-flops and about 510 word-level cells.

## Where this design makes its own choices

These points are not fixed by the radix-8 Booth tree method as published. Each is this
design's own choice:

* **Signed and unsigned.** This is handled by one extra operand bit driven by the `tc`
  input. The names `tc` and `rst_n` are this design's own.
* **Registers.** There are registers on the inputs (33 bits) and on the product (32
  bits). The reference implementation reports 71 registers and does not say where they
  are, so the register count here differs by 6. The reset is asynchronous and
  active-low.
* **Adders inside the tree.** The Wallace tree uses carry-save adders. The carry-select
  adder is used for the 3y multiple. A description in which carry-select adders also
  accumulate partial products in the tree was not followed: a carry-propagating adder
  inside a Wallace tree would defeat its purpose.
* **Negation.** A negative multiple is produced as an inversion plus a separate +1 bit,
  not as a two's complement formed in place. The value is the same.
* **Adder structure.** The carry-select block size (4), the look-ahead group size (4)
  and the full sign extension of the partial products are this design's own.
* **No FPGA figures.** Nothing here reproduces FPGA area or frequency figures. The
  design's pin count (67) matches the reference implementation.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_booth_r8_encoder` | all 16 groups against the digit formula |
| `tb_booth_multiples` | every 17-bit multiplicand: 1y, 2y, 3y, 4y exact |
| `tb_carry_select_adder` | 19-bit/4 and 10-bit/3 adders, corner and random operands, both carry-ins |
| `tb_booth_pp_gen` | all nine digits on random multiplicands: `pp + neg = d·y` |
| `tb_carry_save_adder` | `s + c = x + y + z`, `s = x ^ y ^ z` |
| `tb_wallace_tree` | trees of 2, 3, 7 and 9 rows: the two outputs add up to the input sum |
| `tb_cla_adder` | 32-bit/4 and 13-bit/4 adders against `+` |
| `tb_r8_tree_multiplier` | 16-bit core: worked examples, extreme operands and 50,000 random pairs in both modes; 8-bit core exhaustively in both modes |
| `tb_mbe_radix_8` | full-size top with default parameters |

`tb_mbe_radix_8` does the following:

* checks the two-cycle latency exactly;
* streams about 20,000 operand pairs, one per cycle, with the mode changing at random;
* applies a reset in mid-stream;
* counts how often signed mode, unsigned mode, negative products, the reset and each
  digit value −4…+4 occurred, and fails if any of them never occurred.

Each testbench was also run against a copy of its module with one deliberate bug, and
each one reported failures.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl rtl/mbe_pkg.sv tb/tb_mbe_radix_8.sv \
        --top-module tb_mbe_radix_8 -Mdir obj -o sim -y rtl +libext+.sv
    ./obj/sim

The other testbenches are built the same way: replace both occurrences of the
testbench name. `rtl/mbe_pkg.sv` must come first, because the encoder, the selector and
the core import it.

## Files

* `rtl/mbe_pkg.sv`: digit type `booth_digit_t` and the digit-count function
* `rtl/mbe_radix_8.sv`: top level with the input and product registers
* `rtl/r8_tree_multiplier.sv`: combinational multiplier core
* `rtl/booth_r8_encoder.sv`, `rtl/booth_multiples.sv`, `rtl/booth_pp_gen.sv`: recoding, multiples and partial product selection
* `rtl/wallace_tree.sv`, `rtl/carry_save_adder.sv`: reduction tree
* `rtl/carry_select_adder.sv`, `rtl/cla_adder.sv`: the two carry-propagating adders
* `tb/tb_*.sv`: one testbench per module
