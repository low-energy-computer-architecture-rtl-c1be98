# Low-energy arithmetic and memory-compression RTL

This repository holds two independent low-energy hardware designs, written
in synthesizable SystemVerilog after the thesis *Low Energy Computer
Architecture Designs* (M. M. A. Mahmoud, Cairo University, 2019):

1. **A dual-base multiplier (DBM).** One 64-bit multiplier does both unsigned
   binary and 16-digit BCD multiplication. Its key idea is a single,
   purely binary *column tree* that adds the partial-product digits of each
   digit column for both bases. The binary and decimal weighting happens
   only afterwards, in two short split paths. Two pipeline stages and
   clock gating ensure that only the path in use switches.
2. **A delta compressor for main-memory lines.** Each 32-byte line of a
   memory page is stored as signed 6-bit byte deltas against the page's first
   line, whenever every delta fits. A compressed line takes 24 bytes and a
   tag bit, and is decompressed with one 8-bit addition per byte.

   A variable-length variant stores each line with the narrowest delta
   width from 3 to 7 bits that fits, and marks the width with a 3-bit tag.

Both designs sit side by side in `low_energy_top`. They share only the
clock and the reset.

---

## 1. The dual-base multiplier

### 1.1 Interface and timing (`dbm_multiplier`)

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock, asynchronous active-low reset |
| `mult_en` | 1 | start an operation this cycle; when low, no datapath register is clocked |
| `bd` | 1 | 0 = unsigned binary operands, 1 = BCD-8421 operands |
| `a`, `b` | 64 | multiplicand, multiplier (16 digits of 4 bits) |
| `p` | 128 | product: binary, or 32 BCD digits |
| `p_valid`, `p_bd` | 1 | product valid, and the mode it was computed in |

The multiplier accepts one operation per clock. Present `a`, `b`, `bd` and
`mult_en` right after a rising edge and hold them for the whole cycle. The
product is in `p`, with `p_valid` high, right after the second rising edge
that follows.

The inputs must be stable from the falling edge onward. Each clock gate
samples its enable on the falling edge, and the gated clock is `clk` ANDed
with that sample (`clock_gate`). The gated clocks are:

* `mult_en & ~bd`, which clocks the binary-path register bank;
* `mult_en & bd`, which clocks the decimal-path register bank;
* `s1_valid`, which clocks the output register.

During a decimal operation the binary split path sees no clock edge, and
the reverse holds for a binary operation. When `mult_en` is low, neither
bank is clocked.

### 1.2 Data flow

```
 stage 1 (combinational)                                   | stage 2
 a ──► dbm_multiples ──► dbm_pp_select ──► dbm_column_tree ─┬► [bin bank] ► dbm_split_binary  ─┐
 b, bd ─────────────────────┘   33 partial products         │   (gated ~bd)                    ├► [p]
                                  + sign bits       33 x (Sum, Carry)                          │
                                                            └► [dec bank] ► dbm_split_decimal ─┘
                                                                (gated bd)
```

**Multiples (`dbm_multiples`).** Every multiple is 17 digits wide.

* Binary mode needs A, 2A, 4A and 8A, which are shifts.
* Decimal mode needs A, 2A, 5A and 10A:
  * 2A: recode every digit to BCD-5421, then shift the whole vector left one bit. The result is 2A in BCD-8421.
  * 5A: shift left three bits. This gives 5A in BCD-5421, which is then recoded to 8421.
  * 10A: a one-digit shift.
* A negative multiple starts as a ones' complement (binary) or a nine's
  complement of every digit (decimal). The missing +1 arrives later as a
  *sign bit*.

**Selection (`dbm_pp_select`).** Each multiplier digit controls two
multiplexers:

| mode | MUX1 | MUX2 | digit split |
|---|---|---|---|
| binary, radix-16 Booth | 0, ±A, ±2A | 0, ±4A, ±8A | digit ∈ [-8, 8] = 4·(−2b3+b2+b1) + (−2b1+b0+b−1) |
| decimal, signed-digit radix 5 | 0, ±A, ±2A | 0, 5A, 10A | see table below |

| digit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| MUX1 | 0 | A | 2A | −2A | −A | 0 | A | 2A | −2A | −A |
| MUX2 | 0 | 0 | 0 | 5A | 5A | 5A | 5A | 5A | 10A | 10A |

For Booth recoding, the multiplier is padded with one zero bit on the
right and four on the left. This adds a 17th digit, whose MUX1 can only
pick 0 or A. That gives 2·16 + 1 = 33 partial products in total.

The select and invert lines are sums of products of the current digit's
bits, the top bit of the digit below, and `bd`. They are written out in
the module.

### 1.3 The shared column tree, the hardest part (`dbm_column_tree`)

Partial product *i* starts at digit column *i*. Column *j* takes every
4-bit digit of weight 16^j (binary) or 10^j (decimal) and adds them up
as ordinary binary numbers in a 3:2 carry-save tree (`csa_tree`). The tree
produces a 9-bit Sum and a 9-bit Carry for each column. **No carry moves
between columns.** That is why one tree serves both bases: until the
columns are weighted, a BCD digit and a hexadecimal digit add the same
way.

Negative partial products need two things:

* **The +1.** Multiplier digit *j* has two sign bits. Both are added into
  column *j* as 1-bit rows.
* **Sign extension.** Above its 17 digits, a negative partial product
  continues with F digits (binary) or 9 digits (decimal), up to column 32.
  Every column total is then exact modulo 16^33 or 10^33. The largest
  column total is 33·15 + 2 = 497, which fits in 9 bits. The product is
  below 16^32 (or 10^32), so truncating it is exact.

### 1.4 Split binary path (`dbm_split_binary`)

1. Place each column's Sum and Carry at bit 4j. A 9-bit field covers three
   digit positions, so columns j ≡ 0, 1, 2 (mod 3) go to separate vectors.
   That gives six non-overlapping 128-bit vectors.
2. A CSA tree reduces the six vectors to two.
3. A 128-bit Kogge-Stone adder (`ks_adder`) produces the product.

### 1.5 Split decimal path (`dbm_split_decimal`)

All decimal correction happens here, not inside the tree:

1. A 9-bit Kogge-Stone adder adds each column's Sum and Carry. The total
   is at most 497.
2. Shift-and-add-3 converts each total into three BCD digits.
3. The digits are recoded to **BCD-4221**. Every 4-bit pattern is a valid
   digit in this code, so bitwise carry-save addition needs no correction.
4. The three digits of column *j* get the weights 10^j, 10^(j+1) and
   10^(j+2). Columns j ≡ 0, 1, 2 (mod 3) fill three vectors.
5. A decimal 3:2 CSA combines the vectors:
   * sum digits = a⊕b⊕c, taken bitwise, which is already valid 4221;
   * carry digits = maj(a,b,c). To double them, each carry digit is
     recoded to **BCD-5211** and the vector is shifted left one bit. That
     shift gives exactly 2× in 4221.
6. Both vectors are recoded to 8421. A decimal Kogge-Stone CPA
   (`decimal_cpa`) produces the 32-digit product. It builds a generate
   (sum ≥ 10) and a propagate (sum = 9) per digit and runs a prefix tree
   over them.

---

## 2. Delta compression of memory lines

### 2.1 Principle

Lines in one page of memory are often close in value. The page's first
line *f* is stored as it is. Every other line *l* is compressed as follows:

1. 32 parallel 8-bit Kogge-Stone subtractors form `l_i − f_i` as 9-bit
   signed numbers. The borrow acts as the sign.
2. Compression is possible only if every delta lies in −32..31.
3. If so, the tag bit is 1 and the stored line is the 32 six-bit deltas,
   which take 24 bytes. Delta *i* is in bits [6i+5:6i] and the upper
   8 bytes are zero.
4. Otherwise the tag bit is 0 and the line is stored raw.

Example: against a first-line byte of 0x00, a line byte of 0xFF is +255
and the line stays raw. A byte of 0x01 against 0x02 is −1 and compresses.

`delta_compressor` does this in one combinational step.

`delta_decompressor` reverses it. It checks the tag bit, then sign-extends
each delta and adds it to the first-line byte with an 8-bit Kogge-Stone
adder. Otherwise it passes the line through. Its critical path is one
8-bit addition and a multiplexer.

### 2.2 Byte-serial compression unit (`line_compressor_serial`)

This is the version with a narrow input port:

* Ports: input `l_e` (one byte per clock, with no gaps, starting right
  after reset); outputs `first_line` and `first_line_en`; outputs `cu_line`,
  `cu_line_en` and `cu_f`.
* Every 32 bytes form one line. Byte 0 arrives first and sits in bits [7:0].
* Lines are counted in pages of `LINES_PER_PAGE` lines (128 lines = 4 KB).
* The first line of each page is stored as the reference and shown on
  `first_line`. Every other line is compressed against it.
* Timing: the clock edge that takes in a line's last byte also stores the
  complete line. One cycle later the compressed result is in the output
  register, and the matching enable is high for that one cycle.

### 2.3 Variable-length variant (`delta_compressor_var`, `delta_decompressor_var`)

The thesis also evaluates a variable-length form of the same scheme:

* The compressor uses the same bank of 8-bit subtractors. Five range
  checks test whether every delta fits in 3, 4, 5, 6 or 7 signed bits.
* The narrowest width `w` that fits is used. Delta i sits in bits
  `[w*i +: w]` of `c_line`, and the bits above are zero.
* The 3-bit `tag` is 0 for a raw line, and 1 to 5 for widths 3 to 7.
  `c_bytes` gives the stored length: `4*w` bytes (12 to 28), or 32 for a
  raw line.
* The decompressor reads the width from the tag, sign-extends each delta
  and adds it to the first-line byte. Tags 0, 6 and 7 pass the line
  through unchanged.
* Both blocks are purely combinational. The tag codes and the packing
  order are this design's choices; the thesis gives only the five checks
  and the tag size. The thesis does not describe a variable-length
  decompressor. It is built here so that the variant can be checked end to
  end.

In `low_energy_top` the pair forms a third port group: inputs
`vl_first_line` and `vl_line`; outputs `vl_tag`, `vl_c_line` and
`vl_c_bytes`; inputs `vld_tag` and `vld_c_line`; output `vld_line`. Both
blocks use `vl_first_line` as the reference line.

---

## 3. Where this RTL departs from the thesis, and how far to trust it

* **Column width.** The thesis states that column Sums and Carrys fit in
  8 bits, and rearranges them into four binary vectors at a stride of two
  digits. It does not say how negative partial products are sign-extended.
  This RTL extends them explicitly, so columns can reach 497. Sums and
  Carrys are therefore 9 bits, and the binary path uses six vectors at a
  stride of three. The results are exact, but the binary path has one more
  CSA level than the thesis describes.
* **Circuit internals.** The tree topology (Wallace-style 3:2 reduction
  rather than a hand-built Dadda tree) and the internals of the decimal CPA
  and the BCD converter are straightforward choices of this RTL. The thesis
  gives them only as figure references.
* **Pipeline registers.** The pipeline cut sits after the column tree, as
  in the thesis's chosen two-stage scheme. The output register and the
  `p_valid`/`p_bd` flags are additions.
* **Delta signedness.** The thesis says only that deltas must "fit in
  6 bits". Reading them as signed two's complement matches its worked
  example.
* **Out of scope.** The serial unit's six test outputs are omitted. Its
  outputs are whole 256-bit lines rather than byte-wide test ports.
* **Verification.** Every module has a self-checking testbench against
  references written independently:
  * built-in multiplication, and schoolbook multiplication on decimal digit arrays;
  * a behavioural delta packer.

  The multiplier bench checks thousands of random binary and decimal
  products, the two-cycle latency, and that each gated register bank is
  clocked exactly once per operation of its own mode. The compression
  benches include four lines of Canneal benchmark data (line 1 as
  reference; lines 2 and 4 compress, line 3 does not) and random lines
  over more than one page. Nothing here has been through timing analysis,
  power analysis or gate-level simulation.

---

## 4. Files and simulation

`rtl/` contains one module or package per file:

* Shared: `dbm_pkg` (constants, BCD recoding functions), `ks_adder`,
  `csa_tree`, `decimal_cpa`, `clock_gate`.
* Multiplier: `dbm_multiples`, `dbm_pp_select`, `dbm_column_tree`,
  `dbm_split_binary`, `dbm_split_decimal`, `dbm_multiplier`.
* Compression: `delta_compressor`, `delta_decompressor`,
  `line_compressor_serial`, `delta_compressor_var`,
  `delta_decompressor_var`.
* Top: `low_energy_top`.

`tb/` contains `tb_<module>.sv` for every block, plus two reference
packages, `dbm_ref_pkg` and `mem_ref_pkg`. Each bench prints
`TB_RESULT checks=N failures=M`. `tb_low_energy_top` runs both designs end
to end at the default parameters, and counts each mechanism it exercises
(binary and decimal operations, idle cycles, mode switches, page starts,
compressed and raw lines, and each variable-length tag).

To run one bench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/dbm_pkg.sv tb/dbm_ref_pkg.sv tb/mem_ref_pkg.sv tb/tb_dbm_multiplier.sv \
  --top-module tb_dbm_multiplier -Mdir obj
./obj/Vtb_dbm_multiplier
```

Parameters:

| module | parameter | default | meaning |
|---|---|---|---|
| `delta_compressor`, `delta_decompressor`, `line_compressor_serial`, `low_energy_top` | `NBYTES` | 32 | bytes per line |
| same | `DBITS` | 6 | delta width |
| `delta_compressor_var`, `delta_decompressor_var` | `NBYTES` | 32 | bytes per line |
| `line_compressor_serial`, `low_energy_top` | `LINES_PER_PAGE` | 128 | lines per page |

The multiplier's sizes (16 digits) are fixed in `dbm_pkg`. The BCD
encodings and the recoding tables rely on that width, so it is not meant
to be changed.
