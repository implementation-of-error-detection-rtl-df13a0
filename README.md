# Two-dimensional ECC for radiation-hardened memories

Memories flown in space see soft errors. Often one particle strike flips several
neighbouring cells at once, which is called a multiple cell upset (MCU). A plain
single-error-correcting code cannot repair that. This design protects each 16-bit
data word with 16 redundant bits, all computed by XOR. The redundant bits look at
the word as a small 4x4 matrix, along rows, along columns and along short
diagonals. On a read, the decoder first decides which half of the matrix holds the
error. It then uses the column checks to flip the bad bits in that half back.
Encoder and decoder are purely combinational. The decoder has no iteration and no
lookup table: it is a few levels of XOR, two 4-bit ones-counts, a comparator and a
row multiplexer.

The RTL follows a published two-dimensional code of this kind: the division into
groups, the diagonal, parity and check equations, and the region-selection rule.
The published description stops at the names of the last decoding steps. The
correction step, the status flags and the memory around the codec are therefore
this design's own reading. They are described below, and the section
"Where this design makes its own choices" lists every such choice.

## The data matrix

The 16 data bits form four groups X, Y, Z and W of four bits each. Write them as a
matrix with the groups as columns and the bit number as the row:

```
           X    Y    Z    W
  row 1    X1   Y1   Z1   W1    \  upper half  (Region 1)
  row 2    X2   Y2   Z2   W2    /
  row 3    X3   Y3   Z3   W3    \  lower half  (Region 2)
  row 4    X4   Y4   Z4   W4    /
```

On the ports the data word is `{X1..X4, Y1..Y4, Z1..Z4, W1..W4}`, so X1 is bit 15
and W4 is bit 0. In the package `ecc2d_pkg` this is the packed struct `data_t`,
with fields `x`, `y`, `z` and `w` indexed `[1:4]`. The bits are numbered 1 to 4 so
that the RTL reads like the equations. Verilator's `-Wall` therefore reports
ascending ranges (`ASCRANGE`); this is expected.

## The 16 redundant bits

| bits | equations | what they see |
|------|-----------|---------------|
| D1..D4 (diagonal) | D1 = X1^Y2^Z1^W2, D2 = X2^Y1^Z2^W1, D3 = X3^Y4^Z3^W4, D4 = X4^Y3^Z4^W3 | two crossing diagonals in each half |
| P1..P4 (parity) | Pi = Xi^Yi^Zi^Wi | one row each |
| Cg13 (check), g = X,Y,Z,W | Cg13 = g1^g3 | rows 1 and 3 of one column |
| Cg24 (check) | Cg24 = g2^g4 | rows 2 and 4 of one column |

The stored codeword is 32 bits: `{data, D1..D4, P1..P4, Cx13, Cy13, Cz13, Cw13,
Cx24, Cy24, Cz24, Cw24}`, with D1 in bit 15 of the redundancy half (`red_t`,
`codeword_t` in the package).

Worked example. Data X=1101, Y=1101, Z=0010, W=1101 is `16'hDD2D`. It encodes to
D=1111, P=1111, C13=1111 and C24=0000, so the redundancy is `16'hFFF0`. Several
testbenches check this word.

## Decoding: syndrome, region, XOR & shift

The decoder (`ecc2d_decoder`) works in three steps.

1. **Syndrome** (`ecc2d_syndrome`). Recompute the 16 redundant bits from the stored
   data and XOR them with the stored redundant bits. Each set bit (SD1..SD4,
   SP1..SP4, SCg13, SCg24) names one equation that no longer holds. A clean word
   gives zero.

2. **Region selection** (`ecc2d_region_select`). Count the set syndrome bits that
   belong to the upper half (SD1, SD2, SP1, SP2) and to the lower half (SD3, SD4,
   SP3, SP4).
   - Upper count larger: Region 1, the error is taken to be in rows 1-2.
   - Upper count smaller: Region 2, rows 3-4.
   - Counts equal: Region 3. This includes the error-free word.

   A single flipped data bit always sets exactly one diagonal and one parity bit
   of its own half. It therefore always wins this comparison.

3. **XOR & shift** (`ecc2d_xor_shift`). The check syndromes locate bad bits within
   each column: SCg13 means a bad bit of group g in row 1 or 3, and SCg24 one in
   row 2 or 4. The region says which of the two rows it is. The 4-bit vector
   `{SCx13..SCw13}` is shifted onto row 1 (Region 1) or row 3 (Region 2), and
   `{SCx24..SCw24}` onto row 2 or row 4. The result is XORed into the data. In
   Region 3 nothing is flipped.

   Any error pattern that stays inside one half is fully repaired, whatever its
   number of bits, provided the region comparison points at that half. Errors
   in the redundant bits alone never change the data.

The decoder also reports what it saw:

| flag | meaning |
|------|---------|
| `err_detected` | some syndrome bit is set |
| `err_corrected` | at least one data bit was flipped back |
| `err_uncorrected` | a syndrome bit is set but Region 3 was chosen, so nothing was changed; the data may be wrong |

If only redundant bits were hit, `err_detected` can be raised with neither of the
other two flags; the data is then correct.

## What the code corrects, and what it does not

The code is linear, so whether an error is corrected depends only on the error
pattern, not on the data. Enumerating the patterns gives these results:

| error pattern | corrected |
|---------------|-----------|
| any single bit of the 32 | 32 of 32 |
| any two bits of the 32 | 232 of 496 (47%); all 496 are detected |
| any three bits of the 32 | 976 of 4960 (20%); all are detected |
| two horizontally adjacent data bits (same row) | 12 of 12 |
| two vertically adjacent data bits (same group) | 8 of 12: the 4 pairs that straddle rows 2/3 fall in Region 3 |
| 2x2 block, full row, full group | none; the diagonal and parity bits cancel and Region 3 is chosen |

Errors that fall evenly across both halves end in Region 3: they are flagged as
`err_uncorrected` and passed through unchanged. If the region comparison picks
the wrong half, the decoder can miscorrect. This happens for some multi-bit
patterns, and no flag reports it. Do not treat a clear `err_uncorrected` as proof
that the data is good once more than one bit may have flipped.

## The protected memory (top level)

`ecc2d_protected_memory` puts the codec around a memory of 2^`ADDR_W` codewords
(default `ADDR_W = 8`, so 256 words of 32 bits):

```
 wr_data --> ecc2d_encoder --> ecc2d_codeword_mem --> ecc2d_decoder --> rd_data, rd_region, flags
                                   ^
                   upset_en/addr/mask (bit flips)
```

- **Write.** `wr_en`, `wr_addr` and `wr_data` are sampled on the rising edge of
  `clk`. The data is encoded in the same cycle and stored.
- **Read.** `rd_en` and `rd_addr` are sampled on a rising edge. On the next edge
  `rd_valid` rises, and `rd_data`, `rd_region` and the three flags are valid
  while it is high. Reads can be issued every cycle. A read in the same cycle as
  a write to the same address returns the old word.
- **Upset port.** While `upset_en` is high, `upset_mask` is XORed into the stored
  codeword at `upset_addr` on the clock edge. This reproduces single and multiple
  cell upsets in simulation. A write to the same address in the same cycle wins.
  Tie `upset_en` low in a real design.
- **Reset.** `rst_n` is asynchronous and active low. It clears only the read
  register and `rd_valid`. The array is not reset, so a word must be written
  before it is read.
- **No scrubbing.** The memory does not write corrected data back. To scrub a
  word, read it and write `rd_data` back.

## Files

| file | contents |
|------|----------|
| `rtl/ecc2d_pkg.sv` | types `data_t`, `red_t`, `codeword_t`, `region_e`; the redundancy function |
| `rtl/ecc2d_encoder.sv` | data to 16 redundant bits and the 32-bit codeword |
| `rtl/ecc2d_syndrome.sv` | stored vs. recomputed redundancy |
| `rtl/ecc2d_region_select.sv` | Region 1/2/3 from the diagonal and parity syndromes |
| `rtl/ecc2d_xor_shift.sv` | correction of the selected half |
| `rtl/ecc2d_decoder.sv` | the three decoding steps and the status flags |
| `rtl/ecc2d_codeword_mem.sv` | codeword array with the upset port |
| `rtl/ecc2d_protected_memory.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Each testbench has its own reference model of the code, written with flat bit
indices instead of the package's structs. Each one prints
`TB_RESULT checks=N failures=M`. The top-level testbench runs at the default size.
It writes all 256 words and reads them back-to-back, checking the one-cycle
latency. It then injects single, double-adjacent, straddling, redundancy-only and
random upsets. It counts how often each of these happened: a clean read, a
Region 1 correction, a Region 2 correction, a Region 3 detection and a
redundancy-only upset. If any of them never occurred, the test fails.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/ecc2d_pkg.sv \
    tb/tb_ecc2d_protected_memory.sv --top-module tb_ecc2d_protected_memory -o sim
./obj_dir/sim
```

To run another module's testbench, replace the testbench file and the top-module
name. The package must come first on the command line; `-y rtl` finds the other
modules. Every testbench finishes in well under a second.

## Where this design makes its own choices

The published scheme fixes the 16-bit word, the 32-bit codeword, the grouping into
X/Y/Z/W, the equations of the redundant bits and the region-selection rule. The
following are this design's own choices:

- **Bit packing.** X1 is the MSB of the data word. The redundant bits are in the
  order D, P, C13, C24.
- **Completed equations.** D3, D4, P3, P4 and the Z and W check bits follow the
  pattern of the ones given explicitly. With them, the published example word
  encodes to exactly the published redundancy values.
- **Correction rule.** The check syndromes are mapped onto the two rows of the
  selected half. Region 3 leaves the data untouched.
- **Status flags.** The three flags are additions.
- **Memory.** Its depth (256 words), the synchronous one-cycle read, the reset
  behaviour and the upset port are all this design's own.

## Changing it

- **Memory depth.** Set `ADDR_W` on `ecc2d_protected_memory`. Nothing else
  depends on it.
- **Equations.** The redundancy equations live in one place,
  `ecc2d_pkg::calc_red`. The syndrome step reuses the encoder, so a change there
  reaches both sides. The row mapping in `ecc2d_xor_shift` must match the check
  bits.
- **Pipelining.** For a faster clock, a register between `ecc2d_syndrome` and
  `ecc2d_region_select`, or after the decoder, adds one cycle of read latency.
  The top-level testbench expects exactly one cycle.
