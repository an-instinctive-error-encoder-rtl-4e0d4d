# MBEDC: a 16-bit XOR error-correcting code for radiation-hardened memories

Particle strikes in space flip memory cells, and in dense SRAM a single
strike often flips several neighbouring cells at once (a multiple cell
upset). A single-error-correcting code cannot repair that. This design
encodes each 16-bit data word into a 32-bit codeword with 16 redundancy
bits, all formed by plain XOR gates. It corrects errors that stay inside
one 4-bit group of the word: any single bit, and most 2- and 3-bit bursts.
It detects a large share of the remaining patterns.

The encoder and the decoder are purely combinational. They have no clock,
no reset and no state.

## The data matrix

The 16 data bits form a 4x4 matrix. Its columns are four **regions**
(groups) X, Y, Z and W of four bits each. Row *r* holds bit *r* of every
region:

| row | X  | Y  | Z  | W  |
|-----|----|----|----|----|
| 1   | X1 | Y1 | Z1 | W1 |
| 2   | X2 | Y2 | Z2 | W2 |
| 3   | X3 | Y3 | Z3 | W3 |
| 4   | X4 | Y4 | Z4 | W4 |

Packing in the 16-bit word: X is `data[15:12]`, Y is `[11:8]`, Z is `[7:4]`
and W is `[3:0]`. Inside a region, bit *r* sits at position *r*-1, so X1 is
`data[12]` and X4 is `data[15]`. A run of adjacent bits in the word
therefore stays inside one region, unless it crosses a 4-bit boundary.

## Redundancy bits

| bits | equation | role |
|------|----------|------|
| P1..P4 | Pr = Xr ^ Yr ^ Zr ^ Wr | row parity |
| D1..D4 | D1 = X1^Y2^Z1^W2, D2 = X2^Y1^Z2^W1, D3 = X3^Y4^Z3^W4, D4 = X4^Y3^Z4^W3 | diagonals of the 2x2 sub-matrices |
| Cg13, Cg24 (g = x, y, z, w) | Cg13 = G1^G3, Cg24 = G2^G4 | alternate bits inside each region |

That gives 4 + 4 + 8 = 16 bits. The codeword layout (`codeword_t` in
`mbedc_pkg`) is:

```
code[31:16] data (X, Y, Z, W)
code[15:12] D4 D3 D2 D1
code[11:8]  P4 P3 P2 P1
code[7:0]   Cx24 Cx13 Cy24 Cy13 Cz24 Cz13 Cw24 Cw13
```

The equations for D1, D2, P1, P2 and the check-bit pattern come from the
scheme. D3, D4, P3 and P4 carry the same pattern over to rows 3 and 4. The
bit packing and the codeword order are this implementation's own choices.

## Decoding: syndrome, verification, region selection, correction

1. **Syndrome** (`mbedc_syndrome`). The data half of the received word goes
   through a second encoder. Its redundancy is XORed with the stored
   redundancy, which gives SD, SP and SC. A zero syndrome means a clean word.
2. **Verification and region selection** (`mbedc_region_select`). This is
   the core of the decoder. Each row holds exactly one bit of a region.
   So if all data errors lie in one region g, the parity syndrome SP *is*
   the error pattern of g. The other syndromes must then agree with SP:
   - SC of region g equals {SP2^SP4, SP1^SP3}, and every other region's SC
     is zero;
   - SD equals SP for X and Z. For Y and W, SD equals SP with rows 1<->2
     and 3<->4 swapped. This follows from the diagonal equations.

   All four regions are tested in parallel. If SP is non-zero and exactly
   one region agrees, that region is selected and SP is the set of bits to
   invert. A syndrome of weight one can only come from one flipped
   redundancy bit, so the data is intact. Every other non-zero syndrome is
   reported as uncorrectable.
3. **Correction** (`mbedc_corrector`). The flagged bits of the selected
   region are inverted.

`status`: 0 = clean, 1 = corrected, 2 = one redundancy bit flipped (data
intact), 3 = error detected but not corrected.

### What is and is not corrected

Of the 60 non-zero error patterns confined to one region, 48 are corrected.
The other 12 hit bits 1 and 3 equally and bits 2 and 4 equally. Examples
are {1,3}, {2,4} and all four bits. The equations give such a pattern in X
exactly the same syndrome as the same pattern in Z (likewise Y and W). No
decoder can tell them apart, so these patterns are reported as
uncorrectable. In particular, **a 4-bit burst is detected but not
corrected**. All 1-bit errors are corrected. So are all 2- and 3-bit bursts
of adjacent bits inside one region. Bursts that cross a region boundary are
detected, not corrected.

Counted over the 16-bit data half, there are 58 adjacent bursts of 1 to 4
bits. Of these, 36 are corrected: all bursts of up to 3 bits that stay
inside one region. The other 22 are flagged as uncorrectable: the 4 full
regions and the 18 bursts that cross a region boundary. No burst of 1 to 4
bits anywhere in the 32-bit codeword is passed as clean
(`tb_mbedc_burst`).

The verification rule is this implementation's formal reading of the
scheme's conditions. Those conditions ask that SD and SP contain a 1 and
that the check syndromes flag the error. They are read here as "the three
syndromes must agree with one region". A literal reading ("more than one
SC bit set") would refuse every single-bit error.

Errors that are not confined to one region can alias onto a correctable
syndrome and be miscorrected. This is the usual limit of any code with 16
check bits.

## Modules

| file | what it is |
|------|------------|
| `rtl/mbedc_pkg.sv` | types: `data_t`, `redund_t`, `codeword_t`, `region_e`, `status_e`; `DATA_W` = 16, `CODE_W` = 32 |
| `rtl/mbedc_encoder.sv` | XOR trees, data to codeword |
| `rtl/mbedc_syndrome.sv` | recalculation and syndrome |
| `rtl/mbedc_region_select.sv` | verification and region selection |
| `rtl/mbedc_corrector.sv` | inversion of the selected bits |
| `rtl/mbedc_decoder.sv` | syndrome, region selection and corrector chained |
| `rtl/mbedc_codec.sv` | top: encoder (write path) and decoder (read path) |

The top, `mbedc_codec`, has these ports: `data_i[15:0]` → `code_o[31:0]`,
which goes to the memory; `code_i[31:0]`, which comes from the memory, →
`data_o[15:0]`, `status_o[1:0]`, `region_o[1:0]` (0..3 = X..W),
`err_detected_o` (any syndrome bit set) and `uncorrectable_o`. The memory
itself is not part of the design. Both paths are combinational and
independent. Register them outside to suit the memory's timing.

Synthesized, the codec is about 130 word-level cells, mostly single XOR
gates, with no flip-flops.

## Testbenches

Every testbench checks against `tb/tb_mbedc_ref_pkg.sv`. That package is a
reference model written independently of the RTL. It places each data bit
in the matrix and derives the redundancy bits it feeds. It decodes by
trying all 60 region-confined error patterns.

| testbench | what it checks |
|-----------|----------------|
| `tb_mbedc_encoder` | all 65536 data words, plus a hand-worked example |
| `tb_mbedc_syndrome` | 20000 random corrupted codewords and all single-bit errors |
| `tb_mbedc_region_select` | all 65536 syndromes, plus the class counts (1 clean, 48 correctable, 16 single-redundancy-bit) |
| `tb_mbedc_corrector` | random words × every region × every inversion pattern |
| `tb_mbedc_decoder` | no error, all single and double errors, all region-confined patterns, random multi-bit errors; correction of guaranteed cases is checked against the written word |
| `tb_mbedc_burst` | every burst of 1 to 4 adjacent bits, at every position, in the data half and across the whole codeword |
| `tb_mbedc_codec` | end to end with a 256-word memory model: write, inject upsets, read back. Counts every outcome and every selected region, and fails if any never occurs |

The worked example 1101 1100 1100 1111 encodes to redundancy
`D = 0010, P = 0010, C = 10_11_11_00` (MSB first, in the layout above). It
decodes back to itself.

To run one testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mbedc_pkg.sv tb/tb_mbedc_ref_pkg.sv tb/tb_mbedc_codec.sv \
    --top-module tb_mbedc_codec -o sim && ./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M`.

## Departures and open points

- **Rows 3 and 4.** Only D1, D2, P1, P2 and the X and Y check bits are
  given as explicit equations. The rest extend the same pattern. A
  different D3/D4 pairing would change the codeword, but not the decoder's
  structure.
- **Inversion.** The scheme credits an "inversion" method. Here that is
  taken to be the XOR networks themselves, together with correction by
  inverting the flagged bits. There is no extra inversion stage.
- **4-bit bursts.** The scheme is presented as correcting 4-bit bursts.
  With these equations, a full 4-bit error in one region cannot be located
  (see above). It is detected and flagged instead.
- **Status outputs, the weight-one rule for redundancy errors, bit packing
  and codeword order** are this implementation's choices.
- **No pipeline registers.** Only a low path delay is claimed for the
  scheme, and nothing fixes a cycle timing.
