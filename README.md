# 5-tap FIR filter with MCMAT truncated multipliers

A low-pass FIR filter produces `y[n] = sum h(k)·x[n-k]`. With 8-bit samples and 8-bit
coefficients, each product is 16 bits wide, but only the top 8 bits are kept for the output.
This design never builds the bits that would be thrown away. Each coefficient product comes
from a **truncated multiplier**. It leaves out most low-order partial-product bits, reduces the
rest with a Wallace tree of full and half adders, and rounds with a constant bias. The five
truncated products are then summed by a **5:2 Wallace tree compressor** and one carry-propagate
adder. The technique is called MCMAT: multiple-constant multiplication, accumulation and
truncation.

The filter has 5 taps. Samples, coefficients and the output are all 8 bits wide. Everything is
unsigned. Coefficients are read as fractions of 256.

```
 xn ──┬──[D]── xn_d1 ──[D]── xn_d2 ──[D]── xn_d3 ──[D]── xn_d4
      │           │             │             │             │
   T(h0,·)     T(h1,·)       T(h2,·)       T(h3,·)       T(h4,·)     mcmat_tmult ×5
      └───────────┴──────┬──────┴─────────────┴─────────────┘
                    wtc_5to2 (5 rows → 2)                              5:2 compressor
                         │
                  final adder, mod 256  ──► y_n
```

## The truncated multiplier (`mcmat_tmult`)

This block is the core of the design and the least obvious part. Number the product columns
1..16, with column 1 as the LSB. Row *i* of the partial-product matrix is `a & {8{b[i]}}`,
shifted left by *i*. The output `p` is columns 9..16, so one ulp is 2^8 of the full product.

1. **Deletion.** Row 0 is always kept in full. It feeds the rounding. In rows 1..7, every bit in
   columns 1..`DEL_COL` (default 6) is never generated, which removes a triangle of 15 AND gates
   and their adders.
2. **Wallace reduction.** The eight rows are reduced by carry-save stages: 8 → 6 → 4 → 3 → 2
   rows. A final carry-save stage then adds a constant 1 in column 9 (`CONST_COL9`). Each
   stage is a `wtc_csa_row`, a row of adder cells chosen per bit:
   - an FA (full adder) in general;
   - an HA (half adder) where the third input is known to be zero;
   - a carry-only FC or HC where the sum bit would land in a column that is truncated;
   - no cell at all in columns whose outputs can no longer matter.
3. **Truncation.** Columns 1..7 of both final rows are dropped. In the last stage, columns 1..6
   get no cells, and column 7 gets only an HC for its carry into column 8.
4. **Rounding and final addition.** Columns 8..16 of the two rows are added with a carry-in of
   1 in column 8. That carry-in is a bias of ½ ulp, for round-to-nearest. Column 8 of the sum is
   then discarded.

### Accuracy

The defaults reproduce the reference results 0xFF·0xFF → 0xFE and 0x01·0x01 → 0x01. The second
one needs the column-9 constant. The price is a positive offset. Over all 65,536 input pairs,
`p − a·b/256` lies in **[−0.504, +1.5] ulp**. For example, 128·1 gives 2 and 0·0 gives 1.

| Setting | Error range | Small products |
|---|---|---|
| Defaults (`CONST_COL9 = 1`) | [−0.504, +1.5] ulp | 0·0 and 1·1 give 1 |
| `CONST_COL9 = 0` | [−1.504, +0.5] ulp | 0·0 and 1·1 give 0 |

The usual goal for this kind of multiplier is an error no larger than 1 ulp. Neither setting
meets that exactly. The defaults were chosen to match the reference numbers.

In the filter, each zero sample still adds 1 to the output. A silent input therefore gives
`y_n = 5`.

The bits that are kept depend on how the tree splits its sums between the two final rows. So
the exact result depends on the tree's shape, not only on `DEL_COL`. The testbench reference
model follows the same stage order.

## Summing the products (`mcmat_truncation`, `wtc_5to2`)

`mcmat_truncation` holds five multipliers. Their operands are named as in the reference
simulation: `a·b`, `cf·d`, `e·f`, `g·h`, `k·l`. The five 8-bit truncated products are
reduced to two rows by `wtc_5to2`. That block is three carry-save stages, with a half adder in
bit 0 wherever a carry row enters. An 8-bit adder then adds the two rows. The sum wraps modulo
256: ten operands of 0xFF give five products of 0xFE and a result of 0xF6.

Each product is truncated and rounded on its own before the sum. An alternative is to merge
all partial products into one matrix and truncate once. That can be more accurate, but it does
not reproduce the reference values, so it is not built here.

## The filter (`mcm_fir`)

- **Delay line.** Four 8-bit registers, `xn_d1..xn_d4`, shift on each rising edge of `clk`.
  They are brought out as ports for observation.
- **Output timing.** All arithmetic is combinational, so `y_n` follows `xn` in the same cycle.
  A new sample moves one tap per cycle.
- **Reset.** `rst_n` is asynchronous and active low. It clears the delay line.
- **Coefficients.** `COEFFS` is an unpacked array of type `taps_t`, with element k as h(k). It
  defaults to h = {16, 63, 93, 63, 16}/256. This is a symmetric,
  linear-phase low-pass set whose sum is close to 256. It is this design's own choice; the
  reference coefficient values are not available. In the reference step response, the input is
  held at 0xFF and then switched to 0x01:
  - the reference output is 255, 239, 176, 84, 21, 5;
  - this design gives 253, 237, 175, 83, 21, 5.

  The reference implies tap products of 17, 64, 93, 64, 17. This multiplier cannot produce 64
  from 0xFF: h = 63 gives 63 and h = 64 gives 65. A 5-tap filter also cannot reach the 46 dB
  stop-band attenuation of the target specification (pass band 0.20, stop band 0.27). To use
  other coefficients, override `COEFFS`.
- **Output range.** With the default coefficients, the sum of products is at most 253, so the
  filter output never wraps.

## Where this departs from the reference design

| Point | Reference | Here |
|---|---|---|
| Filter structure | Symmetric taps drawn with pre-adders | Plain direct form; the reference output values only fit this |
| Coefficients | Values not available | {16, 63, 93, 63, 16} |
| Error bound | No larger than 1 ulp | [−0.504, +1.5] ulp, because the reference values were matched |
| Number format | Signed scheme drawn with sign-bit corrections | Unsigned, as in the reference values |
| Tree shape | Column-wise HA/FA/HC/FC counts, drawn for a smaller example | Row-wise carry-save stages, same cell types |
| Deletion limit | Drawn as a triangle without exact positions | `DEL_COL = 6`, the only limit that gives 0xFF·0xFF → 0xFE |

Coefficient design and quantization are offline software steps and are not part of the RTL.

## Files

| File | Contents |
|---|---|
| `rtl/mcmat_pkg.sv` | `EWL = 8`, `TAPS = 5`, types `word_t` and `taps_t`, `DEFAULT_COEFFS` |
| `rtl/mcm_fir.sv` | Top level: delay line and MCMAT unit |
| `rtl/mcmat_truncation.sv` | Five truncated products, 5:2 compressor, final adder |
| `rtl/mcmat_tmult.sv` | 8×8 truncated multiplier (`DEL_COL`, `CONST_COL9`) |
| `rtl/wtc_5to2.sv` | 5:2 Wallace tree compressor (`W`) |
| `rtl/wtc_csa_row.sv` | One carry-save stage with per-bit cell selection |
| `rtl/wtc_fa.sv`, `wtc_ha.sv`, `wtc_fc.sv`, `wtc_hc.sv` | Adder cells: full, half, carry-only full, carry-only half |
| `tb/mcmat_ref_pkg.sv` | Integer reference model of the truncated product |
| `tb/tb_*.sv` | One self-checking testbench per module |

## Verification

Each testbench checks its module against values computed independently of it. Each one ends
with a line `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_wtc_fa`, `tb_wtc_ha`, `tb_wtc_fc`, `tb_wtc_hc` | Every input combination |
| `tb_wtc_5to2` | Corner and 20,000 random operand sets at W = 8 and 12; sums that overflow must occur |
| `tb_mcmat_tmult` | All 65,536 pairs against the integer model and the error bound; also `CONST_COL9 = 0` and `DEL_COL = 4` |
| `tb_mcmat_truncation` | The 0xFF and 0x01 reference vectors; 20,000 random vectors, some of which must wrap |
| `tb_mcm_fir` | At default parameters: reset, the step response above, per-tap delay timing, 5,100 random samples against a reference filter, and a reset mid-stream |
| `tb_mcm_fir_coeffs` | An asymmetric set h = {200, 5, 77, 130, 31}: the impulse response 204, 10, 81, 134, 35, 5 proves that `COEFFS[k]` multiplies x[n−k]; 3,000 random samples, some of which must wrap the output |

To run one testbench, for example the top-level one:

```
verilator --binary --timing -Irtl -Itb rtl/mcmat_pkg.sv tb/mcmat_ref_pkg.sv \
  -y rtl -y tb +libext+.sv --top-module tb_mcm_fir tb/tb_mcm_fir.sv
./obj_dir/Vtb_mcm_fir
```

Lint reports unused bits, all by design:
- the truncated low columns in `mcmat_tmult`;
- the carries out of the top bit, in `wtc_5to2` and `mcmat_tmult`;
- `z` inputs of cells that are known to be zero.
