# Triple adjacent error correction for double-error-correcting OLS codes

A particle strike in a modern memory often upsets a small cluster of
neighbouring cells, not a single one. Orthogonal Latin Squares (OLS) codes
are attractive for memory words because they decode in one step by majority
vote, which is small and fast. A double error correction (DEC) OLS code with
k = m² data bits needs 4m check bits and corrects any two errors. It cannot
correct three errors, even three adjacent ones.

This design adds correction of any **burst of three adjacent cells** to a DEC
OLS decoder. It needs **no extra check bits**. The decoder computes the normal
majority-vote correction and a dedicated triple-burst correction in parallel.
A simple test on the syndrome then picks which of the two results to output.

The RTL is combinational, parameterised by `M` (m). The default is M = 4
(16 data bits, 16 check bits, a 32-cell codeword). M = 8 and M = 16 give
64- and 256-bit data words.

## The code

Each data bit `d[i]` is placed on an m × m grid at row `a = i / m`, column
`b = i % m`. The 4m checks form four groups of m. Every data bit belongs to
exactly one check in each group:

| checks        | group | data bit (a,b) belongs to check number |
|---------------|-------|-------------------------------------|
| 0 … m-1       | rows (M1)          | `a`                      |
| m … 2m-1      | columns (M2)       | `b`                      |
| 2m … 3m-1     | Latin square 1     | `a xor b`                |
| 3m … 4m-1     | Latin square 2     | `(2·a) xor b`, with 2·a in GF(m) |

Each group is a Latin square, so any two groups are orthogonal. As a result,
two data bits share at most one check. Each stored check bit belongs only to
its own equation.

The majority-vote decoder works like this for each data bit. It takes the
four recomputed checks the bit belongs to and flips the bit when at least
three of them fail. With at most two errors, an erroneous bit sees at least
three failing checks and a correct bit sees at most two.

The row and column groups are the standard single-error-correcting OLS
construction, `H = [M1; M2 | I]`. The two Latin-square groups are this
design's choice for the DEC extension. Latin square 1 is the XOR square.
Latin square 2 multiplies the row by the field element 2 in GF(m), using the
polynomials x²+x+1, x³+x+1, x⁴+x+1 and x⁵+x²+1 for m = 4, 8, 16 and 32. Only
m = 4, 8, 16 and 32 are supported. The encoder reports an elaboration error
for any other value.

## Why "exactly three failing column checks" means a burst

This section explains the central idea.

**Column checks.** Three adjacent data bits `j, j+1, j+2` lie in three
different columns, because consecutive indices differ modulo m (m ≥ 4). A
burst on them therefore makes exactly three column checks fail. Any pattern
of one or two errors makes at most two column checks fail, because each cell
affects at most one column check. So "exactly three ones among the m column
checks" never happens for the errors that the majority vote handles. The
detector `olsc_tae_detect` is a popcount compared against 3.

**Row check.** Among the row checks, such a burst makes exactly one fail:

* If all three bits are in one row, that row fails (three flips give odd
  parity).
* If the burst crosses a row boundary, it puts two bits in one row and one in
  the other. Only the row holding one bit fails.

**Signature.** The row that fails is `j/m`, except when `j % m == m-2`. In
that case it is `j/m + 1` (see `tae_row` in `olsc_pkg`). The set of three
columns identifies `j % m`, and the row identifies `j / m`. So each of the
k-2 possible bursts has its own signature: one row check and three column
checks.

**Correction.** `olsc_tae_corrector` has one 4-input AND per burst position.
The AND drives XOR gates on that burst's three bits. For m = 4 and the first
burst, the AND inputs are checks c1, c5, c6, c7 (one-based), and the gates
correct d1, d2, d3.

**Check bits in a burst.** A burst may also hit check cells, so where the
check bits sit in the memory word matters. In this design, data bit `i` is
stored at position `4m + i` and check `j` at position `4m - 1 - j`. The
check cells therefore run away from the data in index order. Check 0, the
row check of d0 … d(m-1), is the cell next to d0.

With this placement:

* **Burst entirely in check cells.** It flips three checks that never belong
  to one data bit together, so the majority vote gives each data bit at most
  two votes. If the burst lies in the column group, the triple path is
  selected. No row check fails, so no triple gate fires and the data is left
  alone.
* **Burst across the data/check boundary.** It hits d0 (and perhaps d1)
  together with row check 0 (and perhaps row check 1). Row check 0 is the
  check that d0 and d1 already share. The majority vote still corrects both bits, and no third data bit
  reaches three votes.

The more obvious order, data followed by c1 … c4m, fails one burst for
m = 4: (d15, d16, c1). The order used here was checked exhaustively for
m = 4, 8 and 16. The testbenches repeat that check.

Check bits themselves are never corrected; only the data is delivered.

## Decoder structure

```
codeword ──► olsc_syndrome ──syn[4m]──┬──► olsc_mld_corrector ──┐ (majority of 4 per bit)
   │        (re-encode, XOR stored)   │                         ├──► mux ──► data_out
   └─ data bits ──────────────────────┼──► olsc_tae_corrector ──┘    ▲
                                      ├──► olsc_tae_detect (columns) ┘──► tae
                                      └──► OR ──────────────────────────► error_detected
```

The three paths run side by side, so the detector is not in series with
either corrector. This costs some power for the shorter delay.

`error_detected` is the OR of all syndrome bits. A memory controller can use
it as a fast first step and wait for the slower corrected data only when a
word has an error. That controller is not part of this RTL.

For scale: the published evaluation of this scheme reports 10–22 % more area
and 40–90 % more delay than a plain majority decoder. Those figures are for
k = 16 … 256 in a 90 nm library.

## Modules

| file | role |
|------|------|
| `rtl/olsc_pkg.sv` | code structure: check membership `chk_idx`, GF(m) multiply, storage positions, burst row `tae_row` |
| `rtl/olsc_encoder.sv` | 4m XOR trees; outputs the check bits and the packed codeword |
| `rtl/olsc_syndrome.sv` | re-encodes the read data and XORs it with the stored checks |
| `rtl/olsc_majority.sv` | at-least-t+1-of-2t vote (parameter `T`, default 2) |
| `rtl/olsc_mld_corrector.sv` | standard one-step majority correction of every data bit |
| `rtl/olsc_tae_detect.sv` | exactly three of the m column checks set |
| `rtl/olsc_tae_corrector.sv` | k-2 burst gates and their correction XORs |
| `rtl/olsc_tac_decoder.sv` | complete modified decoder |
| `rtl/olsc_tac_codec.sv` | top: write path (encoder) and read path (decoder) of a protected memory word |

Top-level ports of `olsc_tac_codec #(M)`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `wr_data` | in | M² | word to store |
| `wr_codeword` | out | M²+4M | cells to write into the memory |
| `rd_codeword` | in | M²+4M | cells read back |
| `rd_data` | out | M² | corrected data |
| `rd_error_detected` | out | 1 | some parity check fails |
| `rd_tae` | out | 1 | the triple-burst correction was selected |

The memory array sits between `wr_codeword` and `rd_codeword` and is not part
of the design. There is no clock and no reset. Outputs follow inputs after
the combinational delay.

## Departures and choices

* The Latin squares of the DEC extension and the storage order of the check
  bits are choices of this design (see above). Both were validated
  exhaustively.
* "Three ones" is implemented as *exactly* three. Three or more would also
  select the triple path for some uncorrectable patterns. Exactly three is
  the condition the argument above needs.
* The burst gate is an AND of its four checks, and corrections are XORs.
* A data bit covered by several burst positions is flipped if any of their
  gates fires. For a single burst, only one gate fires.
* Not built:
  * the memory array and the controller that would use `error_detected` for
    two-step decoding;
  * the suggested extension to longer bursts with codes that correct more
    random errors (for example five-cell bursts with k = 64, t = 4). That
    extension is not worked out in enough detail to design.

## Verification

Every testbench is self-checking. Each compares against an independent
reference model of the code in `tb/tb_olsc_ref_pkg.sv` and prints
`TB_RESULT checks=N failures=F`.

| testbench | what it covers |
|-----------|----------------|
| `tb_olsc_encoder` | all one-hot and 300 random words for M = 4, 8, 16; each bit in exactly 4 checks, any two bits share at most one |
| `tb_olsc_syndrome` | clean words, random 1-, 2- and 3-error and random error vectors |
| `tb_olsc_majority` | all inputs for T = 2 and T = 3 |
| `tb_olsc_mld_corrector` | all single and double errors, M = 4 and 8 |
| `tb_olsc_tae_detect` | all column patterns, M = 4 and 8 |
| `tb_olsc_tae_corrector` | every data burst; bursts in check cells and bursts with one signature check removed leave data unchanged |
| `tb_olsc_tac_decoder` | all single, double and three-cell-burst errors anywhere in the codeword, M = 4, 8, 16, including the `tae` and `error_detected` flags |
| `tb_olsc_tac_codec` | end to end through the top at the default size and at M = 8 and 16 (64 and 256 data bits), all single, double and burst errors; counts each mechanism and fails if one never occurs |
| `tb_olsc_tac_codec_full` | the top at its default parameters, every error pattern on 20 random words |

All of them pass. The M = 16 exhaustive run (about 51 000 patterns) takes a
few seconds.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/olsc_pkg.sv tb/tb_olsc_ref_pkg.sv tb/tb_olsc_tac_codec.sv \
    --top-module tb_olsc_tac_codec
./obj_dir/Vtb_olsc_tac_codec
```

## Changing the design

* **Word size.** Set `M` on `olsc_tac_codec`. M must be a power of two with a
  polynomial in `olsc_pkg::gf_poly`. To support another m, add its
  polynomial there and in `xtime` of the reference package.
* **Registers.** To pipeline the decoder, a register stage after
  `olsc_syndrome` cuts the path with the least state: 4m bits plus the data
  word.
* **Storage order.** The storage order is defined only by `data_pos` and
  `check_pos` in `olsc_pkg`. If you change it, rerun `tb_olsc_tac_decoder`:
  the exhaustive burst check is what shows whether a new order still
  protects the data.
