# Residue arithmetic with double-range signed (DRS) pseudoresidues

Residue number system (RNS) hardware spends much of its time on modular
reduction: after every addition or multiplication, and when converting to
and from binary, a value must be brought back into the residue range of its
modulus. The usual range is [0, m), and to land in it exactly the hardware
has to compare the value with m. That comparison is a full carry-propagate
operation sitting on the critical path.

This RTL uses a slightly redundant residue set instead. For a modulus m
with 2^(h-1) < m < 2^h, a **DRS pseudoresidue** is any (h+1)-bit
two's-complement number in **[-m, m)**. Every residue class has two
representatives, <x>_m and <x>_m - m, and that costs only one extra bit.
With this freedom, most reductions need only the **sign bits** of the
operands to decide what to add. Examples:

* Two DRS values can leave [-m, m) when added only if they have the same
  sign. So the adder just adds -m (both non-negative), +m (both negative)
  or 0, and it never compares with m.
* Doubling in a shift-add multiplier is 2P - m or 2P + m, depending on the
  sign of P.
* A wide running total is corrected by 2^h * m when its two MSBs differ.

Around this number system the repository provides:

* the reduction and conversion units;
* a modular adder/subtractor, a multioperand adder tree, negation and a
  bit-serial multiplier;
* multiply-accumulate cells and two versions of an FIR residue channel;
* RNS-to-mixed-radix conversion;
* error detection in a redundant-modulus RNS;
* approximate CRT magnitude and sign decoding;
* a binary adder checked with DRS residues.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). Every module has a
self-checking testbench in `tb/`.

## Conventions used throughout

| name | meaning | width |
|---|---|---|
| `h` (parameter `H`) | width of an ordinary residue; moduli satisfy 2^(h-1) < m < 2^h | |
| DRS | two's complement in [-m, m) | h+1 |
| SRU | ordinary residue in [0, m) | h |
| TRU | unsigned in [0, 3m) | h+2 |
| wide total | two's complement in [-2^(2h), 2^(2h)), any member of the class | 2h+1 |
| BSD | signed digits {-1,0,1} held as vectors P, N, value P - N | 2 x (h+2) |

* **How the modulus is supplied.** Most units take the modulus `m` as an
  input, so one unit can serve several moduli of the same width. Units
  built around a table (`drs_reduce_lut`, `drs_reduce_wide`, the FIR
  channels, `approx_crt`) are instead built for fixed moduli given as
  parameters. Their table contents are computed at elaboration from the
  formulas given below, so no data files are involved.
* **Power-of-two moduli.** `m = 2^h` is not supported: the modulus inputs
  are h bits wide. A power-of-two modulus needs no DRS reduction anyway.
* **Small moduli.** The adder, negation and the bit-serial multiplier are
  correct for any m < 2^H. The RNS units therefore run small moduli such
  as 2, 3, 5 and 7 on one common width.
* **The range condition.** These units need 2^(h-1) < m:
  * `drs_reduce_signed`
  * `drs_from_unsigned`
  * `tru_to_drs`
  * `drs_reduce_lut`
  * `drs_mac_cell`
* **Reset.** All registers reset asynchronously; `rst_n` is active low.

## Reduction and conversion units

| module | maps | how |
|---|---|---|
| `drs_to_sru` | DRS → [0, m) | one h-bit adder; adds `m AND sign` |
| `drs_reduce_signed` | any (h+1)-bit value → DRS | one (h+1)-bit adder (details below) |
| `drs_from_unsigned` | h-bit unsigned → DRS | subtract m unconditionally |
| `tru_to_drs` | [0, 3m) → DRS | three MSBs choose 0, -m or -2m (details below) |
| `drs_reduce_lut` | (2h+1)-bit value → DRS | table read plus one subtraction (details below) |
| `drs_reduce_wide` | K-bit value → DRS | segment tables, paired subtraction, adder tree (details below) |
| `residue_encoder` | W-bit word → DRS mod 2^H-1 | sum of H-bit segments by a DRS adder tree |

Details:

* **`drs_reduce_signed`.** The adder's second input is m XOR the inverted
  sign bit, and the carry-in is the inverted sign bit. Together these add
  m to a negative value and subtract m from a non-negative one.
* **`tru_to_drs`.** It looks at the three MSBs of the TRU value:
  * `000` adds 0;
  * `001` adds -m;
  * anything else adds -2m.
* **`drs_reduce_lut`.** The input splits into a lower part X[h-2:0] and a
  signed upper part X[2h:h-1].
  * The upper part addresses a 2^(h+2)-entry table holding
    x_hi = m - <2^(h-1) * X[2h:h-1]>_m.
  * The result is the lower part minus x_hi.
* **`drs_reduce_wide`.** The input is cut into segments:
  * The rightmost h-1 bits are already a residue.
  * Each further h-bit segment reads its own table. Segments alternate
    between residue tables and inverse-residue tables.
  * Each residue is paired with an inverse residue, and one subtraction
    turns the pair into a DRS value.
  * A tree of DRS adders sums these values.

The reduction of a (2h+4)-bit number to TRU form with constant
multiplications is **not** included. That method comes from other work and
its constants are not given here. The wide and table reducers cover the
same need.

## The DRS adder (`drs_adder`)

Let X and Y be DRS values. The adder computes X + Y + K, where the
correction K is chosen from the two sign bits alone:

| sign X | sign Y | K |
|---|---|---|
| + | + | -m |
| - | - | +m |
| mixed | | 0 |

**Datapath.** The sum goes through two stages:

1. An (h+1)-bit carry-save adder merges X, Y and K.
2. An (h+1)-bit carry-propagate adder forms the result.

All carries out of bit h are dropped. The result lies in [-m, m) and is
exact modulo 2^(h+1).

**The correction bits.** Each bit of K is a 2-to-1 choice:
K_i = m_i·(X_h Y_h) | ¬m_i·¬(X_h | Y_h).

* When both operands are non-negative this gives ¬m = -m - 1. The missing
  +1 enters as the carry-in of the final adder.
* When both are negative it gives m.

**Subtraction** (`sub = 1`):

* Y is complemented bit by bit.
* The +1 of the two's complement goes into the free LSB of the CSA carry
  vector.
* The sign of ¬Y drives the correction. This also gives correct results
  for Y = 0 and Y = -m: for Y = -m the true difference can reach 2m - 1,
  and the -m correction still brings it back into range.

**Multioperand addition** (`drs_multiop_adder`) needs nothing new. A tree
of these adders sums N operands, and every node's output is again a DRS
value. The tree is laid out as a heap: leaves N-1 .. 2N-2 hold the
operands, and node i adds nodes 2i+1 and 2i+2. For N = 8 its depth is
three adders.

**Negation** (`drs_negate`) is two's complement, with one exception: the
input -m is forced to 0, because +m is not a DRS value.

## Bit-serial multiplier (`drs_mult_seq`)

`drs_mult_seq` computes P = X·Y + A (mod m), Y's most significant bit
first. The recurrence is:

    P0 = 0
    P(j+1) = 2P(j) + a(j) + t(j) · X        (mod m), j = 0 .. h

where:

* t(0) = -Y_h, because the sign bit weighs -2^h;
* t(j) = Y_(h-j) for j = 1 .. h;
* a(j) are the bits of the h-bit unsigned addend A, MSB first, in steps
  1..h, taking the place of the 0 LSB of 2P.

Each step runs in three parts:

1. **Doubling.** The doubling is done as 2P - m when P >= 0, or 2P + m
   when P < 0. Either way it stays in [-m, m).
2. **Carry-save addition.** One CSA adds the doubled P, the ±m constant
   and ±X (or 0). The result is a carry-save pair whose value lies in
   [-2m, 2m-1].
3. **Final correction.** The sign of that pair selects -m (non-negative)
   or +m (negative) for the final adder. That adder brings P back into
   [-m, m).

The internal width is h+3 bits.

**Timing:**

* `start` (one clock) samples the operands.
* `busy` stays high for h+1 clocks.
* `done` pulses for one clock, h+1 clocks after `start`, with `p` valid.
* `p` holds its value until the next start.

## Inner products and FIR filtering

**`drs_mac_cell`** keeps a (2h+1)-bit running total T and adds one full
product X·Y per enabled clock.

* The product lies in [-m(m-1), m^2], and the (2h+2)-bit sum is formed.
* If the two MSBs of the sum differ, the total has left its range. The
  cell then subtracts 2^h·m (positive overflow) or adds it (negative
  overflow). This needs only an (h+1)-bit adder on bits [2h+1:h].
* Because the product never exceeds m^2 in magnitude, one correction is
  always enough.
* Output `ovf` reports that the correction was applied.

**`fir_channel`** is one residue channel of an RNS FIR filter. It has
`TAPS` MAC cells in transposed form:

* All cells see the current sample.
* Cell j registers total(j+1) + c_j·x[n].
* Cell 0 therefore holds y[n] = Σ c_j x[n-j], as a wide total.
* `drs_reduce_lut` converts that total to DRS.
* The output is valid one clock after the input (`in_valid` → `y_valid`).

**`fir_bsd_channel`** is the faster variant of the same channel. No cell
in it contains a carry-propagate adder. Each running total is a binary
signed-digit (BSD) number of h+2 digits, held as two bit vectors P and N.
Digit i is p_i - n_i, from {-1, 0, 1}, so the value is P - N. Two helper
units do the arithmetic:

* **`bsd_adder`** adds two BSD numbers with two levels of full adders,
  so its delay is the same at any width:
  * level 1 merges P1, P2 and the inverted N1 into positive carries and
    negative sums;
  * level 2 merges those with N2 into positive sums and negative carries;
  * the identity a + b - c = 2·carry - ¬sum makes each level exact.
  * The raw sum is one digit wider than the inputs. The digits from
    position h-1 upward are a small signed number U. U is rewritten as a
    3-bit one-sided binary group, which puts the width back to h+2. This
    is a few-bit operation whatever the size of h. It is valid while the
    value stays in (-2^(h+1), 2^(h+1)), which the cell guarantees.
* **`bsd_correct`** reads only the four most significant digits. They give
  an estimate e·2^(h-2) of the value, off by less than 2^(h-2).
  * A 32-entry table, computed from m at elaboration, gives
    k = round(e·2^(h-2)/m).
  * A `bsd_adder` adds the constant -k·m.
  * The result is congruent to the input and lies in
    (-m/2 - 2^(h-2), m/2 + 2^(h-2)). Since 2^(h-2) < m/2, that is inside
    (-m, m).

Each cell (`fir_bsd_cell`) does the following:

1. **Correction.** It corrects the incoming total with `bsd_correct`.
   That runs in parallel with the multiplier, so its delay is hidden.
2. **Product split.** It splits the (2h+1)-bit product into a BSD
   pseudoresidue without any reduction adder:
   * the low h-1 bits form the positive part Y+, which is below 2^(h-1);
   * the upper h+2 bits read the same table as `drs_reduce_lut`, giving
     the negative part Y- in [1, m].
3. **Addition.** It adds the product to the corrected total with the
   second `bsd_adder`. The sum lies in (-2m, m + 2^(h-1)), and it is
   registered.

At the output the total goes through the same correction, which puts it
in (-m, m). One subtraction, P - N, then recodes it to an (h+1)-bit DRS
value. The timing is the same as `fir_channel`.

Differences from the original BSD description:

* The components are not kept in [0, m) and (0, m]. That cannot survive
  carry-free addition, so only the value is bounded.
* The correction reads four digits instead of one MSB per component. One
  MSB each is too coarse an estimate to give a range as narrow as
  (-m, m) without a carry chain.

`tb_bsd_adder` checks both helpers exhaustively at h = 4, for m = 9 and
m = 15.

## Mixed-radix conversion and error detection

**`mixed_radix_converter`.** Take moduli m_0 < … < m_(K-1); the default
set is 2, 3, 5, 7. Each step i:

1. takes the current residue r_i as digit v_i;
2. subtracts it from every higher residue, with one `drs_adder` per
   channel;
3. multiplies each higher residue by the inverse of m_i modulo m_j, with
   one `drs_mult_seq` per channel.

The inverses are constants computed at elaboration. The digits come out
redundant, v_i ∈ [-m_i, m_i), and satisfy Σ v_i · (m_0…m_(i-1)) ≡ u
(mod M).

One case worth knowing: the residues (1, -2, -2, 6) represent u = 13.
They convert to digits (1, 0, 2, 0), i.e. 1 + 2·6 = 13. A hand
calculation that subtracts without the DRS correction gets
(1, -3, -2, 1), which is the same number written with other
representatives.

Latency: (K-1)·(H+3) clocks from `start` to `done`, which is 18 clocks
for the defaults.

**`rrns_checker`** adds a redundant modulus m_K larger than the others;
the default is 11. A legitimate number lies in [0, M), where M = m_0…m_(K-1).
The checker runs in four steps:

1. **Conversion.** It converts the K information residues to redundant
   mixed-radix digits.
2. **Normalisation.** It makes the digits ordinary. `drs_to_sru` adds m_i
   to a negative digit, which lends 1 to the next position. A ripple of
   small subtractors then settles these borrows. A borrow out of the top
   position is a multiple of M and is dropped. The ordinary digits are
   available on `mr_digits`.
3. **Prediction.** It evaluates the number modulo m_K by Horner's rule on
   one `drs_mult_seq` in multiply-add mode: acc·m_i + e_i.
4. **Comparison.** It compares the prediction with the received redundant
   residue. Two DRS values agree when their difference is 0 or -m_K.

Any single corrupted residue is flagged, and so is a result outside
[0, M). For example, the negation of a non-zero legitimate number is
flagged.

Latency: 2·(K-1)·(H+3)+2 clocks, which is 44 clocks for the defaults.

**`mr_to_binary`** completes RNS-to-binary conversion. From the ordinary
mixed-radix digits it evaluates

    u = e_0 + m_0·(e_1 + m_1·(e_2 + m_2·e_3))

Each multiplication is by a constant modulus, so it is a few shifted
adds, and there is no modular reduction at all. The unit is
combinational. Its output is H·K bits wide, which is always enough,
because every modulus is below 2^H.

## Approximate CRT decoding (`approx_crt`)

Each residue addresses a table holding its contribution
<r_i · (M/m_i)^-1>_(m_i) / m_i, truncated to F fraction bits. The tables
are indexed by the (h+1)-bit pseudoresidue, so they are twice the size an
ordinary residue would need.

* An F-bit adder sums the table outputs modulo 1; the integer carries are
  simply dropped.
* The sum approximates x/M from below, with an error under K·2^-F.
* Its MSB serves as an approximate sign for the signed range
  [-M/2, M/2).

## Residue-checked binary adder (`residue_checked_adder`)

Each W-bit operand arrives together with a DRS check residue modulo
m = 2^H - 1. The default is W = 32 and H = 4, which widens a 4-bit check
to 5 bits.

* **Prediction.** The predicted residue of the sum is ra + rb - cout. The
  carry-out counts as 1 because 2^W ≡ 1 (mod 2^H - 1).
* **Regeneration.** `residue_encoder` regenerates the residue of the
  actual sum.
* **Comparison.** A DRS subtractor compares the two, accepting a
  difference of 0 or -m. This is the extra comparison cost of redundant
  check residues.
* **Fault injection.** `err_inject` is XORed into the main sum to emulate
  faults. Tie it to zero in normal use.

The adder is combinational. A pipelined user can register the check and
compare in the next stage.

## Top level (`drs_rns_top`)

The top places independent datapaths side by side, each with its own
ports.

**1. Error-checked RNS unit.** Moduli are `RMOD`, default
{2, 3, 5, 7 | 11}, with `RH = 4`. Each channel has an adder/subtractor,
negation and a multiplier.

| `op` | operation | result (`res_valid`) |
|---|---|---|
| 0 | add | 1 clock after `op_valid` |
| 1 | subtract | 1 clock after `op_valid` |
| 2 | multiply | RH+2 clocks after `op_valid` |
| 3 | negate `op_a` | 1 clock after `op_valid` |

* `op_ready` is low while a multiply runs.
* `chk_start` runs `rrns_checker` on `res_out`. The checker reports
  `chk_err`, the prediction `chk_pred` and the ordinary digits
  `chk_digits`. `mr_to_binary` turns those digits into the binary value
  `chk_bin`.
* `crt_frac` and `crt_neg` are combinational from `res_out`.

**2. FIR channels.** `fir_channel` and `fir_bsd_channel` share the inputs
`fir_valid`, `fir_x` and `fir_coef`. Both use `H = 8`, `M = 251` and
`TAPS = 8`. Both give the same residue class, though not necessarily the
same representative.

**3. Converter bank** (modulus `M`):

| input | output |
|---|---|
| `cv_word` | `cv_word_drs` |
| `cv_wide` | `cv_wide_drs`, then on to `cv_wide_sru` |
| `cv_signed` | `cv_signed_drs` |
| `cv_unsigned` | `cv_unsigned_drs` |
| `cv_tru` | `cv_tru_drs` |
| `cv_ops[MO_N]` | `cv_ops_sum` (modular sum, `drs_multiop_adder`) |

**4. Residue-checked 32-bit adder** (`ca_*` ports).

The default sizes are this design's choices, with two exceptions taken
from the original examples:

* the information moduli 2, 3, 5, 7;
* the 32-bit word with 4-bit check residues.

The choices include:

* h = 8 with m = 251 for the generic units;
* 8 taps;
* redundant modulus 11;
* F = 8 fraction bits;
* check modulus 15.

## Where this design departs from the published method

* **MAC cell correction point.** In the published cell the (2h+2)-bit sum
  is latched and corrected afterwards. `drs_mac_cell` corrects before the
  register, so it stores only 2h+1 bits. The arithmetic is the same; one
  register bit fewer, at the price of the (h+1)-bit correction adder
  being in the same clock period as the product addition.
* **BSD FIR.**
  * The components' ranges are not kept.
  * The correction reads four top digits, not one MSB per component.
  * See the FIR section above for both.
* **Mixed-radix digits.** The converter's DRS adders may pick different
  representatives from a hand calculation. For u = 13, written from the
  top digit down (v3, v2, v1, v0):
  * the published example shows (1, -2, -3, 1);
  * this RTL gives (0, 2, 0, 1).
  Both are correct.
* **Reduction through relaxed residues (TRU) with constant
  multiplications.** This is not built: its constants come from other
  work. Only its last step, TRU → DRS, is built (`tru_to_drs`).
* **Error correction with two redundant moduli.** This is not built. Only
  detection with one redundant modulus is (`rrns_checker`).
* **Smaller CRT tables.** The bit-grouping that shrinks the CRT tables
  from 2x to (1 + 1/h)x the size is not built. `approx_crt` uses one
  table per residue, indexed by the whole pseudoresidue.
* **Operations without their own unit:**
  * Squaring uses the multiplier.
  * Multioperand addition is built only as a tree of DRS adders
    (`drs_multiop_adder`). Accumulating in a CSA tree and reducing once,
    and the end-around-carry method, are not built.
* **Choices not fixed by the method.** These are this design's:
  * moduli with m < 2^h only;
  * check modulus 15;
  * all default widths, table sizes and handshakes.

## Verification status

Every module has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* **Small units** are checked exhaustively over many moduli: the
  converters, the adder and negation. The adder, for example, is checked
  for every operand pair and every modulus from 17 to 31, and also at
  h = 8.
* **The table reducer** is checked exhaustively over all 2^17 inputs.
* **The multiplier** is checked exhaustively at h = 4 and with random
  operands at h = 8. Its latency is checked too.
* **The MAC cell and the FIR channels** are compared with exact integer
  inner products and convolutions. The MAC test forces both overflow
  directions. The FIR tests require the overflow correction (or the BSD
  correction) to occur.
* **The converter and the checker** run every value in [0, 210), with
  random choices of representatives. Corrupted residues must be
  detected.
* **`drs_multiop_adder`** is checked with random operands and moduli,
  including all-(-m) operands, for a balanced and an unbalanced tree.
* **`mr_to_binary`** is checked exhaustively for the moduli {2, 3, 5, 7}
  and {3, 5, 7, 11, 13}.
* **`tb_drs_rns_top`** runs the whole top at its default parameters. It
  counts every mechanism: each operation, multiply stalls, checker
  pass/fail, CRT sign, FIR overflow and BSD corrections, conversions and
  detected adder faults. A mechanism that never occurs counts as a
  failure.

Every testbench has also been shown to fail against a deliberately broken
copy of its module.

Nothing has been checked beyond functional simulation: no timing or area
results are claimed.

## Simulating

Verilator 5 is enough. `drs_pkg.sv` must come first; the other modules are
found through `-y rtl`. From the repository root:

    verilator --binary --timing -Wno-fatal rtl/drs_pkg.sv tb/tb_drs_rns_top.sv \
        -y rtl --top-module tb_drs_rns_top -o sim
    ./obj_dir/sim

Replace `tb_drs_rns_top` with any other `tb/tb_<module>.sv`. Each
testbench ends with `$finish` and prints its `TB_RESULT` line. The top
testbench takes under a second.

To change a size, override the parameters, for example
`drs_adder #(.H(12))` or `fir_channel #(.H(6), .M(61), .TAPS(16))`.
Keep 2^(H-1) < M < 2^H for the table-based units. Table sizes grow as
2^(H+2) (reducer, FIR cells) and 2^(H+1) (CRT), so large H mainly costs
table area.
