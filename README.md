# Sign-magnitude decimal (BCD) adder/subtractors for LUT-6 FPGAs

IEEE 754-2008 decimal floating point stores the significand as a sign plus a
magnitude of up to 34 decimal digits. Adding or subtracting two such
significands means working out the *effective* operation on the magnitudes.
When that operation is a subtraction, the circuit must also find which
magnitude is larger, because the result magnitude must never come out
negative or in complement form.

This RTL implements six combinational circuits for
`(sx,|X|) ± (sy,|Y|) → (sr,|R|)` on packed BCD. They follow two strategies:

* **SM-C10**: a ten's complement adder/subtractor computes `|X| ± |Y|`.
  If a subtraction went negative, the result is complemented back.
* **SM-U**: an unsigned adder computes `|X| + |Y|` while a subtractor that
  always returns a magnitude computes `||X| − |Y||`. The effective operation
  then selects one of the two.

Each strategy comes in three versions, named I, II and III after the
carry-propagate adder it uses. The circuits follow the scheme published as
*FPGA-Specific Decimal Sign-magnitude Addition and Subtraction* (2015). Their
decimal carries run on the FPGA's fast carry chain: each carry is one 2:1
"propagate ? carry-in : generate" multiplexer per digit or per bit. The RTL
writes those multiplexers out explicitly, so the carry chains can be read
straight from the code.

All six circuits compute the same function. They differ in area and delay
once mapped to LUT-6 FPGAs:

* The ten's complement family is the smaller one. Its version III is the
  smallest circuit overall.
* The parallel family is faster at 7 and 16 digits. SM-C10-II is the fastest
  at 34 digits.
* SM-U-I and SM-U-II have no advantage over SM-U-III. Their delay is set by
  the subtractor, which all three share.

## Number format and sign rules

* A magnitude of `N` digits is a `4*N`-bit vector. Digit `i` sits in bits
  `4i+3..4i`, and digit 0 is the least significant. Inputs are assumed to be
  valid BCD (every digit 0–9). Nothing checks this.
* A sign bit is 1 for negative. `op` = 1 means subtract.
* The effective operation is `ope = sx ^ sy ^ op`: 1 means the magnitudes
  are subtracted.
* Result sign, by case:

| case | result sign `sr` |
|---|---|
| `ope = 0` (magnitudes added) | `sx` |
| `ope = 1`, `|X| >= |Y|` | `sx` |
| `ope = 1`, `|X| < |Y|` | `~sx` |

* Equal magnitudes subtracted give a zero magnitude with sign `sx`, so
  `(-5) - (-5)` returns −0.
* A sum wider than `N` digits wraps modulo 10^N. No overflow flag is
  produced, because the scheme does not define one. The carry out of the
  adders is available inside `sm_c10` and `sm_u` if you need to add one.

## The carry-propagate building blocks

### Unsigned adders: `add_i`, `add_ii`, `add_iii`

All three compute `a = x + y + cin (mod 10^N)` and a decimal carry out.

* **Add-I.** Each digit first forms the 4-bit binary sum `u[4:0]` on its own
  small chain. The digit's decimal propagate is `P = (u == 9)` and its
  generate is `G = (u >= 10)`. One multiplexer per digit forms the decimal
  carry. The output digit is corrected to `u + c[i] + 6·c[i+1] (mod 16)`.
  The digit chain costs only one multiplexer per digit, but it has to wait
  for the binary sum first.
* **Add-II.** `P` and `G` are computed straight from the operand digits, so
  the decimal chain starts without waiting for `u`:
  * `Q = (x[3:1] + y[3:1] == 4)`: the digit sum is 8, 9 or 10.
  * `R = (x[3:1] + y[3:1] >= 5)`: the digit sum is at least 10.
  * `P = Q & (x[0] ^ y[0])` and `G = R | Q & x[0] & y[0]`.

  Correction is as in Add-I. Add-II is faster and larger.
* **Add-III** (binary addition with bias and correction). This one is the
  least obvious of the three.
  * Let `h = x[3:1] + y[3:1]` (0..8). The upper bits are replaced by the
    even value `w = 2h + (h >= 4 ? 6 : 0)`.
  * The carry chain then just adds `w + x[0] + y[0] + c` in binary. It runs
    through all `4N` bits, with bit 3's generate equal to `w[4]`.
  * When `2h >= 10` the digit must carry, and the +6 bias makes the 4-bit
    carry out equal the decimal carry.
  * When `2h < 8` the digit sum is at most 9 and no bias is needed.
  * When `2h == 8` the bias is right if the digit sum reaches 10. Otherwise
    the binary result is 14 or 15 where 8 or 9 is wanted.
  * That single bad case is fixed by clearing bits 2 and 1 whenever result
    bit 3 is set. This clearing never harms a correct digit, because a
    correct digit with bit 3 set (8 or 9) already has those bits clear.

  Add-III is the smallest. Its chain is four multiplexers per digit instead
  of one.

### Unsigned subtractor: `sub_u`

`s = x − y (mod 10^N)`, with `c_n` = 1 when `x < y`.

* One binary borrow chain runs through all `4N` bits. The bit propagate is
  `XNOR(x, y)` and the bit generate is `y`.
* The chain produces the *inverted* difference `nz = propagate ^ borrow_in`,
  which is what one LUT plus the chain's XOR gives.
* A digit that borrowed has taken 16 instead of 10 from its neighbour and
  must be reduced by 6. In terms of `nz`, the digit is `9 − nz` after a
  borrow and `~nz` otherwise.

### Sign-magnitude subtractor: `sub_sm`

This is the core of the SM-U strategy. It computes `ss = |x − y|` and
`sign = (x < y)`.

1. A `sub_u` computes `s = x − y` and its final borrow `c_n`.
2. If `c_n = 1`, the magnitude is `0 − s`. Otherwise it is `s − 0`.
3. No multiplexers choose the operands of the second subtraction. The second
   borrow chain gets its bit propagate and generate directly:
   * `pss = ~s`: a 0 bit passes the borrow in both cases.
   * `gss = s & c_n`: a 1 bit generates a borrow only when `0 − s` is
     formed.
4. The second chain's output is corrected exactly like `sub_u`'s.

The two chains sit in series. That makes this the slowest path of the SM-U
circuits, and it is why the three SM-U versions have the same delay.

### Ten's complement adder/subtractors: `c10_i`, `c10_ii`, `c10_iii`

Each computes `sa = x ± y (mod 10^N)`. Subtraction is `x + C9(y) + 1`, with
`sub` (A/S) as the carry into digit 0. The carry out `c` of a subtraction is
1 exactly when `x >= y`.

* The nine's complement is four bit equations per digit:
  `C9[0] = ~d[0]`, `C9[1] = d[1]`, `C9[2] = d[2] ^ d[1]`,
  `C9[3] = ~d[3] & ~d[2] & ~d[1]`.
* `c10_i` folds the y/C9(y) choice into the first LUT of each bit, then
  works like Add-I.
* `c10_ii` computes the Add-II `Q`/`R` functions for both the add and the
  subtract operand, and picks one pair with `sub`.
* `c10_iii` puts an operand stage (`q = sub ? C9(y) : y`) in front of an
  `add_iii`, because the biased adder has no free LUT input left for the
  operation select.

### Conditional re-complement: `dec_neg`

`r = ne ? C9(sa) + 1 : sa`. Adding 1 to a nine's complement only carries
through digits of `sa` that are 0. So the increment chain is one multiplexer
per digit: `nc[i+1] = (sa[i] == 0) & nc[i]`, with `nc[0] = ne`.

Each output digit is `C9(sa[i]) + nc[i]`, where `nc[i]` is the carry *into*
the digit. That sum wraps to 0 exactly when `nc[i+1]` is set.

## The two sign-magnitude strategies

**`sm_c10` (SM-C10-I/II/III, parameter `ARCH`, default `ARCH_II`).**

* `ope` drives the ten's complement unit's A/S input.
* For a subtraction, a carry out of 0 means `|X| < |Y|` and that `sa` is the
  complement of the answer.
* So `ne = ope & ~c` enables `dec_neg`, and `sr = ne ^ sx`.
* Path: one decimal chain, then the one-multiplexer-per-digit `dec_neg`
  chain.

**`sm_u` (SM-U-I/II/III, parameter `ARCH`, default `ARCH_III`).**

* `add_*` and `sub_sm` run in parallel.
* `r = ope ? ss : a` and `sr = (ope & sign) ^ sx`.
* In a LUT mapping, the subtractor's final digit correction and this 2:1
  select fit into one LUT per result bit. The RTL keeps them as two steps
  and leaves the merge to synthesis.

**`dec_sm_addsub_top`** instantiates all six circuits side by side.

* Every port is an array indexed by `dec_pkg::variant_e`:
  `V_SM_C10_I`, `V_SM_C10_II`, `V_SM_C10_III`, `V_SM_U_I`, `V_SM_U_II`,
  `V_SM_U_III`.
* Each circuit has its own operands and result.
* To use a single circuit, instantiate `sm_c10` or `sm_u` directly with the
  `ARCH` you want.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `N` | every module | 34 (`dec_pkg::N_DIGITS`) | digits per magnitude. 34 is decimal128; 16 (decimal64) and 7 (decimal32) are the other usual sizes |
| `ARCH` | `sm_c10`, `sm_u` | `ARCH_II` / `ARCH_III` | which adder the circuit is built on |

Everything is combinational: no clock, no reset, no state. To pipeline the
design, add registers around the modules.

## Files

| file | contents |
|---|---|
| `rtl/dec_pkg.sv` | width default, `arch_e`, `variant_e`, digit functions `c9`, `sub_corr`, `add_corr` |
| `rtl/add_i.sv`, `rtl/add_ii.sv`, `rtl/add_iii.sv` | unsigned BCD adders |
| `rtl/sub_u.sv`, `rtl/sub_sm.sv` | unsigned and sign-magnitude BCD subtractors |
| `rtl/c10_i.sv`, `rtl/c10_ii.sv`, `rtl/c10_iii.sv` | ten's complement adder/subtractors |
| `rtl/dec_neg.sv` | conditional ten's complement |
| `rtl/sm_c10.sv`, `rtl/sm_u.sv` | the two sign-magnitude strategies |
| `rtl/dec_sm_addsub_top.sv` | all six circuits side by side |
| `tb/tb_dec_ref_pkg.sv` | digit-by-digit reference arithmetic and operand generator |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dec_sm_widths.sv` | all six circuits at 2 digits (exhaustive), 7 and 16 digits |

## Verification

Every testbench checks the circuit against a reference that adds and
subtracts digit by digit on integers, like pencil and paper. The reference
shares nothing with the carry-chain formulation.

Operands mix random values with the corner cases:

* equal magnitudes
* values differing in one digit
* all nines plus a small value, so a carry crosses every digit
* digit pairs summing to 9
* zeros and short operands

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends through a
watchdog if it stalls.

* `tb_dec_sm_addsub_top` runs all six circuits at the default 34 digits.
  For each circuit it counts effective additions, additions that overflow,
  subtractions with positive and negative differences, equal magnitudes,
  re-complement carries crossing at least half the digits, and additions
  whose carry crosses every digit. It fails if any of these never occurs.
* `tb_dec_sm_widths` tries every pair of 2-digit magnitudes with every sign
  and operation (80,000 vectors per circuit), then random vectors at 7 and
  16 digits.

Running one testbench with Verilator 5 (the packages must come first):

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/dec_pkg.sv tb/tb_dec_ref_pkg.sv tb/tb_sm_u.sv --top-module tb_sm_u -o sim
./obj_dir/sim
```

Replace `tb_sm_u` with any other testbench name. Each simulation runs in
about a second once built.

## Where this RTL makes its own choices

Some points of the published scheme are given only as block diagrams or
stated only in words. In those places this RTL fills in the details:

* **P/G functions.** Add-I and C10-I use `P = (u == 9)` and `G = (u >= 10)`
  from the binary digit sum. The `Q`/`R` split of Add-II and C10-II uses the
  definitions above. Any functions that give the same `P` and `G` would do.
* **The Add-III bias** is the specific `w` given above. The published
  circuit clears the two bits with slice latches whose reset comes from bit
  3 of the result. Here the clearing is an AND gate, so the design holds no
  latch.
* **Borrow into digit 0** of each `sub_u`/`sub_sm` chain is 0. The SM
  strategies always feed the unsigned adder a carry in of 0.
* **`dec_neg`** adds the incoming carry `nc[i]` to each digit, which is what
  `C9(sa) + 1` needs; the output function of each digit is written from that
  arithmetic rather than taken from a gate-level description.
* **Merged LUT functions.** In the published mapping, the first subtractor's
  correction is merged into the second subtractor's propagate/generate LUTs,
  and the second correction is merged into the output select. Here both
  merges are left to synthesis. The logic function is the same.
* **Sign rule.** The sign follows the case table above and the closed forms
  `sr = (ope & ~c) ^ sx` (SM-C10) and `sr = (ope & sign) ^ sx` (SM-U).

## Limits

* **Not verified for speed or size.** The area and delay advantages above
  hold only for a LUT-6 FPGA mapping with a fast carry chain. Generic
  synthesis or an ASIC flow will rank the six circuits differently. No FPGA
  timing or LUT counts were produced for this RTL.
* **Invalid BCD inputs** (digits 10–15) give undefined results.
* **No overflow or exception flags.** There is also no rounding or
  alignment: this is only the fixed-point significand adder of a decimal
  floating-point unit.
