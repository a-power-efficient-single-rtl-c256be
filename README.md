# Single precision floating point arithmetic unit and single-MAC FIR filter, built from reversible-logic cells

This is a single precision (IEEE-754 binary32) arithmetic datapath meant for
DSP work. It has five operators: add/subtract, multiply, divide, square root,
and a 32-bit bidirectional barrel shifter. There is also a floating point
multiply-accumulate (MAC) unit, and a 32-tap FIR filter that runs all its taps
through that one MAC.

The design idea is to write each block from reversible gates wherever the
structure allows:

- **Feynman** (controlled-NOT, used to copy a signal, since reversible logic
  has no fan-out).
- **TR** (two of them make a full subtractor).
- **Fredkin** (controlled swap, used as a 2:1 multiplexer).

The square root is an array of *controlled-subtract-multiplex* (RCSM) cells.
The barrel shifter is Fredkin multiplexers around a bit-reversal trick.

In this RTL the gates are ordinary combinational modules, so the design
synthesises to normal CMOS logic. Any energy benefit of reversible or
adiabatic circuits comes from how the cells are implemented, and the RTL says
nothing about that. What the RTL keeps is the *structure*: which cells, in
which arrangement, compute each result.

## Top level

`fp_dsp_top` holds two independent parts, each with its own ports:

| part | module | timing |
|---|---|---|
| arithmetic unit | `fp_arith_unit` | combinational, result in the same cycle |
| FIR filter | `fir_single_mac` → `fp_mac` | one tap per clock, one output every 32 clocks |

The filter's MAC has its own multiplier and adder instances. The filter and
the arithmetic unit can therefore run at the same time.

### Arithmetic unit ports

| port | width | meaning |
|---|---|---|
| `in1`, `in2` | 32 | operands of add/sub, multiply, divide |
| `in3` | 32 | shifter data (plain bits) |
| `in4` | 32 | square-root operand |
| `sel` | 2 | 0 add/sub, 1 multiply, 2 divide, 3 shifter or square root (`fp_pkg::au_op_e`) |
| `h1` | 1 | with `sel = 3`: 0 shifter, 1 square root |
| `sub` | 1 | 1: `in1 - in2` |
| `lef`, `sra`, `rot` | 1 each | shifter mode, see below |
| `select` | 5 | shift amount |
| `out` | 32 | selected result |

### Filter ports

| port | width | meaning |
|---|---|---|
| `clk` | 1 | clock, all state on the rising edge |
| `r1` | 1 | synchronous reset (clears accumulator, delay line, output) |
| `r2` | 1 | enable; with `r2 = 0` everything holds |
| `x` | 32 | new sample, read in slot 0 |
| `h[0:31]` | 32 each | coefficients |
| `s` | 5 | tap slot; the caller steps it 0, 1, …, 31 once per clock |
| `y`, `y_valid` | 32, 1 | filter output and its one-cycle strobe |

## Number format and range rules (all operators)

- **Normal numbers only.** An exponent field of 0 is read as the value zero.
  Subnormals are not supported.
- **Underflow and overflow.** A result exponent below 1 flushes to a signed
  zero. One above 254 saturates to a signed infinity.
- **No special values.** NaN and infinity inputs get no special handling.
- **Rounding.** Every result is truncated (rounded toward zero). The
  multiplier, adder and square root give exactly the truncated value. The
  divider may be one unit in the last place (ulp) lower (see below).

## Operators

### Adder/subtractor (`fp_addsub`)

`sub` flips the sign of `b`, so the unit always adds two signed numbers. The
steps are:

1. **Compare.** An 8-bit comparator on the exponents and a 24-bit comparator
   on the mantissas decide which operand is larger in magnitude. The operands
   are swapped so that X1 ≥ X2. X1's exponent is the starting exponent.
2. **Exponent difference.** An 8-bit subtractor forms E1 − E2.
3. **Align.** X2's mantissa is shifted right by that difference. It keeps 26
   extra low bits plus a *sticky* bit, the OR of everything shifted out
   beyond them. The sticky bit matters only when X2 vanishes completely, for
   example 1 − 2⁻⁶⁰ must give 0x3F7FFFFF and not 1.0.
4. **Add or subtract.** A 51-bit propagate/generate adder adds when the signs
   agree and subtracts otherwise. The result is never negative.
5. **Normalise.** A 32-bit leading zero detector looks at the top of the
   sum. Its count sets both the left shift and the exponent: `E1 + 1 − count`.
   The top 32 bits always contain the leading one of a non-zero sum:
   - a sum with large cancellation has exponent difference ≤ 1, so no bits
     were lost;
   - otherwise the leading one is within the top 3 bits.

### Multiplier (`fp_mul`)

- **Sign:** XOR of the two signs (Feynman gate).
- **Exponent:** an 8-bit propagate/generate adder gives `Ea + Eb` with
  carry. A bias subtractor then removes 127.
- **Mantissa:** a 24×24 multiplier built by operand decomposition
  (`rev_mult_24x24`). Both mantissas are cut into twelve 2-bit digits. Each of
  the 144 digit pairs goes through a 2×2 multiplier (`rev_mult_2x2`, two half
  adders), and the weighted partial products are summed.
- **Normalise:** the 48-bit product is in [1, 4). A one-position normaliser
  takes `P[46:24]` and adds 1 to the exponent when `P[47]` is set. Otherwise
  it takes `P[45:23]`.

The whole path is one combinational pass.

### Divider (`fp_div`): Goldschmidt

The divider computes `N / D` with both significands N and D in [1, 2):

1. **ROM.** A reciprocal ROM indexed by the top 12 fraction bits of D gives
   K1 ≈ 1/D.
2. **First products.** `q1 = K1·N` and `r1 = K1·D`.
3. **Correction.** `K2 = 2 − r1` (two's complement).
4. **Second products.** `q2 = K2·q1` and `r2 = K2·r1`.

This uses four multipliers. The parameter `ITER` adds further rounds
`K = 2 − r`.

Why one round is enough: if `r1 = 1 − e`, then `q2 = Q·(1 − e²)`. The
12-bit index keeps |e| below about 2⁻¹³, so one round gets close to 24 bits.

How the ROM is filled: entry `idx` holds the reciprocal of the midpoint of
its interval of D, `round(2^(F+R+1) / (2^(R+1) + 2·idx + 1))`, with R = 12
and F = 30 fraction bits. Elaboration computes the entries from this formula,
so there is no data file.

Precision:

- All internal values have 30 fraction bits and are truncated after each
  multiply.
- Because `q` approaches the quotient from below, the result is the
  truncated exact quotient or one ulp lower. In random tests about 3 % of
  quotients are one ulp low. No final correction step is applied, so even an
  exact quotient such as 1/2 can come out as 0x3EFFFFFF.
- Division by zero returns infinity.

### Square root (`fp_sqrt`): RCSM array

**Exponent.** With the biased exponent e, the result exponent is
`((e + 1) >> 1) + 63`, which equals `127 + floor((e − 127)/2)`.

**Radicand.** The 23 stored fraction bits get `01` prepended, giving 25 bits.
The value is shifted one place left when the unbiased exponent is odd. The
resulting radicand `n[24:0]` lies in [2²³, 2²⁵).

**Root.** The 24-bit root is `Q = floor(sqrt(n · 2²³))`. `Q[23]` is always 1
and `Q[22:0]` is the result fraction.

**Cells.** An RCSM cell (`rcsm`) computes `a − b − borrow_in` with two TR
gates. It then uses a Fredkin gate to output either the difference (when
`u = 1`) or `a` unchanged. A Feynman gate copies `a` for the second use.

**Rows.** One row of RCSM cells is one step of the restoring square root.
Each step does:

1. Bring down two radicand bits: `T = 4·rem + pair`.
2. Try `T − (4·root + 1)`.
3. The borrow out of the row's top cell answers "was it negative?".
   - No borrow: the root bit is 1, and every cell of the row passes its
     difference.
   - Borrow: the root bit is 0, and every cell passes `T`.

**Units.** `rev_usqrt_unit` stacks `STEPS` such rows. It accepts an incoming
remainder and root, so units chain into one long square root. `fp_sqrt`
chains them as:

| unit | radicand bits | root bits |
|---|---|---|
| 12-bit | n[24:13] | Q[23:18] |
| 6-bit | n[12:7] | Q[17:15] |
| 4-bit | n[6:3] | Q[14:13] |
| 3-bit (three zero bits appended) | n[2:0] | Q[12:10] |
| ten 1-bit units (two zero bits each) | — | Q[9:0] |

Standalone, a 6-bit unit gives the 3-bit root and the remainder of a 6-bit
number.

**Sign.** A negative input has no real root. The unit returns the root of the
magnitude with the sign bit set; there is no NaN.

### Bidirectional barrel shifter (`rev_barrel_shifter`)

| `lef`/`left` | `sra` | `rot`/`rotate` | operation |
|---|---|---|---|
| 0 | 0 | 0 | logical right |
| 0 | 1 | 0 | arithmetic right |
| 0 | – | 1 | rotate right |
| 1 | 0 | 0 | logical left |
| 1 | 1 | 0 | arithmetic left: the sign bit stays, the other bits shift left |
| 1 | – | 1 | rotate left |

Only a right shifter exists (`rev_right_shifter`). It is five stages of
Fredkin 2:1 multiplexers shifting by 1, 2, 4, 8 and 16, with zero fill, sign
fill or wrap-around. Left operations reuse it:

- **Stage I:** 16 Fredkin gates controlled by `left` swap bit j with bit 31−j.
- **Stage II:** the right shifter. Sign fill is disabled for left operations.
- **Stage III:** for an arithmetic left shift, one Fredkin gate puts the
  original sign bit into bit 0 of the reversed result.
- **Stage IV:** 16 Fredkin gates reverse the bits back. Bit 0 therefore
  becomes the MSB, so the sign bit is kept.

Example: `0xC0000000` rotated left by 1 gives `0x80000001`. Shifted
arithmetically right by 1 it gives `0xE0000000`.

## MAC unit and FIR filter

`fp_mac` is `acc <= acc + a·b`, built from the floating point multiplier, the
floating point adder and a 32-bit parallel-in parallel-out accumulator
register. The controls are:

- `r1`: synchronous clear.
- `r2`: enable.
- `start`: the adder adds `a·b` to 0 instead of to the accumulator, which
  begins a new sum without a clear cycle.

`fir_single_mac` computes `y(n) = Σ h(k)·x(n−k)` for k = 0…31, one tap per
clock:

- **Operand multiplexers.** Two 32:1 multiplexers select the MAC operands.
  Each is a five-level tree of Fredkin 2:1 multiplexers (`rev_mux`). The
  operands are:
  - `h[s]`;
  - the sample `x(n−s)`: the `x` input in slot 0, otherwise entry `s` of a
    32-entry sample delay line.
- **Slot 0** starts a new sum and pushes `x(n)` into the delay line.
- **Output.** At the clock edge that ends slot 0 of the next sample period,
  the finished sum is copied to `y` and `y_valid` pulses.
- **Timing.** One output every 32 enabled cycles. `y(n)` appears 33 cycles
  after `x(n)` was presented.
- **Sum order.** The adder adds taps in order 0…31 with truncation, so the
  result depends on that order. The testbenches reproduce it exactly.

## Where this RTL makes its own choices

These points are not fixed by the design description and were decided here:

- **Range rules:** the zero, overflow and underflow rules, truncation
  everywhere, and no NaN or subnormal handling.
- **Adder width:** 26 guard bits plus a sticky bit, and the mantissa
  adder/subtractor at 51 bits instead of 24.
- **Divider precision:** ROM size (12 index bits), internal precision (30
  fraction bits), one Goldschmidt round by default, and no final correction.
- **Square-root rows:** RCSM rows span a fixed 28-bit remainder bus rather
  than the minimal cell count per row.
- **Gate pins:** which Fredkin output is used as the multiplexer output.
- **Shifter controls:** arithmetic left is `left = 1, sra = 1`. Rotate wins
  over `sra`.
- **Arithmetic unit controls:**
  - a single select line `h1` for the shifter/square-root multiplexer, with 0
    selecting the shifter;
  - a separate `sub` input;
  - the name `sra` for the arithmetic-shift control.
- **MAC and filter controls:** `r1` is reset and `r2` is enable. The MAC's
  `start` input, the filter's sample delay line, output register and
  `y_valid` are additions that complete the filter around the single MAC.
- **Structure left to synthesis:** the carry look-ahead adder is written as a
  propagate/generate recurrence. The Wallace-tree summation of the
  multiplier's partial products is written as an adder tree.

Sizes of the main parameters:

| parameter | module | default |
|---|---|---|
| `TAPS` | filter, top | 32 |
| `N`, `K` | shifters | 32, 5 |
| `W` | `rev_mult_24x24` | 24 |
| `ROM_BITS`, `ITER` | `fp_div` | 12, 1 |

## Files

- `rtl/fp_pkg.sv`: the `fp32_t` struct, the `au_op_e` select enum and
  constants.
- `rtl/rev_feynman.sv`, `rev_tr.sv`, `rev_fredkin.sv`: gates.
- `rtl/rcsm.sv`, `rev_usqrt_unit.sv`, `fp_sqrt.sv`: square root.
- `rtl/rev_right_shifter.sv`, `rev_barrel_shifter.sv`: shifter.
- `rtl/rev_pg_adder.sv`, `rev_comparator.sv`, `rev_lzd.sv`: adder parts.
- `rtl/fp_addsub.sv`: adder/subtractor.
- `rtl/rev_mult_2x2.sv`, `rev_mult_24x24.sv`, `fp_mul.sv`: multiplier.
- `rtl/fp_div.sv`: divider.
- `rtl/rev_mux.sv`: N:1 Fredkin-tree multiplexer (32:1 in the filter, 4:1
  and 2:1 in the arithmetic unit).
- `rtl/fp_arith_unit.sv`, `fp_mac.sv`, `fir_single_mac.sv`, `fp_dsp_top.sv`:
  the assembled units and the top.
- `tb/fp_ref_pkg.sv`: the reference models. Products and sums are formed
  exactly in double precision and truncated to single. Square roots use
  integer bisection.
- `tb/tb_<module>.sv`: one self-checking testbench per module. `tb_rev_gates`
  covers the three gates.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog,
and the square-root and Goldschmidt tests run thousands of random operands.
For example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/fp_pkg.sv tb/fp_ref_pkg.sv \
          tb/tb_fp_dsp_top.sv --top-module tb_fp_dsp_top -o sim
./obj_dir/sim
```

`tb_fp_dsp_top` runs the whole design at its default size in well under a
second:

- It drives every operator and every shifter mode.
- It triggers overflow, underflow, cancellation and zero operands.
- It streams 36 samples through the 32-tap filter, with a pause in the middle
  of one sample period.
- It counts each of these mechanisms and fails if one never occurred.

`tb_fir_single_mac` also checks the filter's rate (32 cycles per output) and
latency (33 cycles).

## How far it can be trusted

Every module passes its testbench. The results are compared with independent
reference models:

- multiplier and adder: bit-exact against truncated double-precision results;
- square root: bit-exact against an integer square root;
- divider: within one ulp below the truncated quotient;
- shifter: against the language's shift operators.

Points to be aware of:

- The adder's random tests keep exponent differences at or below 28, where
  the double-precision reference is exact. Larger gaps are covered by
  directed cases only.
- Timing, area and power were not characterised. The divider's reciprocal
  ROM is 4096 × 31 bits and dominates the memory bits after synthesis.
- The published waveforms give some values that this design deliberately
  does not match, because they are not the arithmetically correct results:
  - The multiplier waveform shows 0x45EE7400 for 203 × 27.5. That differs
    from the correct 0x45AE7400 in one fraction bit.
  - The divider waveform shows 203 / 100 with an unnormalised significand.
  - The arithmetic unit's add and shift waveforms show outputs that match no
    operation on the printed inputs.
