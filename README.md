# Complex ±1 multiplier in signed-binary form

A CDMA transmitter scrambles, and a receiver descrambles, every chip by
multiplying a complex sample `a + jb` by a complex pseudonoise (PN) chip
`PN_re + jPN_im`, where both PN components are ±1. Each output is then one of
four functions of the same two operands:

| PN_re | PN_im | A (real)  | B (imaginary) |
|-------|-------|-----------|---------------|
| +1    | +1    | a − b     | a + b         |
| +1    | −1    | a + b     | −(a − b)      |
| −1    | +1    | −(a + b)  | a − b         |
| −1    | −1    | −(a − b)  | −(a + b)      |

Built the obvious way, this takes an adder followed by a two's-complement
negation: two carry chains in series. This design needs one carry chain per
output. It rewrites the operands as **signed-binary (SB) digits**, and
negating an SB number only flips its sign bits. The negation therefore costs
one XOR per digit and no carry, and a single adder-like carry chain per branch
converts the result back to two's complement.

`a` and `b` are N-bit two's complement, and `A` and `B` are (N+1)-bit two's
complement. The default width is N = 8. The circuit is purely combinational:
it has no clock, no registers and no reset.

## Datapath

```
 a, b ─► prelogic ─┬─ x_sum ─► "+1" ─► conditional ─► SB→TC converter ─┐
                   │                   inverter                       ├─► switch ─► A, B
                   └─ x_dif ─────────► conditional ─► SB→TC converter ─┘
                                       inverter
 pn_re, pn_im ─► PN logic: inv_sum, inv_dif (to the inverters), swap (to the switch)
```

- The **sum branch** produces ±(a + b). The **difference branch** produces
  ±(a − b).
- The **switch** crosses the two results over to A and B when
  PN_re = PN_im. Otherwise it passes them straight through.

Counted in gate levels, the critical path is N + 3:

- one level for the prelogic,
- the "+1" stage and the conditional inverter, close to one level between
  them,
- N carry stages,
- one level for the switch.

An add-then-negate design needs two N-stage chains, about 2N + 1 levels.

| Module | File | Role |
|---|---|---|
| `cmul_pm1_sbnr` | `rtl/cmul_pm1_sbnr.sv` | top level; wires the blocks below |
| `sbnr_prelogic` | `rtl/sbnr_prelogic.sv` | bits → SB digits for both branches, one gate level |
| `sb_plus_one` | `rtl/sb_plus_one.sv` | carry-free +1 on the sum branch, two gate levels |
| `sb_cond_inverter` | `rtl/sb_cond_inverter.sv` | negation by flipping sign bits |
| `sb2tc_converter` | `rtl/sb2tc_converter.sv` | SB → (N+1)-bit two's complement, the only carry chain |
| `pn_logic` | `rtl/pn_logic.sv` | PN chip pair → inverter and switch controls |
| `output_switch` | `rtl/output_switch.sv` | 2×2 crossbar, 2(N+1) multiplexers |
| `sbnr_pkg` | `rtl/sbnr_pkg.sv` | digit type, control struct, default width |

## The number representation

### Digits

An SB digit is −1, 0 or +1. It is stored as two bits `{sign, magn}`:

| value | sign | magn |
|---|---|---|
| +1 | 0 | 1 |
| 0  | 0 | 0 |
| −1 | 1 | 1 |

The pair `10` ("minus zero") appears when a zero digit's sign is flipped. The
converter reads it as 0.

### From bits to digits without a carry

Add the bits of one position, `y_i = a_i + b_i`, which is 0, 1 or 2. Then take
the digit `x_i = 1 − y_i`. That gives:

```
sign_i = a_i & b_i        magn_i = ~(a_i ^ b_i)
```

These are the generate bit and the inverted propagate bit of an ordinary
adder.

Weight the top digit by −2^(N−1), and write V(x) for the value of the
resulting SB number. Summing over the positions then gives:

```
a + b = −(V(x_sum) + 1)
```

For the difference, the prelogic uses `a` and `~b`:

```
sign_i = a_i & ~b_i,    magn_i = a_i ^ b_i

a − b = −V(x_dif)
```

The two magnitudes are complements of each other, so one XOR per bit serves
both branches.

So the difference branch already holds −(a − b), and negates it to get a − b.
The sum branch first needs +1 added to reach −(a + b), and negates that to get
a + b.

### Adding 1 without a carry chain (`sb_plus_one`)

A transfer bit t_i ∈ {0, 1} moves into each position. The output digit is:

```
d_i = x_i + t_i − 2·t_(i+1)
```

The transfers are chosen so that each output digit stays within {−1, 0, +1}:

- Position 0 adds the constant 1. It passes a transfer on unless x_0 = −1.
- Every higher position passes a transfer on exactly when x_i = +1.

So d_i depends only on x_i and x_(i−1), and every digit is ready after two gate
levels. The transfer out of the top, t_N, is output as `d_top`.

### Back to two's complement (`sb2tc_converter`)

Two rules turn the SB number into the generate/propagate inputs of an adder:

- `G_i = sign_i` and `P_i = ~magn_i`.
- G is ignored where P = 1, which is how minus zero reads as 0.

The carry chain is then:

```
c_0 = 0
c_(i+1) = ~P_i G_i | P_i c_i
r_i     = P_i ^ c_i                        (i < N)
r_N     = ~P_(N−1) G_(N−1) | P_(N−1) ~c_(N−1)
```

The last rule treats the top position as a pair of two's-complement sign bits
of weight −2^(N−1). The (N+1)-bit result therefore cannot overflow.

On its own, the adder computes 2^N − 1 − (value). Taking all N+1 outputs
inverted gives the value itself:

```
r = V(d),  range ±(2^N − 1)
```

**Repeaters.** An inverter sits in the carry chain in front of every stage
whose index is a multiple of `REPEATER_SPACING`. The default is 3, which puts
inverters in front of stages 3 and 6 at N = 8. Behind an odd number of
inverters, the stage propagates ~c with the complementary equations. The sign
rule is likewise taken in its complementary form when the top stage receives
~c. This keeps the result identical for any spacing, and the testbench checks
it for both polarities. For an ASIC, the spacing only shapes the netlist. A
synthesis tool may restructure the chain.

### The sign-bit correction (this design's own addition)

The converter weights the top digit negatively, but the "+1" stage works with
ordinary positive weights. A transfer t_(N−1) into the top digit is therefore
counted with the wrong sign. The transfer out of the top, t_N, is also lost,
because only N digits reach the converter. So the converted N-digit result
can be off by ±2^N:

```
V(d) = V(x) + 1 − 2^N (t_(N−1) − t_N)
```

That error only flips bit N. `sb_plus_one` outputs:

```
sign_fix = t_(N−1) ^ t_N
```

The sum-branch converter XORs `sign_fix` into its sign bit. Without this gate,
the sign bit of ±(a + b) is wrong for 3/8 of all operand pairs; the low N bits
are always right. With it, the result is exact. The correction is one gate off
the carry chain, so it adds nothing to the critical path.

This departs from the architecture the design was derived from. That
architecture claims N digits and the sign rule above are enough on their own.
Exhaustive simulation shows they are not.

## PN encoding and control

A PN chip bit of **0 means +1 and 1 means −1**. This mapping is a choice of
this design. From the table at the top:

```
inv_sum = (PN_re == +1)     // sum branch natively holds −(a+b)
inv_dif = (PN_im == +1)     // difference branch natively holds −(a−b)
swap    = (PN_re == PN_im)  // A takes the difference branch
```

## Limits

- **Overflow.** −(a + b) = +2^N for a = b = −2^(N−1) does not fit in N+1 bits.
  It comes out as −2^N, the value modulo 2^(N+1). It is the only such input.
- **`sb_plus_one` width.** It needs N ≥ 3, and an elaboration-time assertion
  enforces this.
- **No timing model.** The RTL is functional. Speed, area and power depend on
  the circuit style used to build it (pass-transistor logic, a tapered
  transmission-gate carry chain), which the RTL does not model.
- **Not built.** The conventional "independent branches" and "switched
  outputs" architectures are not built; they are the baselines this design
  improves on. The alternative digit mapping x_i = y_i − 1 is not built either.
  It would change only the prelogic and which branch needs the +1.
- **Not included.** The spreading, gain and I/Q summation in front of the
  multiplier, and the PN code generator, are not part of this RTL. The PN
  chips enter as plain ports.

## Verification

Each testbench in `tb/` checks its block against integer arithmetic. Each
prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_cmul_pm1_sbnr` | Exhaustive at the default N = 8: all 65 536 (a, b) pairs × 4 PN chip pairs, against the complex product modulo 2^(N+1). It also counts each PN case, straight and crossed switching, minus-zero digits reaching a converter, sign corrections and the single wrap-around case, and fails if any never occurs. |
| `tb_cmul_widths` | N = 8, 12 and 16 (the range of useful sample widths), random operands plus extreme values. |
| `tb_sbnr_prelogic` | All input pairs; per-digit values and both identities above. |
| `tb_sb_plus_one` | All 3^8 digit inputs: T(d) + 2^N·d_top = T(x) + 1; `sign_fix` exactly when V(d) ≠ V(x) + 1; each digit depends only on two input digits. |
| `tb_sb_cond_inverter` | Random digits, minus zero included. |
| `tb_sb2tc_converter` | All 4^8 digit patterns × `sign_fix`, at repeater spacings 3 and 2, so both polarities of the sign rule are checked. |
| `tb_pn_logic` | The controls reproduce the complex product. |
| `tb_output_switch` | Straight and crossed routing. |

Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/sbnr_pkg.sv rtl/*.sv \
          tb/tb_cmul_pm1_sbnr.sv --top-module tb_cmul_pm1_sbnr -Mdir obj -o sim
./obj/sim
```

Each testbench finishes in well under a second.

## Changing the design

- **Width.** `N` on `cmul_pm1_sbnr` sets the width and is passed down to every
  block; the outputs are N+1 bits wide.
- **Repeater spacing.** `REPEATER_SPACING` on `sb2tc_converter` (0 for none)
  changes only the netlist, not the function.
- **Registers.** The design has none. To pipeline it, register `a`, `b` and
  the PN chips at the input, or the converter outputs; the stages themselves
  hold no state.
