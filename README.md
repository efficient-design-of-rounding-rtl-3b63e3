# Rounding-based approximate Karatsuba multiplier

An N x N-bit unsigned multiplier for error-tolerant work (image and signal
processing) that trades a few percent of accuracy for area and delay. It
combines two ideas:

* **Karatsuba decomposition.** Split each operand into halves,
  `A = AH*2^(N/2) + AL` and `B = BH*2^(N/2) + BL`. Then

      A*B = AH*BH * 2^N + (AH*BL + AL*BH) * 2^(N/2) + AL*BL
      AH*BL + AL*BH = (AH+AL)*(BH+BL) - AH*BH - AL*BL

  so three half-size multiplications replace four.
* **Rounding-based (RoBA) multiplication.** Each of the three half-size
  products is itself approximate. Both operands are rounded to powers of two,
  `Ar` and `Br`, and

      a*b  ~  Ar*b + Br*a - Ar*Br  =  a*b - (a-Ar)*(b-Br)

  The three terms are shifts, so a RoBA multiplier holds no multiplier
  array: only a leading-one search, barrel shifters and two adders.

Every adder in the design (the half sums, the middle term and the final sum)
is a Kogge-Stone parallel-prefix adder. The whole unit is combinational.

## Datapath

```
 a[N-1:0] = {AH, AL}          b[N-1:0] = {BH, BL}
      |                             |
      +-- A1: c = AH + AL (N/2+1)   +-- A2: d = BH + BL (N/2+1)
      |
 p2 = RoBA(AH, BH)   N bits
 p1 = RoBA(AL, BL)   N bits
 p3 = RoBA(c, d)     N+2 bits
      |
 A3:  mid = p3 - p1 - p2        signed, N+3 bits
      |
 final adder:  p = {p2, p1} + (mid << N/2)      2N bits, modulo 2^(2N)
```

`p2 << N` and `p1` occupy disjoint bits of the result, so they are simply
concatenated, and the final Kogge-Stone adder only adds the sign-extended,
shifted middle term to that. The operand split and both shifts are wiring.

| signal | width | meaning |
|---|---|---|
| `c`, `d` | N/2+1 | half sums from adders A1, A2 |
| `p1`, `p2` | N | RoBA products of the low and high halves |
| `p3` | N+2 | RoBA product of the half sums |
| `mid` | N+3 (N+4 in `MID_SUB_DIFF`) | signed middle term |
| `p` | 2N | product |

## Rounding to a power of two

`roba_round` finds the leading one of the operand, at bit `m`. With
`RMODE = ROUND_NEAREST` (the default) the operand becomes `2^(m+1)` when bit
`m-1` is set, i.e. when it is at least `1.5 * 2^m`, and `2^m` otherwise. The
halfway value `3 * 2^(m-1)` therefore rounds up. A W-bit operand can round to
`2^W`, so the rounded value is W+1 bits wide. With `RMODE = ROUND_DOWN` the
operand becomes `2^m`, the power of its leading one. Zero stays zero, so any
product with a zero operand is exactly zero.

`roba_mult` then computes `b << log2(Ar)`, `a << log2(Br)` and
`1 << (log2 Ar + log2 Br)` in 2W+1 bits. It adds the first two and subtracts
the third with two Kogge-Stone adders. The result always fits in 2W bits.

## The middle term and its sign

This is the least obvious part. With exact products the Karatsuba middle
term `AH*BL + AL*BH` is never negative. With three independently
approximated products it can be. `p3` may be underestimated (both half sums
rounded up) while `p1` is overestimated (one operand rounded up, the other
down). Example, N = 8, `3 * 27`:

    AL = 3, BL = 11, AH = 0, BH = 1
    p1 = RoBA(3, 11)  = 4*11 + 8*3 - 32  = 36
    p2 = RoBA(0, 1)   = 0
    p3 = RoBA(3, 12)  = 4*12 + 16*3 - 64 = 32
    mid = 32 - 36 - 0 = -4  ->  p = -4*16 + 36 = -28

`km_middle` therefore keeps `mid` as a two's-complement value one bit wider
than the N+2 bits an exact middle term would need. The final adder
sign-extends it. The product port is 2N bits and wraps modulo `2^(2N)`, so
such a case comes out as `2^16 - 28`. No clamping is done. The exhaustive
8-bit sweep finds 6 of the 65536 operand pairs that wrap in the default
configuration, all with small operands. The 16-bit random run finds a few in
200 000. If this matters, check the result for an upper-half value while the
operands are small, or add saturation.

## Two configurations: `RMODE` and `MMODE`

The approach this RTL follows states that operands are rounded to the
*nearest* power of two, and its block diagram is a Karatsuba multiplier.
The published simulation waveforms of that design disagree with both points
in their intermediate values:

* For the 16-bit case, 500 x 10, they show `AL*BL` with AL = 244 and BL = 10
  as 2208. That number needs 244 to be taken as 128 (rounded down). Nearest
  rounding gives 2464.
* For the 8-bit case, 55 x 50, they show the middle term as
  `p3 - (p1 - p2)` = 48 - (14 - 8) = 42. The Karatsuba identity
  `p3 - p1 - p2` gives 26.

Both behaviours can be selected (types in `rbkm_pkg`):

| parameter | default | alternative |
|---|---|---|
| `RMODE` | `ROUND_NEAREST` | `ROUND_DOWN`: leading-one power |
| `MMODE` | `MID_KARATSUBA`: `p3 - p1 - p2` | `MID_SUB_DIFF`: `p3 - (p1 - p2)` |

With `ROUND_DOWN` and `MID_SUB_DIFF` the RTL reproduces every value in the
published waveforms: 55 x 50 = 2734 for N = 8, and 500 x 10 = 4256 for
N = 16. `MID_SUB_DIFF` needs N+4 bits for the middle term, because
`p3 + p2` can exceed `2^(N+2)`.

Mean relative error of the approximation, measured by the testbenches:

| configuration | N = 8, all operand pairs | wrapped results |
|---|---|---|
| nearest, Karatsuba (default) | 3.17 % | 6 |
| nearest, sub-diff | 9.97 % | 295 |
| down, Karatsuba | 6.58 % | 0 |
| down, sub-diff | 6.79 % | 0 |

For N = 16 in the default configuration, the error is 2.92 % over 200 000
random operand pairs.

## Parameters and interface

`rbkm_multiplier #(N, RMODE, MMODE)`

| port | dir | width | |
|---|---|---|---|
| `a` | in | N | unsigned multiplicand |
| `b` | in | N | unsigned multiplier |
| `p` | out | 2N | approximate product, modulo `2^(2N)` |

`N` defaults to 16 and must be even and at least 4. The 8-bit version is
`N = 8`. There is no clock, reset or handshake: `p` is valid one
combinational delay after `a` and `b` settle. To pipeline it, register the
ports outside, or cut the path after the RoBA multipliers.

## Files

| file | contents |
|---|---|
| `rtl/rbkm_pkg.sv` | mode enums, `mid_width()` |
| `rtl/rbkm_multiplier.sv` | top: split, A1, A2, three RoBA multipliers, A3, shift, final adder |
| `rtl/km_middle.sv` | adder A3, signed middle term |
| `rtl/roba_mult.sv` | rounding-based approximate multiplier |
| `rtl/roba_round.sv` | rounding to a power of two |
| `rtl/ks_adder.sv` | Kogge-Stone adder, any width, carry in and out |
| `tb/rbkm_ref_pkg.sv` | integer reference model used by all testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the RTL with the integer model in `rbkm_ref_pkg`.
That model is written from the formulas, not from the gate structure. Each
testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

* `tb_ks_adder`: exhaustive at 5 bits; random operands and full carry chains
  at 37 bits.
* `tb_roba_round`: every 9-bit value in both modes, including all halfway
  values.
* `tb_roba_mult`: exhaustive at 5 bits, random at 9 bits, and the published
  waveform products.
* `tb_km_middle`: random inputs over the full range, including negative
  results.
* `tb_rbkm_multiplier`: all 65536 8-bit operand pairs in each of the four
  configurations. It also checks the published 8-bit and 16-bit waveform
  values signal by signal. It counts these events and fails if any never
  occurs:
  * A1 carry out and A2 carry out
  * an operand rounded up, and one rounded down
  * a negative middle term
  * an exact product, and an approximate one
* `tb_rbkm_full`: the default 16-bit configuration with no parameter
  overridden, 200 009 products.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/rbkm_pkg.sv tb/rbkm_ref_pkg.sv tb/tb_rbkm_full.sv --top-module tb_rbkm_full
./obj_dir/Vtb_rbkm_full
```

Each testbench runs in well under a minute.

## Departures and open points

* **Product width.** It is 2N bits. The published 16-bit waveform shows a
  33-bit product port. An exact 16 x 16-bit product needs only 32 bits.
* **Shift of `AL*BL`.** The written description says the three products
  are shifted by N, N/2 and N bits. The block diagram and the waveforms
  shift `AL*BL` by nothing, which is the Karatsuba arithmetic. The RTL
  follows the diagram.
* **Final adder.** It is drawn as one three-input Kogge-Stone adder. Here it
  is a concatenation plus one two-input adder, which gives the same sum.
* **Middle term.** It is one or two bits wider than the N+2 bits drawn, for
  the sign reasons above.
* **Adder and RoBA internals.** Neither is specified beyond its name and
  function. The Kogge-Stone tree is the textbook radix-2 one. The RoBA
  datapath (shifters plus an add and a subtract) is a plain realisation of
  the formula.
* **Signed operands.** Not supported.
* **Area and delay.** Only FPGA slice counts and delays are published:
  179 slices / 8.01 ns at 8 bits and 463 slices / 10.34 ns at 16 bits. They
  have not been reproduced.
