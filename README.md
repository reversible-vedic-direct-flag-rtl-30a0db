# Direct Flag Vedic divider, GCD and RSA key generator from reversible gates

This is a small decimal arithmetic system built from reversible logic gates
(Feynman, Toffoli, Fredkin, Peres, HNG, MIG, NFT). Its core is a divider that
uses the *Direct Flag* (Dhvajanka) method of Vedic mathematics. The divisor is
split into a leading digit and a "flag" digit, so each quotient digit comes from
dividing by one digit only, followed by a correction. A GCD unit runs Euclid's
algorithm on this divider. An RSA key generator uses the GCD unit and a Vedic
multiplier to turn two primes p, q and an exponent e into the modulus
n = p*q, phi = (p-1)(q-1), a validity check of e, and the private exponent
d = e^-1 mod phi.

The configuration is the small "8-bit" one. Dividends and divisors have two
decimal digits, p and q have one, and e, n, phi and d have two. Numbers cross
module ports as packed arrays of BCD digits, 4 bits each, with index 0 as the
least significant digit. Remainders and internal values are plain binary.

## The Direct Flag division

Take a divisor of two digits, `nd fl`: `nd` is the *new divisor*, `fl` the
*flag*. The divider works through the dividend one digit at a time. It keeps
a working value W, which starts as the leading dividend digit. Each
**Divide-Multiply-Compare-Subtract (DMCS)** step brings down the next digit d
and produces one quotient digit:

1. **Divide:** Q = W / nd and R = W - Q*nd. Q is limited to 9.
2. **Multiply:** P = Q * fl.
3. **Compare:** RD = 10*R + d. Test RD >= P.
4. **Subtract:** if the test holds, Q is the quotient digit and W = RD - P.
   If it fails, Q was too large. Set Q = Q-1 and R = R+nd, then go back to
   step 2.

A dividend of N digits needs N-1 steps. The last W is the remainder.
Example, 1732 / 23 (nd = 2, fl = 3):

| step | W  | first Q, R | RD vs Q*fl       | correction        | new W        | digit |
|------|----|------------|------------------|-------------------|--------------|-------|
| 1    | 1  | 0, 1       | 17 >= 0          | none              | 17           | 0     |
| 2    | 17 | 8, 1       | 13 < 24          | Q=7, R=3: 33 >= 21 | 12           | 7     |
| 3    | 12 | 6, 0       | 2 < 18           | Q=5, R=2: 22 >= 15 | 7            | 5     |

The result is quotient 075, remainder 7. The identity behind the method is
`10*W + d - Q*(10*nd + fl) = 10*(W - Q*nd) + d - Q*fl = 10*R + d - Q*fl`. So
the new W is always the true partial remainder, and it lies in
0..divisor-1. This gives the bounds the 8-bit datapath relies on:

* The first trial Q = floor(W/nd) is never below the true digit. So the
  corrections only ever count down, and Q = 0 always passes the test. An
  assertion in `rdfvdm` checks this.
* W/nd can exceed 9, for example W = 18 with nd = 1. The trial digit is then
  limited to 9 so that a 4x4 multiplier is enough. This can only happen with
  dividends of three or more digits.
* Before a try passes, RD < Q*fl <= 81. When it passes, RD - P < 99.
  So RD < 180 always fits in 8 bits, and R never exceeds 17.

**Single-digit divisors.** A divisor of 0..9 has nd = 0, which the method as
stated cannot handle. GCD chains meet such divisors all the time. `rdfvdm`
then divides by fl with flag 0. This is ordinary long division, and it takes
one DMCS step more: the last step brings down a 0 digit, and that step's R is
the remainder. A divisor of 0 sets `err`.

**Timing of `rdfvdm`.** The divider is sequential. One cycle captures the
inputs. Each quotient digit then takes one DIV cycle and one CHK cycle per
trial digit, and the done cycle follows. So the latency is
`1 + sum over digits of (1 + trials)` cycles, up to the done pulse. 42 / 12
takes 1 + (1 + 2) = 4 cycles: trial 4 fails (2 < 8), trial 3 passes (12 >= 6).
It returns quotient 3 and remainder 6.

The datapath has one of each of the method's four arithmetic blocks. It has
the non-restoring divider for W/nd and the 4x4 Vedic multiplier. The
multiplier computes Q*nd in DIV and Q*fl in CHK. It has the 8-bit
comparator, and the 8-bit adder/subtractor, which computes W - Q*nd in DIV and
RD - P in CHK. Small adder/subtractor instances form 10*R + d, Q-1 and R+nd.
Fredkin gates select the limited trial digit.

## Reversible gate layer

Every arithmetic block is a netlist of reversible gate modules, one per file:

| gate | equations | used in |
|------|-----------|---------|
| `rev_fg` Feynman | P=A, Q=A^B | adder/subtractor cells, multiplier |
| `rev_f2g` double Feynman | P=A, Q=A^B, R=A^C | comparator |
| `rev_tg` Toffoli | P=A, Q=B, R=AB^C | 2x2 multiplier |
| `rev_frg` Fredkin | P=A, Q=A?C:B, R=A?B:C | trial-digit selector |
| `rev_pg` Peres | P=A, Q=A^B, R=AB^C | half cells, 2x2 multiplier, RCA |
| `rev_hng` HNG | P=A, Q=B, R=A^B^C, S=(A^B)C^AB^D | full cells, RCA |
| `rev_mig` MIG | P=A, Q=A^B, R=AB^C, S=AB'^D | comparator |
| `rev_nft` NFT | P=A^B, Q=B'C^AC', R=BC^AC' | comparator |

These are the standard definitions of these gates. The blocks built from them:

* **`rev_addsub`** is the N-bit adder/subtractor (N = 8). It has one half cell
  `rev_has` at bit 0 and N-1 full cells `rev_fas`; c = 1 selects subtraction.
  Subtraction ripples a *borrow*, so the LSB can be a half cell. A cell
  computes x = a^c, takes the carry or borrow as maj(x, b, cin) from an HNG or
  Peres gate, and removes c from the sum with a second Feynman gate.
* **`rev_comparator`** is the 8-bit magnitude comparator. It runs from MSB to
  LSB. `rev_comp_msb` (two F2G gates and one MIG gate) gives
  P = a>b, Q = a<b and R = a=b for the top bit. Each `rev_comp_bit` takes the
  bit's own `<` and `>` from an NFT block (`rev_nft_block`: an NFT and an F2G
  gate). It merges them into the incoming one-hot P/Q/R with two MIG gates:
  p = p_in ^ (r_in & gt), q = q_in ^ (r_in & lt), and r falls out of the
  second MIG gate.
* **`vedic_mult4`** is the 4x4 Urdhva Tiryak multiplier. It uses four 2x2
  multipliers `rev_mult2x2` (a Toffoli gate and five Peres gates) and three
  4-bit ripple-carry adders `rev_rca4` (a Peres gate and three HNG gates).
  The first RCA adds the two cross products and the second adds the upper
  half of the low product. A Feynman gate merges their carries, which are
  never both set, and the third RCA adds the high product.
* **`nr_divider`** is the non-restoring divider: 8-bit dividend, 4-bit
  divisor, 5-bit adder/subtractors. It is unrolled into 8 stages. Each stage
  shifts in a dividend bit and adds the divisor if the partial remainder is
  negative, or subtracts it if not. The quotient bit is the inverse of the new
  sign. A final stage adds the divisor back if the result is negative. The
  same divider, dividing by 10, turns binary values below 100 into two BCD
  digits in `gcd` and `rsa_keygen`.

In RTL a wire can fan out to several gates for free. So signals are not
copied through extra Feynman gates, and garbage outputs are simply left open.
Gate counts, constant inputs and garbage outputs are therefore not those of a
strictly reversible netlist, and no quantum-cost figure is claimed for this
RTL. Control registers and multiplexers (the FSMs) are ordinary logic.

## GCD and RSA key generation

**`gcd`** computes gcd(a, b) for two 2-digit BCD numbers. While y != 0 it sets
(x, y) <= (y, x mod y). Each `x mod y` is one `rdfvdm` run, with x as the
dividend and y split into nd = tens digit and fl = units digit. The binary
remainder is turned back into BCD by `nr_divider` / 10. gcd(24, 12) = 12.
gcd(x, 0) = x, and gcd(0, 0) = 0.

**`rsa_keygen`** (top) takes p and q as single BCD digits and e as two BCD
digits:

* n = p*q and phi = (p-1)*(q-1) come from two `vedic_mult4` instances and two
  4-bit subtractors. They are output as BCD.
* `e_valid` = (1 < e < phi) and gcd(phi, e) = 1. The range comes from two
  comparators and the gcd from the `gcd` unit. e is converted to binary as
  (e1<<3) + (e1<<1) + e0.
* d: starting from acc = e and d = 1, it repeats acc = (acc + e) mod phi and
  d = d + 1 until acc = 1. Each repetition is one cycle: an adder, a
  comparator against phi and a subtractor. d is output as BCD, and is 0 when
  e is not valid.

p = 5, q = 7, e = 23 gives the public key (e, n) = (23, 35), phi = 24 and
d = 23, since 23*23 = 529 = 22*24 + 1.

## Interfaces

All three sequential blocks use the same handshake. Pulse `start` for one
cycle with the inputs valid; they are captured. `busy` stays high until `done`
pulses for one cycle, and the results then hold until the next `start`.
Reset `rst_n` is active-low and asynchronous. Inputs must be valid BCD
digits (0..9).

| module | inputs | outputs |
|--------|--------|---------|
| `rsa_keygen` | `p`, `q` (digit), `e` (2 digits) | `n`, `phi`, `d` (2 digits), `e_valid` |
| `gcd` | `a`, `b` (2 digits) | `g` (2 digits) |
| `rdfvdm #(NDIG)` | `dvd` (NDIG digits), `nd`, `fl` | `quo` (NDIG digits), `rem` (8-bit binary), `err` |

`rdfvdm` takes any NDIG >= 2 (default 2). With a 2-digit divisor the top
quotient digit is always 0. The shared digit type `digit_t` lives in
`rdfvdm_pkg`.

## Where this design makes its own choices

* The test is RD >= P, not a strict RD > P, because a strict test would reject
  exact divisions such as 24 / 12.
* The method as usually shown makes at most one correction per step. Here
  corrections repeat, one per clock, until the test holds, and the trial digit
  is limited to 9.
* Single-digit divisors, divisor 0 (`err`), and binary-to-BCD conversion by a
  divide-by-10 are additions of this design.
* The divider is clocked, one DMCS trial per cycle, rather than one large
  combinational network. The arithmetic blocks underneath are combinational.
* The modular inverse is a one-cycle-per-step search. e is an input that is
  checked, not a value the hardware selects.
* p and q are limited to one digit, so n and phi stay below 100. A case such
  as p = 11, q = 19 (n = 209) needs wider operands than this configuration
  has.
* The exact gate wiring inside the adder/subtractor cells, the 2x2 multiplier
  (five Peres gates rather than four plus a Feynman gate) and the comparator
  cells is this design's own choice. The one-bit comparator takes a=b from
  the second MIG gate instead of a separate gate.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M` and has a watchdog. The checks are:

* **`tb_rev_gates`:** checks each gate module against its equations for every
  input, and checks that each is reversible: no two inputs give the same
  output.
* **Gates and cells:** exhaustive. `rev_addsub` is tested on all 8-bit
  operands in both modes, `rev_comparator` on all 8-bit pairs, `vedic_mult4`
  on all 4-bit pairs and `nr_divider` on all dividends and divisors 1..15.
* **`tb_rdfvdm`:** every 2-digit dividend with every divisor 0..99, the
  1732 / 23 example and 3000 random 4-digit divisions on an NDIG = 4
  instance. It checks quotient and remainder against integer division, and
  the cycle count against a model of the trial schedule. It also requires
  that corrections, limited trial digits, single-digit divisors and zero
  divisors each occur.
* **`tb_gcd`:** all 10,000 pairs of 2-digit numbers, against Euclid's
  algorithm.
* **`tb_rsa_keygen`:** the full-size end-to-end test. It runs p, q in 2..9
  with every e in 0..99 (6400 key generations). It checks n, phi, e_valid
  and d (by brute force and by e*d mod phi = 1). It requires valid keys,
  range rejections, gcd rejections, divider corrections and single-digit
  divisors to occur. It runs in well under a second.

To simulate, for example:

```
verilator --binary --timing --assert -Irtl rtl/rdfvdm_pkg.sv tb/tb_rsa_keygen.sv \
          --top-module tb_rsa_keygen -Mdir obj && obj/Vtb_rsa_keygen
```

Files in `rtl/` are found through `-Irtl`, and a lint run
(`verilator --lint-only -Wall -Irtl rtl/rdfvdm_pkg.sv rtl/<module>.sv`) is
clean apart from style warnings. Those are open garbage pins of the gates
(`PINCONNECTEMPTY`) and unused upper bits of the divide-by-10 results.
