# Blinded RSA exponentiation in SystemVerilog

An RSA private-key operation computes `base^d mod N` with a secret exponent `d`.
A straightforward square-and-multiply implementation takes a time that depends
on the data, and an attacker who can choose inputs and measure the time can
recover `d` bit by bit. This design defends against that with **blinding**: the
base is multiplied by a fresh random factor before the secret exponentiation,
so the exponentiation never works on a value the attacker knows, and the
factor is removed afterwards. The arithmetic is done with Montgomery
multiplication (no division anywhere), a Wallace-tree carry-save datapath and
carry look-ahead adders, with a 512-bit key size by default.

## The blinded operation

`rsa_blinded_top` runs this sequence for each `start` pulse when
`blind_en = 1`:

| phase | unit | computes |
|---|---|---|
| random number | `rng32` | 32-bit `r`, in exactly 40 cycles |
| inverse | `mod_inverse` | `gcd(r, N)` and `r^-1 mod N`; if the gcd is not 1, a new `r` is drawn (`retries` counts these) |
| blinding factor | `mod_exp` | `r^e mod N` (`e` is the public exponent) |
| blind the base | `mod_mul` | `b' = base * r^e mod N` |
| secret exponentiation | `mod_exp` | `b'^d = base^d * r^(e*d) = base^d * r mod N` |
| unblind | `mod_mul` | `(base^d * r) * r^-1 = base^d mod N` |

The exponentiation with `d` therefore returns the product of the random number
and the wanted result, and one modular multiplication by the inverse of the
random number gives the final result. The identity `r^(e*d) = r mod N` is what
makes the result exact, which is why the public exponent is an input.

With `blind_en = 0` the unit skips straight to `base^d mod N`; this is there to
compare timings, not for use. `op_cycles` reports the length of each
operation; `rand_r` the random number used.

Only the base is blinded. The exponentiation still does one multiplication
per 1-bit of `d`, so its length depends on the Hamming weight of `d` (a fixed
property of the key), but no longer on the base.

### Inputs the host must supply

* `modulus` N, odd (Montgomery arithmetic needs an odd modulus; any RSA modulus is).
* `r2 = 2^(2W) mod N`, a per-key constant used to move values into and out of
  the Montgomery domain. It is computed once per key in software.
* `exp_d`, `exp_e`, `base` (any W-bit value), and two 32-bit seeds for the
  random number generator.

Handshake: `start` is a one-cycle pulse taken when the unit is idle; `busy`
is high until `done` pulses with `result`. Reset is synchronous and active
high throughout the design.

## Montgomery multiplier (`mont_mul`), the core

Every modular operation goes through one radix-2 Montgomery multiplier that
returns `a * b * 2^-W mod N`. It processes one bit of `a` per clock:

```
S + C  <-  (S + C + a_i*b + q*N) / 2,    q = (S + C + a_i*b) mod 2
```

`q` is chosen so the sum is even and the halving is exact; this replaces the
division of an ordinary modular product. The running value is never added
up: it is kept as two vectors S and C (carry-save form), and the four addends
are reduced to a new S/C pair by a Wallace tree of 3:2 compressors
(`wallace_reduce`), so an iteration has the delay of two full-adder rows,
independent of W. `S + C < 2N` holds throughout. After W iterations, one
clock adds S and C with the 512-bit carry look-ahead adder and subtracts N
when needed; both the sum and the difference are always computed and a
multiplexer picks one, so the multiplier takes **W+1 cycles for every
operand**. The q bit is checked by an assertion that the tree's sum vector is
even.

`mod_mul` wraps it for an ordinary product: `mont(mont(a, b), r2) = a*b mod N`,
2(W+3) cycles. `mod_exp` does left-to-right square and multiply on one
multiplier: convert the base (`mont(base, r2)`), start the accumulator at
`mont(1, r2)`, then per exponent bit square and, for a 1, multiply, and
finally `mont(acc, 1)` to leave the domain. All W exponent bits are scanned,
so one exponentiation takes `(3 + W + popcount(exponent)) * (W + 3)` cycles.

## Extended Euclid (`mod_inverse`)

Computes `gcd(a, m)` and `a^-1 mod m` with the extended Euclidean algorithm,
but without a divider: each quotient is found by shift and subtract. The
divisor and its Bezout coefficient are shifted left while twice the divisor
still fits, then shifted back one place per clock, subtracting whenever the
divisor fits. The coefficients are signed (W+2 bits, they stay within ±m); a
negative result is brought into `[0, m)` by adding m. For a 32-bit `r` and a
512-bit N the first step is long (~1000 cycles, a 480-bit quotient), the rest
short. Its run time depends on `r`, which is random and not secret-related.

## Random number generator (`rng32`, `barrel_rotl`)

Seeded by `initial_value` and `key`; a rising edge on `enable` starts a
generation and `done` (held high) rises exactly 40 clock edges later, for any
seed. At the start, both seeds are XORed with the previous output, so
repeated requests return new numbers. Each cycle runs one round

```
t = rotl(s, k[4:0])        // 32-bit barrel shifter
s = (t ^ k) + s
k = k + (t ^ 32'h9E3779B9)
```

and the output is `s ^ k`. This is a simple mixing generator, not a
cryptographic one; for a product its security would need review. Its
structure (barrel shifter, two 32-bit adders, three 32-bit XORs, fixed 40
cycles) is modelled on the resource figures of the original generator, whose
round function was not published, so the numbers it produces are its own.

## Adders (`cla_adder4/16/64`, `cla_adder_n`)

A 4-bit carry look-ahead cell, four of them with a look-ahead unit
(`cla_lookahead4`) make 16 bits, four 16-bit adders with another look-ahead
level make 64 bits, and `cla_adder_n` cascades 64-bit adders to any width
(512 by default), the carry rippling between 64-bit slices. Widths that are
not multiples of 64 are zero-padded. Every addition, subtraction and
comparison in the modular units uses this adder (subtraction as
`x + ~y + 1`, the carry out meaning "no borrow").

## Where this design departs from, or adds to, the original description

* **Blinding method.** The original describes multiplying by the random
  number around the exponentiation and then by its inverse. Taken literally
  (`r * base^d * r^-1`) that cancels without blinding anything; this design
  blinds the base with `r^e` so the secret exponentiation itself sees the
  random factor and the result stays exact. This needs the public exponent.
* **Constant-time multiplier.** The original multiplier's cycle count varied
  (98-101 cycles); this one is fixed at W+1 cycles.
* **Random generator round function** is this design's own (see above).
* **Redraw on a non-invertible random number**, the `blind_en` switch, the
  `op_cycles`/`retries` outputs and the externally supplied `r2` are additions.
* One exponentiator and one multiplier are shared between the blinding and
  the secret exponentiation.
* The ripple-carry adder, the shift-and-add and Booth multipliers that the
  original tried before settling on the units above are not included.

## Performance (simulated, W = 512, e = 65537)

| operation | cycles |
|---|---|
| Montgomery product | 513 |
| modular multiplication | 1030 |
| exponentiation, 512-bit d | (515 + popcount(d)) * 515 |
| full blinded operation, one test key | 666 995 |
| same, unblinded | 397 583 |

Blinding costs one extra exponentiation with `e`, which the fixed scan of all
W exponent bits makes as long as 512 squarings; scanning only the bits of
`e` would shrink it, at the price of a data-dependent length.

## Files and simulation

`rtl/` holds one module per file; `rsa_pkg.sv` (key size 512, RNG cycles 40,
the controller's phase type) must be compiled first. `tb/` has a
self-checking testbench per module, each printing
`TB_RESULT checks=N failures=M`:

| testbench | what it covers |
|---|---|
| `tb_cla_adder4/16/64`, `tb_cla_adder_n` | exhaustive / random sums, carry chains, 512 and 70 bits |
| `tb_barrel_rotl`, `tb_wallace_reduce` | every rotation; sum preservation for 2, 4, 7 operands |
| `tb_rng32` | value against a model, exactly 40 cycles, new number every request |
| `tb_mont_mul`, `tb_mod_mul`, `tb_mod_exp` | results against wide-integer arithmetic, exact latencies, 64 and 512 bits |
| `tb_mod_inverse` | gcd and inverse, non-invertible cases, a >= m, 512-bit modulus |
| `tb_rsa_blinded_top` | W = 64: blinded and plain operations, redraws (a modulus with factor 3), op_cycles |
| `tb_rsa_full` | default W = 512 with a 512-bit RSA key, blinded and plain (about 10 s) |

The testbenches compute their reference values with SystemVerilog's wide
integer arithmetic (`%` on 1024-bit vectors); the RSA keys in them are fixed
test keys. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rsa_pkg.sv tb/tb_rsa_full.sv \
          --top-module tb_rsa_full -Mdir obj_full -o sim
./obj_full/sim
```

Parameters: `W` (key size) on `rsa_blinded_top`, `mod_exp`, `mod_mul`,
`mont_mul`, `mod_inverse`; `EW` (exponent width) on `mod_exp`; `N` on
`cla_adder_n`; `CYCLES` on `rng32`. W must be at least 32 for the full random
number to be used (it is truncated otherwise).
