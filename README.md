# RSA cryptosystem with Urdhva Tiryakbhyam (Vedic) multipliers

This is a complete, small RSA system in synthesizable SystemVerilog. It
generates a key pair from pseudo random numbers and encrypts or decrypts
32-bit words with it. Every multiplication in the design goes through an
Urdhva Tiryakbhyam ("vertically and crosswise") multiplier. That is the
multiplication rule of Vedic mathematics, applied here to binary numbers.
The aim is a multiplier that forms all its partial products in one step and
adds them column by column, with no shifted partial-product rows. RSA spends
almost all its time on modular multiplications, so it gains from a faster
multiplier.

The sizes are those of a teaching design, not a secure one. The primes have
16 bits, so n, e, d and the data words have 32 bits. A 32-bit modulus can be
factored in a fraction of a second. Do not use this for real security.

```
                 kg_seed, kg_start
                        |
   +--------------------v-----------------------------------------------+
   | rsa_keygen                                                          |
   |  prng --> primality_tester --> confirmed_primes --> gcd_unit        |
   |  (16-bit    (trial division,     (p, q; n = p*q,     (e, d by       |
   |   LFSR)      8x8 Urdhva square)   phi = (p-1)(q-1))  ext. Euclid)   |
   |                                        |                 |          |
   |                                 key_n register   key_e, key_d regs  |
   +----------------------------------------|-----------------|----------+
                                            |                 |
          inexp, inmod pins ----> [ key selector: use_gen_key, decrypt ]
                                            |
   indata, ds --------------------> rsa_core: cypher = indata^exp mod n
                                     (32x32 Urdhva multiplier + mod-n divider)
```

## The Urdhva Tiryakbhyam multiplier

This is the part of the design that departs most from a textbook
multiplier.

**The rule.** Write both operands as digits. Product digit k is formed from
every digit pair (a_i, b_j) with i + j = k. Column 0 has one vertical
product, a_0 b_0. The middle columns have crosswise products as well. The
pair products of a column are added to the carry from column k-1. The
lowest digit of that sum is product digit k, and the rest is the carry into
column k+1. The carry into column 0 is zero. In decimal, 325 x 728 takes
five columns:

| column | products | + carry | sum | digit | carry out |
|---|---|---|---|---|---|
| 0 | 5x8 | 0 | 40 | 0 | 4 |
| 1 | 2x8 + 5x2 | 4 | 30 | 0 | 3 |
| 2 | 3x8 + 2x2 + 5x7 | 3 | 66 | 6 | 6 |
| 3 | 3x2 + 2x7 | 6 | 26 | 6 | 2 |
| 4 | 3x7 | 2 | 23 | 3 | 2 |

The final carry 2 is the top digit, so 325 x 728 = 236600.

**`vedic_mul4`: the 4x4 cell.** This cell applies the rule in radix 2. A
"digit product" is an AND of two bits. Each of the seven columns adds at most
four AND terms and a carry, which fits in 3 bits. The carry is at most 3, so
2 bits hold it. Bit 0 of the column sum is the product bit, and bits 2:1
carry on. The seventh carry is product bit 7.

**`vedic_mul #(N)`: N x N from 4x4 cells.** The operands are cut into
D = N/4 four-bit digits. All D x D cells work in parallel, and each one
gives an 8-bit digit product. The same column rule is then applied a second
time, in radix 16:

```
col[k]  = carry[k] + sum of pp[i][k-i]      (0 <= i, k-i < D)
p[4k+3:4k] = col[k][3:0]
carry[k+1] = col[k] >> 4
p[top 4 bits] = carry[2D-1]
```

A column holds up to D products of at most 225 each, plus the carry. It is
`10 + clog2(D+1)` bits wide, which is enough for any D. N must be a multiple
of 4. The default N = 8 is an 8x8 multiplier with a 16-bit product. The
design also uses N = 16 in the key generator and N = 32 in the RSA core.
Both modules are purely combinational.

The multiplier is exact at every width: 8 bits is tested exhaustively, and
16 and 32 bits with 20 000 random pairs and the corner values.

## The RSA core (`rsa_core`)

Encryption computes C = M^e mod n and decryption computes M = C^d mod n. It
is the same operation, so one engine does both. It uses right-to-left
square-and-multiply:

1. base = indata mod n (so data >= n is allowed), result = 1 (0 if n = 1).
2. For each exponent bit, lowest first: if the bit is 1, then
   result = result * base mod n. If higher set bits remain, then
   base = base * base mod n. The loop stops at the highest set bit, so the
   last square is skipped.

Every modular multiplication is one pass through the combinational 32x32
Urdhva multiplier. Its 64-bit product goes straight into `seq_divmod`, a
restoring divider that handles one bit per clock. The divider's remainder is
the reduced value, and its quotient is not used. The four-state controller
(`S_IDLE`, `S_MUL`, `S_WAIT`, `S_NEXT`) picks the operands for each pass:
reduce, multiply into result, or square.

**Ports.** The ports are `clk`, `rst`, `ds`, `indata[31:0]`, `inexp[31:0]`,
`inmod[31:0]`, `cypher[31:0]` and `ready`. That is 132 pins. Pulse `ds` for
one cycle while `ready` is high. The inputs are sampled only on that cycle.
`ready` falls, and it rises again when `cypher` holds the result. `cypher`
then holds until the next `ds`.

**Timing.** Each modular multiplication takes 2W + 3 = 67 cycles. Let h be
the number of set exponent bits and k the index of the highest set bit. Then
`ds`-to-`ready` is (1 + h + k)(2W + 3) + 1 cycles, counting the `ds` cycle.
Some values:

| exponent | cycles |
|---|---|
| 0x11 (e = 17) | 470 |
| 0xAC1 (d = 2753) | 1 140 |
| 0xFFFFFFFF (worst case) | 4 289 |

The testbench checks this count on every run.

**Example.** Take p = 61 and q = 53, so n = 3233 = 0xCA1, phi = 3120,
e = 17 and d = 2753 = 0xAC1. Encrypting 7 gives 0x941. Decrypting 0x941
gives 7.

## Key generation (`rsa_keygen`)

The controller runs the key generation blocks as a chain. It stops as soon
as it has a key. No memory or FIFO holds candidates.

- **`prng`** is a 16-bit Fibonacci LFSR with polynomial
  x^16 + x^14 + x^13 + x^11 + 1 and period 65535. `start` loads `seed` into
  it. A seed of 0 selects the built-in seed 0xACE1.
- **Candidate forming.** The low PRIME_W bits of the random number are
  used, with the top and bottom bits forced to 1. Every candidate is
  therefore odd and full width, and n = p*q always has 2*PRIME_W bits.
- **`primality_tester`** uses exact trial division. It divides by 3, 5, 7,
  ... and stops at the first zero remainder (composite). It also stops when
  the divisor squared exceeds the candidate, or after the largest
  (PRIME_W/2)-bit odd divisor (prime). The square comes from an 8x8 Urdhva
  multiplier and the remainder from a 16-by-8-bit `seq_divmod`. Each divisor
  costs about 18 cycles, so a prime near 2^16 takes about 2 300 cycles.
- **`confirmed_primes`** keeps the first prime as p. It keeps the next
  *different* prime as q. A repeated prime is dropped, and `dup` pulses. Two
  16-bit Urdhva multipliers form n = p*q and phi = (p-1)(q-1). Both are
  registered two clocks after q arrives.
- **`gcd_unit`** tries e = 17, 19, 21, ... in turn. Each candidate must
  satisfy 1 < e < phi. For each one it runs the extended Euclidean
  algorithm on (phi, e):

  ```
  (r0, r1) = (phi, e); (t0, t1) = (0, 1)
  while r1 != 0:  q = r0 / r1
                  (r0, r1) = (r1, r0 - q*r1)     -- remainder from seq_divmod
                  (t0, t1) = (t1, t0 - q*t1)     -- q*|t1| on a 32x32 Urdhva multiplier
  ```

  If gcd = r0 = 1, then e is accepted and d = t0 mod phi. Otherwise the
  next e is tried. The coefficients t are kept signed, 34 bits wide, since
  |t| never exceeds phi. A negative final t0 has phi added to it. Each Euclid
  step takes W + 3 cycles, and a 32-bit phi needs at most about 46 steps.
- **Restart.** If phi is not larger than the first e, no e fits. In that
  case both primes are discarded and drawing continues. With 16-bit
  primes this cannot happen, because phi is always at least 2^30.
- **Key registers.** `key_n`, `key_e` and `key_d` are loaded together.
  `done` pulses and `key_valid` rises at the same time. The counters
  `composites`, `dups`, `e_rejects` and `restarts` describe the last run.

Key generation time depends on the seed. Over 40 seeds it took between 3 700
and 12 400 cycles, about 6 000 on average. Most of that time is trial
division.

## Top level (`rsa_top`)

`rsa_top` connects the key generator to the core through a key selector:

| use_gen_key | decrypt | core exponent | core modulus |
|---|---|---|---|
| 0 | x | `inexp` pin | `inmod` pin |
| 1 | 0 | generated e (encryption) | generated n |
| 1 | 1 | generated d (decryption) | generated n |

The selector is combinational, and the core samples it on `ds`. Key
generation and the core run independently. Make sure `key_valid` is high
before you use a generated key.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `rsa_pkg` | `PRIME_W`, `KEY_W`, `E_INIT` | 16, 32, 17 | shared constants |
| `rsa_top`, `rsa_keygen` | `PRIME_W` | 16 | 8 or 16 only; the LFSR is 16 bits |
| `rsa_keygen`, `gcd_unit` | `E_INIT` | 17 | first e tried; keep it odd |
| `rsa_core` | `W` | 32 | data, exponent and modulus width |
| `vedic_mul` | `N` | 8 | any multiple of 4 |
| `seq_divmod` | `NW`, `DW` | 64, 32 | dividend and divisor widths |
| `primality_tester` | `W` | 16 | multiple of 8 |

All resets are synchronous and active high. After reset every block is idle.

## Where this RTL departs from the published design, and what to trust

- The published design gives what each key generation block does, but not
  how. The LFSR, trial division, the duplicate-prime rule, candidate
  forming, and the restart are choices made here. So are the
  square-and-multiply order and the restoring divider in the core. The
  published design does not describe any Vedic division.
- The public exponent is not random. The published design says e is chosen
  at random, and its example uses 17. Here e is the first odd value from 17
  up that is coprime with phi, which is 17 for most keys.
- `ds` is read as a one-cycle "data start" pulse. `ready` and `rst` are
  added. Together with the 4 x 32 data pins this gives the 132 pins reported
  for the published core.
- The published design reports 459 registers for its RSA core. This RTL has
  about 300 flip-flops in `rsa_core` and about 980 in the whole system with
  key generation. The published design does not give its register
  breakdown, so the two cannot be matched more closely.
- No timing, frequency or power claims are made for this RTL. The
  multipliers and the 32-bit adders in the divider are single-cycle
  combinational logic. Add pipeline registers if you need a high clock rate.
- The conventional array multiplier, which the published results compare
  against, is not included.
- The functional behaviour described above is checked in simulation: the
  4x4 and 8x8 multipliers exhaustively, the other blocks against software
  models. Nothing has been tried on an FPGA.

## Simulation

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. Each one has a cycle watchdog. To build and
run one with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_rsa_top \
    -Irtl -y rtl -y tb +libext+.sv rtl/rsa_pkg.sv tb/tb_rsa_top.sv -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_vedic_mul4` | all 256 products |
| `tb_vedic_mul` | all 65 536 8x8 products (including 09x07 = 003F and 09x0E = 007E); 16- and 32-bit random and corner products |
| `tb_seq_divmod` | 64/32-bit quotient and remainder, random and corner values; latency of 65 cycles |
| `tb_prng` | sequence against a model, hold, zero seed, full period of 65535 |
| `tb_primality_tester` | all 8-bit values; 16-bit primes, composites, squares of primes and random values |
| `tb_confirmed_primes` | n and phi (61, 53 gives 3233 and 3120), dropping a repeated prime, two-clock latency |
| `tb_gcd_unit` | phi = 3120 gives e = 17 and d = 2753; rejection of 17; no valid e; 300 random phi |
| `tb_rsa_core` | 7^0x11 mod 0xCA1 = 0x941 and back; random cases against a model; cycle count |
| `tb_rsa_keygen` | 21 seeds against a full software model of the generator (same p, q, e, counters), including a repeated prime and a rejected e; restart path at 8-bit primes |
| `tb_rsa_top` | at default sizes: the example key through the pins, thirteen generated keys each checked by factoring n, encryption and decryption round trips; counts composite, repeated-prime, rejected-e, external-key, encryption and decryption events |

`tb_rsa_top` runs the whole system at its default parameters in well under a
second. Seed 5461 is used in it because that run meets a repeated prime and
has to reject e = 17.

## Files

- `rtl/rsa_pkg.sv`: shared widths.
- `rtl/vedic_mul4.sv`, `rtl/vedic_mul.sv`: the Urdhva multipliers.
- `rtl/seq_divmod.sv`: the sequential divider used for every mod reduction.
- `rtl/rsa_core.sv`: the modular exponentiation engine.
- `rtl/prng.sv`, `rtl/primality_tester.sv`, `rtl/confirmed_primes.sv`,
  `rtl/gcd_unit.sv`, `rtl/rsa_keygen.sv`: key generation.
- `rtl/rsa_top.sv`: the system top.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
