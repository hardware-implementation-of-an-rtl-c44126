# Word-level integer FHE: encryption, decryption and homomorphic evaluation

This RTL implements a simple symmetric homomorphic encryption scheme over the
integers. It is a variant of DGHV (van Dijk, Gentry, Halevi, Vaikuntanathan).
Classic DGHV encrypts one bit per ciphertext. This variant encrypts a whole
message word, such as a character or a small number, into a single ciphertext:

    CT = m + 2*r*p + p*q          (encryption)
    m  = CT mod p                 (decryption)

Here `p` is the secret key (a prime), `r` is a noise value and `q` is a large
constant. The message `m` must lie in `[0, p-1]`. All the terms except `m` are
multiples of `p`, so reducing modulo `p` gives the message back. The same
argument works for sums and products of ciphertexts:

    (CT1 + CT2) mod p = (m1 + m2) mod p
    (CT1 * CT2) mod p = (m1 * m2) mod p

So a party that does not know `p` can add or multiply encrypted words. The
key holder then decrypts the correct result. That result is exact while it
stays below `p`; past `p` it wraps modulo `p`.

The hardware has three independent systems, each built from the same two
datapaths:

| system | module | what it shows |
|---|---|---|
| encryption-decryption | `fhe_encdec_system` | `decrypt(encrypt(m)) = m` |
| additive evaluation | `fhe_add_eval` | `decrypt(CT1 + CT2) = m1 + m2` |
| multiplicative evaluation | `fhe_mul_eval` | `decrypt(CT1 * CT2) = m1 * m2` |

`fhe_top` places the three systems side by side. Each keeps its own ports,
and they share one clock and reset.

## Sizes

All widths are in `rtl/fhe_pkg.sv`:

| constant | value | meaning | origin |
|---|---|---|---|
| `CT_W` | 64 | ciphertext | original design |
| `M_W` | 25 | message and decrypted result | original design |
| `P_W` | 32 | key `p` | chosen here |
| `R_W` | 16 | noise `r` | chosen here |
| `Q_W` | 16 | constant `q` | chosen here |
| `DEC_LATENCY` | 2 | cycles from sample to result | original design |

With these widths `m + 2rp + pq` needs at most 51 bits, so a ciphertext never
overflows. The top 13 bits of every ciphertext are therefore always zero.
Derived widths:

- A ciphertext sum has 65 bits.
- A ciphertext product has 128 bits.

The worked examples below fit comfortably. These sizes demonstrate the
arithmetic only. They are far too small to be secure: a 32-bit key can be
recovered by brute force.

## Encryption datapath (`fhe_encrypt`)

The encryptor is purely combinational:

    r ──┐
        ×──(r·p)──×2──┐
    p ──┤             +──(2rp+pq)──+── ct
        ×──(p·q)──────┘            │
    q ──┘                  m ──────┘

It uses two multipliers, a doubling (a one-bit shift), and two adders. All
the arithmetic is exact unsigned integer arithmetic. The intermediate results
are kept at full width and then cut to `CTW` bits.

## Decryption datapath (`fhe_decrypt`) — the part to read carefully

The decryptor has no modulo operator. Instead it forms the remainder as

    m = C - p * floor(C / p)

It does this in two register stages:

1. **Stage 1.** A combinational divider computes `floor(C/p)`. The quotient
   is registered together with copies of `C` and `p`, so `p` may change from
   one sample to the next.
2. **Stage 2.** A multiplier forms `p*floor(C/p)`, and a subtractor takes it
   from `C`. The remainder is registered and cut to `MW` (25) bits.

The original design computed `C/p` in floating point. It took the fractional
part of the quotient with two type casts and multiplied that fraction by `p`.
The result was only approximate, for example 64.9999975 for a message of 65,
and had to be rounded. Here the integer divider gives `floor(C/p)` directly,
so the remainder is exact for every input. The two register stages sit where
the original had its two delay elements: after the divider and after the
subtractor.

The decryptor width `CW` is a parameter. The three systems use it at three
sizes:

| system | `CW` |
|---|---|
| encryption-decryption | 64 |
| additive evaluation | 65 |
| multiplicative evaluation | 128 |

With `CW = 128` the design holds a 128-by-128-bit divider in one combinational
stage. That is the largest and slowest logic in the design. Pipeline the
divider before targeting a high clock rate. No such pipelining is done here.

Limits:

- A result of `2^25` or more loses its high bits at the output. The message
  width is 25 bits, like the original output port.
- `p = 0` is not a valid key. It gives a quotient of 0, so the output is
  `C` cut to 25 bits.

## Interface and timing

Each system has the following ports:

- `clk`, and `rst_n` (asynchronous, active low).
- `in_valid`, plus the inputs `m` (or `m1` and `m2`), `r`, `p` and `q`.
- Combinational outputs: the ciphertext(s), and for the evaluation systems
  the ciphertext sum or product.
- A plaintext reference result computed in the clear: `plain_sum` or
  `plain_prod`. This is the check value the original systems displayed next
  to the decrypted result.
- `m_out` and `out_valid`, registered.

A sample presented with `in_valid` high at one rising edge appears on `m_out`
with `out_valid` high two rising edges later. A new sample may be presented
on every cycle. Reset clears only the valid flags; the data registers are
not reset.

In both evaluation systems the two encryptions share the same `r`, `p` and
`q`, as in the original systems.

## Worked examples

These values are from the original design. The testbenches check each one.

| operation | key `p` | `q` | `r` | messages | ciphertexts | combined | decrypted |
|---|---|---|---|---|---|---|---|
| round trip | 1207645633 | 100 | 124 | 64 | 420260680348 | – | 64 |
| addition | 1207645633 | 100 | 124 | 72, 65 | 420260680356, 420260680349 | 840521360705 | 137 |
| multiplication | 9321 | 31 | 13 | 60, 65 | 531357, 531362 | 282342918234 | 3900 |

The multiplicative system is also tested on the ciphertexts of the
1207645633-key example. Their product is a 78-bit number, which is why the
product is carried on 128 bits.

## Where this RTL departs from the original design

- **Arithmetic.** The arithmetic is exact integer arithmetic. The original
  used floating-point arithmetic cores.
- **Inputs.** `m`, `r`, `p` and `q` are input ports. In the original they were
  constants built into each design, and only the 25-bit result was brought
  out. The ciphertexts and intermediate results are also outputs here.
- **Valid flags.** The `in_valid`/`out_valid` flags and the reset of those
  flags are additions.
- **Product width.** The ciphertext product is exact on 128 bits. The
  original held it in a 64-bit floating-point word.
- **Latency.** The original reported a processing time of 71 ns at 100 MHz,
  about seven cycles, with its floating-point cores. This design takes two
  cycles. Its clock rate is limited by the combinational divider and
  multipliers, and no frequency target was applied.
- **Top level.** The original built the three systems as three separate FPGA
  designs. `fhe_top` only collects them.

## Files

RTL, in `rtl/`:

| file | contents |
|---|---|
| `fhe_pkg.sv` | widths and latency |
| `fhe_encrypt.sv` | encryption datapath |
| `fhe_decrypt.sv` | two-stage decryption datapath |
| `fhe_encdec_system.sv` | encryption-decryption system |
| `fhe_add_eval.sv` | additive evaluation system |
| `fhe_mul_eval.sv` | multiplicative evaluation system |
| `fhe_top.sv` | the three systems side by side |

There is one self-checking testbench per module, `tb/tb_<module>.sv`. Each
testbench:

- computes its expected values independently of the datapath. It uses
  `m + p*(2r+q)` for ciphertexts, `k*p + m` to build inputs for the
  decryptor, and `(m1 op m2) mod p` for evaluation results.
- checks the two-cycle latency of every result.
- feeds random streams with random gaps and includes the worked examples.

`tb_fhe_top` runs all three systems at once at the default sizes. It also
counts how often each behaviour occurred:

- round trips
- additions
- multiplications
- products wider than 64 bits
- back-to-back samples

It fails if any of them never happened.

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

From the project root, with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/fhe_pkg.sv tb/tb_fhe_top.sv --top-module tb_fhe_top -Mdir obj_top
    ./obj_top/Vtb_fhe_top

To test a single module, replace `tb_fhe_top` with that module's testbench.
To lint, run `verilator --lint-only -Wall -Irtl -y rtl rtl/fhe_pkg.sv
rtl/fhe_top.sv`. Lint reports only unused-constant warnings, for the package
constants that a given module does not use. These are expected.

## Changing it

- **Widths.** Edit `fhe_pkg.sv`. Keep `2^M_W + 2^(R_W+P_W+1) + 2^(Q_W+P_W)`
  below `2^CT_W`, or ciphertexts will wrap.
- **Reusing the datapaths.** `fhe_encrypt` and `fhe_decrypt` take their
  widths as parameters, so they can be used on their own at other sizes.
- **Decryptor latency.** If you pipeline the divider, update `DEC_LATENCY`.
  The testbenches check latency against it.
