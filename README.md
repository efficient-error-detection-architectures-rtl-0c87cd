# Recomputing error detection for SABER and Falcon datapaths

Fault attacks on lattice-based cryptography work by disturbing a
computation, through clock or voltage glitches, a laser or an
electromagnetic pulse, and then reading secrets out of the faulty
output. The datapaths here protect themselves by *recomputing*. Each
operation runs twice on the same hardware. The second run uses
*encoded* operands, chosen so that a fault-free circuit gives the same
answer both times. A comparator then flags any difference. Two
encodings are used:

* **RENO**, recomputing with negated operands. Both factors of a
  product are negated, since (-a)(-b) = ab. Where a sum is involved,
  the result is negated back at the output.
* **RESwO**, recomputing with swapped operands. The two operands of a
  subtractor or a multiplier change ports. A fault-free unit gives the
  same result, up to a known sign.

A transient fault hits only one of the two runs, so the two results
differ. Plain recomputation would repeat a permanent fault, such as a
stuck-at bit. With encoded operands the stuck bit meets different
values in each run, so a permanent fault also makes the runs disagree.

The RTL covers these parts:

* **SABER, hardware-only path.**
  * A centered binomial sampler with RESwO.
  * A data memory.
  * A 256-lane parallel schoolbook polynomial multiplier with RENO.
* **SABER, HW/SW co-design path.** A matrix-vector accelerator with
  RENO that computes one row of `b' = (A s' + h) mod q`.
* **Falcon and ModFalcon.**
  * The recomputing units around line 13 of ffSampling,
    `t0' = t0 + (t1 - z1) ⊙ L10`, in five variants.
  * The RENO check on ModFalcon's `t - z`.
  * The RENO check on line 4 of the constant-time sampler,
    `z = (2b-1) z0 + b`.

Every unit has an `err` output. It goes high after a run whose two
computations disagree.

SABER parameters: N = 256, q = 2^13, p = 2^10 and module rank l = 3.
Secrets are sampled with μ = 8, which gives values in [-4, 4].

## The recomputing units at a glance

| unit (module) | normal computation | recomputation | decoding | start → done |
|---|---|---|---|---|
| `cbd_lane` / `binomial_sampler` | HW(lo) − HW(hi) | HW(hi) − HW(lo) (swapped) | flip the sign bit | 2 edges after the second word |
| `saber_polymul_reno` | s(x)·a(x) | (−s(x))·(−a(x)) | none | N/16 + 2N + 4 edges (532) |
| `saber_accel_reno` | Σ A_ij s_j + h | Σ (q−A_ij)(q−s_j) + h | none | L·2·(N/4 + N + 2) + 1 edges (1933) |
| `falcon_reno_sub` | t1 − z1 | (−z1) − (−t1) | none | 2 edges |
| `falcon_reswo_mul` | L10 ⊙ out1 | out1 ⊙ L10 (swapped ports) | none | 2 edges |
| `falcon_reno_mul` | L10 ⊙ out1 | (−L10) ⊙ (−out1) | none | 2 edges |
| `falcon_reno_mac` | L10 ⊙ out1 + t0 | (−L10) ⊙ out1 − t0 | negate | 2 edges |
| `falcon_reno_ffs` | t0 + (t1 − z1) ⊙ L10 | −t0 + (−t1 + z1) ⊙ L10 | negate | 2 edges |
| `modfalcon_reno_sub` | t − z (K lanes) | (−z) − (−t) | none | 2 edges |
| `samplerz_reno` | (2b−1)·z0 + b | (−(2b−1))·(−z0) + b | none | 2 edges |

"Edges" counts the clock edges after the edge that takes `start`, up
to the edge that raises `done`.

The small units share one pattern:

* `start` latches the operands into registers while the unit is idle.
* In the Norm cycle, the datapath result goes into a register.
* In the recomputation cycle, the same datapath runs again with its
  input multiplexers switched. The comparator checks the new result
  against the register.
* After that, `done` pulses for one cycle. `out`, which holds the
  Norm result, and `err` stay valid until the next `start`.

Halving the throughput is the cost of time redundancy. No sub-pipelining
is built in.

## SABER: binomial sampler (`binomial_sampler`, `cbd_lane`)

Two 64-bit pseudorandom words arrive over a `in_valid`/`in_ready`
handshake. They fill a 128-bit buffer, with the first word in the low
half. Sixteen lanes each take 8 bits of the buffer.

Each lane computes two Hamming weights. A swap multiplexer then feeds
them to a 5-bit two's complement subtractor: `a − b` in the Norm cycle
and `b − a` in the RESwO cycle. The difference becomes a 4-bit
sign-magnitude sample (sign in bit 3). In the RESwO cycle the sign bit
is flipped, so a correct lane produces the same sample in both cycles.
A zero result always has sign 0, so +0 and −0 can never trip the
comparator.

The 16 Norm samples form the 64-bit output word. Sample k sits in bits
`4k+3:4k`. The output word is valid together with `err` for one cycle.

`MU` is a parameter. LightSABER (μ = 10) builds 12 lanes, and their 48
bits sit in the low end of the output word.

## SABER: polynomial multiplier (`saber_polymul_reno`)

**Storage.** The secret s(x) has 256 coefficients of 4 bits each. It
is loaded once from the data memory, 16 coefficients per word, into a
register array, so every coefficient is visible at once. The public
polynomial a(x) is never stored. `coef_selector` takes one coefficient
per cycle out of a memory word that holds four 13-bit coefficients in
16-bit slots.

**One cycle.** In each cycle, all 256 `saber_mac_core` instances add
`s[j]·a[i]` into their accumulators. Because the secret is small, each
core is a shift-and-add of |s| ≤ 7, followed by an add or a subtract
chosen by the sign bit. In the same cycle the array is multiplied by
x. This is a negacyclic shift: coefficient j moves to j+1, and the last
coefficient moves to position 0 with its sign bit flipped, because
x^256 = −1. Arithmetic mod 2^13 is plain 13-bit wrap-around.

**Getting −s(x) for free.** After the 256 shifts of run 1, every
coefficient has wrapped exactly once. The register therefore holds
s(x)·x^256 = −s(x). Run 2, the RENO run, uses this directly, so no
negation hardware is needed on the secret side. Negating a[i] (q − a)
is done in the coefficient selector. At the end of run 2 the register
holds s(x) again.

**Comparing the runs.** Run 1's 256 results are copied into a shadow
bank. One compare cycle after run 2 sets `err`. `result` shows the
run-1 product.

**Fault injection.** `fi_and` and `fi_or` force stuck-at-0 and
stuck-at-1 bits onto the a operand after the Norm/RENO multiplexer.
In normal use, tie them to all ones and all zeros. Take a stuck LSB as
an example. Run 1 multiplies by `a & ~1` and run 2 by `-((-a) & ~1)`.
These differ for every odd a, so the fault is caught.

**The blind spot of negation.** A lone stuck-at fault on the MSB of a
changes that coefficient by ±q/2 = ±2^12. Modulo q, −q/2 and +q/2 are
the same number, so negation can map this error onto itself. Run 1 and
run 2 are then wrong in the same way, and the comparator stays quiet.
In a campaign of 2,000 random single-bit, two-bit and six-bit
stuck-at faults on the a operand, every fault corrupted the product.
1,981 of them (99.05%) raised `err`. All 19 misses were this MSB case.
Every fault on two or more bits, and every single fault on any other
bit, was caught in that campaign. This includes the LSB faults on which
the published evaluation concentrates.

**Memory ports.** Both ports have one cycle of read latency.
`s_rd_en` and `a_rd_en` are never high together, so the two ports can
share one RAM read port. The top level does exactly that.

## SABER: data memory and the hardware path in `pqc_ed_top`

`saber_data_mem` is a simple dual-port RAM: 64-bit words, one write
port, one read port with one cycle of latency. In the top level it
holds:

* the secret at words 0..15, written by the sampler through a wrapping
  pointer;
* a(x) at words 16..79, written by the host.

The sampler always wins the write port. `host_wready` is low in any
cycle where the sampler writes, and the host must hold its write until
`host_wready` is high. The multiplier's read address is taken from its
secret port during loading and from its a(x) port during the runs. An
assertion checks that the two ports are never used together.

## SABER: HW/SW co-design accelerator (`saber_accel_reno`)

Software produces one row of A (with SHAKE-128) and the sign-extended
secret vector s'. Both are read as 13-bit two's complement
coefficients, four per word, at word address `j·N/4 + w`. The
accelerator computes

    b'_i = (Σ_{j<L} A_ij(x)·s_j(x) + h) mod q,   h = 4 in every coefficient.

It uses the same parallel-MAC structure as the multiplier, but both
operands are 13 bits wide. Each product A_ij·s_j is computed twice:

* a Norm pass;
* a RENO pass that reloads s_j and feeds both MAC inputs as q − x, so
  the buses stay 13 bits wide.

Each pass accumulates into its own bank of temporary registers. At the
end of the row the comparator checks the two banks. The rounding of b'
to p is left to software.

## Falcon and ModFalcon units

ffSampling works on FFT-domain values, which are complex numbers.
Here they are signed fixed-point numbers, 32 bits with 16 fraction
bits for the real part and for the imaginary part (`falcon_pkg::cfx_t`).
⊙ is the complex product.

**Exact identities.**

* Subtractions wrap modulo 2^32, so the RENO identities hold for every
  input.
* Products are formed at full width (68 bits) from operands that are
  widened before they are negated, so even −2^31 negates exactly.
* In the MAC-type units, t0 is aligned to the product's scale. The
  decoding negation comes *before* the product is truncated back to
  Q16, because truncation does not commute with negation. Done in the
  other order, fault-free runs would disagree in the last bit.

**The units.**

* `falcon_reno_sub` computes t1 − z1. In the RENO cycle it feeds the
  negated operands as (−z1) − (−t1), which again equals t1 − z1, so
  nothing needs decoding.
* `falcon_reswo_mul` and `falcon_reno_mul` check the product
  L10 ⊙ out1, where out1 = t1 − z1. The first swaps the multiplier
  ports; the second negates both operands.
* `falcon_reno_mac` checks the whole multiply-accumulate. It negates
  L10 and t0, then negates the result back.
* `falcon_reno_ffs` checks the whole of line 13. It negates t0, t1 and
  z1, then negates the result back.
* `modfalcon_reno_sub` applies the subtractor scheme to K = 3 real
  fixed-point lanes of the vectors t and z. Longer vectors take
  several starts.
* `samplerz_reno` computes z = (2b−1)·z0 + b with a ±1 multiplier.
  z0 is a 5-bit base sample in 0..18, and z is a 7-bit signed result.

## What is not here, and where the design departs

**Not built:**

* the recursion of ffSampling, with its LDL* decomposition, splitfft
  and mergefft;
* the base sampler and the Bernoulli rejection step of SamplerZ, so
  only line 4 and its check exist;
* salt generation, hashing, the basis product and compression in
  ModFalcon signing;
* SHAKE-128;
* the rounding from q to p.

**Departures and own choices:**

* The sampler has 16 lanes over a 128-bit buffer. Another reading of
  the published description is 8 lanes per 64-bit word. The 16-lane
  form fills the 64-bit output word exactly.
* The −s(x) of the multiplier's RENO run comes from the negacyclic
  shifts, not from a separate negation multiplexer.
* The accelerator uses N parallel MACs. The published design is much
  smaller: its original version reports about 1,000 flip-flops, and its
  MAC count is not known. Area figures from this RTL are therefore not
  comparable.
* The Falcon units use Q16.16 fixed point in place of floating point.
* These are all this design's own choices: the memory layouts, the
  handshakes, reset (asynchronous, active low), the shadow bank used
  for comparison, and the fault-injection inputs.
* The comparators themselves are not protected. A faulty comparator
  is outside the fault model.

## Simulating

Every module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`. A typical run, from the directory
that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl rtl/saber_pkg.sv rtl/falcon_pkg.sv \
        tb/tb_pqc_ed_top.sv --top-module tb_pqc_ed_top -j 4
    ./obj_dir/Vtb_pqc_ed_top

**What the testbenches cover:**

* `tb_pqc_ed_top` runs the whole design at its default size:
  * It samples a secret from random words while the host writes a(x),
    so host stalls happen.
  * It multiplies, checks against a schoolbook reference, injects a
    stuck-at fault and expects `err`.
  * It runs an accelerator row with and without a fault.
  * It exercises every Falcon, ModFalcon and SamplerZ unit.
  * It counts each of these mechanisms and fails if any never
    happened.
* `tb_fault_campaign` repeats the published stuck-at evaluation on
  the multiplier, on a smaller scale. It injects random single-bit,
  two-bit and six-bit stuck-at-0 and stuck-at-1 faults on the a
  operand. It checks that every fault that corrupts the product is
  flagged, except the lone-MSB case described above, and prints the
  detection ratio.
* The block testbenches check the datapaths against references
  computed in the testbench, and check the cycle counts in the table
  above.

**Changing parameters.** `N_COEF`, `L` and `MU` are parameters. The
package constants in `saber_pkg` (q, p, word width) and `falcon_pkg`
(fixed-point format) are shared by all modules.
