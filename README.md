# RSA exponentiation on a carry-save Montgomery multiplier

This design computes `M^E mod N` for RSA keys of up to 1024 bits. Its main idea
is that no carry ever has to ripple across a 1024-bit word until the very end.
The Montgomery multiplier takes both operands in carry-save form, meaning as two
vectors whose sum is the value. It keeps its accumulators in carry-save form
and also returns its result that way. A result can therefore go straight back
in as the next operand. The whole chain of squarings and multiplications never
needs a wide carry-propagate adder. Only the last step turns the two-vector
result into an ordinary binary number, with a one-bit serial adder.

The longest path in each clock cycle is a few full-adder levels plus some XORs,
however wide the key. The cost is cycles: one clock per bit, so a multiplication
takes n+2 clocks.

## Files

| file | what it is |
|---|---|
| `rtl/rsa_pkg.sv` | the controller's step type (`op_e`) |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/csa.sv` | 3:2 carry-save adder, W bits |
| `rtl/csa42.sv` | registered 4-2 carry-save adder: two CSAs and a register |
| `rtl/mont_mult.sv` | carry-save Montgomery multiplier |
| `rtl/serial_adder.sv` | bit-serial adder for the final conversion |
| `rtl/rsa.sv` | top level: square-and-multiply controller, operand selection, registers |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_rsa_full` (default 1024-bit size) and `tb_rsa_512` (512-bit size) |

## The multiplier (`mont_mult`)

### What it computes

With `L = n + 2` (n = `NB`, the modulus length) the multiplier computes

    r0 + r1  ≡  (a0 + a1) * (b0 + b1) * 2^-L   (mod N)

The requirements are:

- N is odd and N < 2^n.
- A = a0 + a1 < 2^(n+1).
- B = b0 + b1 < 2^(n+1).

If A and B are both below 2N, the result is below 2N as well. That bound is why
no final subtraction is needed. It holds because 2^L = 4·2^n > 4N, so

    (A·B + Q·N) / 2^L  <  (4N² + 2^L·N) / 2^L  <  2N

The design uses L = n + 2 steps, not n, for exactly this reason. With only n
steps the result could grow from one multiplication to the next.

### One step per clock

Each clock does one radix-2 Montgomery step. The step has three parts, and all
three settle within the same cycle.

- **P0, serial conversion of the multiplier.** A one-bit full adder with a carry
  flip-flop adds bit i of `a0` and bit i of `a1`. Its output is bit `a_i` of the
  binary value A. A is never formed in parallel.
- **P1, product accumulation.** A 4-2 CSA adds `a_i·b0` and `a_i·b1` to the
  running partial product (two vectors, halved on the way back in). The bit that
  falls off the low end is called `T`. Over all the steps, the `T` bits are the
  low half of A·B, one bit at a time. Bit 0 of a carry vector is always 0, so
  `T` is just the XOR of the four inputs' low bits. No adder is needed for it.
- **P2, reduction.** A second 4-2 CSA keeps the Montgomery sum P. Each step
  computes `q = parity(P + T)`, a three-input XOR, and then
  `P ← (P + q·N + T) / 2`. The choice of q makes the sum even. So the halving
  is exact even in carry-save form: both vectors have bit 0 clear, and the /2
  is only wiring.

Both 4-2 CSAs store their outputs unshifted, in the form the 4-2 CSA register
holds them. The `>> 1` happens where the stored vectors feed back into the next
step.

### The last step and the merge

After the steps, the P1 vectors (the high half of A·B) and the P2 vectors must
be added into one carry-save pair. Bit n+1 of A is always 0, so the last of the
L steps adds no partial product; it only has to add `q·N` and halve. The design
therefore merges the last step with this combination:

1. A 4-2 CSA reduces the four vectors to two.
2. `q` is the parity of their sum.
3. One more 3:2 CSA adds `q·N`.
4. The halving is exact.

As a result, a multiplication takes exactly L = n + 2 cycles, counting the start
cycle.

### Timing and handshake

| cycle | what happens |
|---|---|
| 0 | `start` high. `a0`/`a1`/`b0`/`b1`/`n` must be valid. Step 0 runs using `a0[0]`, `a1[0]` directly. |
| 1 … n | steps 1 … n, with A bits taken from internal shift registers |
| n+1 | merge step; `r0`/`r1` are loaded at its end |
| n+2 | `done` high, result valid; `start` may be given again here |

The multiplier reads `a0`/`a1` only in the start cycle. `b0`, `b1` and `n` must
stay unchanged until the merge step. Assertions check:

- no `start` while busy;
- N odd;
- the two range rules above.

## The exponentiation (`rsa`)

The controller runs left-to-right square-and-multiply. Every value stays in
Montgomery form and in carry-save form:

    M'  = MM(M, C)            C = 2^(2L) mod N   (into the Montgomery domain)
    R   = M'
    for i = k-2 downto 0:     k = length of E, bit k-1 is its leading 1
        R = MM(R, R)
        if e_i: R = MM(R, M')
    R'  = MM(R, 1)            (out of the Montgomery domain)
    result = R'0 + R'1        (serial adder, n+2 cycles)

- `M'` is kept as two vectors (`mp0`, `mp1`).
- `R` is the multiplier's own result register. It is fed back as both operands
  when squaring.
- The leading 1 of E is found by a priority encoder when the operation starts.
  The exponent may therefore have any length up to `EB` bits.
- The next multiplication starts in the same cycle as the previous one's
  `done`. No cycle is lost between steps.
- The postprocessing result is at most N, and it equals N only when
  `M^E ≡ 0 (mod N)`. The unit returns 0 in that case. With a real RSA modulus
  and M < N this cannot happen.

### Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; asynchronous active-high reset |
| `start` | in | 1 | one-cycle pulse while `busy` is low; all inputs are captured |
| `msg` | in | NB | M, must be below N |
| `exponent` | in | EB | E (e to encrypt, d to decrypt), nonzero |
| `modulus` | in | NB | N, odd |
| `r2_const` | in | NB | **2^(2·(NB+2)) mod N**, computed outside the unit |
| `busy` | out | 1 | operation in progress |
| `done` | out | 1 | one-cycle pulse; `result` valid from then until the next operation ends |
| `result` | out | NB | M^E mod N |

Note the constant. It belongs to the n+2-step multiplier, so for a 1024-bit
unit it is `2^2052 mod N`, not `2^2048 mod N`. For a given N it is a one-time
precomputation, like the key itself.

### Latency

Let NM = 2 + (k−1) + h. Here k is the exponent length and h the number of
1 bits below its leading 1. Then `done` comes

    (NM + 1) · (n + 2) + 2   cycles after the start cycle.

That is n+2 cycles for each multiplication and n+2 for the final addition. The
extra 2 cycles are for capturing the inputs and registering the result. On
average h ≈ (k−1)/2, which gives about 1.5·(k+1)·(n+2).

| case | multiplications | cycles |
|---|---|---|
| n = 512, E = 2^16+1 | 19 | 10 282 |
| n = 512, random 512-bit E | 776 | 399 380 |
| n = 1024, E = 2^16+1 | 19 | 20 522 |
| n = 1024, random 1024-bit E | 1543 | 1 584 146 |

At roughly 160 MHz this is about 0.06 ms (512) and 0.13 ms (1024) to encrypt
with `e = 65537`. A full-length exponent takes about 2.4 ms (512) and 10 ms
(1024).

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `rsa` | `NB` | 1024 | modulus length n |
| `rsa` | `EB` | NB | exponent register length |
| `mont_mult` | `NB` | 1024 | modulus length. The vectors are NB+3 bits; L = NB+2 |
| `serial_adder` | `LEN` | 1026 | number of bits added (NB+2 in `rsa`) |
| `csa`, `csa42` | `W` | 1027 | vector width |

A unit built with a given `NB` also works for any smaller odd modulus. The cycle
count is that of the built size, and `r2_const` must then be
2^(2·(NB+2)) mod N for the built NB.

## Where this design departs from the algorithm it implements

These are the points where this RTL makes its own choice rather than following
the published algorithm literally:

- **Step count and Montgomery factor.** The published form of the multiplier
  uses n steps and the factor 2^-n, with C = 2^(2n) mod N. Its cycle analysis,
  however, counts n+2 loop steps and n+2 cycles per multiplication. This design
  uses n+2 steps, the factor 2^-(n+2) and C = 2^(2(n+2)) mod N. Only this
  version provably keeps the carry-save results below 2N.
- **Merged last step.** The separate closing 4-2 CSA is merged into the last
  step, as described above, so that a multiplication takes n+2 cycles.
- **Single-cycle step.** P0, P1 and P2 are chained combinationally within one
  clock, not pipelined across clocks. The critical path is one full adder
  (P0), an AND, two full adders (P1's 4-2 CSA), an XOR chain for `q`, an AND,
  and two full adders (P2). The merge step has a similar depth: three CSA
  levels.
- **Handshakes and controls.** The start/done handshakes, the register enable
  and clear on the 4-2 CSA, the exponent-length detection and the result-equals-N
  fold are this design's own.
- **The 3:2 CSA.** The full adders of the CSA are written as bitwise vector
  equations.

The controller steps, the operand sequence, the carry-save representation
throughout, the 4-2 CSA structure (two CSAs feeding a register with clock and
reset), the serial conversion of the multiplier and the n+2-cycle budget per
step all follow the published design.

## Verification

Each testbench is self-checking. Each ends with a `TB_RESULT checks=… failures=…`
line and has a cycle watchdog.

- `tb_csa`, `tb_csa42`: random and corner vectors. They check the sum
  identity, carry bit 0, and the register's hold, clear and reset behaviour.
- `tb_serial_adder`: random sums and the exact LEN-cycle latency, both back to
  back and with gaps.
- `tb_mont_mult` (n = 32): random odd moduli, operands below 2N split randomly
  into two vectors, and results chained back as operands. It checks
  `R·2^L ≡ A·B (mod N)`, `R < 2N` and the n+2-cycle latency.
- `tb_rsa` (n = 32): 240 exponentiations against a wide-integer
  square-and-multiply model. It checks the exact latency formula and counts
  every controller path: preprocessing, squaring, multiply, zero exponent bit,
  one-bit exponent, postprocessing, final addition, and the fold of N to 0.
- `tb_rsa_512` and `tb_rsa_full`: one encryption (E = 65537) and one
  full-length random exponent at n = 512 and at the default n = 1024. The
  1024-bit run takes a few seconds in Verilator.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_rsa_full rtl/rsa_pkg.sv tb/tb_rsa_full.sv
    ./obj_dir/Vtb_rsa_full

The random moduli in the tests are random odd numbers, not products of two
primes. The arithmetic does not depend on that, but no real key pair was used.
Neither timing closure nor FPGA resources have been evaluated.

Lint notes:

- Verilator reports `SYNCASYNCNET` because the reset is used both as an
  asynchronous reset and as the `disable iff` condition of the assertions.
  That is intended.
- Verilator reports the unused top bit of the majority vector in `csa`. That
  bit would be a carry out of the word, and it is dropped on purpose.
