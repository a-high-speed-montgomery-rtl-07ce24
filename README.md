# MMM42: a Montgomery multiplier that skips its empty iterations

RSA spends almost all its time in modular multiplication of 1024-bit or larger
numbers. Radix-2 Montgomery multiplication turns each product A·B mod N into K
small steps: one addition of up to three long operands and one halving. A
carry-save adder keeps each step short, because no carry ripples along the
1024 bits.

A carry-save step costs energy even when it adds nothing. That happens when
the multiplier bit A(i) and the quotient bit q(i) are both zero: the step
only halves the state. For random operands about one step in four is like
this. This design detects such a step one cycle ahead and merges it into the
previous one, so a 1028-iteration product takes roughly 810 to 830 cycles on
average instead of 1029. The wide state registers are also written less often.
The operand registers are loaded once per product, and their clocks are
gated the rest of the time.

The RTL is synthesizable SystemVerilog. It has two levels:

* `mmm42_mult`: the multiplier. Its operands and result are in carry-save
  form (each number is the sum of two words), and all values lie in [0, 2N).
* `mmm_rsa`: a modular exponentiator (M^E mod N) built on the multiplier.
  It feeds each carry-save result straight back in as the next operand.

## The arithmetic

With R = 2^(K+2) the multiplier returns S ≡ A·B·R⁻¹ (mod N) with S < 2N,
provided A, B < 2N and N is odd and below 2^K. It uses three ideas.

**Walter's bound instead of a final subtraction.** The loop runs over K+2
bits of A, not K. This makes R > 4N, and then inputs below 2N always give an
output below 2N. No comparison with N and no subtraction is needed, so the
result can go straight back in.

**A doubled multiplicand.** The adder adds B' = 2B instead of B. B' is even,
so the quotient bit is simply the parity of the state:
q(i) = S(i) mod 2. It no longer depends on A(i)·B. The cost is one more
halving, so the loop has K+3 real iterations, i = 0 … K+2. Bit K+2 of A is
zero, which makes the last iteration a pure reduction step.

**Four precomputed operand cases.** Each iteration adds one of 0, N, B' or
D = B' + N to the state, chosen by (A(i), q(i)). D is formed once, before
the loop. Every case is a sum of two words, so the adder always has exactly
four inputs: two state words and two operand words.

Per iteration, S(i+1) = (S(i) + A(i)·B' + q(i)·N) / 2. The state stays below
5N, and every sum fits in K+4 bits.

## One iteration in hardware (`mmm_rca42`)

```
 RSS ──>>1/>>2──┐ M4
 RSC ──>>1/>>2──┤ M3          RN, RB1, RD1 ── M1 ── w
                ├── RCA1 (full-adder row: S1, S2, w) ── sum', carry'
                │                         RB2, RD2 ── M2 ── y
                └── RCA2 (full-adder row: sum', carry', y) ── t_s, t_c ──> RSS, RSC
```

* M1 and M2 select w ∈ {0, N, B1, D1} and y ∈ {0, 0, B2, D2}. The select
  code is {A~, q~}, stored by the look-ahead unit in the previous cycle.
* RCA1 and RCA2 are rows of full adders with no carry chain.
* The registers RSS/RSC hold the undivided sum T = t_s + t_c.
* The division happens at the start of the next cycle, in M3/M4: a shift
  right by one bit normally, or by two bits after a bypass.

Word-wise shifts divide exactly here, and this is what makes the
bypass cheap:

* y is always even: B' is doubled, and D2 is a carry word.
* Bit 0 of RCA1's carry word is empty.
* So RCA2's carry word always ends in two zero bits.
* T is even, so t_s ends in a zero too, and T/2 is the two words each
  shifted by one.
* A bypass is only taken when T/2 is even as well. Then bit 1 of t_s is
  also zero, and T/4 is the two words each shifted by two.

`mmm42_mult` asserts all three invariants.

## Bypassing an empty iteration

During iteration i, two units look one step ahead:

* **MBRFA (`mmm_mbrfa`).** A arrives in carry-save form (A1, A2), held in
  two shift registers, RA1 and RA2. Two chained full adders add their lowest
  two bits and a stored carry. This gives A(i+1) and A(i+2) in the same
  cycle.
* **Look-ahead unit (`mmm_lu`).** It reads the low three bits of RCA1's two
  outputs and of y, and adds them into a 3-bit sum. Bit 1 of that sum is
  q(i+1). Bit 2 is q(i+2), the quotient bit that applies if iteration i+1
  is skipped. These bits are ready long before RCA2 has settled.

Iteration i+1 adds nothing exactly when A(i+1) = 0 and q(i+1) = 0. The unit
then computes `bypass = NOR(q(i+1), A(i+1))`, and two 2-to-1 multiplexers
choose what to store for the next cycle:

| bypass | next cycle runs | q~, A~ stored  | state divided by | MBRFA carry kept, shift |
|--------|-----------------|----------------|------------------|-------------------------|
| 0      | iteration i+1   | q(i+1), A(i+1) | 2                | carry(i+1), 1 bit       |
| 1      | iteration i+2   | q(i+2), A(i+2) | 4                | carry(i+2), 2 bits      |

The bypass flag is stored in a flip-flop, and it steers M3/M4 in the next
cycle. Glitches on the look-ahead logic therefore never reach the wide
multiplexers.

Bypass is disabled in the last two iterations. The loop then always ends
with a plain halving, and the result is exactly (RSS, RSC) / 2.

## Pre-computation and gated operand registers

A product has one pre-compute cycle, then the loop:

1. **On start.** RB1/RB2 take the two B words shifted left by one, which is
   B'. RN takes N. The MBRFA loads A. RSS is preset to 2N, which M3 halves
   to N, and the select code is set to "B".
2. **Pre-compute cycle.** The adder computes N + B' = D into RD1/RD2.
3. **Iterations.** The loop then starts at the dummy iteration i = -1: the
   state is zero and the select code is "0". This iteration only primes the
   look-ahead with A(0) and A(1).

RB1, RB2 and RN are written only on step 1, and RD1 and RD2 only on step 2.
Each of the two groups is clocked through its own latch-and-AND clock gate
(`mmm_clock_gate`). Each gate pulses exactly once per multiplication. The
latch is intentional: it keeps the gated clock free of glitches, and
synthesis reports it as a latch bit.

## Interface and timing of `mmm42_mult`

| port          | width | meaning                                          |
|---------------|-------|--------------------------------------------------|
| `start`/`ready` | 1   | pulse `start` while `ready` is high; operands are sampled on that edge |
| `a1,a2,b1,b2` | K+2   | carry-save operands, A1+A2 < 2N and B1+B2 < 2N   |
| `n`           | K     | odd modulus                                      |
| `done`        | 1     | one-cycle pulse                                  |
| `s1,s2`       | K+2   | result; valid from `done` until the next `start` |

Latency from the start edge to `done` is 1 + (K+4 − b) cycles, where b is
the number of bypasses. It is K+5 cycles with no bypass. With random
1024-bit operands roughly 200 to 220 iterations are skipped, giving 810 to
830 cycles per product. That is about 1.25× the throughput of the same loop
without bypass.
Reset is asynchronous and active low. It clears the control and state
registers but not the operand registers, which are always written before
they are read.

## Exponentiation (`mmm_rsa`, the top)

`mmm_rsa` uses the left-to-right binary method, entirely in the Montgomery
domain:

```
M' = MMM(M, R² mod N)                 -- into Montgomery form
skip leading zeros of E; X = M'       -- one cycle per zero
for each remaining bit of E:  X = MMM(X, X);  if bit: X = MMM(X, M')
X = MMM(X, 1)                         -- out of Montgomery form, X ≤ N
result = X1 + X2, minus N if ≥ N      -- the only carry-propagate addition
```

* X is never copied: it is the multiplier's own result register pair.
* M' has a register pair of its own.
* The host supplies R² mod N = 2^(2K+4) mod N, with N odd and greater than 1,
  and M below N.
* E = 0 returns 1 at once.
* Ports: `start`/`ready`, `msg`, `expo` (EW bits), `n`, `r2`, then `done`
  and `result`.
* Defaults: K = 1024 and EW = 1024.

A 1024-bit modulus with E = 65537 takes 19 multiplications, about 20 000
cycles.

## Where this follows its source and where it does not

These parts are taken from the published MMM42 algorithm and architecture:

* the four-case loop on a doubled multiplicand;
* the K+2-bit operands and the loop from i = −1 to K+2;
* the datapath of two full-adder rows with multiplexers M1 to M4 and
  registers RSS, RSC, RB1, RB2, RD1, RD2 and RN;
* the MBRFA with two full adders and a carry that depends on the bypass;
* the look-ahead unit with its NOR and two 2-to-1 multiplexers;
* storing the bypass flag and doing the extra shift in the next cycle;
* gated clocks on the five operand registers.

These are this design's own choices:

* **Quotient bits in the look-ahead unit.** The published unit takes q(i+1)
  from one RCA1 output bit, and q(i+2) from the XOR of two. That depends on
  an operand encoding that is not specified. Here a 3-bit sum of the low
  bits gives the same two quotient bits for this design's encoding.
* **Forming B' and D.** B' = 2B is wiring, not an adder pass. D is formed in
  a single pre-compute cycle.
* **Widths and edges of the loop.** The datapath is K+4 bits wide. Bypass is
  disabled in the last two iterations.
* **Control.** The start/ready/done handshake, the counter and the reset
  scheme are this design's own.
* **Clock gate.** It is the common latch-based cell.
* **The exponentiator.** Its whole sequence and its final conversion are
  this design's own. The source only says that the multiplier serves RSA
  exponentiation and that its outputs are reused directly.

Not modelled: energy. The source reports up to 60 % lower energy and 24.6 %
higher throughput for 1024 bits against its own baseline. Only the cycle
count can be checked in RTL simulation, and it agrees in size (about 1.25×).

## Files

| file | contents |
|------|----------|
| `rtl/mmm_pkg.sv` | select codes, controller state types, full-adder function |
| `rtl/mmm_rca42.sv` | M1–M4 and the two full-adder rows |
| `rtl/mmm_lu.sv` | look-ahead unit |
| `rtl/mmm_mbrfa.sv` | modified barrel register full adder |
| `rtl/mmm_clock_gate.sv` | latch-based clock gate |
| `rtl/mmm42_mult.sv` | the multiplier: registers, gating, controller |
| `rtl/mmm_rsa.sv` | exponentiator, top of the design |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mmm_rsa_small` |
| `tb/mmm_mult_harness.sv` | reusable driver and checker for `mmm42_mult` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each one also has a watchdog. For example, to run the full-size end-to-end
test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mmm_pkg.sv \
  tb/tb_mmm_rsa.sv rtl/mmm_rsa.sv rtl/mmm42_mult.sv rtl/mmm_rca42.sv \
  rtl/mmm_lu.sv rtl/mmm_mbrfa.sv rtl/mmm_clock_gate.sv --top-module tb_mmm_rsa
./obj_dir/Vtb_mmm_rsa
```

The other testbenches are built the same way with their own module lists.
Each takes about a second. What they check:

* **`tb_mmm_rsa`** runs at the default K = 1024 with a 1024-bit exponent
  field. It tries E = 65537, 3, 1 and 0, a random 40-bit exponent, M = 0 and
  M = N−1, and compares the results with plain wide-integer arithmetic. It
  also checks the number of squarings and multiplications and the cycle
  bound, and that each gate pulses once per product. It counts bypasses,
  divide-by-four shifts, the four select codes, squarings, multiplications
  and skipped zeros, and fails if any of them never occurs.
* **`tb_mmm_rsa_small`** runs 3000 random exponentiations at K = 16,
  including the final reduction by N.
* **`tb_mmm42_mult`** runs 24 products at K = 1024 and 4000 at K = 16. It
  checks each result three ways: against an integer model of the same
  bypassing loop, by congruence (S·R ≡ A·B mod N), and by range (S < 2N).
  It also checks the exact latency of every product.
* **The leaf testbenches** cover `mmm_rca42` (random sums),
  `mmm_lu` (all 2048 inputs), `mmm_mbrfa` (random bypass sequences) and
  `mmm_clock_gate` (enable moving in both clock phases).

To change the size, set `K` (and `EW`) on `mmm_rsa` or `mmm42_mult`. All
internal widths follow from it.
