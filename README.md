# τ-adic arithmetic unit for lightweight Koblitz-curve cryptography

On a Koblitz curve a scalar multiplication is cheapest when the scalar is a
τ-adic expansion K = Σ K_i τ^i, where τ is the Frobenius map. The map
satisfies τ² = μτ − 2 with μ = ±1. Protocols such as ECDSA also need the same
scalar as an integer k, for example in the blinded signature half
s_d = b·k mod q. Converting between k and K is expensive for a small device.

This unit avoids the conversion. It computes s_d directly as a τ-adic
expansion, b × K, and the receiving server converts the result. All the work
is additions of τ-adic expansions. Those are done bit-serially by a small
carry datapath, roughly a hundred to a few hundred gates, which sits next to a
W-bit word RAM.

The RTL is in `rtl/` and is plain synthesizable SystemVerilog-2017. The
testbenches in `tb/` are self-checking.

## The carry that makes τ-adic addition work

Adding two expansions digit by digit is like binary addition, but the carry is
itself an element of Z[τ], written t = t0 + t1·τ. For each digit position:

    r    = A_i + B_i + t0
    C_i  = r mod 2
    t   <- (t − C_i) / τ      i.e.  (t0, t1) <- (t1 + μ·⌊r/2⌋, −⌊r/2⌋)

A is binary (0/1). B may be signed (−1/0/+1), as in τNAF or τZFR keys, and a
signed B also gives subtraction. The result C is binary.

With these digit sets the carry only takes 21 values:
−3 ≤ t0 ≤ 3 and −2 ≤ t1 ≤ 2. So 3 bits per component are enough, and once the
inputs run out the carry dies within 7 more digits.

**Plain addition (Alg. 1)** runs until the carry is zero, so the result can be
up to m+7 digits long. Keeping results near m digits would need "folding",
which uses τ^m ≡ 1 (mod q). Folding takes a variable amount of time, and that
timing leaks information.

**Partial expansions (Alg. 6)** fix this. A value is a pair (A, α): an
expansion A of exactly m digits plus a small remainder α = α0 + α1·τ. The
remainder stands for digits that wrapped around past position m-1. Because
τ^m ≡ 1, they count at position 0.

To add (A, α) and (B, β), the carry starts at α+β. The adder runs exactly m
digit steps, and whatever carry is left over becomes the remainder γ of the
result. If α and β are among the 21 reachable carries and m > 6, then γ is
too. So additions can be chained forever, always in the same number of cycles,
with no folding.

The sum α+β needs 4 bits per component: t0 ∈ [−6, 6] and t1 ∈ [−4, 4]. Hence
the Alg. 6 carry register has 8 flip-flops and the Alg. 1 register has 6.

To turn a partial expansion back into a plain m-digit expansion, add
(0,(0,0)) to it. This folds γ into the digits. In rare cases γ is still
non-zero afterwards, and the folding is repeated.

## Datapath extensions

- **`tau_step`**: one digit iteration of the rule above. It is purely
  combinational.
- **`tau_add_dp`** (Alg. 1): a 6-bit carry register and OMEGA copies of
  `tau_step`. It has a synchronous clear and a `carry_zero` output.
- **`ptau_add_dp`** (Alg. 6): an 8-bit carry register that can be loaded with
  α+β, plus OMEGA copies of `tau_step` (the "unroll factor" ω).
  - m is prime, so ω never divides it (except ω = 1).
  - On the step that contains digit m−1, a multiplexer stores the carry after
    stage m mod ω instead of after the last stage. That stored carry is γ.
  - Whatever α+β was, the carry is back among the 21 values after seven
    digits. So for ω ≥ 8 the stages from the eighth on use the 3-bit logic
    of `tau_add_dp`; an assertion watches the carry entering them.

A signed digit B_i enters as two wires, {B_i,1, B_i,0}, read as a two's
complement number: +1 = 01, −1 = 11, 0 = 00.

μ is a parameter. For μ = +1 the t0 update adds ⌊r/2⌋, and for μ = −1 it
subtracts it. NIST K-163 has μ = +1. K-233 and K-283 have μ = −1.

## Word-serial addition and its timing (`ptau_seq`)

Operands live in the RAM as W-bit words. Digit i of an expansion is bit i%W of
word i/W.

For each word, the sequencer does the following:

1. Fetch the A word into one shift register and the B word into another.
2. Clock W/ω steps through the datapath. The result digits shift into a third
   register.
3. Write that register back as the result word.

A fourth register holds the sign plane of a signed B.

An Alg. 6 addition first reads both remainder words and loads α+β into the
carry. At the end it writes γ back as the result's remainder word. The adder
for α+β stands in for the ALU adder that a complete processor would already
have.

The RAM is a register file: every access takes one cycle and reads are
combinational. That gives these exact cycle counts, measured from the cycle
after `start` up to and including the `done` cycle:

| addition | cycles |
|---|---|
| Alg. 6 | NW·(W/ω + h) + h + 1, NW = ⌈m/W⌉ |
| Alg. 1 | NW1·(W/ω + h), NW1 = ⌈(m+7)/W⌉ |
| signed operand B | + one cycle per word (sign-plane read) |

Here h = 3 for a single-port RAM (read A, read B, write C) and h = 2 for a
dual-port RAM. For K-283 with W = 16, ω = 4 and a single-port RAM, one Alg. 6
addition takes 130 cycles. For K-163 with W = 8, ω = 4 and a dual-port RAM it
takes 87.

Every word takes the full W/ω steps, also the last one. After digit m−1 the
carry is frozen, and digits at position m and above are written as 0.

The operand A can be replaced by the constant zero (`a_zero`). Its reads still
happen, so the zero operand does not change the timing.

## RAM map and formats (`tau_arith_top`)

With NW = ⌈M/W⌉ and NW1 = ⌈(M+7)/W⌉:

| region | base | contents |
|---|---|---|
| K | 0 | NW1 expansion words, 1 remainder word, NW1 sign-plane words |
| B | 2·NW1+1 | NW1 words + remainder (binary copy of K, Alg. 7) |
| C | B + NW1+1 | NW1 words + remainder (accumulator / result) |
| D | C + NW1+1 | NW1 words + remainder (second ladder accumulator) |
| b | D + NW1+1 | NW words of the integer b, bit i in word i/W |

- **Remainder word:** t0 sign-extended in the low W/2 bits and t1 in the high
  W/2 bits.
- **Input K:** an expansion of up to m+2 digits is accepted by storing digits
  K_m and K_{m+1} as its remainder (t0, t1). This works because
  τ^m·(K_m + K_{m+1}τ) ≡ K_m + K_{m+1}τ. It covers τNAF keys of length m+1.

For K-283 / W = 16 the map is 117 words of 16 bits.

## Multiplication b × K (`tau_mul_ctrl`)

Both schedules start by adding K (signed) to zero. This turns it into a binary
partial expansion. Both end by adding zero to the result until its remainder
is (0,0), at most `MAX_EMBED` = 4 times. `embed_fail` reports the case where
that was not enough. The bits of b are read most significant first, with one
RAM read per bit. Every bit gets its own read, even when the word is already
known, so the pattern of RAM accesses does not reveal the weight of each word
of b.

- **Double-and-add** (`OP_MUL7`): for each bit, C ← C ⊞ C, and C ← C ⊞ B if
  the bit is 1. It uses ⌊log₂b⌋ + weight(b) + 1 additions. The sequence of
  additions reveals the weight of b but not its bits.
- **Montgomery ladder** (`OP_MUL8`): uses two accumulators C and D. For a 0
  bit: D ← D ⊞ C, then C ← C ⊞ C. For a 1 bit: C ← C ⊞ D, then D ← D ⊞ D. It
  always uses 2⌊log₂b⌋ + 3 additions, so both the operation sequence and the
  time are fixed once the leading bit of b is fixed.

The host supplies ⌊log₂b⌋ as `b_msb`.

Cycle count of a multiplication:

    additions·(L6 + 1) + NW + ⌊log₂b⌋ + 1

where L6 is the Alg. 6 latency. For K-283 at the defaults, the ladder with a
283-bit b takes 74,578 cycles. Double-and-add with a typical b takes about
56,000.

Measured in simulation (`tb_tau_workloads`), W = 16, full-length b:

| configuration | ladder (Alg. 8) | double-and-add (Alg. 7, random b) |
|---|---|---|
| K-283, ω = 1, single port | 197,050 | 148,470 |
| K-283, ω = 2, single port | 115,402 | 85,358 |
| K-283, ω = 4, single port | 74,578 | 56,762 |
| K-283, ω = 8, single port | 54,166 | 41,626 |
| K-283, ω = 16, single port | 43,960 | 33,719 |
| K-283, ω = 4, dual port | 63,805 | 47,341 |
| K-233, ω = 4, single / dual port | 51,618 / 44,146 | 38,198 / 33,054 |
| K-163, ω = 4, single / dual port | 26,988 / 23,064 | 21,166 / 17,324 |

## Using the unit

The host port (`host_we/addr/wdata/rdata`) accesses the RAM while `busy` is
low. Reads are combinational. Writes made while the unit is busy are dropped.

To run a command, pulse `start` together with `op`:

- `OP_ADD1` / `OP_ADD6`: region `dst` ← region `src_a` + region `src_b`. The
  flags `a_zero` and `b_signed` apply.
- `OP_MUL7` / `OP_MUL8`: region C ← b × K.

`done` pulses when the command finishes. After an Alg. 6 addition,
`gamma_t0/t1` hold γ. After an Alg. 1 addition, `carry_nz` flags a result that
did not fit in NW1 words.

### Parameters of `tau_arith_top`

| parameter | default | meaning |
|---|---|---|
| M | 283 | extension degree m (curve NIST K-283) |
| MU | −1 | μ of the curve (+1 for K-163) |
| W | 16 | RAM / ALU word width, at least 8 |
| OMEGA | 4 | unroll factor ω, must divide W |
| DUAL_PORT | 0 | 1: second RAM read port (h = 2) |
| MAX_EMBED | 4 | bound on the final remainder foldings |

The address width is 10 bits (`tau_pkg::AW`).

## Verification

The testbenches never re-run the adder's algorithm to get expected values.
Instead they evaluate digit strings in Z[τ] with wide integers (`tb/tau_tb_pkg.sv`)
and check identities:

- Alg. 1: C = A + B exactly.
- Alg. 6: C + τ^m·γ = A + α + B + β exactly, and γ lies in the 21-carry set.
- b × K: C + γ ≡ b·K modulo τ^m − 1. Divisibility is tested through the norm
  of τ^m − 1.

| testbench | what it covers |
|---|---|
| `tb_tau_add_dp`, `tb_ptau_add_dp` | datapaths with ω = 1..4 (Alg. 6 also 8 and 16, with the narrowed stages), both μ, several positions of the last-stage multiplexer |
| `tb_ptau_seq` | sequencer at K-283 (single-port) and K-163 (W = 8, dual-port), all operation flags, exact latencies |
| `tb_tau_mul_ctrl` | controller against a model sequencer: exact addition schedule, counts, repeated folding and its failure flag |
| `tb_tau_arith_top` | whole unit at M = 13, W = 8, ω = 4: additions between random RAM regions and about 160 random products; counts every mechanism, including the repeated final folding |
| `tb_tau_arith_top_full` | default (K-283) build: one ladder and one double-and-add product with a full 283-bit b, plus one addition of each kind |
| `tb_tau_workloads` | b × K with both schedules for K-283 at ω = 1, 2, 4, 8, 16 and for K-163, K-233, K-283 with single- and dual-port RAM (ten builds side by side, through the helper `tb/tau_wl_run.sv`); prints the latency table above |

Example, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/tau_pkg.sv tb/tau_tb_pkg.sv tb/tb_tau_arith_top_full.sv \
        --top-module tb_tau_arith_top_full -o simv
    ./obj_dir/simv

Each testbench prints `TB_RESULT checks=N failures=F` and has a cycle
watchdog.

## Where this RTL departs from, or adds to, the source design

- **Value of h.** The source text assigns h = 2 to single-port and h = 3 to
  dual-port RAMs. Its own access count and its 87-cycle example imply the
  opposite. The RTL uses h = 3 for single-port and h = 2 for dual-port.
- **Alg. 1 example.** The quoted 84-cycle Alg. 1 example for K-163 does not
  follow from the quoted formula, which gives 88. The RTL follows the formula.
- **Multiplication latency.** Total b × K latencies differ from the published
  table: here they are 8,000 to 11,000 cycles lower at every ω (for example
  74,578 versus about 85,000 for the ladder at ω = 4). The published figures
  include control overheads that are not described. Here each addition costs
  one extra issue cycle and each bit of b costs one read cycle.
- **Gate-level structure.** The published datapaths are drawn with half and
  full adders and were synthesised at 75 to 830 GE. Here they are written at
  word level. For ω ≥ 8 the Alg. 6 stages from the eighth on use the 3-bit
  Alg. 1 logic, because the carry is back in the 21-value set after seven
  digits. The further narrowing of earlier stages that the source mentions is
  not applied.
- **Surrounding ALU.** The datapath was meant to live inside an ECC ALU that
  also does GF(2^m) and modular arithmetic. That ALU is not part of this RTL.
  A host RAM/command port takes its place.
- **Choices made here.** The following are this design's own choices:
  - the sign-plane storage of signed digits and its extra read cycle per word;
  - the remainder-word format and the RAM map;
  - the register-file RAM;
  - the fixed-priority RAM sharing;
  - the bound on repeated foldings.
- **Not included.** Folding of plain expansions, multiplication of two
  expansions, and inversion are software sequences of additions. They are not
  built as controllers. Alg. 1 additions are available as a host command, on
  which such sequences can be built.
