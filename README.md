# Low-power transformed parallel LFSR

A linear feedback shift register (LFSR) that divides a message polynomial by a
generator g(x) is the core of every CRC and BCH encoder. Processed one bit per
clock it is tiny but slow, so fast links unroll it to take P bits per clock.
The unrolled form needs two XOR networks that switch on every clock: one that
folds the P new message bits into the state, and one that feeds the state back.
This design makes those two networks as small as possible by working in a
changed coordinate system. The state is stored as rT = T^-1 r instead of r, with
T^-1 chosen so the per-clock networks are sparse. The cost moves into a single
output network T, which converts rT back to the remainder r once per message.
Most of the time T is idle, so the logic that toggles every clock, and with it
the dynamic power, shrinks.

The top level, `plfsr_top`, is a small demonstration chip built around this
idea. It holds two independent parts that share a clock and a reset:

* a CRC-8 unit that divides each 32-bit input word `ip` by
  g(x) = x^8 + x^2 + x + 1, 8 bits per clock, using the transformed LFSR, and
  outputs the remainder on `crcop`;
* a pseudo-random pattern generator of the kind used for built-in self-test: a
  4-bit maximal-length LFSR whose bit stream shifts into the 32-bit `lfsr_out`.

## The mathematics in the hardware

Number the state registers r_0 … r_{N-1}, where r_i holds the coefficient of
x^i and r_{N-1} is the register next to the input. For
g(x) = x^N + g_{N-1}x^{N-1} + … + g_0, one serial step with input bit u is

    f = r_{N-1} ^ u
    r_i <= r_{i-1} ^ (g_i & f)        (r_{-1} = 0)

or, as matrices over GF(2), r(t+1) = A r(t) + b u(t). Here A is the companion
matrix of g and b = g. When the last message bit has gone in, the registers
hold the remainder of u(x)·x^N divided by g(x). With a zero start value that
remainder is the CRC.

Applying the step P times gives the parallel update

    r(t+P) = A^P r(t) + Bp up(t),   Bp = [b, A b, A^2 b, …, A^{P-1} b]

where up(t) is the block of P bits. In this RTL, bit up[P-1] is the earliest,
most significant bit, and column k of Bp multiplies up[k].

Substitute r = T rT:

    rT(t+P) = ApT rT(t) + BpT up(t),   ApT = T^-1 A^P T,   BpT = T^-1 Bp
    remainder = T rT   (computed once, after the last block)

Any invertible T gives the correct remainder. The choice of T only decides
where the XOR gates end up.

### Choosing T^-1

T^-1 is built triangular about its anti-diagonal, with every anti-diagonal entry
set to 1. A matrix of that form is always invertible. Each row is chosen
separately: all settings of its free entries are tried, and the one that gives
the corresponding row of BpT the fewest ones is kept. The row of BpT is what
that state bit's pre-processing XOR has to compute. Ties go to the numerically
smallest candidate. Written with r_{N-1} first, which is the usual order for
these matrices, T^-1 is lower anti-triangular. In the package's index order
(r_0 first), row i has its 1 in column N-1-i and free entries in columns below
that. The parameter `TINV_FMT` selects one of the other three shapes that also
guarantee an invertible T^-1: upper anti-triangular, lower triangular or upper
triangular (`plfsr_pkg::TINV_*`). The search is the same for each.

All of this runs at elaboration time, in constant functions of `plfsr_pkg`:
`companion`, `ap_matrix`, `bp_matrix`, `tinv_matrix`, `mat_inv`, `apt_matrix`,
`bpt_matrix` and `t_matrix`. Changing N, P or G rebuilds every matrix. The
search of one row is capped at 10 free entries, the ones nearest the
anti-diagonal (`TINV_SEARCH_BITS`). For N ≤ 11 the search is therefore
exhaustive. For longer polynomials it is a bounded search.

For the default CRC-8 with P = 8, the networks come out as follows (XOR2 gates
after sharing, see below):

| network | untransformed | transformed |
|---|---|---|
| pre-processing (Bp / BpT), every clock | 13 | 3 |
| feedback (A^P / ApT), every clock | 13 | 11 |
| output T, once per message | — | 10 |

The gates that switch on every clock fall from 26 to 14. The total rises to 24
because of T.

## Substructure sharing (`gf2_ss_matmul`)

Each of the three constant matrices is built by `gf2_ss_matmul`, which computes
y = M x with an XOR network that computes each common sub-term once. The plan
is made at elaboration time by a greedy search:

1. Start with each output as the set of inputs its row of M selects.
2. Find the pair of signals that appears together in the most outputs. Stop if
   no pair appears in at least two.
3. Add an XOR2 node for that pair. In every output that held both signals,
   replace them with the node. Repeat.
4. Each output is the XOR (a reduction, balanced by synthesis) of the signals
   it still holds.

For the three outputs y0 = x0^x1^x2^x3^x5, y1 = x0^x1^x2^x3^x4 and
y2 = x2^x3^x4^x5, the search shares x2^x3 first and then two more terms. It
ends at 7 XOR2 gates instead of 11. The module reports its sizes as the
localparams `NODES` and `XOR2_GATES`.

Finding the smallest shared network is NP-complete, and sharing can deepen the
critical path. With `MAX_DEPTH` set (0 = off), a candidate node is taken only
if every output that uses it stays within max(`MAX_DEPTH`, its unshared depth)
XOR levels, counting the output's remaining terms combined two shallowest
first. `MAX_DEPTH = 1` therefore means "never deeper than without sharing".
In the chain y0 = x0^x1^x2^x3, y1 = x0^x1^x2, y2 = x0^x1, free sharing builds
two nodes and 3 XOR2 but makes y0 three levels deep; with `MAX_DEPTH = 2` only
x0^x1 is shared (4 XOR2, two levels). This is this design's own constraint
rule, not the reference design's method. `SHARE = 0` builds the plain network.

## The parallel LFSR engine (`plfsr_transformed`)

```
 in_data ──► [BpT] ──┐
                     ▼
            ┌──────► XOR ──► rt_q ──┬──► isolate ──► [T] ──► out_rem (reg)
            │                        │     ▲
            └───── [ApT] ◄───────────┘   fin_q
```

On a first beat, the feedback term is the constant ApT·T^-1·INIT instead of
ApT·rt_q, so a new message needs no extra clock to clear the state.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `in_valid` | in | 1 | a beat is present |
| `in_first` | in | 1 | the beat starts a message |
| `in_last` | in | 1 | the beat ends a message (may equal `in_first`) |
| `in_data` | in | P | message bits, `in_data[P-1]` earliest |
| `out_valid` | out | 1 | one-clock pulse |
| `out_rem` | out | N | remainder, bit i = coefficient of x^i; holds until the next result |

Timing: the edge that takes the last beat also sets `fin_q`. During the next
clock, T converts `rt_q`, and at the following edge the result is registered
and `out_valid` pulses. The remainder therefore appears one clock after the
last beat was taken. A new message may start on the very next beat, because
T reads the old `rt_q` while the new first beat is being folded in.
`out_valid` and `in_first` may be active in the same clock.

`ISOLATE_T = 1` holds T's input at zero except in that one clock, so T's XOR
network does not toggle while a message streams in. The price is N AND gates.
`INIT` sets a non-zero register start value. For example, `INIT = 16'hFFFF`
with g = 0x1021 gives the CRC-16/CCITT-FALSE remainder. Bit reflection and a
final XOR, used by some CRC standards, are not part of the engine.

## The top level (`plfsr_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous active-high reset of both parts |
| `ip` | in | 32 | message word |
| `lfsr_out` | out | 32 | pattern generator output |
| `crcop` | out | 8 | CRC-8 of the last complete word |
| `crc_valid` | out | 1 | pulses for one clock when `crcop` is updated |

**CRC sequencing.** A 2-bit beat counter runs freely from reset. Beat k feeds
`ip[31-8k -: 8]` to the engine, so the word is consumed most significant byte
first. Beat 0 restarts the engine and beat 3 ends the message. A new word is
taken every 4 clocks with no gap. `ip` is not latched and must stay steady for
those 4 clocks. If it changes in the middle, the result is the CRC of a mixed
word. The first word is taken at the first rising edge after `rst` falls. Its
CRC is on `crcop`, with `crc_valid` high, 4 clocks after that edge. After that
a result arrives every 4 clocks. For example, `ip = 32'h00001FFF` gives
`crcop = 8'h67`, and `ip = 32'h00000A89` gives `8'h34`.

**Pattern generator (`lfsr_pattern_gen`).** The 32-bit `lfsr_out` register
shifts left every clock. It takes its new bit from `lfsr_out[2] ^ lfsr_out[3]`,
so its low four bits form a Fibonacci LFSR with the recurrence
s[n] = s[n-3] ^ s[n-4] (polynomial x^4 + x + 1, period 15). The upper 28 bits
hold the most recent output bits. Reset loads `SEED = 1`. `USE_XNOR = 1`
switches to XNOR feedback; its lock-up state is 1111 instead of 0000, so a
zero seed is then legal. `LFSR_W`, `TAPS` and `OUT_W` select other lengths.

Size at the defaults: 52 flip-flops (32 pattern, 8 transformed state,
8 output, 1 end-of-message flag, 1 valid, 2 beat counter) and about 24 XOR2 in
the CRC networks.

## Where this RTL departs from the reference design, or fills gaps

Taken from the reference architecture:

* the parallel and transformed recursions;
* the anti-triangular T^-1 with its row-by-row search for sparse BpT rows;
* T used once per message;
* substructure sharing;
* the 4-bit LFSR with XOR/XNOR feedback;
* the pins `clk`, `rst`, `ip[31:0]`, `lfsr_out[31:0]` and `crcop[7:0]`.

Choices made here:

* **P = 8.** The parallelism of the demonstration is not stated.
* **g(x) = x^8 + x^2 + x + 1, zero start value.** The CRC polynomial is not
  stated.
* **Recovered pattern generator.** Its recurrence was worked out from the
  output values the reference design shows. Its seed could not be recovered,
  so sequences may be offset in time from the reference design's.
* **Greedy sharing.** Sharing uses a greedy pair search. The reference design
  applies sharing with critical-path constraints by a method not reproduced
  here; only this design's per-output depth limit `MAX_DEPTH` exists.
* **Operand isolation of T, the engine handshake, and `INIT`.** These are
  additions.
* **The top's `crc_valid` output and registered remainder.** These add one
  output pin and 8 flip-flops over the reference pin-out and its reported
  44 registers.
* **The bounded T^-1 search for N > 11.**

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `plfsr_transformed_tb` runs eight engines side by side:
  * CRC-8, 8 bits per clock;
  * CRC-8 with sharing and isolation off;
  * CRC-16 (0x1021) with zero start value;
  * CRC-16 (0x1021) with all-ones start value;
  * the three other T^-1 formats;
  * CRC-8, 32 bits per clock.

  They process several hundred random messages of random length, back to back
  and with idle clocks. The remainders are compared with a bit-serial model
  and the standard check values for "123456789" (0xF4, 0x31C3, 0x29B1). The
  testbench also checks that each result arrives exactly one clock after the
  last beat.
* `gf2_ss_matmul_tb` checks the three-output sharing example over all inputs,
  with sharing on, off and depth-limited. It also checks a CRC-16
  pre-processing matrix and a random 8×32 matrix against a direct product.
* `gf2_ss_size_tb` checks the reported network sizes against hand-worked
  values: 3 shared nodes and 7 XOR2 with sharing, 11 without, and still 3
  nodes and 7 XOR2 with `MAX_DEPTH = 1`, all three levels deep. For the chain
  example it checks 2 nodes, 3 XOR2 and three levels unconstrained against 1
  node, 4 XOR2 and two levels with `MAX_DEPTH = 2`, and all chain outputs.
* `lfsr_pattern_gen_tb` compares the output with the recurrence every clock.
  It checks the period of 15 and that every non-zero state is visited. It
  checks that a known 25-bit stretch of the m-sequence appears. It also checks
  that the XNOR variant never locks up.
* `plfsr_top_tb` runs the top at its default parameters end to end:
  * the words 0x00001FFF and 0x00000A89, then 350 random words;
  * every CRC checked against a bit-serial model, along with its exact arrival
    clock;
  * the pattern output checked every clock;
  * a reset in mid-run.

* `plfsr_gate_count_tb` builds, for CRC-8 at 8 and 32 bits per clock and
  CRC-16 at 8 bits per clock, both the plain parallel LFSR and the transformed
  one. It checks on every clock that T·rT equals the plain state. It also
  checks that BpT never has more ones than Bp, and it prints the network sizes:

  | configuration | ones in Bp / BpT | per-clock XOR2, plain / transformed | XOR2 in T | XOR levels, plain / transformed |
  |---|---|---|---|---|
  | CRC-8, P = 8 | 26 / 11 | 26 / 14 | 10 | 3 / 3 |
  | CRC-16, P = 8 | 32 / 12 | 24 / 26 | 15 | 3 / 4 |
  | CRC-8, P = 32 | 118 / 92 | 88 / 76 | 11 | 7 / 6 |

  The XOR levels are counted from register to register: the deeper of the two
  per-clock networks plus the XOR that merges them.

  The transformation always thins the pre-processing matrix. With the simple
  greedy sharing used here, the per-clock total is not always smaller: for
  CRC-16 at P = 8, ApT costs more than the gates saved in BpT, and its path is
  one XOR level deeper. A sharing algorithm that is more thorough than this
  greedy one may recover the difference.

Operand isolation is not visible at any port. Its effect on correctness is
covered by the engines that run with it on and off. No power or timing figure
has been measured.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl \
    rtl/plfsr_pkg.sv tb/plfsr_top_tb.sv --top-module plfsr_top_tb
./obj_dir/Vplfsr_top_tb
```

Replace `plfsr_top_tb` with any other testbench name. The package must come
first on the command line. The other modules are found through `-y rtl`. All
matrices are computed while Verilator elaborates, so the first build of a
large configuration (long g, large P) takes longer.

## Files

* `rtl/plfsr_pkg.sv` — GF(2) matrix functions and the T^-1 search
* `rtl/gf2_ss_matmul.sv` — constant matrix multiplier with shared XOR terms
* `rtl/plfsr_transformed.sv` — transformed P-parallel LFSR engine
* `rtl/lfsr_pattern_gen.sv` — LFSR pattern generator
* `rtl/plfsr_top.sv` — demonstration top level
* `tb/*_tb.sv` — one self-checking testbench per module, plus
  `gf2_ss_size_tb` (network sizes) and `plfsr_gate_count_tb` (plain against
  transformed networks)
