# Radix-4 successive cancellation polar decoder

This is a hardware successive cancellation (SC) decoder for polar codes. By default it
decodes (1024, K) codes with 5-bit LLRs. Plain SC decoding works through the code
tree one radix-2 stage at a time and decides one bit per cycle. This decoder takes
two radix-2 stages per cycle and decides four bits at a time. Two further shortcuts
remove more cycles:

- A 16-bit sub-tree with a simple frozen pattern is decided in one cycle.
- While one group of 4 bits is being decided, the idle processing units compute the
  next group's LLRs for all 16 possible outcomes. This is called partial-sum
  lookahead.

Latency for n = 1024, counted from start to the last decision:

| mode (`psl_en`, `spc_en`)             | cycles                              |
|---------------------------------------|-------------------------------------|
| radix-4 only (0, 0)                   | 596 = 4 + 16 + 64 + 256 + 256       |
| lookahead (1, 0)                      | 404                                 |
| special sub-codes (0, 1)              | 596 − 7 per special 16-bit node     |
| both (1, 1)                           | 404 − 4 per special 16-bit node     |

With a rate-1/2 code built by the Bhattacharyya bound (design parameter 0.5), 44 of
the 64 sixteen-bit nodes are special, so modes (0, 1) and (1, 1) take 288 and 228
cycles.

In general the radix-4 schedule takes 4 + 16 + ... + n/4 cycles of LLR computation
plus n/4 leaf decisions. For n = 64, 256 and 4096 that is 36, 148 and 2388 cycles.
With lookahead, each 16-LLR node costs 5 cycles instead of 8, giving 24, 100 and
1620 cycles.

## Conventions

- **Code.** x = u · G, where G is the n-fold Kronecker power of [[1,0],[1,1]]. The
  transform is in natural order, with no bit-reversal permutation.
- **Indices.** u_0 is decoded first. For a tree node of size M, its children cover
  consecutive quarters of the node's u range.
- **LLRs.** An LLR is positive when 0 is more likely. Channel LLRs are Q-bit two's
  complement values. Every stored LLR is saturated to ±(2^(Q−1) − 1), which is ±15
  for Q = 5.
- **Frozen pattern.** The pattern is an input, `info_mask`. Bit i = 1 means u_i is
  a data bit; bit i = 0 means it is frozen to 0. Any frozen set can be used. The only
  constraint is that every 4-bit group must have one of the six patterns the last
  stage handles (see below). Patterns from reliability-ordered constructions always
  do.
- **Hard decision.** A bit's decision is the sign bit of its LLR.

## The radix-4 processing unit (`r4_pu`)

Take a node of size M at radix-4 level k (M = n/4^k) and its four quarter LLR
vectors. PU i reads the four operands

    L0 = a[i], L1 = a[i+M/4], L2 = a[i+M/2], L3 = a[i+3M/4]

and produces entry i of one of the node's four children. It skips the odd radix-2
stage, so that stage is never stored. With the min-sum f(a,b) = sgn a·sgn b·min(|a|,|b|)
and g(a,b,s) = (−1)^s·a + b, the four children are:

| child | function      | value                                                     |
|-------|---------------|-----------------------------------------------------------|
| 0     | ff            | f(f(L0,L2), f(L1,L3))                                     |
| 1     | fg            | g(f(L0,L2), f(L1,L3), b0)                                 |
| 2     | gf            | f(g(L0,L2,b0^b1), g(L1,L3,b1))                            |
| 3     | gg            | g(g(L0,L2,b0^b1), g(L1,L3,b1), b2)                        |

Here b0, b1 and b2 are the partial sums of children 0–2 at index i. These are the
re-encoded decisions, described in the partial-sums section below.

The unit works at Q+3 bits internally and saturates once, at the output. Child c is
simply function code c, so the function code is the tree digit of the child being
computed.

## The PU line (`pu_line`)

There are n/4 PUs, 256 at n = 1024. They are enough to compute the first radix-4
level in one cycle, and every deeper level uses a subset of them. Each PU has its
own operand, function and partial-sum inputs. This lets the lookahead borrow 64 of
them while they would otherwise be idle. The line never runs fewer than 64 PUs, so
the smallest supported code is n = 64.

## The last stage unit (`lspu`)

A 4-bit leaf is decided in one cycle from its four LLRs. Only six frozen patterns
can occur in a polar code: any pattern a reliability order allows in 4 bits. Write
s_j for the sign bit of L_j and s_ab for the sign bit of L_a + L_b. Then:

| data bits (u3..u0) | decisions                                                               |
|--------------------|-------------------------------------------------------------------------|
| 0000               | all 0                                                                   |
| 1000               | u3 = s_0123, the sign of L0+L1+L2+L3                                    |
| 1100               | u2 = s_02 ^ s_13, u3 = s_13                                             |
| 1010               | u1 = s_01 ^ s_23, u3 = s_23                                             |
| 1110               | min-sum SC of the 3 data bits, in closed form (two magnitude compares)  |
| 1111               | u = (s0, s1, s2, s3) · G_4, i.e. u3 = s3, u2 = s2^s3, u1 = s1^s3, u0 = s0^s1^s2^s3 |

In pattern 1110, if min(|L1|,|L3|) < min(|L0|,|L2|), then:

- u1 = s0^s2.
- u2 and u3 then depend on whether |L1| < |L3|.

Otherwise:

- u1 = s1^s3.
- u3 = s3.
- u2 is chosen by comparing |L0| with |L2|.

When no two magnitudes tie, these rules give exactly the min-sum SC decisions for
every pattern except 1010. The LSPU testbench checks this against a bit-by-bit SC
reference. For 1010 the rules are a sign-only shortcut: u3 is taken from s_23
without the g step, so it can differ from SC on noisy inputs. The software
reference uses the same rules, so the end-to-end tests still compare bit-exactly.

Any other pattern sets `bad` and outputs zeros. On the top level this is the
sticky `bad_pattern`.

Two sign conventions differ from what some descriptions of this unit print:

- Patterns 1100 and 1010 use u3 = s_13 (resp. s_23), not its inverse. For 1100 this
  is the SC decision, and the inverse would flip u3 on every noise-free word.
- In pattern 1110 the branch is taken when min(|L1|,|L3|) < min(|L0|,|L2|).

## Special 16-bit nodes (`spc_decoder`)

Some nodes have K = 16 bits and a frozen pattern of one of seven shapes. For these,
the code bits of the node fall into groups that carry the same value, and the sign
of each group's LLR sum decides one data bit, or an XOR of data bits. S(set) is the
sign bit of the sum of the node's LLRs over the set:

| kind  | data bits                 | decision                                                                                |
|-------|---------------------------|-----------------------------------------------------------------------------------------|
| RATE0 | none                      | all 0                                                                                   |
| REP   | u15                       | u15 = S(all 16)                                                                         |
| HALF  | u7, u15                   | u15 = S(upper 8), u7 = S(lower 8) ^ u15                                                 |
| QUART | u3, u7, u11, u15          | q_j = S(quarter j); u15 = q3, u11 = q2^q3, u7 = q1^q3, u3 = q0^q1^q2^q3                   |
| LAST2 | u14, u15                  | u15 = S(odd LLRs), u14 = S(even LLRs) ^ u15                                             |
| LAST4 | u12..u15                  | T_r = S(L[4j+r], j = 0..3); u15 = T3, u14 = T2^T3, u13 = T1^T3, u12 = T0^T1^T2^T3        |
| RATE1 | all                       | u = (sign bits) · G_16                                                                  |

These are fast approximations, not exact SC. The only exceptions are RATE0, RATE1
and (with min-sum) REP.

The equations come from writing out x = u·G_16 for each pattern. QUART and LAST4
decode their group sums as a rate-one 4-bit code. Some published formulas for these
two shapes carry an extra XOR term that does not agree with the encoder; the
encoder-derived form is used here.

The reference model in `tb/polar_ref_pkg.sv` derives the same decisions a different
way. It solves the group equations generically from the frozen mask, so it does not
share the table.

Special decoding is applied only at the 16-bit level. A special node is decided in
one cycle. Its leaves would otherwise take 5 cycles with lookahead or 8 without, so
each special node saves 4 or 7 cycles.

## Partial sums (`psum_unit`)

The g functions need the partial sums of earlier siblings, that is, the XOR
re-encoding of the already decided bits. For each radix-4 level k = 0..L−2
(L = log4 n), the unit keeps a register of n/4^k bits. Slot c of that register
holds the partial sums of child c of the current level-k node.

Updates arrive as 4 bits from the LSPU or 16 bits from the special decoder. They are
encoded (u·G_4 or u·G_16) and written into their slot. If the slot was the parent's
last child, the parent's sums are formed at once with the radix-4 combination:

    beta[i] = b0^b1^b2^b3,  beta[i+M/4] = b1^b3,  beta[i+M/2] = b2^b3,  beta[i+3M/4] = b3

This continues upward in the same cycle, so nothing waits on partial sums.

This register-per-level organisation is this design's choice. It replaces a
generation-matrix and shift-register network, and computes the same values. The
registers have no reset, because every slot is written before it is read.

## Partial-sum lookahead (`psl_unit`)

The lookahead runs while the LSPU decides child c < 3 of the current 16-LLR node.
The unit feeds PUs 0..63 with the node's LLRs:

- Hypothesis h (0..15) uses PUs 4h..4h+3.
- Each of those PUs computes child c+1 of the node, assuming the current leaf's
  partial sums are enc4(h) = h·G_4.

When the LSPU result u arrives in the same cycle, a 16:1 multiplexer selects
hypothesis h = u. The selected 4 LLRs are written as the next leaf. The next cycle
is therefore again a leaf decision, and a 16-LLR node takes 1 + 4 cycles instead of
4 + 4.

## LLR storage (`llr_mem`)

Level 0 holds the n channel LLRs. Each deeper level k holds only the current node,
which is n/4^k LLRs. The total is 1024 + 256 + 64 + 16 + 4 at n = 1024. Each level is
split into four quarter banks. The four operands of every PU therefore come from
different banks, and a whole level is read in one cycle.

The storage is flip-flops read combinationally. This is a register-file model of
the banked memory, not a set of single-port SRAM macros. Replacing it with SRAMs
would need a bank/address map and registered reads. Registered reads would change
the one-cycle-per-node schedule.

## Schedule (`sc_ctrl`)

The controller walks the radix-4 tree depth first. It keeps one base-4 digit per
level (`dig[1..L-1]`) naming the current leaf, and issues one operation per cycle:

- **`OP_PU` at level `lvl`.** The line computes child `dig[lvl]` of the current node
  one level up. The function code is that digit.
- **`OP_SPC`.** This follows the `OP_PU` that produced a 16-LLR node when special
  decoding is enabled and the node's mask is special.
- **`OP_LEAF`.** The LSPU decides 4 bits.

After a leaf or special node, the digits advance like a counter. The highest digit
that changed says at which level LLR computation restarts. With lookahead, a leaf
that is not the last child is followed directly by the next leaf.

Control and memory work overlap the PU cycle. Every cycle counts as decoding
work, and the cycle counts above are exact.

## Top level (`r4_sc_decoder`)

Parameters:

- `N`: 1024, a power of 4, at least 64.
- `Q`: 5.
- `LOAD_W`: 16, the number of LLRs per load beat.

Use:

1. **Load.** While idle, present `LOAD_W` channel LLRs per `ld_valid` beat, in index
   order. N/LOAD_W beats fill a codeword.
2. **Decode.** Set `info_mask`, `psl_en` and `spc_en`, and pulse `start`. `busy`
   rises.
3. **Result.** `done` pulses once, and `u_hat` then holds all n decisions, with
   frozen positions 0. `latency` gives the cycle count of that decode.

Reset is synchronous and active low.

`psl_en` and `spc_en` are sampled at `start`. They are mode inputs so that all four
schedules can be compared on one build. A fixed product would tie them high.

## Where this differs from, or adds to, the original architecture

- The LLR memory is a banked register file rather than 64 single-port SRAM banks
  (see above).
- The partial-sum unit is organised per radix-4 level instead of as a
  generation-matrix network.
- The frozen set is a run-time input, and the two speed-ups are run-time modes.
- The following are this design's own choices: the load interface, the handshake,
  reset, the cycle counter, the saturation point and the internal widths.
- RATE0 and RATE1 16-bit nodes count as special nodes. If only the other five shapes
  were treated specially, the rate-1/2 construction above would have 6 special nodes
  rather than 44.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The shared reference is
`tb/polar_ref_pkg.sv`, which provides:

- Saturating min-sum functions.
- Bhattacharyya code construction.
- A butterfly encoder.
- A recursive radix-2 SC decoder. It mirrors the hardware's saturation points and
  computes the expected latency by itself.

| testbench                  | what it checks                                                                 |
|----------------------------|--------------------------------------------------------------------------------|
| `tb_r4_pu`                 | all four functions against two radix-2 f/g steps, extreme and random LLRs      |
| `tb_pu_line`               | per-PU independence of operands and functions                                  |
| `tb_lspu`                  | six patterns against the rules and (except 1010) bit-by-bit SC; impossible patterns flagged |
| `tb_spc_decoder`           | classification of all shapes and decisions against a generic group solver      |
| `tb_psum_unit`             | partial sums after random leaf/special sequences against u·G re-encoding       |
| `tb_psl_unit`              | the selected lookahead LLRs equal a direct PU computation for every hypothesis |
| `tb_llr_mem`               | load, per-level writes and bank-conflict-free operand reads                    |
| `tb_sc_ctrl`               | operation sequence and cycle count in all four modes                           |
| `tb_r4_sc_decoder`         | n = 256, many frames and all modes: bit-exact match with the reference, noiseless frames decode to the sent word, latency, and that PU, leaf, lookahead and every special shape occur |
| `tb_r4_sc_decoder_sizes`   | n = 64 and n = 256 side by side: 36 / 24 and 148 / 100 cycles, bit-exact decisions |
| `tb_r4_sc_decoder_full`    | default n = 1024: 596 / 404 / 288 / 228 cycles and bit-exact decisions         |

To run one testbench with Verilator (5.x):

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/polar_pkg.sv tb/polar_ref_pkg.sv tb/tb_r4_sc_decoder_full.sv \
        --top-module tb_r4_sc_decoder_full
    ./obj_dir/Vtb_r4_sc_decoder_full

At n = 1024 the build takes about half a minute and 0.5 GB; the simulation itself is
instantaneous. Smaller configurations can be run by overriding `N` (e.g. 64 or 256);
the end-to-end testbench uses N = 256.

Not modelled: silicon area, clock frequency and power. Those depend on the cell
library.
