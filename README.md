# 16-bit modified square-root carry select adder with Brent-Kung sections

A carry select adder splits a word into sections. Each section works out its
result for both possible incoming carries ahead of time. When the real carry
arrives from below, a multiplexer picks one of the two results. The carry then
crosses each section through a single multiplexer instead of rippling through
every bit.

The classic version spends two ripple carry adders per section. This design
changes both halves of that pair:

* The carry-in-0 result comes from a **Brent-Kung parallel prefix adder**, which
  is faster than a ripple adder.
* The carry-in-1 result comes from a **binary to excess-1 converter (BEC)**. The
  BEC adds one to the carry-in-0 result, because `a + b + 1 = (a + b) + 1`. It
  needs far fewer gates than a second adder.

The sections grow wider towards the top of the word ("square-root"
sectioning). A higher section's carry arrives later, which gives its wider
local adder and BEC more time to finish.

## Section layout

| section | bits     | adder                        | BEC   | multiplexer |
|---------|----------|------------------------------|-------|-------------|
| 0       | [1:0]    | 2-bit Brent-Kung, takes `cin` | none  | none        |
| 1       | [3:2]    | 2-bit Brent-Kung, carry-in 0 | 3-bit | 6:3         |
| 2       | [6:4]    | 3-bit Brent-Kung, carry-in 0 | 4-bit | 8:4         |
| 3       | [10:7]   | 4-bit Brent-Kung, carry-in 0 | 5-bit | 10:5        |
| 4       | [15:11]  | 5-bit Brent-Kung, carry-in 0 | 6-bit | 12:6        |

An N-bit section has an (N+1)-bit BEC. The BEC's input is the adder's
carry-out followed by its N sum bits, so the multiplexer selects the
section's carry-out along with its sum. That carry-out drives the select of
the next section up. In each section:

```
            a[k], b[k]
                |
        +---------------+
        | N-bit BK, c=0 |
        +---------------+
                | {cout0, sum0}   (N+1 bits)
        +-------+--------+
        |                |
        |        +---------------+
        |        | (N+1)-bit BEC |  = {cout0, sum0} + 1
        |        +---------------+
        |                |
      0 +---[ MUX 2(N+1):(N+1) ]--- 1
                  |   ^
                  |   +---- carry from the section below
           {cout_k, sum_k}
```

The critical path runs through section 0's 2-bit adder and then one
multiplexer per section (four in all). Inside each section, the Brent-Kung
adder and the BEC run in parallel with the carry chain below.

## The Brent-Kung adder (`bk_adder`)

Each bit forms a generate `g = a & b` and a propagate `p = a ^ b`. Group
signals then combine with the prefix operator:

```
(G, P)[hi:lo] = (G_hi + P_hi * G_lo,  P_hi * P_lo)
```

The carry into bit i+1 is the group generate `G[i:0]`. The carry-in is folded
into bit 0 as `g0' = g0 | p0 & cin`. With that change, every `G[i:0]` already
includes the carry-in, and `sum[i] = p[i] ^ G[i-1:0]`.

The Brent-Kung network builds the prefixes in two sweeps:

* **Up-sweep.** Step d = 1, 2, 4, ... combines position i with position i-d
  for every i where (i+1) is a multiple of 2d. For four bits this gives
  `G[1:0]` and `G[3:2]`, then `G[3:0]`.
* **Down-sweep.** Step d = ..., 2, 1 fills in each position i = (2k+1)d - 1.
  It combines that position with the finished prefix at i-d. For four bits
  this is the single cell `G[2:0] = G2 + P2 * G[1:0]`.

For four bits this gives the carries C1 = `G[0]`, C2 = `G[1:0]`,
C3 = `G[2:0]` and cout = `G[3:0]`. That matches the two-level tree of the
original 4-bit drawing. One node in that drawing is marked `G 2:1`. The node
that produces the carry into bit 3 has to cover bits 2 down to 0, so this RTL
builds `G[2:0]` there.

The module is written for any `N`, as loops in one `always_comb`. The 16-bit
adder uses N = 2, 3, 4 and 5. For the uneven sizes (3 and 5), the loops simply
skip cells whose positions lie outside the word.

## The binary to excess-1 converter (`bec`)

```
x[0] = ~b[0]
x[i] =  b[i] ^ (b[0] & b[1] & ... & b[i-1])
```

The AND terms form a chain: each extends the previous one by one bit.
`x = b + 1 mod 2^N`. An all-ones input wraps to zero. In a section, that case
is exactly the one where the carry-out comes only from the incoming carry:
the adder result `{0, 1...1}` becomes `{1, 0...0}`.

## Files

| file                  | contents |
|-----------------------|----------|
| `rtl/csa_pkg.sv`      | word width, section count, default section widths, `group_lsb()` |
| `rtl/bk_adder.sv`     | N-bit Brent-Kung adder with carry-in |
| `rtl/bec.sv`          | N-bit binary to excess-1 converter |
| `rtl/csa_mux2.sv`     | 2N:N result multiplexer |
| `rtl/csa_section.sv`  | one section: BK adder (carry-in 0) + (N+1)-bit BEC + multiplexer |
| `rtl/msqrt_bk_csa.sv` | the 16-bit adder (top) |
| `tb/tb_*.sv`          | one self-checking testbench per module |

Top-level ports: `a[15:0]`, `b[15:0]`, `cin` -> `sum[15:0]`, `cout`. The
whole design is combinational. It has no clock, no registers and no reset.

## Parameters

`msqrt_bk_csa` has two parameters:

* `WIDTH`, 16 by default.
* `GROUP_W`, an array of `csa_pkg::N_GROUPS` = 5 section widths, listed from
  the least significant section. The default is `'{2, 2, 3, 4, 5}`.

An elaboration-time `$error` fires when the widths do not add up to `WIDTH`.
For a different number of sections, change `N_GROUPS` and `DEFAULT_GROUP_W` in
the package. The 16-bit layout is the only one that has been evaluated. Other
layouts are this RTL's generalisation. Section 0 is always a plain Brent-Kung
adder fed by `cin`.

## Verification

Every testbench compares the module's outputs with integer arithmetic
(`a + b + cin`, `b + 1`, or the selected input). Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_bk_adder`: widths 2, 3, 4, 5, 8 and 16. The low 5 bits and the carry-in
  are swept exhaustively, followed by full-length propagate patterns and 20,000
  random words.
* `tb_bec`: widths 3, 4, 5 and 6, every input value.
* `tb_csa_mux2`: widths 3, 5 and 6, random data with both select values.
* `tb_csa_section`: widths 2, 3, 4 and 5, every operand pair and carry-in.
  It also confirms that the carry-out-through-the-BEC case occurs at every
  width.
* `tb_msqrt_bk_csa`: the 16-bit adder at its default parameters.
  * Inputs: corner cases, then 300,000 random operand pairs. The pairs are
    uniform, near-complementary (long propagate chains) or sparse.
  * Coverage counts, per upper section: the BEC result was chosen, the adder
    result was chosen, and the carry-out came only from the BEC. It also
    counts a carry-in of 1 and a carry-out of 1. A count that stays at zero is
    a failure.

To run one with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_msqrt_bk_csa \
    rtl/csa_pkg.sv rtl/bk_adder.sv rtl/bec.sv rtl/csa_mux2.sv rtl/csa_section.sv \
    rtl/msqrt_bk_csa.sv tb/tb_msqrt_bk_csa.sv
./obj_dir/Vtb_msqrt_bk_csa
```

Every test finishes in well under a second.

## Where this RTL departs from, or adds to, the original design

* **Prefix node `G[2:0]`.** The 4-bit Brent-Kung drawing labels the node
  before the carry into bit 3 as covering bits 2:1. This RTL builds
  `G[2:0]`, the only group that produces that carry correctly.
* **Carry-in of the Brent-Kung adder.** The drawn 4-bit adder has its carry
  input tied to 0. The bottom section of the 16-bit adder takes the external
  carry-in, so `bk_adder` has a `cin` port, folded into bit 0's generate. The
  upper sections tie it to 0.
* **BEC equations.** They follow the 4-bit converter (`x1 = b1 ^ b0`,
  `x2 = b2 ^ b0 b1`, `x3 = b3 ^ b0 b1 b2`), extended to any width.
* **Multiplexer.** It is a behavioural 2:1 select per bit. The original gives
  no gate-level form for it.
* **Not included.** The "regular linear" Brent-Kung carry select adder is the
  reference design the proposed adder is compared with. It has four 4-bit
  sections, each a Brent-Kung adder for carry-in 0 and a ripple adder for
  carry-in 1. It is not part of this RTL.
* **Power, voltage and transistor counts.** The original evaluation reports
  average power at supplies from 1.4 V down to 0.6 V and transistor counts in
  a 45 nm process (174 for this adder against 192 for the regular linear one).
  Those are circuit-level results, and the RTL neither reproduces nor
  guarantees them. A synthesis tool will restructure the logic, for example
  by merging the BEC's AND chain or mapping the multiplexers to cells.
