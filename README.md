# Carry-maskable accuracy-configurable CLA adder

A 16-bit carry-lookahead adder whose accuracy can be switched while it runs.
Each of the three low 4-bit slices has a mask bit. With the mask set, the slice adds
exactly. With the mask cleared, the slice's half adders stop generating carries. The
slice then returns `A | B` instead of `A + B`, and sends no carry upward. Less carry
activity means less switching in the lookahead logic. Error-tolerant workloads (image,
signal and learning kernels) can run in approximate mode. The same hardware still
gives exact sums when they are needed, with no second adder. All masks set gives an
ordinary CLA.

The circuit is combinational. It has no clock, reset, handshake or latency: `s` is
valid one gate delay after `a`, `b` and `m_x` settle.

```
          a[15:0]  b[15:0]   m_x[2:0]
             |        |         |
  Part 1   cmha_group x4  (slice k uses m_x[k]; slice 3 is always exact)
             |  P[15:0], G[15:0]
  Part 2   cla_network: cla_unit 0..3 (in-slice carries, PG/GG)
             |          cla_unit 4   (C3, C7, C11, C15)
             |  C[15:0]
  Part 3   sum_xor:  S_i = P_i ^ C_(i-1),  S_16 = C_15
             |
          s[16:0]
```

## Interface (`cma_adder`)

| port  | dir | width | meaning |
|-------|-----|-------|---------|
| `a`   | in  | 16 | operand A |
| `b`   | in  | 16 | operand B |
| `m_x` | in  | 3  | `m_x[k]` controls bits `4k+3..4k`; 1 = exact, 0 = approximate |
| `s`   | out | 17 | sum; `s[16]` is the carry out |

There is no carry-in; the carry into bit 0 is 0. The parameters `GW` (bits per slice,
default 4) and `NG` (slices, default 4) set the width `NG*GW`. `m_x` then has `NG-1` bits.

## The carry-maskable half adder (`cmha`)

This cell is the key piece. A half adder's XOR can be built as `u = NAND(a,b)`,
`w = OR(a,b)`, `sum = AND(u,w)`. The carry `a & b` is then just `NOT(u)`, so the
generate signal reuses the NAND. The mask is a third input of that NAND:

| m_x | u                | P = u & w | G = ~u  |
|-----|------------------|-----------|---------|
| 1   | `~(a & b)`       | `a ^ b`   | `a & b` |
| 0   | 1                | `a | b`   | 0       |

A masked bit never generates a carry. It does still *propagate* one: its P is `a | b`.
Masking therefore costs one extra NAND input per bit and adds no gate to the carry path.

## Carry lookahead (`cla_unit`, `cla_network`)

`cla_unit` computes all W carries of a slice at once. Each one is the flattened form of
`C_i = G_i + P_i C_(i-1)`. For example, the top carry of a 4-bit unit is
`G3 + P3G2 + P3P2G1 + P3P2P1G0 + P3P2P1P0·Cin`. The unit also outputs the group
propagate `PG = P3P2P1P0` and group generate `GG` (the same sum without the Cin term).

`cla_network` is the two-level arrangement. Four first-level units produce the carries
inside each slice and the slice's PG/GG. A second-level unit of the same kind turns
those into the carries out of the slices (C3, C7, C11, C15). C3, C7 and C11 are the
carry-ins of first-level units 1, 2 and 3. Unit 0 and the second-level unit both get
carry-in 0. Output `c[i]` is the carry out of bit i.

## What the approximate modes compute

Masks are meant to be cleared from the LSB upward: `m_x = 3'b110`, `3'b100` or
`3'b000` makes the low 4, 8 or 12 bits approximate. With the low K bits masked:

```
s = (((a >> K) + (b >> K)) << K) | ((a | b) & (2^K - 1))
```

The upper part is exact but never receives the carry of the low part, and the low part
is a bitwise OR. The result is never larger than the exact sum. It is wrong exactly
when some masked bit has `a = b = 1`. Under uniformly random operands, the error rate
is therefore `1 - (3/4)^K`:

| approximate bits | error rate (closed form) | measured (20 000 random sums per level) | mean error distance |
|---|---|---|---|
| 4  | 68.4 % | 68.1 % | ≈ 3.7 |
| 8  | 90.0 % | 89.7 % | ≈ 64 |
| 12 | 96.8 % | 97.0 % | ≈ 1040 |

Error rate counts any wrong result; the typical error is small next to the 17-bit
range. A single-digit error rate, as has been reported for adders of this kind, needs
input data with few coinciding ones in the low bits. It cannot be reached with uniform
random operands.

Mask patterns that are not LSB-first (for example `3'b101`) are accepted and are
deterministic, but behave differently. A carry from an exact slice below still ripples
into a masked slice through its `P = a | b` bits. Those bits give `(a|b) ^ carry`. The
testbench checks these patterns against a bit-serial model.

## Design choices

These points are not fixed by the published circuit and were chosen here:

- **Mask polarity and insertion.** The mask enters as the third input of the half
  adder's NAND, and `m_x = 1` means exact. With the opposite polarity, every cell needs
  an inverter.
- **Top slice.** Bits 15..12 have no mask and are always exact.
- **Carry-in.** There is no carry-in port. Both lookahead levels get a carry-in of 0.
- **Group signals.** PG and GG use the standard group propagate/generate equations.
- **Any mask pattern.** All eight `m_x` values are allowed; see the section above.
- **Out of scope.** Power, delay and energy come from a transistor-level
  implementation, and the RTL reproduces none of them. The other approximate adders it
  is compared with (gate-level static, consistent-carry, and the segmented
  accuracy-configurable adder that sums overlapping 2k-bit windows) are separate designs
  and are not included.

## Files

| file | module |
|------|--------|
| `rtl/cmha.sv` | carry-maskable half adder, one bit |
| `rtl/cmha_group.sv` | GW cells sharing one mask (Part 1 slice) |
| `rtl/cla_unit.sv` | W-bit lookahead unit with PG/GG |
| `rtl/cla_network.sv` | two-level lookahead (Part 2) |
| `rtl/sum_xor.sv` | sum XORs and carry out (Part 3) |
| `rtl/cma_adder.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |

## Verification

Each testbench compares the block with a reference that does not share its structure.
The references are ripple recurrences, integer addition, and the closed form above.
Each testbench prints `TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_cmha`, `tb_cmha_group`, `tb_cla_unit`: exhaustive over all input combinations.
- `tb_cla_network`, `tb_sum_xor`: directed corner patterns plus random vectors.
- `tb_cma_adder`: the whole adder at its default 16-bit size. It covers directed cases,
  a sweep of the low byte under every mask pattern, 40 000 random sums with random
  masks, and the error-rate measurement per level. It also counts exact additions, each
  approximation level, carry-outs, masked sums that are wrong and that are still right,
  non-LSB-first masks, and carries entering a masked slice. If any of these never
  occurs, it counts a failure. It runs in well under a second.

Each testbench was also run against a copy of its module with a deliberate fault, such
as the mask ignored in the generate output or the carry-out dropped. Every testbench
reported failures on its faulty copy.

Simulate with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl tb/tb_cma_adder.sv \
          --top-module tb_cma_adder -Mdir obj_cma
./obj_cma/Vtb_cma_adder
```

Lint: `verilator --lint-only -Wall -Irtl rtl/cma_adder.sv`.

## Changing the size

`cma_adder #(.GW(g), .NG(n))` builds an `n*g`-bit adder with `n-1` mask bits. The
second-level lookahead unit is `n` bits wide, so large `n` makes its sum-of-products
terms long. For wide adders, add a third level to `cla_network` rather than raising
`NG`. `tb_cma_adder` uses 4-bit slices in its error-rate closed form through `GW`, and
its directed vectors assume 16 bits.
