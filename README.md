# Serial threshold-implemented Sboxes from shift-invariant permutations

A threshold implementation (TI) protects a circuit against first-order power
analysis by splitting every secret value into three random Boolean shares and
computing each output share from only two input shares. Even with glitches,
no gate then sees all three shares. A TI is cheapest for quadratic functions.
It needs no fresh randomness when the shared function is *uniform*, that is,
when it is itself a permutation of the 3n shared bits.

This RTL implements two Sboxes built for that setting: a 4-bit Sbox **S4**
and an 8-bit Sbox **S8**. Both are small substitution-permutation networks.
Each round applies a quadratic **shift-invariant** permutation S, and rounds
are separated by a cheap linear layer A². Shift-invariant means that every
output bit is the same Boolean function f applied to a rotated copy of the
input. With the direct 3-share sharing, every output bit of every share then
comes from one circuit: a single 1-bit gadget. The hardware uses exactly one
such gadget. It gets the other 3n−1 bits by rotating the input register,
both across bits and across shares. The cost is latency: 28 cycles for S4
and 78 cycles for S8.

## The two Sboxes

Bits are numbered from 0, the least significant bit. Bit i of S(x) is
f(x rotated right by i).

| | S4 | S8 |
|---|---|---|
| width n | 4 | 8 |
| structure | S ∘ A² ∘ S | S ∘ A² ∘ S ∘ A² ∘ S |
| f (bit 0 of S) | x0 ⊕ (x0⊕x1)(x2⊕x3) | x2⊕x5⊕x6 ⊕ x0(x1⊕x2⊕x4⊕x5⊕x6⊕x7) ⊕ x1x7 ⊕ x2(x4⊕x5⊕x6) ⊕ x3(x5⊕x6) ⊕ x4(x6⊕x7) ⊕ x5x6 ⊕ x6x7 |
| A x | (x≪1) ⊕ (0xF if msb(x)) | (x≪1) ⊕ (0x8D if msb(x)) |
| differential uniformity / linearity | 4 / 8 | 8 / 64 |
| cycles (1-bit serial TI) | 28 | 78 |

A is an "xtime" map: shift left by one, then XOR a fixed constant when the
bit shifted out was 1. The constant is the first column of A. There is no A²
after the last S. The published lookup tables define the permutations S and
the complete Sboxes, and the testbenches check against those tables. The
ANF of f was recovered from the table of S. Both forms, with this bit order
and this round structure, reproduce the published Sbox tables exactly.

`rtl/ti_sbox_pkg.sv` holds these constants:
- `*_LIN`: the linear terms of f, as a bit mask.
- `*_QUAD[i][j]` with j > i: the quadratic terms x_i·x_j.
- `*_A_COL`: the xtime constant.
- `*_ROUNDS`: the number of S layers.

## Sharing and why one gadget suffices

Write the input as x = x⁰ ⊕ x¹ ⊕ x² (three shares). The direct sharing is

```
y⁰ = g(x¹, x²)    y¹ = g(x², x⁰)    y² = g(x⁰, x¹)
g(a, b) = Σ LIN_j·a_j  ⊕  Σ_{i<j} QUAD_ij·(a_i a_j ⊕ a_i b_j ⊕ b_i a_j)
```

Each output share misses one input share, which gives non-completeness.
Summing the three shares gives back f, which gives correctness. For both S4
and S8 the map (x⁰,x¹,x²) → (y⁰,y¹,y²) is a bijection on 3n bits, so the
sharing is uniform. The testbenches check this exhaustively for S4 (all 4096
share triples, for the gadget and for the complete two-round Sbox). For S8,
`tb_s8_uniformity` runs all 2²⁴ share triples through the gadget sharing
(about half a minute of simulation).

Two properties let a single gadget cover everything:
- The same g serves all three shares. Only its inputs change, by rotating
  which shares feed it.
- The same g serves all n bits. Only the bit alignment changes, by rotating
  every share right by one bit per cycle.

The gadget (`si_share_bit`) has 2n inputs and 1 output. A² is linear, so it
is applied to each share on its own (`xtime_a2`), once per share.

## The serial datapath

```
           x_sh ──┐                   ┌──────── A² ×3 ◄──────────┐
                  ▼                   ▼                          │
        ┌──── input register (3 shares × n) ────┐                │
        │ rot_bits: every share >>> 1           │                │
        │ rot_shares: share s ← share s+1       │                │
        └──────── share 1 ──── share 2 ─────────┘                │
                     │ a         │ b    (forced to 0 unless eval) │
                     ▼           ▼                               │
                    1-bit gadget g ── y ──► output register (3n, serial in) ──► y_sh
```

The controller (`ti_sbox_ctrl`) runs each round on this fixed schedule:

| cycles | action |
|---|---|
| n | gadget cycles for output share 0, bits 0 … n−1: the input register rotates its bits each cycle, and the output register shifts one bit in |
| 1 | pre-charge: gadget inputs at 0, input register rotates its shares |
| n | gadget cycles for output share 1 |
| 1 | pre-charge |
| n | gadget cycles for output share 2 |

One round therefore takes 3n + 2 cycles.

- **Bit alignment:** after n bit rotations a share is back in its starting
  position, so the share rotation only has to bring the next pair of shares
  to the gadget taps.
- **Round reload:** in the last gadget cycle of a round (except the final
  round), the value the output register is about to take goes through the
  three A² copies and is loaded into the input register at the same edge.
  No cycle is spent on the linear layer.
- **Final round:** after the last gadget cycle, `done` pulses and the output
  register holds the result shares.

**Pre-charge.** In a serial TI, switching the gadget from one pair of shares
to the next can leak in the first order. The reason is that the transition
involves the old and the new input values together, which can cover all
three shares. A pre-charge cycle drives the gadget inputs to all-zero between
the two pairs. Switching between bits of the same pair needs no pre-charge.
The gadget inputs are also held at zero while the core is idle.

## Interface and timing (`ti_sbox_serial`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | sampled when `busy` is low; loads `x_sh` |
| `x_sh` | in | [3][N] | input shares, x = `x_sh[0]^x_sh[1]^x_sh[2]` |
| `busy` | out | 1 | operation in progress; `start` is ignored |
| `done` | out | 1 | one-cycle pulse, ROUNDS·(3N+2) clock edges after the edge that took `start` |
| `y_sh` | out | [3][N] | output shares, XOR = Sbox(x); held until the next operation |

Parameters: `N`, `ROUNDS`, `LIN`, `QUAD`, `A_COL`. The defaults give S4.
Pass the `S8_*` constants from `ti_sbox_pkg` to get S8. Any other 8-bit or
4-bit shift-invariant quadratic SPN Sbox of this kind can be loaded through
the same parameters.

`ti_sbox_array` puts `PAR` cores side by side in lock step.
`ti_sbox_top` contains two such arrays, each 384 shared bits wide:
- 32 × S4, with ports `start4/x4_sh/busy4/done4/y4_sh`;
- 16 × S8, with ports `start8/x8_sh/busy8/done8/y8_sh`.

This is the size used for side-channel measurement on an FPGA, where a
single serial Sbox draws too little power to measure well. The two arrays
are independent. The caller must supply fresh random input shares; the
design itself uses no randomness.

## What follows the published design and what is chosen here

The following come from the published design: the Sbox definitions, the
matrices, the round counts, the direct sharing principle, the single
rotating gadget with input and output registers, the pre-charge rule, the
cycle counts 28/78 and the 384-bit parallel configuration.

These are choices made for this RTL:
- **Where the pre-charge cycles go.** They sit before the two share switches
  of each round. This reproduces 28 and 78 cycles exactly. The round
  boundary has no pre-charge. There, the gadget goes straight from the last
  pair of one round to the first pair of the next. Those new inputs depend
  on all three old shares, so an extra pre-charge cycle at each round
  boundary would be the conservative choice. It would cost ROUNDS−1 more
  cycles.
- **How the ANF splits between shares.** The split of each quadratic term is
  the standard a_i a_j ⊕ a_i b_j ⊕ b_i a_j; any split that gives a correct
  and uniform sharing would be valid.
- **Output register and round reload.** The output register is 3n bits long,
  and A² is applied during the reload into the input register.
- **Handshake, reset and control.** `start`/`busy`/`done`, a synchronous
  reset that clears all registers, and one controller per lane in the array.
- **Gating the gadget inputs.** The zeroing is done with plain
  multiplexers/ANDs at the gadget inputs. On silicon, the pre-charge only
  helps if that gating settles without glitches that reach the gadget. This
  RTL does not address that.

The following are not implemented:
- the "single rotation" variants (all shares in parallel with bits rotated,
  or the reverse);
- fully parallel variants;
- the software (ARM Cortex-M0/M3) implementations.

Area and delay figures from standard-cell synthesis are not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_si_share_bit` | S4 gadget sharing: all 4096 share triples for correctness against the S table, a closed form of every share, and uniformity. S8 gadget: 4000 random triples against the S table. |
| `tb_xtime_a2` | A² against an explicit matrix-vector product with the matrices A; exhaustive for both widths. |
| `tb_ti_share_reg`, `tb_ti_out_reg` | Random operations against a behavioural model; output bit ordering. |
| `tb_ti_sbox_ctrl` | Cycle-exact schedule for S4 and S8, `start` ignored while busy, single-cycle `done`. |
| `tb_ti_sbox_serial` | S4: all 4096 input sharings, with results matching the Sbox table and pairwise distinct (uniform). S8: all 256 inputs with random sharings. Also latency 28/78, zero gadget inputs in every pre-charge cycle, and the counts of pre-charge cycles and round reloads. |
| `tb_ti_sbox_array` | Lanes with independent inputs; array latency. |
| `tb_s8_uniformity` | S8 gadget sharing over all 2²⁴ share triples: correct against the S table and a bijection (uniform). |
| `tb_ti_sbox_top` | Top at full default size, both arrays running together with staggered starts: all 256 S8 inputs, 24 random S4 operations, one ignored `start`. Counts pre-charges, share rotations, round reloads and overlap cycles. |

The reference tables for S8 are in `tb/s8_perm.hex` (the permutation S) and
`tb/s8_sbox.hex` (the complete Sbox). Both are read with
`$readmemh` relative to the project root.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ti_sbox_pkg.sv \
    tb/tb_ti_sbox_top.sv --top-module tb_ti_sbox_top -Mdir obj_top
./obj_top/Vtb_ti_sbox_top
```

Any other testbench builds the same way: replace the testbench file and the
top-module name. Every testbench except `tb_s8_uniformity` finishes in well under a second.
`verilator --lint-only -Wall` reports two unused-bit warnings:
- share 0 of the input register is never tapped directly;
- the bit that is shifted out of the output register is dropped.

Both are expected.
