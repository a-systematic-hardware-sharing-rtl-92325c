# One shared adder network for all six H.264 transforms

An H.264 codec uses six different transforms:

- the 2D 4x4 forward and inverse integer transforms;
- the 2D 4x4 Hadamard transform (luma DC);
- the 2D 2x2 Hadamard transform (chroma DC);
- the 1D 8-point forward and inverse integer transforms (the 8x8 High-profile transform, applied to rows and then columns).

A separate datapath for each transform wastes area. This design computes all six on a single combinational network. The network has 44 two-input add/subtract nodes in four stages. A 3-bit mode input selects the transform.

The design is built in two steps:

1. **Shift-and-add decomposition of each transform.** Outputs that use the same coefficients are grouped. Partial sums that several outputs share are computed once. Every constant multiplication (1.5, 1.25, 0.75, 0.375, 0.5, 2) becomes shifts and additions. For example, the 8-point inverse transform then needs 24 adders, 16 subtractors and a few wired shifts instead of 64 multipliers, in four adder levels.
2. **Unification.** Each transform's four-level dataflow is laid onto one common set of nodes: 12, 16, 8 and 8 nodes per stage. Where transforms need different inputs at a node, a multiplexer in front of it, driven by the mode, chooses the input path. Every node in stages 2 to 4 keeps one fixed operation (add or subtract) for all transforms, so those nodes need no add/subtract control.

The network holds no state. A surrounding unit registers one block in and one set of results out per clock. It delivers 8 results per cycle (4 for the 2x2 Hadamard) with one cycle of latency.

## Structure

```
            +---------+  A0..A11  +---------+  B0..B15  +---------+  C0..C7  +---------+
 X0..X15 -->| route 1 |--> 12 --->| route 2 |--> 16 --->| route 3 |--> 8 ---->| route 4 |--> 8 --> F0..F7
            +---------+   nodes   +---------+   nodes   +---------+   nodes  +---------+   nodes
                 ^                  ^  ^                  ^  ^  ^              ^ ^ ^ ^
 X, A, B, C:     |                  X  A                  X  A  B              X A B C
 mode, pass -----+------------------+---------------------+--------------------+
```

| stage | nodes | operation of node n |
|---|---|---|
| 1 | A0..A11 | A0..A7 add or subtract, chosen per mode and pass; A8..A11 add |
| 2 | B0..B15 | even n add, odd n subtract |
| 3 | C0..C7 | + - - + + - - + |
| 4 | F0..F7 | F0..F3 add, F4..F7 subtract |

Each node computes `op_a + op_b` or `op_a - op_b` on W-bit two's-complement values (default W = 16), wrapping on overflow.

The routing network of a stage (`ua_route`) produces both operands of every node in that stage. An operand is one of these:

- a visible signal;
- that signal scaled by a wired shift: `>>>1` (×0.5), `>>>2` (×0.25) or `<<1` (×2);
- the constant zero.

A stage can see the primary inputs and the outputs of every earlier stage. The 8-point inverse transform relies on this: it feeds X0, X4, X2 and X6 straight into stage 2.

### How an operand multiplexer is built

Each operand multiplexer follows the same low-cost pattern. A small constant table, indexed by the 3-bit mode (and the pass bit), produces a select code. That code steers a data multiplexer over only the input paths that some mode really uses.

A plain design would put a 6-way data multiplexer on every operand. Here the wide data multiplexer has only as many inputs as there are distinct paths. The 6-way choice is made on the narrow select code instead, which saves area and routing.

In the RTL, the table is the function `h264_tx_pkg::route(mode, pass, stage, node)`. Synthesis folds it into the select logic.

## Modes and data layout

Mode encoding is `h264_tx_pkg::mode_t`:

| code | mode | inputs | passes | outputs |
|---|---|---|---|---|
| 0 | `M_HAD2`, 2x2 Hadamard | X0..X3 = c00 c01 c10 c11 | 1 | F0..F3 = y00 y01 y10 y11; F4..F7 = 0 |
| 1 | `M_HAD4`, 4x4 Hadamard | X[4i+j] = x(i,j) | 2 | pass 0: rows 0 and 2; pass 1: rows 1 and 3 |
| 2 | `M_FWD4`, 4x4 forward | X[4i+j] = x(i,j) | 2 | pass 0: rows 0 and 2; pass 1: rows 1 and 3 |
| 3 | `M_INV4`, 4x4 inverse | X[4i+j] = x(i,j) | 2 | pass 0: rows 0 and 3; pass 1: rows 1 and 2 |
| 4 | `M_FWD8`, 8-point forward | X0..X7 | 1 | F0..F7 = y0..y7 |
| 5 | `M_INV8`, 8-point inverse | X0..X7 | 1 | F0..F7 = y0..y7 |

For the 4x4 modes, "rows r0 and r1" means:

- F0..F3 = y(r0, 0..3);
- F4..F7 = y(r1, 0..3).

Inputs that a mode does not use are ignored.

The transforms, with results unscaled (scaling belongs to the quantiser):

- 4x4 forward: `Y = Cf X Cf^T` with `Cf = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]`. Exact.
- 4x4 inverse: `Y = Ci X Ci^T` with `Ci = [1 1 1 .5; 1 .5 -1 -1; 1 -.5 -1 1; 1 -1 1 -.5]`. The factors of 0.5 are truncating shifts (see Numerics).
- 4x4 Hadamard: `Y = H X H` with `H = [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1]`. Exact, without the division by 2 of the luma DC path.
- 2x2 Hadamard: `Y = [1 1; 1 -1] X [1 1; 1 -1]`. Exact.
- 8-point inverse: `y = Ei x`. The matrix `Ei` has rows such as `[1 1.5 1 1.25 1 .75 .5 .375]`; the full matrix is in `tb/tx_ref_pkg.sv` (as 8·Ei).
- 8-point forward: `y = Ei^T x`.

A 2D 8x8 transform takes two sweeps of 8 one-dimensional transforms, with a transpose in between. The transpose buffer is not part of this design.

## How each transform is laid onto the nodes

This section is the key to reading `h264_tx_pkg.sv`. The comments there name each node's role.

### 8-point inverse (4 stages, 1 pass)

- **Stage 1** forms scaled copies of the odd inputs (12 nodes): 1.5·X1, 1.25·X1, 0.75·X1, and the same kinds of copies of X3, X5 and X7. Each is `x ± (x >>> k)`. The four 0.75/−0.75 nodes are the subtracting ones; they sit on add/subtract nodes A0..A3.
- **Stage 2** builds:
  - the even part: X0 ± X4, X2 + X6/2, X6 − X2/2;
  - the odd part: for example 1.5·X1 + (1.5·X7)/4, and 1.25·X1 − 0.75·X7.
- **Stage 3** combines the even terms and the odd terms.
- **Stage 4** produces the final butterflies: y0..y3 on the adding nodes, y4..y7 on the subtracting ones.

The scaled copies are truncated where they are formed. The result is therefore the exact `Ei x` only up to a few LSBs (see Numerics).

### 8-point forward (4 stages, 1 pass)

This is the usual even/odd factorisation:

- **Stage 1:** a_k = x_k ± x_(7−k).
- **Stage 2:**
  - b0..b3 from a0..a3;
  - 1.5·a4..1.5·a7;
  - a5 ± a6 and a4 ± a7.
- **Stage 3:**
  - y0, y4, y2 = b2 + b3/2 and y6 = b2/2 − b3;
  - the four odd sums b4..b7.
- **Stage 4:**
  - y1 = b4 + b7/4, y3 = b5 + b6/4, y5 = b6 − b5/4, y7 = b4/4 − b7;
  - y0, y2, y4 and y6 pass through as `x + 0` or `x − 0`.

The results match the H.264 reference encoder's integer butterflies bit for bit.

### 4x4 inverse (direct 2D, 2 passes of 8)

There is no row/column split and no transpose buffer. All 16 inputs feed the network on both passes.

- **Stage 1** combines input rows element by element:
  - pass 0: `X0j + X2j` and `X1j + X3j/2`;
  - pass 1: `X0j − X2j` and `X1j/2 − X3j`.
- **Stage 2** (4 nodes per combined row, 8 per half) pairs the elements:
  - A0 ± A1 and A0 ± A1/2;
  - A2 ± A3 and A2 ± A3/2.
- **Stage 3** finishes the row transform with signs + − − +. The same sign pattern appears for the forward and Hadamard transforms.
- **Stage 4** adds and subtracts the two halves:
  - pass 0 gives rows 0 and 3;
  - pass 1 gives rows 1 and 2.

### 4x4 forward and 4x4 Hadamard (direct 2D, 2 passes of 8)

These use the same frame as the 4x4 inverse, with different pairings:

- **Stage 1:** `X0j ± X3j` and `X1j ± X2j`.
- **Stage 2:**
  - Hadamard: A0 ± A1 and A2 ± A3;
  - forward: the doubled variants 2A0 + A1, A0 − 2A1, A2 + 2A3 and 2A2 − A3.
- **Stage 3:** the same + − − + combination as the inverse.
- **Stage 4:**
  - pass 0 gives rows 0 and 2 (sum and difference of the halves);
  - pass 1 gives rows 1 and 3. The forward transform takes `2U + L` and `U − 2L` there, where U and L are the two stage-3 halves.

### 2x2 Hadamard (1 pass, 4 results)

- Like every transform that needs fewer than four levels, it starts at stage 1.
- Stage 1 forms c00 ± c01 and c10 ± c11.
- Stage 2 forms the four results.
- Stages 3 and 4 pass them through to F0..F3 as `x + 0` or `x − 0`.

## Numerics

All signals are W = 16 bits wide. There is no saturation. These input ranges keep every intermediate value in range:

| mode | input range |
|---|---|
| 8-point inverse | ±4095 |
| 4x4 inverse | ±2047 |
| 8-point forward, 4x4 forward | ±255 (9-bit residuals) |
| 4x4 Hadamard | ±1023 |
| 2x2 Hadamard | ±8191 |

Wider inputs wrap.

The right shifts truncate toward minus infinity. The forward transforms and both Hadamard transforms are exact. Measured against the exact rational product over the test vectors:

- **8-point inverse:** within 23/8 LSB.
- **4x4 inverse:** within 11/4 LSB.

The two inverse decompositions apply their factors of 0.5 and 0.25 at different points than the H.264 standard's two-step inverse. They are therefore **not bit-exact with the standard decoder**. A decoder that must match the standard bit for bit needs different rounding positions.

## The transform unit (top level)

`h264_transform_unit` places the network between an input register and an output register:

```
clk         _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
in_valid    ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______
in_mode      | INV4  |  INV4 | FWD8|
in_ready    ‾‾‾\___/‾‾‾\___/‾‾‾‾‾‾‾‾‾‾   (low during pass 0 of a 4x4 block)
taken at     e0      e2      e4
out_valid   ______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__
out_pass          | 0 | 1 | 0 | 1 | 0 |
```

- A block is taken when `in_valid && in_ready`. A block taken at clock edge k shows its pass-0 results on `out_f` after edge k+1. A 4x4 block shows its pass-1 results after edge k+2.
- The unit takes the next block during the last pass of the current one. A gap-free stream therefore yields 8 results every cycle (4 for the 2x2 Hadamard).
- `out_valid` is high for exactly one cycle per pass. There is no output back-pressure.
- Reset is synchronous and active low (`rst_n`).
- Two assertions guard the interface:
  - an offer that is not taken must stay offered, with the same mode;
  - a second pass only occurs for the 4x4 modes.

## Where this RTL departs from the published architecture

- **Stage 1 add/subtract nodes.** The published unified architecture draws all 12 stage-1 nodes as adders. It counts 28 adders and 16 subtractors, with no add/subtract nodes. The published 4x4 datapaths, however, change stage 1 between sums and differences from one pass to the next, and 12 adders cannot give both. Here stage-1 nodes 0..7 add or subtract under control of the routing table; nodes 8..11 only add. Stages 2..4 match the published operations node for node.
- **Routing into later stages.** Every routing network can reach the primary inputs and all earlier stages, not only the previous stage. The published 8-point inverse datapath feeds inputs directly into its second stage, which requires this.
- **Own dataflows.** The published material details only the 8-point inverse and the 4x4 inverse dataflows. The 8-point forward, 4x4 forward, 4x4 Hadamard and 2x2 Hadamard dataflows here are this design's own. They are built the same way and fitted to the same fixed node operations. The 8-point forward matrix is taken as the transpose of the inverse one, as in H.264.
- **Registers and handshake.** The published architecture is purely combinational. The input/output registers, the valid/ready handshake and the pass sequencing are additions.
- **Uniform width.** All nodes are 16 bits wide. The published design sizes each node from the widest transform that uses it. The largest such width is 16 bits, but some nodes could be narrower.

## Verification

| testbench | what it checks |
|---|---|
| `tb/tb_ua_route.sv` | Delivered operands for a sample of nodes in every mode and pass, against the signal and scaling the transform equations call for: zero operands, pass-dependent add/subtract, doubling in the 4x4 forward pass 1. |
| `tb/tb_ua_datapath.sv` | All six modes with zero, impulse, DC, alternating-extreme and 3000 random blocks each. Every output is compared with bit-exact reference models and with the exact matrix product, within 4 LSB where truncation applies. |
| `tb/tb_h264_transform_unit.sv` | 4000 blocks with random modes and idle gaps through the registered unit, at default parameters. Checks the results, `out_mode`/`out_pass`, and the latency of every pass. Also checks the cycle count and results per cycle of a gap-free stream in every mode. Counts mode switches, two-pass blocks, back-to-back takes, stalls and idle gaps, and fails if any never happened. |
| `tb/tb_macroblock.sv` | One 4:2:0 macroblock through the unit: 16 forward 4x4 luma blocks, the 4x4 Hadamard of their DC terms, two chroma 2x2 Hadamards and 8-point forward and inverse sweeps. Checks every result and the total cycle count. |

The reference models are in `tb/tx_ref_pkg.sv`. They are plain integer arithmetic written from the transform equations, independent of the routing table.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/h264_tx_pkg.sv rtl/ua_route.sv rtl/ua_datapath.sv rtl/h264_transform_unit.sv \
  tb/tx_ref_pkg.sv tb/tb_h264_transform_unit.sv --top-module tb_h264_transform_unit
./obj_dir/Vtb_h264_transform_unit
```

## Files

| file | content |
|---|---|
| `rtl/h264_tx_pkg.sv` | Mode and operand types, fixed node operations, the routing table |
| `rtl/ua_route.sv` | Routing network of one stage |
| `rtl/ua_datapath.sv` | The four-stage unified network |
| `rtl/h264_transform_unit.sv` | Top level: registers, handshake, pass sequencing |
| `tb/` | Testbenches and the reference-model package |

### Changing the design

- **A mode's dataflow:** edit the `route_s*` functions in `h264_tx_pkg.sv`. An operand is `opx/opa/opb/opc(index, shift)` or `opz()`, and `nr(a, b, sub)` builds a node entry; `sub` counts only in stage 1.
- **A node's operation in stages 2..4:** edit `S2_SUB`, `S3_SUB` or `S4_SUB`.
- **Data width:** set the parameter `W`.
