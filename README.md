# max* datapath for joint turbo / LDPC decoding

Turbo decoders (Log-MAP) and LDPC decoders (sum-product) both rely on one
nonlinear operation, the log-sum-exp

    max*{x1, x2} = ln(e^x1 + e^x2)

For turbo codes it merges path metrics. For LDPC codes it gives the check-node
rule for two LLRs:

    L(U xor V) = max*{0, L(U) + L(V)} - max*{L(U), L(V)}

This RTL builds max* from a piecewise-linear (PWL) approximation with `r`
planes. Hardware for that approximation can be arranged in three ways, each
cheaper than the last. On top of the cheapest r = 4 form, the RTL builds an
eight-input unit that serves both decoders. In turbo mode it computes two
8-input max* reductions. In LDPC mode it computes the check-node combination
of eight LLRs. A run-time mode bit switches between the two.

All arithmetic is signed two's-complement fixed point: **8-bit words with 3
fractional bits**. The range is -16.0 to +15.875 and the step is 0.125.

## 1. The generalized max* operator

The best convex `r`-term PWL approximation of ln(e^x1 + e^x2) is

    z = max{ x1, y_1, ..., y_{r-2}, x2 },   y_i = a_{r-i-1} x1 + a_i x2 + b_i

Its coefficients are symmetric:

- 0 < a_1 < ... < a_{r-2} < 1
- a_i + a_{r-i-1} = 1
- b_i = b_{r-i-1}
- for odd r, the middle plane has a = 0.5 and b = ln 2

Three equivalent datapaths follow from this:

| module | form | what it builds |
|---|---|---|
| `max_star_a1` | direct | r-2 combiners (`lse_combiner`, two constant multiplies each) and a CS-tree over r values |
| `max_star_a2` | paired | Planes i and r-1-i merge into y_i* = a_i(x1+x2) + k_i·x* + b_i, where x* = max(x1,x2) and k_i = 1-2a_i (`lse_pair_combiner`). For odd r the middle plane is 0.5(x1+x2) + b, made with a shift. The CS-tree has ceil(r/2) inputs. |
| `max_star_a3` | offset | z = x* + max{0, w_1*, ...}, with w_i* = b_i - a_i·\|x1-x2\| |

The A3 form never computes |x1-x2|. The compare-select unit that finds x*
already produces δ = x1 - x2. Each `mpa` block multiplies a_i·δ and feeds it to
a *programmable adder*: XOR gates plus the carry-in, both driven by the sign of
δ, turn the adder into b - a·δ when δ >= 0 and b + a·δ when δ < 0. A3 needs
floor(r/2) - 1 real multipliers; A1 needs 2(r - 2 - r mod 2).

`cs_unit` is the basic compare-select element. It subtracts (δ = p - q, one bit
wider than the operands) and uses the sign to pick p or q. `cs_tree` chains N-1
of them in a heap-shaped binary tree.

**Coefficients and precision.** `R`, `A_Q` and `B_Q` are parameters.
`A_Q[i-1]` = a_i·256 and `B_Q[i-1]` = b_i·256, for i = 1..R-2. The defaults
are the r = 4 power-of-two set: a = {0.25, 0.75}, b = {0.5, 0.5}. Inside, all
three forms compute exactly, in units of 2^-11. They round once at the output
(floor to 2^-3, then saturate to 8 bits). As a result, A1, A2 and A3 give
**bit-identical** results for any symmetric coefficient set, and the
testbenches rely on that. A3 reads only the first ceil(R/2)-1 coefficient
entries, so it assumes the set is symmetric. At elaboration, all three forms
reject coefficients that are out of range or not increasing. A2 and A3 also
reject sets that are not symmetric. R >= 3 is supported. R = 2 is
plain max(x1, x2) and has no module.

Some known approximations are special cases of these parameters:

- r = 3, a = 0.5, b = ln 2 in A3 form is the MacLaurin approximation.
- r = 3 in A2 form is average Log-MAP.
- r = 4 with a_1 = 0.25 in A3 form is linear Log-MAP.

## 2. The fixed r = 3 and r = 4 units

These are the two low-cost units a decoder would use. They round inside, on the
2^-3 grid, exactly as their shift-and-add structure does.

- `max_star_r3_a2`: z = max{x*, (x1 + x2 + 1.0) >> 1}. That is two adders, a
  wired shift and two CS units.
- `max_star_r4_a3`: z = x* + max{0, 0.5 ∓ (δ >> 2)}. A CS unit gives x* and δ.
  δ is shifted right by two and goes to a programmable adder with the constant
  0.5. A CS unit against 0 clamps the correction, and a final adder adds it to
  x*.

In `max_star_r4_a3` the arithmetic shift comes *before* the add/subtract
choice. A negative δ is therefore rounded toward -∞ before the sign is
applied. For δ = -1, for example, the correction is 0.5 + floor(-1/4)·0.125 =
0.375, not 0.5. The two units agree with the exact log-sum-exp to within 0.4
everywhere away from saturation. The testbenches check this for every input
pair.

## 3. The programmable unit and the joint tree

`pu` is the building block of the dual-mode node. It takes four LLRs
L(U), L(V), L(U'), L(V') and a mode bit:

```
              turbo mode            LDPC mode
  j  =  max*{L(U'), L(V')}      max*{0, L(U)+L(V)}
  k  =  max*{L(U),  L(V)}       max*{0, L(U)+L(V)} - max*{L(U), L(V)}  = L(U xor V)
```

Both modes use the same hardware:

- One adder forms L(U)+L(V).
- A multiplexer feeds the "left" max* unit with (U', V') in turbo mode or
  (0, U+V) in LDPC mode.
- The "right" max* unit always sees (U, V).
- A second multiplexer passes either 0 or the left result to a programmable
  adder. The adder adds the right result in turbo mode and subtracts it in
  LDPC mode.

The max* units are `max_star_r4_a3` by default. Parameter `ALG = ALG_R3_A2`
swaps in the r = 3 unit.

`pu_tree` connects seven PUs in three levels (4-2-1). First-level unit i
receives L(Ui), L(Vi), L(Ui'), L(Vi'), for i = 0..3. Each higher unit takes
its two children's `k` outputs as (U, V) and their `j` outputs as (U', V').
So:

- **Turbo:** J is the 8-input max* of the primed inputs and K the 8-input max*
  of the unprimed ones. Together they are the two reductions of an 8-state
  turbo decoder's a-posteriori step.
- **LDPC:** K is the check-node combination of all eight inputs
  (U0 ⊕ V0 ⊕ ... ⊕ V3). J has no meaning in this mode.

A check node with fewer than eight edges ties its spare inputs to +15.875. A
very reliable "0" barely changes the result. `tb_workloads` does this for
degree-6 and degree-7 nodes.

**Word growth.** Inside each PU, the sum and both max* units work on 10 bits.
Only `j` and `k` are saturated back to 8 bits. Clipping L(U)+L(V) to 8 bits
would be cheaper, but it breaks LDPC mode. Two strong agreeing inputs (+15.875
and +15.875) would then give k = 0, destroying a perfectly reliable message.
In turbo mode the outputs saturate when the max* exceeds +15.875. The
`sat` output reports any clipping in the tree.

The tree outputs one combined value per check node. A check node inside a
full decoder also needs one *extrinsic* message per edge (leave-one-out
combinations). That needs extra structure, such as forward/backward partial
results, which is not part of this design.

## 4. Extrinsic scaling

In LDPC mode the r = 3 and r = 4 approximations lose a little against exact
sum-product. Scaling the extrinsic messages by about 0.9 recovers the loss.
`extrinsic_scaler` multiplies K by `SCALE_NUM / 2^SCALE_SHIFT`, rounds half up
and saturates. The default is 230/256 ≈ 0.898. It acts only in LDPC mode. For
the r = 3 unit on the irregular rate-1/2 code, 0.85 works better
(`SCALE_NUM = 218`).

## 5. Top level: `joint_turbo_ldpc_top`

The top puts two parts side by side:

- **Check node:** `pu_tree` followed by `extrinsic_scaler`.
- **Generalized max*:** A1, A2, A3 (R = 4 defaults) and the r = 3 unit, all on
  one operand pair `gx1`, `gx2`. They let you compare the forms in one netlist.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (target 200 MHz); asynchronous active-low reset |
| `in_valid` | in | 1 | inputs valid this cycle |
| `mode` | in | `mode_e` | `MODE_TURBO` (0) or `MODE_LDPC` (1) |
| `lu`, `lv`, `lup`, `lvp` | in | 4 × 8 | L(Ui), L(Vi), L(Ui'), L(Vi') |
| `gx1`, `gx2` | in | 8 | operands of the generalized max* units |
| `out_valid` | out | 1 | results valid |
| `j`, `k` | out | 8 | check-node results (k scaled in LDPC mode) |
| `z_a1`, `z_a2`, `z_a3`, `z_r3` | out | 8 | generalized max* results |
| `sat_count` | out | 16 | valid operations in which the tree saturated (sticks at 65535) |

**Timing.** The datapath is combinational, with one register stage at the
output. Inputs presented with `in_valid` appear one clock later with
`out_valid`. The node accepts a new operation every cycle. When `in_valid` is
low the outputs hold their last values.

Parameters: `W` (8), `ALG` (`ALG_R4_A3`), `SCALE_NUM` (230), `SCALE_SHIFT`
(8). Word width is also tied to `maxstar_pkg::LLR_W`/`LLR_F`.

Coarse synthesis of the top gives about 700 word-level cells and 65
flip-flops. About 590 cells are in the seven-PU tree.

## 6. Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Every testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog. The reference models
(`tb/tb_ref_pkg.sv`) evaluate every PWL plane in real arithmetic, then floor
and clamp. They do not mirror the RTL structure.

- The max* units are tested **exhaustively** over all 65 536 operand pairs. The
  generalized forms run at R = 3, 4, 5 and 6. Each unit is also checked against
  exact ln(e^x1 + e^x2), with a tolerance of 0.4.
- `tb_pu` and `tb_pu_tree` test both modes and both max* options against a
  reference tree with random and extreme inputs. They also check that K has
  the right sign in LDPC mode and that J and K stay within 1.2 of the exact
  8-input log-sum-exp in turbo mode.
- `tb_joint_turbo_ldpc_top` runs the default top for 20 000 operations at
  200 MHz. It checks the one-cycle latency, output hold in idle cycles, mode
  switches between back-to-back operations, saturation and `sat_count`, a
  reset mid-stream, and every output value. It counts how often each of these
  happens and fails if one never does.
- `tb_workloads` feeds noisy channel LLRs to degree-6 and degree-7 check nodes
  and compares K with the scaled exact tanh-rule value. Two configurations run
  side by side:

  | configuration | mean absolute error |
  |---|---|
  | r = 4 unit, scaling 0.9 (default) | about 0.09 |
  | r = 3 unit, scaling 0.85 | about 0.13 to 0.15 |

  It also checks 8-state turbo reductions against exact log-sum-exp, with a
  mean error of about 0.11.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/maxstar_pkg.sv tb/tb_ref_pkg.sv tb/tb_joint_turbo_ldpc_top.sv \
    --top-module tb_joint_turbo_ldpc_top
./obj_dir/Vtb_joint_turbo_ldpc_top
```

Replace the testbench file and top-module name to run the others. Each one
finishes in well under a second.

## 7. Choices made here, and what is not included

Choices where no specification was available:

- The coefficient word length is 8 fractional bits.
- Exact intermediate arithmetic in A1/A2/A3, with a single floor at the output.
- Saturation at every 8-bit output.
- 10-bit words inside the PU.
- Scaling by 230/256 with round-half-up, applied only to K in LDPC mode.
- The output register, the reset and the saturation counter.
- The heap shape of the CS-trees.

Deliberately left out:

- Min-sum family check nodes (plain, offset 0.15, normalized 0.8) and the
  MacLaurin and table-lookup max* designs. These are the reference points this
  datapath is measured against. The MacLaurin function is available as
  `max_star_a3 #(.R(3), .A_Q('{128}), .B_Q('{177}))`.
- The earlier r = 4 "A2" unit built with shifts. `max_star_a2` with R = 4
  computes the same function.
- Everything of a full decoder around the node: message memories, variable
  nodes, per-edge extrinsic outputs, iteration control and the turbo trellis
  (branch and state metric units). This RTL therefore makes no BER or
  iteration-count claims. Gate counts from a particular standard-cell
  library are not reproduced either.
