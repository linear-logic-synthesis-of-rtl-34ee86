# Multi-valued flip-flops from linear (current-mode) logic

This is synthesizable SystemVerilog for a family of **k-valued flip-flops**:
RS, synchronous RS, push-pull (master-slave) RS, D, T and JK. Each one stores
one of k levels 0..k-1 instead of one bit. The design comes from current-mode
logic. There a logic level is a current, a whole multiple of a unit current,
and every gate is built from current sums, differences, clipped differences,
absolute values and threshold comparisons. That is "linear" logic. No
Boolean gate is used.

The key idea is how inversion is generalised. A two-valued latch is two
NAND gates in a loop. Each NAND is `min(x1, x2) (+) 1`, where `(+)` is
addition modulo 2. A k-valued latch instead has **k elements in a ring**.
Each element computes `min(x1, x2) (+) i`, where `(+)` is now addition modulo
k and `i` is a rotation set from outside. One trip round the ring rotates the
level by `k*i = 0 (mod k)`, so any level that is held stays put. Lowering one
of the ring's k inputs breaks the loop at that point and writes a new level.

The default valuedness is **K = 3** (ternary). This is the main case: 3 is
prime, and a k-valued flip-flop can reach every state from every other only
when k is prime. For K = 4 the rotation by 2 loops between two states. Every
module takes K as a parameter. K = 2 gives the ordinary latches, and K = 4, 5
and 7 are simulated too.

## Levels and the linear element (`mvl_gate`)

A level is an unsigned number of `$clog2(K)` bits whose value is below K.
`mvl_gate` computes one of four elements:

| `OP` | `ROT_AT_INPUT` | function |
|---|---|---|
| `OP_MIN` | 0 | `min(x1, x2) (+) i` (k-valued AND-NOT) |
| `OP_MIN` | 1 | `min(x1, x2 (+) i)` |
| `OP_MAX` | 0 | `max(x1, x2) (+) i` (k-valued OR-NOT) |
| `OP_MAX` | 1 | `max(x1, x2 (+) i)` |

`ROT_NEG = 1` turns `(+)` into `(-)`, using `x (+) i = x (-) (K - i)`.

In the RTL, `FORM` chooses the arithmetic that a current circuit would use.
The function does not change, only the structure. Below, `-.` is the
truncated difference: `a -. b = a - b` when `a >= b`, otherwise 0.

* `FORM_DIFF`: `min = x1 -. (x1 -. x2)`, `max = x1 + (x2 -. x1)`, and
  `x (+) i = x + i - K*[1 -. (K -. (x + i))]`.
* `FORM_MODULE`: `min, max = (x1 + x2 -/+ |x1 - x2|) / 2`, and
  `x (+) i = x + i - K*(1 + |x + i - (K-1)| - |x + i - K|) / 2`. The
  fraction is a unit step at `x + i = K`, built from two absolute values.
* `FORM_THRESH`: `min = sum_t [(x1 >= t) + (x2 >= t) > 1]` and
  `max = x1 + x2 - min`. The rotation subtracts K times a sum of threshold
  products. For K = 3 these become the familiar two-term and three-term
  threshold expressions. For other K the general sums are this design's
  extension.

## The RS ring (`mvl_rs_ff`)

Element j takes the external input `x[j]` and the output of element j-1. The
last output, Q, feeds back to element 0. For K = 3:

| input | element output |
|---|---|
| `x[0]` = S | `n[0]` = Q̄ |
| `x[1]` = SR | `n[1]` = Q̿ |
| `x[2]` = R | `n[2]` = Q |

In a consistent state `n[j] = Q (+) (j+1)*i`. So the flip-flop offers all k
rotations of its level at once, the k-valued version of having both Q and Q̄.

**Hold and write.** With `OP_MIN` every input held at K-1 passes the chain
through unchanged. That is the hold state. Lowering one input clips the chain
at that element and writes. The level written depends on the input value, on
which input is used, on the current state and on i. For example, with K = 3
and i = 1, starting from state 1:

* S = 0 goes to 0. S = 1 or 2 leaves the state alone, so S can only clear.
* SR = 0 goes to 2, and SR = 1 goes to 0.

`OP_MAX` is the dual: the hold level is 0 and raising an input writes.

**Rotation setting i.** i = 0 gives a plain min chain with no inversion. It
is degenerate and only useful as a pass-through. i = 1 and i = 2 give mirror
behaviour: for example, the T flip-flop counts up for one and down for the
other.

**Allowed inputs.** A write should change one input at a time and leave the
others at the hold level. Some other patterns have no stable state. For
example, S = SR = R = 1 with i = 2 oscillates.

### How the loop is modelled

A combinational ring cannot be simulated or synthesized reliably, so this
RTL registers all K ring nodes:

* On every `clk` edge the K elements are evaluated once in ring order,
  starting from the registered Q, and the results are stored.
* A write through one input reaches Q after one clock. All nodes have
  settled after at most **two** clocks. This holds for every single-input
  write at K = 3 and K = 5.
* `settled` is 1 when one more pass would change nothing. For a pattern with
  no stable state, the nodes keep changing and `settled` stays 0. That is how
  the real ring's oscillation shows up here.
* Reset (`rst_n`, synchronous, active low) clears all nodes. With hold inputs
  they become consistent, with Q = 0, one clock later.

The clock is an evaluation clock of the model. It is not part of the logic
being modelled. The synchronisation input C of the flip-flops below is a
k-valued level like any other input.

## Synchronous and composite flip-flops

* **`mvl_rsc_ff` (single-ended synchronous RS).** Each input goes through a
  gate before it reaches the ring. C = 0 locks the flip-flop: the ring sees
  the hold level. C = K-1 lets the inputs through. For the min ring the gate
  is `max(x, (K-1) - C)`; for the max ring it is `min(x, C)`. An assertion
  flags C at any other level. `ROT_AT_INPUT` chooses between the two
  element forms: 0 is the output implementation (min, then rotate), 1 the
  input implementation (rotate the fed-back signal, then min).
* **`mvl_pp_rsc_ff` (push-pull).** A master RSC is opened by C, and a slave
  RSC is opened by `(K-1) - C`. The slave's inputs are the master's outputs
  moved along by one place: slave S = master Q, slave SR = master Q̄, slave
  R = master Q̿. With this order the slave takes exactly the master's level
  for every i ≠ 0. The input implementation (`ROT_AT_INPUT = 1`) needs the
  unshifted order instead, slave `x[j]` = master `n[j]`, and the module
  switches to it.
* **`mvl_d_ff`.** `S = D`, `SR = D (+) i`, `R = D (+) i (+) i`, or in general
  `x[j] = D (+) j*i`. Two rotation elements form these inputs. With
  C = K-1 the flip-flop settles to Q = D for every i ≠ 0, whatever it held
  before. `PUSH_PULL = 0` (the default) builds it on the single-ended RSC, so
  it is transparent while C = K-1. `PUSH_PULL = 1` builds it on the
  push-pull RSC. `OP = OP_MIN` is the AND-NOT form. `OP = OP_MAX` is the
  OR-NOT form: max ring with hold level 0, rotation elements
  `max(0, v) (+) i`. It takes the same input equations and also stores D.
* **`mvl_t_ff`.** A master-slave pair whose slave outputs feed back to the
  master inputs in the same order (master `x[j]` = slave `n[j]`). Each T
  pulse (K-1, then 0) steps Q to `Q (+) i`, which makes it a modulo-K
  counter whose step and direction are set by i.
* **`mvl_jk_ff`.** The T structure, with the three feedback wires passed
  through `min` gates with J, JK and K. With J = JK = K = K-1 it counts like
  the T flip-flop. Lower gate values pull the master inputs down and write
  other levels.

**Timing of the composite flip-flops.** Hold C (or T) at each level for at
least two clocks. Treat i as a static setting. Changing i re-rotates every
ring, and while a slave is open this can move the stored level.

## Two-valued current logic (`cur_nand2`, `cur_rs_ff2`)

`cur_nand2` is the two-valued current element. `FORM` selects one of four
linear forms, and all four compute AND-NOT:

| form | expression |
|---|---|
| difference | `1 -. [(x1 + x2) -. 1]` |
| module | `(2 - x1 - x2 + abs(x1 - x2)) / 2` |
| comparison | `1 - x1 + (x1 > x2)` |
| threshold | `1 - [(x1 + x2) > 1]` |

`cur_rs_ff2` joins two of these elements into the usual cross-coupled latch.
It uses the same registered loop model as the ring. A set shows after one
clock. A clear changes `q_n` after one clock and `q` after two. The
synchronous and push-pull two-valued versions are `mvl_rsc_ff` and
`mvl_pp_rsc_ff` with `K = 2`. At K = 2 and i = 1 an output-implementation
element is a NAND, and an input-implementation element is
`x1 AND NOT x2`. So `ROT_AT_INPUT` also gives both two-valued forms.

## Top level (`mvl_ff_top`)

The family has no system around it. The top places one instance of each
flip-flop side by side. Each keeps its own data ports, and all share `clk`,
`rst_n` and the rotation `i`. The k-valued instances are K = 3 and use the
difference form. Except for two, they are min-realisation, output
implementation and AND-NOT. The two exceptions are a second push-pull RSC in
the input implementation (`ppi_*` ports) and a second D flip-flop in the
OR-NOT form (`dm_*` ports). The two-valued pair uses the threshold form.

The top also holds a two-valued push-pull synchronous RS flip-flop (`bp_*`
ports). This is `mvl_pp_rsc_ff` at K = 2 with its rotation tied to 1, so
every element is a NAND and the `(K-1) - C` stage is a plain inverter.
`bp_r_n` drives the element whose output is Q̄, and `bp_s_n` drives the one
whose output is Q.

## Where this RTL goes beyond or departs from the published description

* **Rotation per element.** Each ring element rotates by exactly i. One
  published worked example instead rotates by i + 1 (it gives Q̄ = S (+) 1
  at i = 0). With rotation i, the published D-flip-flop equations store D,
  the T flip-flop counts modulo 3 in an order set by i, and from state 1 S
  can only clear while SR reaches both other states. All of these are stated
  properties. With rotation i + 1 none of them hold.
* **Two-valued element function.** The two-valued current element is
  described as OR-NOT, but its printed expressions compute AND-NOT, so it
  computes AND-NOT. The printed module form is twice the intended value, so
  here it is halved. The printed comparison form gives 2 for (1, 0), so here
  it subtracts the minimum.
* **RSC gate operation.** The RSC gate uses the operation dual to the
  ring's. Only this choice meets the stated rule that C = 0 locks and
  C = K-1 passes. Drawings of the structure label these gates with the
  ring's own operation.
* **Wiring orders.** The master-to-slave order (push-pull) and the
  feedback order (T, JK) were chosen as the unique orders that give slave
  copying and modulo-k counting. The same search gave the unshifted order
  for the push-pull flip-flop in the input implementation.
* **OR-NOT D flip-flop.** It is said to be similar to the AND-NOT one but is
  not drawn. Its rotation elements, `max(0, v) (+) i`, are this design's
  own.
* **D flip-flop style.** The D flip-flop is single-ended by default, as
  described in the text. Its symbol carries the push-pull mark, which is
  available through `PUSH_PULL = 1`.
* **Threshold forms for K ≠ 3, and the rotation of the module form,** are
  this design's own.
* **Analog behaviour is not modelled.** There are no transistor-level
  circuits, current levels, delays, power or speed. The loop model's clock
  and its two-clock settling are modelling artefacts.
* **JK write behaviour.** No truth table is published for the JK flip-flop
  beyond its structure.

## Files

| file | contents |
|---|---|
| `rtl/mvl_pkg.sv` | enums (`mvl_op_e`, `mvl_form_e`, `cur_form_e`) and the truncated-difference, threshold and absolute-value primitives |
| `rtl/mvl_gate.sv` | k-valued linear element |
| `rtl/mvl_rs_ff.sv` | k-valued RS ring |
| `rtl/mvl_rsc_ff.sv`, `rtl/mvl_pp_rsc_ff.sv` | synchronous single-ended and push-pull RS |
| `rtl/mvl_d_ff.sv`, `rtl/mvl_t_ff.sv`, `rtl/mvl_jk_ff.sv` | D, T, JK |
| `rtl/cur_nand2.sv`, `rtl/cur_rs_ff2.sv` | two-valued current element and RS pair |
| `rtl/mvl_ff_top.sv` | everything side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_mvl_workloads.sv` | transition completeness at K = 2, 3, 4, 5, 7 |
| `tb/tb_mvl_ref_pkg.sv`, `tb/mvl_gate_chk.sv` | testbench helpers |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. For example:

```sh
verilator --binary --timing --assert --top-module tb_mvl_ff_top \
  -y rtl -y tb +libext+.sv rtl/mvl_pkg.sv tb/tb_mvl_ref_pkg.sv tb/tb_mvl_ff_top.sv
./obj_dir/Vtb_mvl_ff_top
```

To run another testbench, replace `tb_mvl_ff_top` in both places. Each
testbench runs in well under a second.

The testbenches check the design against a plain min/max/modulo model, which
is independent of the linear forms:

* **`mvl_gate`:** every input for 72 configurations (K = 2, 3, 5, all OP,
  rotation and form choices).
* **Rings:** node by node against a step model, at K = 3 and 5. The RS and
  RSC rings are run in both realisations, and the RSC and push-pull in both
  element forms.
* **D:** Q = D, in the AND-NOT and OR-NOT forms.
* **T:** counting in both directions, with wrap-around.
* **JK:** clock-by-clock against a two-ring model.
* **Top:** `tb_mvl_ff_top` drives every flip-flop at the default parameters.
  It counts each behaviour it provokes (each RS input writing, oscillation,
  locking, master-slave transfer in both element forms, D load in both
  forms, counting and wrap, JK toggle and
  write, binary set, clear and both-low, and the two-valued push-pull
  transfer) and fails if any of them never happened.

## Changing it

* `K` sets the valuedness everywhere. Use a prime K for a flip-flop that can
  reach every state. `tb_mvl_workloads` shows why. It loads a D flip-flop at
  K = 2, 3, 4, 5 and 7, trying every start level, every target level and
  every rotation. At a prime K every load takes. At K = 4 with i = 2 the
  rotation only cycles between two levels, and the loads 0 → 1 and 2 → 3 do
  not take.
* On `mvl_rs_ff`, `mvl_rsc_ff`, `mvl_pp_rsc_ff` and `mvl_d_ff`, `OP`
  selects the min (AND-NOT) or max (OR-NOT) realisation. On `mvl_rs_ff`,
  `mvl_rsc_ff` and `mvl_pp_rsc_ff`, `ROT_AT_INPUT` moves the rotation to the
  chained input. The T and JK flip-flops are built only in the output
  implementation and the min realisation.
* `FORM` changes only the arithmetic structure, not the function.
