# Earliest-first carry-propagate adder

A normal parallel-prefix adder assumes every operand bit arrives at the same
moment. Often they don't. In the final adder of a multiplier, for example,
the middle bits come out of the reduction tree last. In such cases a fixed
tree (Kogge-Stone, Sklansky, ...) finishes only when its latest input has gone
all the way through the tree. This adder is built for a given **delay
profile**, the arrival time of each bit position. An elaboration-time
scheduler places the carry operators so that signals which arrive early are
combined first, while the late ones are still on their way. When the profile
is equal, the result is the usual logarithmic tree. When it is not, you get
an irregular network whose last carry arrives earlier.

The RTL is one parameterised, purely combinational SystemVerilog module,
`gef_adder`. The network's topology is computed from its parameters by
constant functions and then built with generate loops. It needs no external
tool or generated netlist.

## Ternary operators and term pairs

Every carry-lookahead or conditional-sum adder can be written as a chain of
one associative, **non-commutative** operator applied to bit-level terms,
from bit 0 upward. Associativity means the chain can be bracketed in any
order. Each bracketing is one prefix network, and the scheduler picks the one
that suits the arrival times. Non-commutativity means an operand must never
change sides. The less significant term is always the left operand (`lo`).

Each term is a pair of signals `(u, v)` covering a contiguous bit range.
`gef_ternary_op` combines `lo` and `hi` with one of four rules, chosen by the
`OP` parameter (`gef_pkg::gef_op_e`):

| `OP`          | pair `(u, v)` | combine (`_l` = lo, `_h` = hi)                       | adder family                 |
|---------------|---------------|------------------------------------------------------|------------------------------|
| `GEF_NABLA_P` | `(g, p)`      | `u = g_h | p_h&g_l`, `v = p_l & p_h`                 | carry lookahead, p = a^b     |
| `GEF_NABLA_R` | `(g, r)`      | `u = g_h | r_h&g_l`, `v = r_l & r_h`                 | carry lookahead, r = a\|b    |
| `GEF_MUX`     | `(r, g)`      | `u = u_l ? r_h : g_h`, `v = v_l ? r_h : g_h`         | conditional carry            |
| `GEF_DELTA`   | `(g, p)`      | `u = g_h ^ p_h&g_l`, `v = p_l & p_h`                 | exclusive-or form            |

For the mux rule, `r` is the group's carry out if its carry in is 1, and `g`
is its carry out if its carry in is 0. The exclusive-or rule relies on `g`
and `p` never being 1 together, which holds when p is a^b.

A term that starts at bit 0 *is* a carry. It is held as `(c, 0)`, or as
`(c, c)` for the mux rule, so the same pair rule applies to it. A cell whose
low operand is a carry uses the cheaper carry form (`CARRY = 1`), which
computes only `u`. The carry is always `u`.

The adder has three stages:

```
a, b ──► gef_pgr ──► p, g, r ──► leaf pairs ──► carry network ──► c[0..W-2]
                      │                      (gef_carry_network │
                      │                       or dfp_carry_network)
                      └──────────── p ─────────────────┐        │
                                                       ▼        ▼
                                            s[0] = p[0], s[i] = p[i] ^ c[i-1]
```

`c_0 = g_0`. There is no carry input and no carry output, so the adder
computes `a + b mod 2^W`. The default is W = 17. The carry network then
covers 16 positions (c0..c15), and bit 16 contributes only its sum XOR.
This is the "p last" arrangement. The "p first" one is described below.

## How the earliest-first schedule is built

The schedule runs inside `gef_carry_network` as the constant function
`gef_schedule()`. Times are integers in a unit of which one operator takes
`OPD`. The default `OPD = 2` lets you write profiles in half-operator steps,
such as 10.5.

**One earliest-first run** takes an ordered list of terms that together tile
a bit range:

1. Every term starts in the *pending list*, with its bit range and ready time.
2. All pending terms that share the earliest time move to the *ready list*,
   which is kept in bit order. Terms already waiting in the ready list stay
   there.
3. In the ready list, runs of adjacent terms (ranges that touch) are paired
   off from the least significant end. Each pair becomes one operator whose
   output (time = the later input + `OPD`) goes back to the pending list. A
   term left without a partner keeps waiting in the ready list. With
   `FANIN = 3`, three adjacent ready terms go into one three-term cell
   (time + `OPD3`), and only a leftover two are paired.
4. Steps 2 and 3 repeat until only one term is left.

**Building the whole network:**

* First, one run over all L leaves. Its result is the most significant carry
  `c_{L-1}`. Every carry and group term created along the way is remembered.
* Then, from `c_{L-2}` down to `c_1`, every carry not yet built is split into:
  * the nearest carry already built below it, then
  * from the next bit up, the widest group terms already built,
  * then the single leaves.

  A run on that short list builds the carry and remembers any new group
  terms. If a pairing would rebuild an existing term, the existing one is
  used.

Example: an equal profile with L = 16 and `OPD = 1`. The first run pairs
all bits, then all pairs, and so on, giving `c15` at t = 4. On the way it
builds `c0, c1, c3, c7`, the groups `(8..11)`, `(12..13)`, and so on.
`c14` is then split into `c7, (8..11), (12..13), (14)`. A new run on those
four terms, ready at 3, 2, 1 and 0, adds three operators: `(12..14)` at 2,
`(8..14)` at 3, and `c14` at 4. When all carries are done, the network has
32 operators, or (L/2)·log2 L, in four levels. This is the familiar Sklansky
shape. The unit testbenches check this case operator by operator, through
the carry times.

Unequal example: a carry ready at 12, bits 1–4 at 10 and bits 5–8 at 10.5.
The scheduler combines the two 4-bit blocks while the carry is still on its
way. It delivers `c4` at 13 and `c8` at 14: eight bits in two operator
delays after the carry.

The schedule can be read from localparams of the carry network instance.
The testbenches use these, and you can use them to inspect any
configuration:

| localparam   | meaning                                                              |
|--------------|----------------------------------------------------------------------|
| `N_OPS`      | operators placed                                                     |
| `C_TIME[i]`  | ready time of carry `c_i`, in DP units                               |
| `N_KEPT`     | passes in which a term waited in the ready list for a later partner  |
| `N_REUSED`   | already-built terms used again when splitting a carry                |
| `N_DECOMP`   | carries built by splitting (all except those the first run produced) |

These times come from the unit delay model: one operator takes `OPD`. The
model ignores the p/g/r gates, the final sum XOR, and wire load. They
describe the network's structure. They are not a timing sign-off.

## Merging p first: conditional-sum and exclusive-or adders

With the mux and exclusive-or rules the half-sum does not have to wait for
the carry. For sum bit i, p_i can be folded into the leaf of bit i-1 before
anything else happens:

| `OP`        | modified leaf at bit i-1           |
|-------------|------------------------------------|
| `GEF_MUX`   | `(p_i ^ r_{i-1}, p_i ^ g_{i-1})`   |
| `GEF_DELTA` | `(p_i ^ g_{i-1}, p_{i-1})`         |

Then `s_i = c_0 ∘ (1) ∘ … ∘ (i-2) ∘ modified leaf`, and the sum comes
straight out of the operator tree. The same pair rules apply, because both
rules stay correct for any operand values. The and-or rules do not, so they
have no p-first form.

`SUM = GEF_SUM_P_FIRST` selects this arrangement. `gef_sum_network` then
replaces the carry network. It schedules the sum bits with the same
earliest-first procedure, from the top sum bit down. Each modified leaf is
ready `OPX` after the later of its two bits. A term that contains a modified
leaf belongs to one sum bit only, so it is never shared. Plain group terms
are shared as before.

What it buys: the top sum bit no longer needs a final XOR after its carry.
That XOR overlaps with the first operator level. Take W = 16 with an equal
profile. With p last, the top sum is ready at 10 half units (4 operators,
then the XOR). With p first it is ready at 8. For W = 17 (2^4 + 1) the two
are equal, because there the extra term is what makes the tree one level
deeper. The price is more operators: 39 instead of 28 for that 16-bit case,
because the sum bits share less.

In general, with an equal profile and fan-in 2, p last puts
`ceil(log2(W-1))` operators and then the XOR on the top sum bit. P first
puts the XOR and then `ceil(log2 W) - 1` operators there. These are the
usual critical-path counts for carry-lookahead and conditional-sum adders,
and the tests check them for W = 16 and 17.

## The alternative scheduler: dual-bit forward prediction

`dfp_carry_network` (select with `SCHED = GEF_SCHED_DFP`) is the simpler
scheduler that the earliest-first method generalises. It walks from bit 0
upward. At each step it looks at the next two positions and compares two
options:

* ripple: `c_n ∘ (n+1)`, then `∘ (n+2)`;
* pair first: `(n+1) ∘ (n+2)`, then `c_n ∘ pair`.

It takes the pair only when that makes `c_{n+2}` strictly earlier. When it
pairs, the skipped carry `c_{n+1}` is built beside the chain. This is the
two-bit rule only. The scheduler does not form longer blocks when many bits
arrive long before the carry. So for the "carry at 12, bits at 10/10.5"
example above it reaches 16, not 14. The scheduler is there to compare
against. In the end-to-end test the earliest-first network is never later,
and on a 32-bit multiplier-style profile it is clearly earlier (17 vs 24
operator delays). It also uses far more operators there (135 vs 37).

**Full-adder ripple steps.** When the carry arrives at about the same time
as the next bits, neither option is good. Both must wait for g and r, which
come half an operator delay after the operand bits. A full adder takes the
operand bits directly. Its carry out is `maj(a_i, b_i, c_{i-1})`. With
`FA = 1`, every ripple step (and the side carry of a pair step) is such a
full-adder carry. Its input time is `DP[i] - TRG`, and it costs `OPD`. An
example in half units: carry at 4, operands at 4 and 5, so g and r at 5 and
6. Ternary cells give `c_{n+2}` at 9 by rippling, or 10 by pairing. Full
adders give it at 8. The scheduler weighs the two options with these
times. Only the carry half of the full adder is built. The sum bit is still
`p_i ^ c_{i-1}`.

## Parameters

`gef_adder`:

| parameter | default          | meaning                                                                |
|-----------|------------------|------------------------------------------------------------------------|
| `W`       | 17               | operand and sum width (at least 3)                                     |
| `SCHED`   | `GEF_SCHED_GEF`  | carry-network scheduler (`GEF_SCHED_DFP` for forward prediction)       |
| `OP`      | `GEF_NABLA_R`    | ternary operator, see the table above                                  |
| `OPD`     | 2                | delay of one operator in DP units                                      |
| `FANIN`   | 2                | 2, or 3 to let the earliest-first scheduler use three-term cells       |
| `OPD3`    | 3                | delay of a three-term cell in DP units (fan-in 3 only)                 |
| `SUM`     | `GEF_SUM_P_LAST` | `GEF_SUM_P_FIRST`: p merged at the leaves (mux or exclusive-or only, earliest-first only, W ≥ 4) |
| `OPX`     | 2                | delay of the XOR that forms a modified leaf (p first only)             |
| `FA`      | 0                | 1: forward prediction ripples with full-adder carries                  |
| `TRG`     | 1                | time from operand bits to g and r, in DP units (`FA = 1` only)         |
| `DP`      | all 0            | `logic [W-1:0][15:0]`: `DP[i]` is when the terms of bit i are ready    |

Ports: `a[W-1:0]`, `b[W-1:0]` in, `s[W-1:0]` out. All logic is
combinational, with no clock or reset. With p last, `DP[W-1]` has no effect
on the schedule, because the top bit only feeds its sum.

An example: a 10-bit adder for the unequal example above.

```systemverilog
localparam logic [9:0][15:0] DP =
  {16'd0, 16'd21, 16'd21, 16'd21, 16'd21, 16'd20, 16'd20, 16'd20, 16'd20, 16'd24};
gef_adder #(.W(10), .OP(gef_pkg::GEF_MUX), .DP(DP)) u_add (.a(a), .b(b), .s(s));
```

## Where this departs from the method or stops short

* Fan-in is 2 by default. `FANIN = 3` adds three-term cells
  (`gef_ternary_op3`): wherever three adjacent terms are ready together, they
  go into one cell, which costs `OPD3`. The default `OPD3 = 3` against
  `OPD = 2` reflects a three-term and-or-invert cell being about 1.45 times
  slower than a two-term one. Four-term cells are not built. Whether a larger
  fan-in pays off depends on the library, so it is left to the parameter.
* When a run of three or more adjacent terms is ready, groups are formed from
  the least significant end. The method does not say which grouping to use.
* Every two-term operator costs the same `OPD`, including the carry form
  whose low operand is a carry. In a real library the carry form is slightly
  faster.
* The earliest-first networks are made of ternary-operator cells only.
  Full-adder steps exist only in forward prediction (`FA = 1`), and only as
  carry cells.
* The p-first sum network reuses the carry scheduling procedure unchanged,
  with each modified leaf as the last term of its sum bit. The method only
  says the p-first case is similar. It is available with the earliest-first
  scheduler only, not with forward prediction.
* The fixed textbook adders that the method compares against (plain
  carry-lookahead, conditional-sum and so on, with their latency formulas)
  are not built separately. With an equal profile the scheduler produces
  their prefix structure anyway.
* The method says unequal profiles need fewer operators than a regular tree.
  This scheduler does not show that. Carries split after the first run get
  their own chains, so irregular profiles can cost many operators (135 for
  the 32-bit hill profile, against about 80 for a Sklansky tree of that width). The
  latency gain is real. The area figure needs a smarter sharing step than the
  greedy split used here.
* Forward prediction is limited to the two-bit rule (see above). It has no
  p-first form, and it has no hybrid form that mixes p-first and p-last sum
  bits in one adder to save area.
* No carry in or carry out.

## Files

| file | content |
|------|---------|
| `rtl/gef_pkg.sv` | operator and scheduler enums, the term pair type, leaf and carry pair helpers |
| `rtl/gef_pgr.sv` | per-bit p = a^b, g = a&b, r = a\|b |
| `rtl/gef_ternary_op.sv` | one two-term operator cell, group or carry form |
| `rtl/gef_ternary_op3.sv` | one three-term operator cell (fan-in 3) |
| `rtl/gef_carry_network.sv` | earliest-first scheduler and the network it builds |
| `rtl/dfp_carry_network.sv` | forward-prediction scheduler and network |
| `rtl/gef_sum_network.sv` | earliest-first sum network for the p-first adders |
| `rtl/gef_adder.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_gef_adder_full` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops with a
watchdog if it hangs. Run one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl rtl/gef_pkg.sv \
    tb/tb_gef_adder.sv --top-module tb_gef_adder -o sim && ./obj_dir/sim
```

Replace `tb_gef_adder` with another testbench name to run it.

* `tb_gef_pgr`: p, g and r against a one-bit half adder, for random and
  corner operands.
* `tb_gef_ternary_op`: all four operators, both group and carry forms,
  over all 16 input combinations. The reference treats each pair as a
  2-bit-group summary and computes the combined group from its carry-in
  behaviour.
* `tb_gef_ternary_op3`: the same for the three-term cell, over all 64
  input combinations.
* `tb_gef_carry_network`: five networks, every carry compared with a
  bit-serial reference. Also checks the schedule:
  * 32 operators for the equal 16-position case;
  * the exact carry times of that case (c0 at 0, c1 at 1, c2–c3 at 2,
    c4–c7 at 3, c8–c15 at 4);
  * 13 and 14 for the unequal example;
  * a fan-in 3 network of 9 positions: 12 operators, 6 of them three-term
    cells, with every carry time worked out by hand (c8 at 3 operator
    delays, where fan-in 2 needs 4).
* `tb_gef_sum_network`: six p-first sum networks (mux and exclusive-or,
  equal and scattered profiles, fan-in 2 and 3). The testbench forms the
  modified leaves itself and checks every sum bit against `a + b`. It also
  checks the top sum times: 10 for the 17-bit word, 8 for the 16-bit word,
  and 6 (three operator levels) for an 8-bit word with either operator.
* `tb_dfp_carry_network`: five forward-prediction networks, with
  hand-worked decisions, operator counts and times for three profiles, with
  and without full-adder steps (`c_{n+2}` at 4.5 against 4 in the example
  above).
* `tb_gef_adder`: fourteen adders side by side, covering every operator,
  both schedulers, both sum arrangements, both fan-ins, equal, hill-shaped,
  scattered and falling profiles, and widths 10–32. Three more 5-bit
  adders (p first with either operator, and full-adder forward prediction)
  are checked over all operand pairs. It checks the sums against `a + b`. It also checks that each
  schedule mechanism occurs at least once:
  * a term waiting in the ready list;
  * a reused term;
  * a carry built by splitting;
  * an unequal profile beating the equal-profile bound;
  * a pair step, a ripple step and a full-adder step of forward
    prediction;
  * the earliest-first network beating forward prediction;
  * a three-term cell;
  * a p-first adder whose top sum bit is earlier than with p last.
* `tb_gef_adder_full`: the default adder only, with all single-bit
  carry-chain corners and 200 000 random additions.

All of these pass. The arithmetic is checked exhaustively only in the
operator cells and the 5-bit adders. Everywhere else it is checked by random and corner-case
simulation. The delay claims are checked against the unit delay model, not
against gate-level timing.
