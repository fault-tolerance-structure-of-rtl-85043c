# Fault-tolerant radix-2 signed-digit adder

This is an N-digit adder (N = 64 by default) that finds its own faults,
locates them to one digit position, and repairs a permanent one by switching
in a spare unit. It works because of two properties of radix-2 signed-digit
(SD) addition:

* **The carry moves at most one position.** Each digit position can be
  built as a small unit of its own that touches only its neighbours.
  A fault therefore corrupts only one or two digits of the sum.
* **With a suitable two-wire digit code, every digit of the addition obeys
  simple parity identities.** They can be checked position by position,
  without a global XOR tree.

A single error makes the controller recompute the same operands. If the
error goes away, it was transient. If two diagnoses agree, the fault is
permanent. Its position goes into a fault status register. From then on,
every unit from the faulty one upward does the work of the position below
it, and a spare unit at the top takes over the most significant position.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). Every block has a
self-checking testbench; the small cells inside ADD1, ADD2 and the two-rail
checker are tested through them. The top-level testbench runs the whole
design at its default size.

## Digits and their parity

A digit takes the values -1, 0 and +1 and is carried on two wires, `{neg, pos}`:

| code | value |
|------|-------|
| `01` | +1 |
| `10` | -1 |
| `00` | 0 (the form this design produces) |
| `11` | 0 (accepted by the parity logic, but see below) |

The value of a digit `d` is `d[0] - d[1]`. Its parity `P(d) = d[1] ^ d[0]`
is 1 exactly when the digit is non-zero. A stuck-at fault on one wire always
changes a digit between zero and non-zero, so it always flips that digit's
parity.

A bus of N digits holds digit k (k = 1..N, 1 is least significant) at bits
`[2k-1:2k-2]`. The value of a number is the sum over k of digit_k * 2^(k-1).
The adder's result is `z + c_out * 2^N`.

## Carry-free addition: ADD1 and ADD2

Each position i computes its result in two steps:

1. **ADD1** splits `a_i + b_i` into an intermediate carry `c_i` and an
   intermediate sum `w_i`, with `w_i + 2*c_i = a_i + b_i`.
2. **ADD2** forms `z_i = w_i + c_{i-1}`.

For `a_i + b_i = +-2` and `0` there is only one possible split. For a sum
of +-1 there are two. ADD1 chooses by looking at position i-1, so that
`w_i` and the incoming `c_{i-1}` never have the same non-zero sign. That
keeps `z_i` within one digit. Only the negative wires `a_{i-1}[1]` and
`b_{i-1}[1]` are needed, so ADD1 has six inputs:

| a_i + b_i | a digit of position i-1 negative? | c_i | w_i |
|-----------|-----------------------------------|-----|-----|
| +2        | -   | +1 | 0  |
| +1        | no  | +1 | -1 |
| +1        | yes | 0  | +1 |
| 0         | -   | 0  | 0  |
| -1        | yes | -1 | +1 |
| -1        | no  | 0  | -1 |
| -2        | -   | -1 | 0  |

Because this rule reads only the negative wire, a zero coded `11` at
position i-1 would count as negative and could overflow the next ADD2. The
operands must therefore use `00` for zero (see the last section).

ADD1 and ADD2 are each built from two independent bit-slices
(`sd_add1_slice`, `sd_add2_slice`): one produces only the MSBs, the other
only the LSBs. A fault inside a block can then change at most one wire of
each output digit, and that is always visible as a parity flip. If the two
bits of one digit shared logic, a single fault could turn +1 into -1 with
the same parity.

## On-line checking

Three parity identities hold at every position i:

| checker | identity | catches |
|---------|----------|---------|
| 1 | `P(w_i) = P(a_i) ^ P(b_i)` | corrupted operand digits, faulty ADD1 sum wire |
| 2 | `P(z_i) = P(w_i) ^ P(c_{i-1})` | faulty ADD2 |
| 3 | `P(c_i) = Prediction_P(c_i)` | faulty ADD1 carry wire |

`P(a_i)` and `P(b_i)` arrive with the operands (`pa`, `pb`). They are
computed wherever the operands come from, so checker 1 also covers the
operand path.

Checker 3 is needed for wrong carries. A wrong carry from position i
belongs to unit i, but it is consumed by ADD2 of position i+1. At best that
blames unit i+1. In the usual case checker 2 sees nothing at all: ADD2 and
checker 2 both use the same wrong carry, so property (4) still holds.
So `carry_pred` predicts `P(c_i)` from the same six wires ADD1 uses, with logic
written independently of ADD1. The comparison then flags position i itself.
`carry_pred` is non-zero when both digits are non-zero with the same sign,
or when exactly one is non-zero and the rule above takes the carry.

The parities are made by one XOR gate per digit (`parity_gen`), with no
trees. Each `parity_checker` compares two N-bit parity vectors and gives:

* a per-position mismatch vector, used for localisation;
* a two-rail summary pair, formed from the pairs `{x_i, ~y_i}` and reduced
  by a tree of two-rail cells.

The three pairs go through one more `two_rail_checker`. Its output
`err_rail` is `01`/`10` when all is well and `00`/`11` on an error. The
per-position error vector is the OR of the three mismatch vectors.

## Locating and bypassing a faulty unit

This is the part of the design that takes the most care.

**Units and the spare.** The datapath (`ft_sd_array`) has N+1 physical
units (`ft_sd_unit`). Unit N+1 is a spare at the most significant end. Each
unit is an ADD1/ADD2 pair with four 2:1 multiplexers in front of it:

* three operand multiplexers choose the inputs of the unit's own position
  (`a_i`, `b_i`, sign wires of i-1) or those of the position below (`a_{i-1}`,
  `b_{i-1}`, sign wires of i-2);
* one carry multiplexer chooses `c` from the unit just below or from two
  units below.

**Controls.** The fault status register holds one bit `b_k` per position.
All bits are 0 after reset. The multiplexer controls are the running OR

    C_i = b_1 | b_2 | ... | b_i

so they are 0 below the lowest faulty position and 1 from it upward.

**How the work moves.** Suppose unit f is faulty:

* units 1..f-1 keep their own positions;
* every unit j >= f takes the operands of position j-1 (select `C_j`; the
  spare uses `C_N`), so unit f+1 does position f, unit f+2 does position
  f+1, and so on, and the spare does position N;
* unit f+1 needs the carry of position f-1, which now comes from unit f-1,
  two units below. Its carry multiplexer therefore selects the skip input
  when `C_{j-1} & ~C_{j-2}`. Every other unit keeps taking the carry of the
  unit just below, which after the shift does the position below its own;
* unit f still computes something, but nothing reads it.

**Output order.** Output multiplexers put the results back in operand
order: digit k of `z`, `w` and `c` comes from unit k+1 when `C_k = 1` and
from unit k otherwise. `c_out` comes from unit N+1 or unit N in the same
way. The checkers see these reordered `w` and `c`, so after a repair they
check the units that are actually in use, and the error goes away.

Example, N = 8, ADD2 of unit 3 stuck:

* checker 2 flags position 3, and the same flag comes back on recompute;
* the register becomes `00000100` and the controls `11111100`;
* units 1 and 2 are unchanged, units 4..9 do positions 3..8, and unit 4
  takes its carry from unit 2.

There is one spare. A second permanent fault cannot be repaired and ends
in the failure state.

## Control flow and timing

`ft_controller` sequences the flow. The operands are held in registers so
that they can be evaluated again. The adder and checkers are purely
combinational between the operand registers and the result registers, so
each evaluation takes one clock cycle.

| state | what happens |
|-------|--------------|
| IDLE | `in_ready = 1`; operands are loaded on `in_valid`. |
| EVAL | No error: the result is registered, and new operands can be loaded in the same cycle, so clean traffic runs at one addition per cycle. Error (`ev_error`): the mismatch vector is kept as the first diagnosis. |
| RECOMP | Same operands again. No error: the fault was transient and the result is delivered (`ev_transient`). Same vector as before: the fault is permanent; the vector goes into the fault status register (`ev_permanent`). A different non-zero vector: a transient corrupted one of the diagnoses; the new vector replaces the old and RECOMP repeats (`ev_rediag`). |
| VERIFY | Same operands on the repaired array. No error: success, result delivered (`ev_ft_ok`). Error: the fault is in logic that has no spare (carry predictor, XOR gates, checkers). `ft_fail` is set, and stays set until reset (`ev_ft_fail`). |

A confirmed permanent fault while the spare is already in use also sets
`ft_fail`. Once `ft_fail` is set, results are delivered after one
evaluation, and `result_err` shows whether the checkers still complained.

Latency from the accepting clock edge to `out_valid`:

| case | cycles |
|------|--------|
| clean | 1 |
| transient | 2 |
| reconfiguration | 3 |
| each repeated diagnosis | +1 |

## Top-level interface (`ft_sd_adder_top`, parameter `N = 64`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears the fault status register) |
| `in_valid` / `in_ready` | in / out | 1 | operand handshake; a transfer happens when both are 1 at a rising edge |
| `a`, `b` | in | 2N | operands, canonical SD digits |
| `pa`, `pb` | in | N | parity of each operand digit |
| `out_valid` | out | 1 | one-cycle pulse: `z`, `c_out`, `result_err` hold a new result |
| `z` | out | 2N | sum digits |
| `c_out` | out | 2 | carry digit of weight 2^N |
| `result_err` | out | 1 | the result was delivered although the checkers still flagged an error |
| `err_rail` | out | 2 | two-rail error pair of the current evaluation |
| `fault_status` | out | N | fault status register |
| `reconfigured` | out | 1 | the spare is in use |
| `ft_fail` | out | 1 | repair failed or impossible; checking ability lost |
| `ev_error`, `ev_transient`, `ev_rediag`, `ev_permanent`, `ev_ft_ok`, `ev_ft_fail` | out | 1 | one-cycle event pulses of the flow above |

## Files

| file | contents |
|------|----------|
| `rtl/sd_pkg.sv` | digit type, codes, value/encode/parity helpers |
| `rtl/sd_add1.sv`, `rtl/sd_add1_slice.sv` | ADD1 and its bit-slice |
| `rtl/sd_add2.sv`, `rtl/sd_add2_slice.sv` | ADD2 and its bit-slice |
| `rtl/ft_sd_unit.sv` | one reconfigurable unit |
| `rtl/ft_sd_array.sv` | N+1 units, carry skip, output multiplexers |
| `rtl/parity_gen.sv` | P(w), P(c), P(z) |
| `rtl/carry_pred.sv` | Prediction_P(c) |
| `rtl/parity_checker.sv` | per-position comparison plus two-rail summary |
| `rtl/two_rail_checker.sv`, `rtl/trc_cell.sv` | two-rail checker tree and cell |
| `rtl/fault_status_reg.sv` | fault status register and running-OR controls |
| `rtl/ft_controller.sv` | detect / recompute / reconfigure sequencer |
| `rtl/ft_sd_adder_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_ft_sd_adder_sizes.sv`, `tb/ft_size_runner.sv` | the top at N = 8, 16 and 32 |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. Each has a watchdog. For example, the full design at N = 64:

    verilator --binary --timing --assert -Wno-fatal -y rtl rtl/sd_pkg.sv \
        tb/tb_ft_sd_adder_top.sv --top-module tb_ft_sd_adder_top -o sim
    ./obj_dir/sim

Building takes about 20-30 s; the simulation itself takes well under a
second. Any other testbench runs the same way with its own name. The unit
tests of the parameterised blocks use N = 8.

`tb/tb_ft_sd_adder_sizes.sv` runs the other operand lengths, 8, 16 and 32
digits, side by side. At each size it runs random additions, repairs a
permanent fault in unit 3, and runs more additions. Its driver is in
`tb/ft_size_runner.sv`, so add `-y tb` to the command line.

What the testbenches establish:

* **ADD1, ADD2, two-rail checker:** exhaustive.
* **Unit, array, parity logic, predictor, register:** random stimulus
  against models written in the testbench. For the array this covers every
  reconfiguration setting, with the retired unit's outputs forced to
  garbage to show that it is really bypassed.
* **Controller:** cycle by cycle against the flow above.
* **Top level (N = 64):**
  * clean random additions, single and back to back (one per cycle);
  * a one-cycle transient;
  * two disagreeing diagnoses;
  * permanent faults in units 1, 20, 37 and 64, each followed by random
    traffic with the fault still present;
  * a diagnosis that flags two adjacent units, of which only the lower one
    stays faulty: the lower one is retired;
  * a second permanent fault with no spare left;
  * a stuck carry predictor that survives reconfiguration;
  * unchecked delivery after the failure.

  Every result is compared with A + B, and every latency is checked.

Faults are injected with `force` on single wires inside the slices. A
released variable that is written by `always_comb` keeps its forced value
until the block runs again, so the transient injections force the wire
back to its fault-free value before releasing it.

## Choices made here, and limits

* **Sign rule.** The ADD1 choice for a sum of +-1 uses "a digit of position
  i-1 has its negative wire set", which needs six inputs. A rule written on
  the sign of `a_{i-1} + b_{i-1}` would pick differently when position i-1
  holds (+1, -1) or (0, 0). Both rules are correct.
* **Canonical zero.** Because of the six-input rule, operands must use `00`
  for zero. A `11` zero at position i-1 counts as negative.
* **Checker interfaces.** Each parity checker gives a two-rail pair plus a
  per-position mismatch vector; the vector is what makes localisation
  possible. The pair coding `{x_i, ~y_i}` is this design's choice.
* **Flow decisions.** The following are this implementation's own: the
  operand and result registers, the valid/ready handshake, the repeated
  diagnosis when two diagnoses differ (with no retry limit), the direct
  failure when the spare is already used, and the unchecked delivery after
  `ft_fail`.
* **Localisation of input faults.** Each unit has its own input
  multiplexers, so a stuck input wire inside unit i disturbs only unit i and
  sets one status bit. When a diagnosis does set bits i and i+1 together,
  the controls (the OR of the bits below) shift from unit i upwards, and
  the still-healthy unit i+1 takes over position i.
* **Unprotected logic.** The carry predictor, parity XORs, checkers,
  fault status register, controller and multiplexer controls have no spare.
  A fault there either ends in `ft_fail` or goes unnoticed.
* **Checker depth.** The two-rail trees inside the parity checkers grow as
  log2 N. The unit datapath's depth does not depend on N.
* **Area and timing.** Area (LUT counts) and delay have not been measured
  against published figures for this structure. Those figures were
  8/16/32/64-bit FPGA and ASIC syntheses: about 120 % extra area over a plain
  SD adder and a roughly constant 56 % delay overhead at 32 and 64 bits.
* **Spare's inputs.** With no fault, the spare adds two zero digits, and
  its outputs go unused.
