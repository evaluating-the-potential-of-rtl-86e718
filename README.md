# Constructive timing violation: a 32-bit adder ALU run past its critical path, with checkers

Dynamic power goes with f·C·Vdd², so lowering the supply voltage is the strongest
lever on energy. Lowering Vdd also slows the gates, so the clock would normally have
to slow down too. *Constructive timing violation* (CTV) keeps the fast clock anyway
and tolerates the timing errors that result:

* a **main ALU** runs at the fast clock f_H at the low voltage. Its critical path no
  longer fits in one cycle. Most operations exercise far shorter paths, though, so
  most results are still right;
* two **checker ALUs**, identical to the main one, run at f_L = f_H / 2 on opposite
  clock phases. Each has two f_H cycles per operation, so they never violate timing.
  Taking turns, they keep up with the main ALU's one operation per cycle;
* a **comparator** per checker compares the main result with the checker result.
  A mismatch flags a timing violation. The checker's value is the correct one, and
  the processor recovers with its usual misspeculation machinery, such as
  instruction reissue.

The main ALU gives the low latency. The checkers only keep up the throughput. In
the idealised case (Vdd halved, gate delay proportional to 1/Vdd) the main ALU uses
1/4 of the original power and the two checkers 1/4 together, so the total is half.

This repository holds that CTV ALU, built around a 32-bit carry select adder (CSLA),
and the circuit used to measure how often such an adder fails when its clock is
boosted. Both are synthesizable SystemVerilog. A gate-delay model of the adder
(testbench only) reproduces the fault measurement in simulation.

## Block overview

```
ctv_top
├── ctv_clkgen        f_L / ~f_L phases from f_H (as clock enables)
├── ctv_alu           main adder + 2 checker adders + 2 comparators
│   ├── csla32 ×3     32-bit carry select adder
│   │   └── csla_block (8 and 16 bit) → csla_rca (4-bit ripple carry)
│   └── ctv_comparator ×2
└── csla_eval         fault-measurement circuit (reference csla32 + comparator);
                      the adder under test is connected from outside
```

Shared types (`add_res_t` = `{c, s[31:0]}`, `op_res_t` = valid + result) are in
`ctv_pkg`.

## How an operation moves through the CTV ALU

Everything is clocked by `clk_h` (f_H). The checker clocks f_L and ~f_L are not
separate clock nets here. `ctv_clkgen` keeps a toggle flip-flop that holds the level
of f_L and gives two enables:

* `en_a` = 1: the coming f_H edge is a rising edge of f_L. Checker A starts a new
  operation and registers the result of its previous one.
* `en_b` = 1: the coming edge is a rising edge of ~f_L. Checker B does the same.

Exactly one of the two is set in every cycle. Since f_L rising edges coincide with
every second f_H rising edge, this samples at exactly the same instants as real
f_L / ~f_L clocks, and the design stays in one clock domain. For timing closure, the
paths from a checker's operand registers through its adder to its result register
are **two-cycle paths** of f_H. The main adder's paths are single-cycle paths, and
the design expects them to fail sometimes.

An operation X presented with `in_valid` before edge t0, where `en_a` = 1 at t0:

| edge | main ALU | checker A | outputs after the edge |
|------|----------|-----------|------------------------|
| t0 | operands registered | operands registered | |
| t1 | result registered (`spec`) | still computing | `spec` = speculative result of X |
| t2 | result moved to the second register | result registered | `verif` = correct result of X; `detect`, `detect_a` |

An operation that enters at an `en_b` edge follows the same pattern on checker B,
and `detect_b` reports it. The ALU accepts one operation per f_H cycle with no stall.
The speculative result has a latency of one cycle after the operands are registered,
and the verdict arrives one cycle after that. `verif` always carries the value of
the checker that is being compared in that cycle, so it is the corrected result
whenever `detect` is set.

The second register behind the main adder is what lines the two results up. The main
result leaves the first register after one cycle, but the checker result only
arrives after two.

### Modelling a violation

RTL has no gate delays, so the main adder never actually fails in simulation. The
`inj_mask` input (33 bits) is XORed into the main result as the first output
register captures it. This models a violation the way a statistical study of the
technique does: by making violations happen at random with a chosen probability.
Tie `inj_mask` to zero in an implementation. The real violations then come from
clocking the main adder past its critical path.

## The 32-bit carry select adder

`csla32` computes `{C[32], S[31:0]} = A + B + Cin` in three sections:

* bits 7:0: one 8-bit sub-adder with the real carry-in;
* bits 15:8: two 8-bit sub-adders with carry-in 0 and 1. The carry out of bits 7:0
  selects the sum and gives the carry into bit 16;
* bits 31:16: two 16-bit sub-adders with carry-in 0 and 1. The carry into bit 16
  selects the sum and `C[32]`.

The 8- and 16-bit sub-adders (`csla_block`) are carry select adders themselves. They
are made of 4-bit ripple-carry groups (`csla_rca`, full adders with a majority
carry). Every group except the lowest is built twice, for carry-in 0 and 1, and the
groups are merged pairwise by 2:1 multiplexers until the real carry-in picks the
result. An 8-bit block has one multiplexer level and a 16-bit block has two.
`csla_block` needs `WIDTH` to be `LEAF_WIDTH` times a power of two.

The adder is the whole ALU here: the operation set of a general ALU is not part of
this design. The CTV structure does not depend on it, and another combinational unit
could replace `csla32` in the three places it is used in `ctv_alu`.

## Measuring timing faults: `csla_eval`

To find out how often the adder fails at a given clock boost, the operands are
registered and fed to two adders. One is the adder under test, with real gate
delays. The other is a delay-free reference `csla32`. On the next edge both 33-bit
results are registered and compared. `ng` = 1 ("NG") means the adder under test had
not settled within one clock period. A vector presented before edge t0 is registered at t0,
both results are registered at the next edge, and `res_valid` / `ng` hold the verdict
in the cycle after that. The adder under test is outside the
module: `dut_a`, `dut_b`, `dut_cin` go out and `dut_res` comes back. In `ctv_top`
these pins are brought out as `eval_*` ports, with their own clock and reset.

In the testbench the adder under test is `tb/csla32_gates.sv`. It is a gate-level
model with the same structure as `csla32`: full-adder sum 50, carry 40 and 2:1 mux
30 time units. These delays are illustrative, not those of any cell library. Its
static critical path is 260 units, through the sum of the upper 16 bits. With 40,000
uniformly random vectors per point, the end-to-end test measures:

| clock boost (260 / period) | 1.0 | 1.1 | 1.2 | 1.3 | 1.4 | 1.5 | 2.0 | 2.5 | 3.0 |
|---|---|---|---|---|---|---|---|---|---|
| fault probability | 0 % | 33 % | 82 % | 86 % | 91 % | 99 % | 100 % | 100 % | 100 % |

Read these numbers with care. Uniformly random 32-bit operands switch almost every
internal node, so they are a worst case. The technique's original evaluation drew
operands from integer benchmark programs. Those have short carry chains, and it
reported about 10–50 % faults at twice the clock. The measurement circuit is the
same either way; only the vectors and the delay model differ.

## Interfaces

`ctv_top` (no parameters):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_h`, `rst_n` | in | 1 | f_H clock, asynchronous active-low reset |
| `in_valid`, `op1`, `op2`, `cin` | in | 1, 32, 32, 1 | operation (op1 + op2 + cin) |
| `inj_mask` | in | 33 | violation model, 0 in use |
| `f_l`, `f_l_n` | out | 1 | current level of f_L and ~f_L |
| `spec` | out | `op_res_t` | speculative result |
| `verif` | out | `op_res_t` | checked (correct) result |
| `detect_a`, `detect_b`, `detect` | out | 1 | violation found by checker A / B / either |
| `eval_clk`, `eval_rst_n` | in | 1 | clock and reset of the measurement circuit |
| `eval_in_valid`, `eval_a`, `eval_b`, `eval_cin` | in | 1, 32, 32, 1 | test vector |
| `eval_dut_a`, `eval_dut_b`, `eval_dut_cin` | out | 32, 32, 1 | registered vector to the adder under test |
| `eval_dut_res` | in | 33 | its `{C[32], S}` |
| `eval_res_valid`, `eval_ng` | out | 1 | verdict valid, NG |

After reset, f_L is low, so the first f_H edge is an f_L edge (checker A). All valid
bits reset to 0. `ctv_alu` holds concurrent assertions: the delayed main result and
the checker result belong to the same operation, and exactly one phase enable is
set.

## What is and is not here

Taken from the original description of the technique:
* one main unit and two checkers on complementary half-rate clocks, with
  f_H = 2·f_L;
* the second register behind the main unit, and one comparator per checker;
* the checker value as the correct result;
* the 8/8/16 partition of the 32-bit carry select adder and its multiplexers;
* the registers and comparator of the fault-measurement circuit.

Choices made in this design:
* the adder as the ALU operation;
* the inside of the 8- and 16-bit sub-adders, with a 4-bit ripple leaf;
* f_L / ~f_L as clock enables on f_H;
* valid bits, reset values and the `inj_mask` violation model;
* comparator timing. The comparators see the delayed main result for only one f_H
  cycle, because a single second register serves both of them. The original
  description wants them to run at the slow clock f_L. That would need a separate
  holding register per comparator, which this design does not add;
* the gate-delay values of the testbench model.

Not included:
* the out-of-order processor the technique was studied in, and its
  instruction-reissue recovery. Here, `detect` and `verif` are the hooks for that
  recovery;
* the DC/DC converter and the split supply voltages;
* a real standard-cell netlist with extracted delays. The testbench gate model
  stands in for it.

The voltage domains are not expressed in RTL. In an implementation the main ALU and
the checkers sit in the low-voltage domain, and the registers and comparators must
meet timing at their own clocks.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog if
it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/ctv_pkg.sv tb/tb_ctv_top.sv --top-module tb_ctv_top
./obj_dir/Vtb_ctv_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_csla_block` | 8-bit sub-adder exhaustively, 16-bit on random and carry-chain vectors |
| `tb_csla32` | 55,000 random and boundary-carry vectors against integer addition |
| `tb_ctv_clkgen` | reset level, toggling, enables |
| `tb_ctv_comparator` | single-bit differences in all 33 positions, check qualifier |
| `tb_ctv_alu` | scoreboard of spec / verif / detect per operation, with random violations |
| `tb_csla_eval` | NG exactly for the vectors given an error, latency of the verdict |
| `tb_ctv_top` | whole design at default sizes: injected fault rates 0–50 % (4,000 operations each), then the boost sweep above with the gate-delay adder; takes about 1.5 minutes |

`tb_ctv_top` checks every verdict against the adder output that it samples itself.
It requires zero NG at boost 1.0 and at least one NG at 3.0. It also counts each
mechanism (speculative results, verification and detection by each checker, idle
cycles, OK and NG verdicts) and fails if any of them never happened.
