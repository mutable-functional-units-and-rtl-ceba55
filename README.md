# Mutable functional unit (MFU) for a superscalar core

Most integer programs leave a processor's floating-point adder idle. This
design turns that adder into a **mutable functional unit**: a double-precision
IEEE 754 adder that can also run 64-bit integer add, subtract, logic and shift
instructions. It switches between the two modes at run time, and a switch
("mutation") costs at most two cycles. Put in place of the FP adder of a
4-wide out-of-order core in the style of the MIPS R10000, it gives integer
code one more integer unit without adding a unit.

The RTL follows the MFU proposal of Solihin, Cameron, Luo, Lavenier and
Gokhale, *Mutable Functional Units and Their Applications on
Microprocessors*. It contains:

* the MFU datapath (`mfu`) with its leaf blocks and its mutation controller;
* the in-order reservation station that feeds it (`mfu_rs`);
* the steering stage that decides which instructions go to the MFU
  (`steering_logic`);
* a top, `mfu_integration`, that joins the three.

The rest of the core is not included: fetch, decode, rename, the other
reservation stations, the other functional units and the register files. It
connects through the top's ports.

```
 decode group (4 renamed instructions)
        |
        v
 +----------------+   to_mfu   +-------------------+  head   +-------------------------+
 | steering_logic |----------->| mfu_rs (8, FIFO)  |-------->| mfu                     |
 |  cfp, crr      |            | operand capture   |         |  stage 1: swap, shifter |
 +----------------+            +-------------------+         |  stage 2: adder, logic  |
        | to_other                   ^   ^                   |  stage 3: normalise,    |
        v                            |   |                   |           round, pack   |
 other reservation stations   fwd_ext|   | mfu_result        +-------------------------+
 (outside this design)               |   +-------------------------------+ |
                                     +--- results of ALU1, ALU2, LSU, FPU2 | v forwarding bus
```

## The datapath and its two modes

The MFU is a three-stage FP adder (align, add, pack) with four changes: the
adder is widened to 64 bits, the 53-bit alignment shifter becomes a 64-bit
barrel shifter, a logic unit is added, and programmable switches let the
integer path bypass the FP-only parts. In the RTL each switch is a 2-to-1 mux
driven by that stage's mode register:

| switch | stage | FP mode | integer mode |
|---|---|---|---|
| RS1a | 1 | swap control from the exponent comparison | 0 (swap disabled), so B1 reaches the shifter |
| RS1b | 1 | shift amount = exponent difference, saturated to 63 | 6-bit shift amount from the instruction |
| RS2a | 2 | adder input A2 (aligned larger operand) | A1 (raw operand A) |
| RS2b | 2 | adder input B2 (aligned smaller operand) | B1 (raw operand B) |

**FP mode.** It takes three cycles.

1. *Align* (`a1`, `b1`). The two exponents are subtracted both ways. The
   operand with the larger exponent goes to the A side. The barrel shifter
   (`mfu_barrel_shifter`) shifts the other significand right, and every bit
   shifted out is ORed into a sticky bit.
2. *Add* (`a2`, `b2`). `mfu_add_sub` forms `sum = x + y'` and
   `sum+1 = x + y' + 1`. For an effective subtraction `y' = ~y`, the ones'
   complement. `mfu_lop` counts the leading zeros of the magnitude.
3. *Pack*. "sel 1comp" takes `sum+1` if the carry out was set (x > y).
   Otherwise it takes `~sum` and flips the sign. `mfu_shift_left` normalises.
   The exponent is reduced by the shift, and the result is rounded to nearest
   even and packed.

Inside the 64-bit datapath the significand sits in bits 62..10. Bit 63 takes
the carry of an addition. Bits 9..0 are guard bits, and bit 0 is sticky.
Denormal inputs and outputs, signed zeros, infinities and NaN are all handled.
Every NaN result is the quiet NaN `0x7FF8_0000_0000_0000`. The unit produces
no exception flags.

**Integer mode.** An integer instruction reads the stage-1 operand registers
A1/B1 directly and finishes in one cycle:

* add and subtract use the stage-2 adder through RS2a/RS2b (`sum`, or `sum+1`
  for A − B);
* AND, OR, XOR and NOR use the logic unit;
* SLL, SRL and SRA shift B by the instruction's 6-bit amount in the stage-1
  barrel shifter.

The integer and FP results have separate output ports. At most one of them is
valid in any cycle, so the top merges them onto one forwarding-bus slot.

## Mutation: when an instruction may enter

This is the part that decides performance, and the part most worth reading
before changing anything. It lives in `mfu_mutation_ctrl`.

Stages 1 and 2 each have a mode register. Stage 3 is used only by FP adds and
has none. Each kind of instruction uses its own stage resources:

| class | uses | result leaves |
|---|---|---|
| FP add/sub | stage 1, then 2, then 3 (one cycle each) | 3 cycles after acceptance |
| integer shift | stage 1 (barrel shifter), one cycle | 1 cycle after acceptance |
| other integer | stage 2 (adder / logic unit), one cycle | 1 cycle after acceptance |

Four rules decide when an instruction may enter:

* **Reconfiguration.** Changing a stage's mode takes one cycle, and the stage
  must hold no instruction in that cycle.
* **Look-ahead.** Each cycle, a free stage switches toward the mode its next
  user needs. For stage 1 that is the instruction at the head of the
  reservation station. For stage 2 it is the FP add now in stage 1, or else
  the head. The head counts even while its operands are still missing, so a
  mutation can overlap the wait.
* **Acceptance.** The head is taken in a cycle when four things hold:
  its operands are present; the stage it needs next cycle will be in its mode
  after this clock edge; that stage is free then; and its result would not
  leave in the same cycle as an earlier result.
* **One exit per cycle.** At most one result leaves the unit per cycle.
  Together with the stage-2 occupancy, this rule is why an integer
  instruction always loses two cycles after an FP add.

Traced cycle by cycle. "Time" counts from the cycle in which the first
instruction occupies its first stage:

```
ADD then FP-ADD (no penalty)        FP-ADD then ADD (2 lost cycles)
time  stage1     stage2             time  stage1     stage2     stage3
 1    reconfig   ADD                 1    FP-ADD     -          -
 2    FP-ADD     reconfig            2    reconfig   FP-ADD     -
 3    -          FP-ADD              3    -          reconfig   FP-ADD
 4    -          -       (stage3)    4    -          ADD        -
```

Resulting penalty, in issue cycles lost between two back-to-back instructions:

| first | second | penalty |
|---|---|---|
| same class | same class | 0 |
| integer add/sub/logic | FP add | 0 |
| integer shift | FP add | 1 |
| FP add | integer add/sub/logic | 2 |
| FP add | integer shift | 2 |

Because of the one-exit rule, FP add → shift costs 2 cycles. Without the
rule it would cost 1. The unit would then need to drive both result ports in
one cycle.

Assertions in the controller check two things on every cycle: no stage is
used in the wrong mode, and no integer result leaves together with an FP
result.

## Steering

`steering_logic` runs beside register renaming on each decode group. It goes
through the group in program order and keeps two counters:

* **cfp** measures recent demand for FP adds. Every FP add or subtract goes to
  the MFU and adds `CFP_INC` (4) to cfp, saturating at `CFP_MAX` (16). Every
  other instruction subtracts 1, stopping at 0.
* **crr** is the round-robin counter. While cfp is 0, each integer
  instruction that the MFU can execute increments crr. When crr reaches
  `N_CHUNK` (4), it drops by `RR_MULT * N_CHUNK` (16). The instruction goes to
  the MFU if crr ≥ 0, and to the integer station otherwise.

From reset, an integer-only stream therefore sends 3 instructions to the MFU,
then 12 elsewhere, then runs of 4 out of every 16. A single FP add keeps the
next four non-FP-add instructions away from the MFU.

Memory, multiply, divide, branch and other instructions never go to the MFU.
They still lower cfp. The counters move only over the slots actually
dispatched in a cycle (`adv_cnt`). If part of a group is held back, it is
steered again from the same counter state next cycle.

## The MFU reservation station

`mfu_rs` is a circular buffer of `DEPTH` entries (8). Unlike the core's other
stations, it issues strictly in order: only the oldest entry may go, once
both of its operands are present.

A whole dispatch group (up to `ENQ_W` = 4) can be written in one cycle, and
the entries are packed behind the tail. Each waiting operand watches every
forwarding-bus result and captures a value whose tag matches. Operands being
written in the same cycle also check the bus, so a result broadcast during
dispatch is not lost. An entry becomes ready the cycle after its last operand
arrives.

The `full` output gives the "station full" fraction that is the main measure
for choosing its size.

## The integration top

`mfu_integration` dispatches in program order. Valid slots of a decode
group form a prefix, with slot 0 the oldest. While the other stations can
take instructions (`other_rs_ready`), the top dispatches the longest prefix
whose MFU-bound instructions fit in the free entries of `mfu_rs`. That prefix
is `dec_count` slots. If an MFU-bound instruction does not fit, `rs_stall` is
raised, and the front end offers the rest of the group again next cycle. A
rule that dispatched whole groups only would deadlock once a group could
carry more MFU instructions than the station holds, for example 16-wide
decode with 8 entries.

| port | dir | meaning |
|---|---|---|
| `dec_valid[DW]`, `dec_slot[DW]` | in | renamed instructions: `is_fpadd`, `mfu_int`, and the `mfu_instr_t` (op, shamt, destination tag, operands A/B each with ready bit, tag and value) |
| `other_rs_ready` | in | the other stations can take instructions this cycle |
| `dec_accept`, `dec_count` | out | something was dispatched; slots 0..`dec_count`−1 were dispatched |
| `to_other[DW]` | out | dispatched slots that go to the other stations |
| `fwd_ext[NFWD_EXT]` | in | result buses of the other units (`fwd_t`: valid, tag, value) |
| `mfu_result` | out | the MFU's forwarding-bus result |
| `to_mfu`, `rs_stall`, `rs_full`, `rs_count`, `mfu_issue`, `mode1/2`, `reconf1/2`, `mutation_stall`, `cfp`, `crr` | out | observation |

For a shift, only operand B is used, so the dispatcher should mark A ready.
Tags are 7 bits wide (`mfu_pkg::TAG_W`). The 11 operation codes are listed in
`mfu_pkg::mfu_op_e`.

Timing: an instruction written in cycle t can issue in t+1 if its operands
are present. An integer result appears 1 cycle after issue, an FP result 3
cycles after.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `mfu_integration`, `steering_logic` | `DW` | 4 | 4-wide dispatch of the base core |
| `mfu_integration` (`RS_DEPTH`), `mfu_rs` (`DEPTH`) | depth | 8 | size found sufficient; 4 and 16 were also evaluated |
| `steering_logic` | `CFP_MAX`, `CFP_INC`, `N_CHUNK`, `RR_MULT` | 16, 4, 4, 4 | steering algorithm values |
| `mfu_rs` | `ENQ_W` | 4 | one dispatch group per cycle |
| `mfu_rs`, `mfu_integration` | `NFWD`, `NFWD_EXT` | 5, 4 | this design: one result bus per unit |

The datapath width is fixed at 64 bits.

## How far to trust it, and where it departs from the proposal

The following are this design's own choices, where the proposal is silent or
unclear:

* The FP path uses the full 64-bit adder and shifter, with 10 guard bits. The
  proposal uses only the 54 low bits, which would not give correct rounding.
* The leading-one block (LOP) is an exact leading-zero counter on the
  stage-2 magnitude. It is not a predictor working from the adder inputs.
* The proposal draws two more switches that would feed B1 and the
  instruction's shift amount to the pack-stage left shifter. They are not
  built: integer left shifts use the barrel shifter, which the proposal says
  does both directions.
* The penalty rules above are built from the two worked timing examples and
  the one-result-per-cycle rule. The proposal's penalty table also lets the
  penalty depend on the instruction *after* the incoming one. That dependence
  is not modelled. The maximum (2 cycles) and the two worked cases match
  exactly.
* The steering round robin covers only integer instructions the MFU can
  execute. The proposal also mentions memory operations, but the MFU has no
  path to memory.
* The steering counters are 5-bit (cfp, 0..16) and 6-bit signed (crr,
  −12..3). The proposal calls them 4-bit, which cannot hold those values.
* Dispatch takes the longest in-order prefix that fits, and a single
  `other_rs_ready` stands for all the other stations. Operand capture needs
  one cycle before issue. The integer operation list is AND/OR/XOR/NOR,
  ADD/SUB and SLL/SRL/SRA. Control state has an asynchronous active-low
  reset; datapath registers have no reset.

The performance claims (8–14 % speedup on integer programs) concern the whole
processor and are not something this RTL can show on its own.

## Simulating

Every file holds one module or package; `rtl/mfu_pkg.sv` must come first.
Each testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/mfu_pkg.sv \
    tb/tb_mfu_integration.sv --top-module tb_mfu_integration -Mdir obj
./obj/Vtb_mfu_integration
```

| testbench | what it shows |
|---|---|
| `tb_mfu_integration` | end-to-end at default parameters. A 6000-instruction program alternates integer-heavy and FP-heavy phases with data dependences. Checks every steering decision and dispatch count against a reference model, and every MFU result (value, tag, order, 1/3-cycle latency) against integer operators and the simulator's IEEE doubles. Requires each mechanism to occur at least once: FP steering, both round-robin outcomes, cfp saturation, both dispatch holds, a partly dispatched group, both mutation directions, mutation stall, and wakeup from the MFU and from outside. |
| `tb_mfu_configs` | the evaluated sizes: station depth 4, 8 and 16, and decode width 8 and 16, on an integer-heavy mix (2 % FP adds) and an FP-heavy mix (45 %). Checks every result and prints how often the station was full. Fails if, on the integer mix, a deeper station is full more often, or if the FP mix fills the 8-entry station less often than the integer mix. Typical output: on the integer mix, about 29 %, 5 % and 0 % full for 4, 8 and 16 entries. On the FP mix the station is full about 35 % of the time at every depth, because the MFU's one FP add per cycle is then the bottleneck. |
| `tb_mfu` | the MFU alone: 3000 random instructions, including denormals, infinities, NaN, cancellation and overflow; latency; one result per cycle. |
| `tb_mfu_mutation_ctrl` | penalty for every ordered pair of classes; the two traced sequences cycle by cycle. |
| `tb_mfu_rs`, `tb_steering_logic` | station against a queue model; steering against a reference, including the 3/12/4 round-robin pattern. |
| `tb_mfu_barrel_shifter`, `tb_mfu_add_sub`, `tb_mfu_logic_unit`, `tb_mfu_lop`, `tb_mfu_shift_left` | leaf blocks against bit-level references. |

The FP reference is the simulator's own double arithmetic, which is IEEE
round-to-nearest-even on common hosts.
