// mfu_mutation_ctrl: mode registers, occupancy tracking and issue control of
// the mutable functional unit.
//
// The MFU has three stages: stage 1 (swap + barrel shifter), stage 2 (adder and
// logic unit) and stage 3 (normalise and pack). Stages 1 and 2 each hold a mode
// register (MODE_INT / MODE_FP) that drives their programmable switches; stage
// 3 is only used by FP additions and needs none. A floating-point add occupies
// stage 1, 2 and 3 in three consecutive cycles. An integer shift occupies the
// stage-1 barrel shifter for one cycle; any other integer operation occupies
// the stage-2 adder/logic unit for one cycle. In both cases the integer result
// leaves the unit in that same cycle.
//
// Mutation: changing a stage's mode takes one cycle in which the stage holds
// no instruction. Every cycle, a stage that is free is switched to the mode the
// next user of that stage needs: for stage 1 that is the instruction at the
// head of the reservation station; for stage 2 it is the FP add now in stage 1
// if there is one, otherwise the head instruction. The head is accepted in a
// cycle when, at the end of that cycle, the stages it will use next cycle are
// in its mode, the stage it needs is free then, and its result will not leave
// the unit in the same cycle as an earlier result (at most one instruction
// enters and one leaves per cycle). This reproduces the two sequences the MFU
// timing describes: ADD then FP-ADD issue back to back (no penalty), FP-ADD
// then ADD lose two cycles; FP-ADD then shift also loses two cycles, shift
// then FP-ADD loses one.
//
// Interface: `head_valid`/`head_cls` show the oldest waiting instruction (used
// for look-ahead reconfiguration even while its operands are missing),
// `head_ready` says its operands are present; `accept` pulses in the cycle the
// instruction is taken (its operands are latched at the clock edge ending that
// cycle). `e1_cls`, `e2_valid`, `e3_valid` say what occupies the pipeline
// registers this cycle; `mode1`/`mode2` drive the switches; `reconf1`/`reconf2`
// are high in a cycle in which that stage is being reconfigured;
// `mutation_stall` is high when a ready head waits only because of mutation
// or of the result-slot rule.
module mfu_mutation_ctrl
  import mfu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      head_valid,
  input  logic      head_ready,
  input  mfu_cls_e  head_cls,
  output logic      accept,
  output mfu_cls_e  e1_cls,      // class of the instruction in the stage-1 register
  output logic      e2_valid,    // FP add in stage 2
  output logic      e3_valid,    // FP add in stage 3
  output mfu_mode_e mode1,
  output mfu_mode_e mode2,
  output logic      reconf1,
  output logic      reconf2,
  output logic      mutation_stall
);
  mfu_mode_e want1, want2;
  logic      s1_busy, s2_busy;
  logic      mode1_ok, mode2_ok;

  always_comb begin
    s1_busy = (e1_cls == CLS_FP) || (e1_cls == CLS_SHIFT);
    s2_busy = (e1_cls == CLS_ALU) || e2_valid;

    want1 = (head_cls == CLS_FP) ? MODE_FP : MODE_INT;
    if (e1_cls == CLS_FP)  want2 = MODE_FP;
    else                   want2 = (head_cls == CLS_FP) ? MODE_FP : MODE_INT;

    reconf1 = head_valid && !s1_busy && (mode1 != want1);
    reconf2 = (head_valid || e1_cls == CLS_FP) && !s2_busy && (mode2 != want2);

    // Mode each stage will have after this cycle's clock edge.
    mode1_ok = (mode1 == want1) || reconf1;
    mode2_ok = (mode2 == MODE_INT) || (reconf2 && want2 == MODE_INT);

    accept = 1'b0;
    if (head_valid && head_ready) begin
      unique case (head_cls)
        CLS_FP:    accept = mode1_ok;
        CLS_SHIFT: accept = mode1_ok && !e2_valid;
        CLS_ALU:   accept = mode2_ok && !e2_valid && (e1_cls != CLS_FP);
        default:   accept = 1'b0;
      endcase
    end
    mutation_stall = head_valid && head_ready && !accept;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1_cls   <= CLS_NONE;
      e2_valid <= 1'b0;
      e3_valid <= 1'b0;
      mode1    <= MODE_INT;
      mode2    <= MODE_INT;
    end else begin
      e1_cls   <= accept ? head_cls : CLS_NONE;
      e2_valid <= (e1_cls == CLS_FP);
      e3_valid <= e2_valid;
      if (reconf1) mode1 <= want1;
      if (reconf2) mode2 <= want2;
    end
  end

  // A stage is never used in the wrong mode, and at most one result leaves.
  a_s1_mode: assert property (@(posedge clk) disable iff (!rst_n)
    (e1_cls == CLS_FP |-> mode1 == MODE_FP) and (e1_cls == CLS_SHIFT |-> mode1 == MODE_INT));
  a_s2_mode: assert property (@(posedge clk) disable iff (!rst_n)
    (e2_valid |-> mode2 == MODE_FP) and (e1_cls == CLS_ALU |-> mode2 == MODE_INT));
  a_one_exit: assert property (@(posedge clk) disable iff (!rst_n)
    !(e3_valid && (e1_cls == CLS_ALU || e1_cls == CLS_SHIFT)));
endmodule
