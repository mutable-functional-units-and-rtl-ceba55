// tb_mfu_mutation_ctrl: self-checking test of the MFU mutation controller.
// For every ordered pair of instruction classes (FP add, integer shift,
// integer add/logic) it issues the pair back to back from a ready reservation
// station and checks the number of lost issue cycles (mutation penalty):
// 0 for equal classes and for add/logic -> FP, 1 for shift -> FP, 2 for
// FP -> add/logic and FP -> shift. It also checks the cycle-by-cycle
// reconfiguration of the two mutation examples (ADD then FP-ADD, FP-ADD then
// ADD), and runs a random stream checking that every instruction is issued
// and no stage is used in the wrong mode (assertions in the controller).
module tb_mfu_mutation_ctrl;
  import mfu_pkg::*;
  logic clk = 0, rst_n;
  logic head_valid, head_ready, accept, e2_valid, e3_valid, reconf1, reconf2, mutation_stall;
  mfu_cls_e head_cls, e1_cls;
  mfu_mode_e mode1, mode2;
  int checks = 0, failures = 0;
  int cyc;

  mfu_mutation_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  // Run a sequence; return the cycle of each accept and of each reconfiguration.
  mfu_cls_e seq[$];
  int acc_cyc[$], rc1[$], rc2[$];

  task automatic run_seq();
    int idx;
    acc_cyc.delete(); rc1.delete(); rc2.delete();
    rst_n = 0; head_valid = 0; head_ready = 0; head_cls = CLS_NONE;
    @(negedge clk); @(negedge clk); rst_n = 1;
    idx = 0;
    for (int c = 0; c < 40; c++) begin
      head_valid = idx < seq.size();
      head_ready = head_valid;
      head_cls   = head_valid ? seq[idx] : CLS_NONE;
      #1;
      if (reconf1) rc1.push_back(c);
      if (reconf2) rc2.push_back(c);
      if (accept) begin acc_cyc.push_back(c); idx++; end
      @(negedge clk);
    end
    head_valid = 0;
  endtask

  function automatic int penalty(mfu_cls_e x, mfu_cls_e y);
    if (x == y) return 0;
    if (x == CLS_FP) return 2;
    if (y == CLS_FP && x == CLS_SHIFT) return 1;
    return 0;
  endfunction

  initial begin
    mfu_cls_e cl[3] = '{CLS_FP, CLS_SHIFT, CLS_ALU};
    // Warm-up instruction of the first class puts the unit in its mode.
    foreach (cl[i]) foreach (cl[j]) begin
      seq = '{cl[i], cl[i], cl[j]};
      run_seq();
      check(acc_cyc.size() == 3, "all three issued");
      if (acc_cyc.size() == 3)
        check(acc_cyc[2] - acc_cyc[1] - 1 == penalty(cl[i], cl[j]),
              $sformatf("penalty %s->%s got %0d exp %0d", cl[i].name(), cl[j].name(),
                        acc_cyc[2] - acc_cyc[1] - 1, penalty(cl[i], cl[j])));
    end

    // ADD then FP-ADD: ADD accepted at k, FP-ADD at k+1 while stage 1 mutates,
    // stage 2 mutates at k+2 while FP-ADD is in stage 1.
    seq = '{CLS_ALU, CLS_FP};
    run_seq();
    check(acc_cyc.size() == 2 && acc_cyc[1] == acc_cyc[0] + 1, "ADD,FP-ADD back to back");
    check(rc1.size() == 1 && rc1[0] == acc_cyc[1], "stage 1 mutates while ADD is in stage 2");
    check(rc2.size() == 1 && rc2[0] == acc_cyc[1] + 1, "stage 2 mutates while FP-ADD is in stage 1");

    // FP-ADD then ADD: FP-ADD accepted at k (stage 1 at k+1), stage 1 mutates
    // at k+2, stage 2 at k+3, ADD accepted at k+3 and in the adder at k+4.
    seq = '{CLS_FP, CLS_ALU};
    run_seq();
    check(acc_cyc.size() == 2 && acc_cyc[1] == acc_cyc[0] + 3, "FP-ADD,ADD two-cycle penalty");
    check(rc1.size() == 2 && rc1[1] == acc_cyc[0] + 2, "stage 1 mutates at time 2");
    check(rc2.size() >= 1 && rc2[rc2.size()-1] == acc_cyc[0] + 3, "stage 2 mutates at time 3");

    // Random stream with random operand readiness.
    begin
      int issued, n, stalls;
      mfu_cls_e q[$];
      rst_n = 0; head_valid = 0; @(negedge clk); rst_n = 1;
      n = 400; issued = 0; stalls = 0;
      for (int i = 0; i < n; i++) q.push_back(mfu_cls_e'($urandom_range(3, 1)));
      for (int c = 0; c < 4000 && issued < n; c++) begin
        head_valid = 1; head_cls = q[issued]; head_ready = ($urandom_range(3, 0) != 0);
        #1;
        if (mutation_stall) stalls++;
        if (accept) issued++;
        @(negedge clk);
      end
      head_valid = 0;
      check(issued == n, "random stream fully issued");
      check(stalls > 0, "random stream saw mutation stalls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
