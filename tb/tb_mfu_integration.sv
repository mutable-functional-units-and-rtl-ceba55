// tb_mfu_integration: end-to-end test of the MFU integration at its default
// parameters (4-wide decode, 8-entry in-order MFU reservation station).
//
// The testbench plays the rest of the core. It generates a program that
// alternates integer-heavy phases (like non-numerical code) and FP-add-heavy
// phases (like numerical code), with random data dependences on recent
// instructions. Each cycle it offers the next decode group, with every source
// operand either present (value read at rename) or waiting for the tag of its
// producer; the part of a group that is not dispatched is offered again.
// The expected dispatch count (longest prefix whose MFU part fits the free
// station entries) is checked every cycle. Instructions the steering stage sends elsewhere are "executed" by
// a model of the other functional units, whose results come back on the
// external forwarding buses after a random delay.
//
// Checked: every steering decision against an independent model of the
// steering algorithm; every MFU result (value, tag, in-order) against a
// reference computed when the program was generated (integer operators and
// the simulator's IEEE double arithmetic); the MFU latency (1 cycle integer,
// 3 cycles FP after issue); that every instruction completes. It counts each
// mechanism and fails if one never happened: FP-add steering, round-robin
// steering to the MFU and away from it, cfp saturation, dispatch held by a
// full MFU station and by the other stations, a partly dispatched group, both mutation directions, the
// mutation stall, wakeup from the MFU's own result and from an external bus.
module tb_mfu_integration;
  import mfu_pkg::*;
  localparam int DW = 4, NFWD_EXT = 4, NPROG = 6000;

  logic clk = 0, rst_n;
  logic [DW-1:0] dec_valid, to_other, to_mfu;
  dispatch_slot_t dec_slot [DW];
  logic other_rs_ready, dec_accept, rs_stall, rs_full, mfu_issue;
  logic [2:0] dec_count;
  logic reconf1, reconf2, mutation_stall;
  fwd_t fwd_ext [NFWD_EXT];
  fwd_t mfu_result;
  logic [3:0] rs_count;
  mfu_mode_e mode1, mode2;
  logic [4:0] cfp;
  logic signed [5:0] crr;
  int checks = 0, failures = 0, cyc = 0;

  mfu_integration dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------- program
  typedef struct {
    int kind;          // 0 FP add/sub, 1 MFU-capable integer, 2 other
    mfu_op_e op;
    logic [5:0] shamt;
    int src_a, src_b;  // producer index, or -1
    word_t va, vb;     // operand values
    word_t res;
    bit nan;
  } prog_t;
  prog_t prog [NPROG];

  function automatic word_t rand_fp();
    word_t v;
    v = {$urandom, $urandom};
    v[62:52] = 11'($urandom_range(1040, 1000));
    return v;
  endfunction

  function automatic word_t ref_result(prog_t p, output bit is_nan);
    word_t r;
    is_nan = 0;
    case (p.op)
      OP_ADD: r = p.va + p.vb;
      OP_SUB: r = p.va - p.vb;
      OP_AND: r = p.va & p.vb;
      OP_OR:  r = p.va | p.vb;
      OP_XOR: r = p.va ^ p.vb;
      OP_NOR: r = ~(p.va | p.vb);
      OP_SLL: r = p.vb << p.shamt;
      OP_SRL: r = p.vb >> p.shamt;
      OP_SRA: r = $signed(p.vb) >>> p.shamt;
      OP_FADD: r = $realtobits($bitstoreal(p.va) + $bitstoreal(p.vb));
      default: r = $realtobits($bitstoreal(p.va) - $bitstoreal(p.vb));
    endcase
    if (p.op == OP_FADD || p.op == OP_FSUB) is_nan = (r[62:52] == 11'h7FF) && (r[51:0] != 0);
    return r;
  endfunction

  task automatic gen_program();
    for (int n = 0; n < NPROG; n++) begin
      prog_t p;
      bit fp_phase;
      int r;
      fp_phase = ((n / 400) % 2) == 1;
      r = $urandom_range(99, 0);
      if (fp_phase) p.kind = (r < 55) ? 0 : (r < 80 ? 1 : 2);
      else          p.kind = (r < 2)  ? 0 : (r < 75 ? 1 : 2);
      if (p.kind == 0) p.op = $urandom_range(1, 0) ? OP_FADD : OP_FSUB;
      else             p.op = mfu_op_e'($urandom_range(8, 0));
      p.shamt = 6'($urandom);
      p.src_a = -1; p.src_b = -1;
      if (n > 0 && $urandom_range(1, 0)) p.src_a = n - $urandom_range(n < 6 ? n : 6, 1);
      if (n > 0 && $urandom_range(2, 0) == 0) p.src_b = n - $urandom_range(n < 6 ? n : 6, 1);
      // FP adds read FP values: take operands only from FP producers.
      if (p.kind == 0) begin
        if (p.src_a >= 0 && prog[p.src_a].kind != 0) p.src_a = -1;
        if (p.src_b >= 0 && prog[p.src_b].kind != 0) p.src_b = -1;
        p.va = (p.src_a >= 0) ? prog[p.src_a].res : rand_fp();
        p.vb = (p.src_b >= 0) ? prog[p.src_b].res : rand_fp();
      end else begin
        p.va = (p.src_a >= 0) ? prog[p.src_a].res : {$urandom, $urandom};
        p.vb = (p.src_b >= 0) ? prog[p.src_b].res : {$urandom, $urandom};
      end
      if (p.kind == 2) begin p.res = {$urandom, $urandom}; p.nan = 0; end
      else p.res = ref_result(p, p.nan);
      prog[n] = p;
    end
  endtask

  // ------------------------------------------------------------- core model
  bit   done [NPROG];
  bit   to_mfu_of [NPROG];
  int   in_flight_tag [128];     // program index holding each tag, or -1
  int   mfu_q[$];                // MFU-bound instructions in dispatch order
  int   mfu_issued = 0;          // how many of mfu_q have issued
  int   due_q[$];                // cycle each issued result is due
  typedef struct { int idx; int due; } ext_t;
  ext_t ext_q[$];
  int   m_cfp = 0, m_crr = 0;
  int   pc = 0, completed = 0;

  // counters of mechanisms
  int c_fp_steer = 0, c_rr_mfu = 0, c_rr_other = 0, c_cfp_sat = 0, c_rs_stall = 0;
  int c_other_stall = 0, c_to_fp = 0, c_to_int = 0, c_mut_stall = 0, c_wake_mfu = 0, c_wake_ext = 0;
  int c_partial = 0, c_full = 0, c_full_fp_phase = 0, c_cycles_fp_phase = 0;

  function automatic bit steer_model(int kind, inout int c, inout int r);
    if (kind == 0) begin c = (c + 4 > 16) ? 16 : c + 4; return 1; end
    c = (c > 0) ? c - 1 : 0;
    if (c != 0 || kind != 1) return 0;
    r++;
    if (r >= 4) r -= 16;
    return r >= 0;
  endfunction

  function automatic operand_t make_opnd(int src, word_t v);
    operand_t o;
    if (src < 0 || done[src]) begin o.rdy = 1; o.tag = '0; o.val = v; end
    else begin o.rdy = 0; o.tag = tag_t'(src % 128); o.val = '0; end
    return o;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", msg, cyc);
    end
  endtask

  initial begin
    int g;
    mfu_mode_e pm1;
    bit exp_to_mfu [DW];
    gen_program();
    foreach (in_flight_tag[t]) in_flight_tag[t] = -1;
    rst_n = 0; dec_valid = '0; other_rs_ready = 1;
    foreach (dec_slot[s]) dec_slot[s] = '0;
    foreach (fwd_ext[k]) fwd_ext[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pm1 = MODE_INT;
    while (completed < NPROG && cyc < 300000) begin
      int c, r;
      @(negedge clk);
      // ---- offer a decode group
      g = $urandom_range(DW, 1);
      if (pc + g > NPROG) g = NPROG - pc;
      for (int s = 0; s < g; s++)
        if (in_flight_tag[(pc + s) % 128] != -1) begin g = s; break; end
      dec_valid = '0;
      c = m_cfp; r = m_crr;
      for (int s = 0; s < DW; s++) begin
        dec_slot[s] = '0;
        if (s < g) begin
          prog_t p;
          p = prog[pc + s];
          dec_valid[s] = 1;
          dec_slot[s].is_fpadd = (p.kind == 0);
          dec_slot[s].mfu_int  = (p.kind == 1);
          dec_slot[s].instr.op = p.op;
          dec_slot[s].instr.shamt = p.shamt;
          dec_slot[s].instr.dst = tag_t'((pc + s) % 128);
          dec_slot[s].instr.a = make_opnd(p.src_a, p.va);
          dec_slot[s].instr.b = make_opnd(p.src_b, p.vb);
          if (p.op inside {OP_SLL, OP_SRL, OP_SRA}) dec_slot[s].instr.a.rdy = 1;
          exp_to_mfu[s] = steer_model(p.kind, c, r);
        end
      end
      other_rs_ready = ($urandom_range(19, 0) != 0);
      // ---- results of the other functional units
      foreach (fwd_ext[k]) fwd_ext[k] = '0;
      for (int k = 0, i = 0; k < NFWD_EXT && i < ext_q.size(); ) begin
        if (ext_q[i].due <= cyc) begin
          fwd_ext[k].valid = 1;
          fwd_ext[k].tag = tag_t'(ext_q[i].idx % 128);
          fwd_ext[k].val = prog[ext_q[i].idx].res;
          k++;
          ext_q.delete(i);
        end else i++;
      end
      #1;
      // ---- steering decisions, and the dispatched prefix
      for (int s = 0; s < g; s++)
        check(to_mfu[s] == exp_to_mfu[s], $sformatf("steering of instruction %0d", pc + s));
      begin
        int fit, used, free_now;
        free_now = 8 - int'(rs_count) ;
        fit = 0; used = 0;
        if (other_rs_ready)
          for (int s = 0; s < g; s++) begin
            if (exp_to_mfu[s] && used + 1 > free_now) break;
            used += int'(exp_to_mfu[s]); fit = s + 1;
          end
        check(int'(dec_count) == fit, $sformatf("dispatch count %0d exp %0d", dec_count, fit));
        if (fit < g && other_rs_ready) c_partial++;
      end
      // ---- MFU issue and result
      if (mfu_issue) begin
        int idx;
        check(mfu_issued < mfu_q.size(), "issue with nothing dispatched");
        idx = mfu_q[mfu_issued];
        due_q.push_back(cyc + (prog[idx].kind == 0 ? 3 : 1));
        mfu_issued++;
      end
      if (mfu_result.valid) begin
        int idx;
        check(mfu_q.size() > 0 && mfu_issued > 0, "result with nothing issued");
        if (mfu_q.size() > 0 && mfu_issued > 0) begin
          idx = mfu_q.pop_front(); mfu_issued--;
          check(due_q.pop_front() == cyc, $sformatf("latency of instruction %0d", idx));
          check(mfu_result.tag == tag_t'(idx % 128), $sformatf("tag of instruction %0d", idx));
          if (prog[idx].nan)
            check(mfu_result.val[62:52] == 11'h7FF && mfu_result.val[51:0] != 0, $sformatf("NaN of %0d", idx));
          else
            check(mfu_result.val == prog[idx].res,
                  $sformatf("value of instruction %0d op %s: %h exp %h", idx, prog[idx].op.name(),
                            mfu_result.val, prog[idx].res));
          done[idx] = 1; in_flight_tag[idx % 128] = -1; completed++;
        end
      end
      foreach (fwd_ext[k]) if (fwd_ext[k].valid) begin
        int idx;
        idx = in_flight_tag[fwd_ext[k].tag];
        done[idx] = 1; in_flight_tag[fwd_ext[k].tag] = -1; completed++;
      end
      // ---- mechanisms
      if (rs_stall) c_rs_stall++;
      if (!other_rs_ready && dec_valid != '0) c_other_stall++;
      if (mutation_stall) c_mut_stall++;
      if (rs_full) c_full++;
      if (reconf1 && mode1 == MODE_INT) c_to_fp++;
      if (reconf1 && mode1 == MODE_FP) c_to_int++;
      if (cfp == 5'd16) c_cfp_sat++;
      if (((pc / 400) % 2) == 1) begin c_cycles_fp_phase++; if (rs_full) c_full_fp_phase++; end
      // ---- dispatch
      if (dec_accept) begin
        for (int s = 0; s < int'(dec_count); s++) begin
          int idx;
          idx = pc + s;
          in_flight_tag[idx % 128] = idx;
          to_mfu_of[idx] = to_mfu[s];
          if (to_mfu[s]) begin
            mfu_q.push_back(idx);
            if (prog[idx].kind == 0) c_fp_steer++; else c_rr_mfu++;
            for (int o = 0; o < 2; o++) begin
              int src;
              src = o ? prog[idx].src_b : prog[idx].src_a;
              if (src >= 0 && !done[src] && !(o == 0 && prog[idx].op inside {OP_SLL, OP_SRL, OP_SRA})) begin
                if (to_mfu_of[src]) c_wake_mfu++; else c_wake_ext++;
              end
            end
          end else begin
            ext_t e;
            if (prog[idx].kind == 1) c_rr_other++;
            e.idx = idx; e.due = cyc + $urandom_range(8, 1);
            ext_q.push_back(e);
          end
        end
        check(!dec_accept || other_rs_ready, "dispatch while other stations busy");
        c = m_cfp; r = m_crr;
        for (int s = 0; s < int'(dec_count); s++) void'(steer_model(prog[pc + s].kind, c, r));
        m_cfp = c; m_crr = r;
        pc += int'(dec_count);
      end
      cyc++;
    end
    check(completed == NPROG, $sformatf("all %0d instructions completed (%0d)", NPROG, completed));
    check(c_fp_steer > 0,   "FP add steered to MFU");
    check(c_rr_mfu > 0,     "integer round-robin to MFU");
    check(c_rr_other > 0,   "integer round-robin to other station");
    check(c_cfp_sat > 0,    "cfp saturated");
    check(c_rs_stall > 0,   "dispatch held by full MFU station");
    check(c_partial > 0,    "group partly dispatched");
    check(c_other_stall > 0, "dispatch held by other stations");
    check(c_to_fp > 0,      "mutation to FP mode");
    check(c_to_int > 0,     "mutation to integer mode");
    check(c_mut_stall > 0,  "mutation stall");
    check(c_wake_mfu > 0,   "wakeup by MFU result");
    check(c_wake_ext > 0,   "wakeup by external result");
    $display("cycles=%0d fp_steer=%0d rr_mfu=%0d rr_other=%0d cfp_sat=%0d rs_stall=%0d other_stall=%0d",
             cyc, c_fp_steer, c_rr_mfu, c_rr_other, c_cfp_sat, c_rs_stall, c_other_stall);
    $display("to_fp=%0d to_int=%0d mut_stall=%0d wake_mfu=%0d wake_ext=%0d rs_full=%0d (FP phases %0d of %0d cycles)",
             c_to_fp, c_to_int, c_mut_stall, c_wake_mfu, c_wake_ext, c_full, c_full_fp_phase, c_cycles_fp_phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
