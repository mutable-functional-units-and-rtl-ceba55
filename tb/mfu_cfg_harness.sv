// mfu_cfg_harness: testbench helper that runs one MFU integration instance
// at a given decode width and station depth on a synthetic instruction mix.
//
// It generates NPROG instructions (FP_PCT percent FP add/sub, INT_PCT percent
// integer operations the MFU can execute, the rest other instructions) with
// random dependences on the last six instructions, offers decode groups of up
// to DW instructions every cycle, models the other functional units (results
// on the external buses after 1..8 cycles) and checks every MFU result value,
// tag and order against a reference computed at generation. When all
// instructions have completed it raises `done` and reports its counts:
// checks, failures, cycles, and cycles in which the MFU station was full.
module mfu_cfg_harness
  import mfu_pkg::*;
#(
  parameter int DW       = 4,
  parameter int RS_DEPTH = 8,
  parameter int FP_PCT   = 2,
  parameter int INT_PCT  = 73,
  parameter int NPROG    = 3000
)(
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   full_cycles
);
  localparam int NFWD_EXT = 4;
  localparam int AW = $clog2(DW + 1);
  localparam int CW = $clog2(RS_DEPTH + 1);

  logic rst_n;
  logic [DW-1:0] dec_valid, to_other, to_mfu;
  dispatch_slot_t dec_slot [DW];
  logic other_rs_ready, dec_accept, rs_stall, rs_full, mfu_issue;
  logic [AW-1:0] dec_count;
  logic reconf1, reconf2, mutation_stall;
  fwd_t fwd_ext [NFWD_EXT];
  fwd_t mfu_result;
  logic [CW-1:0] rs_count;
  mfu_mode_e mode1, mode2;
  logic [4:0] cfp;
  logic signed [5:0] crr;

  mfu_integration #(.DW(DW), .RS_DEPTH(RS_DEPTH)) dut (.*);

  typedef struct {
    int kind; mfu_op_e op; logic [5:0] shamt; int src_a, src_b;
    word_t va, vb, res; bit nan;
  } prog_t;
  prog_t prog [NPROG];
  bit done_i [NPROG];
  int in_flight_tag [128];
  int mfu_q[$];
  typedef struct { int idx; int due; } ext_t;
  ext_t ext_q[$];

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

  function automatic operand_t make_opnd(int src, word_t v);
    operand_t o;
    if (src < 0 || done_i[src]) begin o.rdy = 1; o.tag = '0; o.val = v; end
    else begin o.rdy = 0; o.tag = tag_t'(src % 128); o.val = '0; end
    return o;
  endfunction

  initial begin
    int pc, completed, g;
    done = 0; checks = 0; failures = 0; cycles = 0; full_cycles = 0;
    for (int n = 0; n < NPROG; n++) begin
      prog_t p;
      int r;
      r = $urandom_range(99, 0);
      p.kind = (r < FP_PCT) ? 0 : (r < FP_PCT + INT_PCT ? 1 : 2);
      p.op = (p.kind == 0) ? ($urandom_range(1, 0) ? OP_FADD : OP_FSUB) : mfu_op_e'($urandom_range(8, 0));
      p.shamt = 6'($urandom);
      p.src_a = (n > 0 && $urandom_range(1, 0)) ? n - $urandom_range(n < 6 ? n : 6, 1) : -1;
      p.src_b = (n > 0 && $urandom_range(2, 0) == 0) ? n - $urandom_range(n < 6 ? n : 6, 1) : -1;
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
    foreach (in_flight_tag[t]) in_flight_tag[t] = -1;
    rst_n = 0; dec_valid = '0; other_rs_ready = 1;
    foreach (dec_slot[s]) dec_slot[s] = '0;
    foreach (fwd_ext[k]) fwd_ext[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pc = 0; completed = 0;
    while (completed < NPROG && cycles < 200000) begin
      @(negedge clk);
      g = DW;
      if (pc + g > NPROG) g = NPROG - pc;
      for (int s = 0; s < g; s++)
        if (in_flight_tag[(pc + s) % 128] != -1) begin g = s; break; end
      dec_valid = '0;
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
        end
      end
      foreach (fwd_ext[k]) fwd_ext[k] = '0;
      for (int k = 0, i = 0; k < NFWD_EXT && i < ext_q.size(); ) begin
        if (ext_q[i].due <= cycles) begin
          fwd_ext[k].valid = 1;
          fwd_ext[k].tag = tag_t'(ext_q[i].idx % 128);
          fwd_ext[k].val = prog[ext_q[i].idx].res;
          k++;
          ext_q.delete(i);
        end else i++;
      end
      #1;
      if (mfu_result.valid) begin
        int idx;
        checks++;
        if (mfu_q.size() == 0) failures++;
        else begin
          idx = mfu_q.pop_front();
          if (mfu_result.tag != tag_t'(idx % 128) ||
              (prog[idx].nan ? !(mfu_result.val[62:52] == 11'h7FF) : mfu_result.val != prog[idx].res)) begin
            failures++;
            if (failures < 10) $display("FAIL DW=%0d RS=%0d instruction %0d", DW, RS_DEPTH, idx);
          end
          done_i[idx] = 1; in_flight_tag[idx % 128] = -1; completed++;
        end
      end
      foreach (fwd_ext[k]) if (fwd_ext[k].valid) begin
        int idx;
        idx = in_flight_tag[fwd_ext[k].tag];
        done_i[idx] = 1; in_flight_tag[fwd_ext[k].tag] = -1; completed++;
      end
      if (rs_full) full_cycles++;
      for (int s = 0; s < int'(dec_count); s++) begin
        int idx;
        idx = pc + s;
        in_flight_tag[idx % 128] = idx;
        if (to_mfu[s]) mfu_q.push_back(idx);
        else begin
          ext_t e;
          e.idx = idx; e.due = cycles + $urandom_range(8, 1);
          ext_q.push_back(e);
        end
      end
      pc += int'(dec_count);
      cycles++;
    end
    checks++;
    if (completed != NPROG) begin
      failures++; $display("FAIL DW=%0d RS=%0d: %0d of %0d completed", DW, RS_DEPTH, completed, NPROG);
    end
    done = 1;
  end
endmodule
