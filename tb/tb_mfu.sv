// tb_mfu: self-checking test of the whole mutable functional unit.
// The testbench plays the in-order reservation station: it presents a random
// stream of integer and FP instructions (with random operand readiness) and
// checks every result against an independent reference: SystemVerilog integer
// operators for the integer operations and the simulator's own IEEE double
// arithmetic ($bitstoreal/$realtobits) for FP add/subtract, including
// denormals, infinities, NaN, signed zeros, cancellation and overflow. It also
// checks the latency (integer result one cycle after acceptance, FP three)
// and that both modes and both mutation directions occurred.
module tb_mfu;
  import mfu_pkg::*;
  logic clk = 0, rst_n;
  logic in_valid, in_ready, in_accept, reconf1, reconf2, mutation_stall;
  mfu_instr_t in_instr;
  fwd_t int_res, fp_res;
  mfu_mode_e mode1, mode2;
  int checks = 0, failures = 0, cyc = 0;

  mfu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic word_t rand_fp(int kind);
    word_t v;
    v = {$urandom, $urandom};
    case (kind)
      0: v[62:52] = 11'($urandom_range(1100, 950));           // ordinary
      1: v[62:52] = 11'd0;                                      // denormal / zero
      2: v[62:52] = 11'h7FF;                                    // inf / NaN
      3: v = {v[63], 63'd0};                                    // signed zero
      4: v[62:52] = 11'($urandom_range(2046, 2040));           // near overflow
      5: v[62:52] = 11'($urandom_range(3, 1));                 // near underflow
      6: v = {v[63], 11'h7FF, 52'd0};                           // infinity
      default: ;
    endcase
    return v;
  endfunction

  function automatic word_t ref_result(mfu_instr_t i, output bit is_nan);
    real ra, rb;
    word_t a, b;
    a = i.a.val; b = i.b.val; is_nan = 0;
    case (i.op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_NOR: return ~(a | b);
      OP_SLL: return b << i.shamt;
      OP_SRL: return b >> i.shamt;
      OP_SRA: return $signed(b) >>> i.shamt;
      default: begin
        word_t r;
        ra = $bitstoreal(a); rb = $bitstoreal(b);
        r = (i.op == OP_FADD) ? $realtobits(ra + rb) : $realtobits(ra - rb);
        is_nan = (r[62:52] == 11'h7FF) && (r[51:0] != 0);
        return r;
      end
    endcase
  endfunction

  // Expected results, in issue order, with the cycle each must appear.
  typedef struct { word_t val; bit nan; tag_t tag; int due; bit fp; } exp_t;
  exp_t exp_q[$];
  mfu_instr_t stream[$];
  int n_int = 0, n_fp = 0, to_fp = 0, to_int = 0, stall_cyc = 0;

  function automatic mfu_instr_t make_instr(int n);
    mfu_instr_t i;
    i = '0;
    i.op = mfu_op_e'($urandom_range(10, 0));
    // Runs of the same kind, so both long runs and frequent mutations occur.
    if ((n / 6) % 2 == 0 && $urandom_range(3, 0) != 0) i.op = $urandom_range(1, 0) ? OP_FADD : OP_FSUB;
    i.shamt = 6'($urandom);
    i.dst = tag_t'(n);
    i.a.rdy = 1; i.b.rdy = 1;
    if (op_class(i.op) == CLS_FP) begin
      i.a.val = rand_fp($urandom_range(9, 0) < 6 ? 0 : $urandom_range(7, 1));
      i.b.val = rand_fp($urandom_range(9, 0) < 6 ? 0 : $urandom_range(7, 1));
      if ($urandom_range(3, 0) == 0) begin  // close exponents: cancellation
        i.b.val[62:52] = i.a.val[62:52] + 11'($urandom_range(1, 0));
        i.b.val[63] = ~i.a.val[63] ^ (i.op == OP_FSUB);
      end
      if ($urandom_range(15, 0) == 0) i.b.val = i.a.val ^ {(i.op == OP_FADD), 63'd0};
    end else begin
      i.a.val = {$urandom, $urandom};
      i.b.val = {$urandom, $urandom};
    end
    return i;
  endfunction

  initial begin
    int issued;
    bit nan;
    mfu_op_e prev_op;
    rst_n = 0; in_valid = 0; in_ready = 0; in_instr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) stream.push_back(make_instr(n));
    issued = 0;
    prev_op = OP_ADD;
    while (issued < stream.size() || exp_q.size() > 0) begin
      @(negedge clk);
      in_valid = issued < stream.size();
      in_ready = in_valid && ($urandom_range(7, 0) != 0);
      if (in_valid) in_instr = stream[issued];
      #1;
      // results visible in this cycle
      if (int_res.valid && fp_res.valid) begin
        checks++; failures++; $display("FAIL two results in one cycle");
      end
      if (int_res.valid || fp_res.valid) begin
        fwd_t r;
        r = int_res.valid ? int_res : fp_res;
        checks++;
        if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
        else begin
          exp_t e;
          e = exp_q.pop_front();
          if (e.due != cyc || r.tag != e.tag || e.fp != fp_res.valid ||
              (e.nan ? !(r.val[62:52] == 11'h7FF && r.val[51:0] != 0) : r.val !== e.val)) begin
            failures++;
            if (failures < 20)
              $display("FAIL tag %0d cycle %0d (due %0d) got %h exp %h", r.tag, cyc, e.due, r.val, e.val);
          end
        end
      end
      if (mutation_stall) stall_cyc++;
      if (in_accept) begin
        exp_t e;
        mfu_instr_t i;
        i = stream[issued];
        e.val = ref_result(i, nan);
        e.nan = nan; e.tag = i.dst; e.fp = (op_class(i.op) == CLS_FP);
        e.due = cyc + (e.fp ? 3 : 1);
        // keep the queue in exit order (results leave in issue order here)
        exp_q.push_back(e);
        if (e.fp) n_fp++; else n_int++;
        if (op_class(prev_op) == CLS_FP && !e.fp) to_int++;
        if (op_class(prev_op) != CLS_FP && e.fp) to_fp++;
        prev_op = i.op;
        issued++;
      end
      cyc++;
      if (cyc > 100000) break;
    end
    checks++; if (n_int == 0 || n_fp == 0) begin failures++; $display("FAIL a mode never used"); end
    checks++; if (to_fp == 0 || to_int == 0) begin failures++; $display("FAIL a mutation direction never happened"); end
    checks++; if (stall_cyc == 0) begin failures++; $display("FAIL no mutation stall"); end
    $display("int=%0d fp=%0d int->fp=%0d fp->int=%0d stall cycles=%0d", n_int, n_fp, to_fp, to_int, stall_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
