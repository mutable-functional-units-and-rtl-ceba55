// tb_mfu_rs: self-checking test of the in-order MFU reservation station.
// Random dispatch groups (never more than the free count) write instructions
// whose operands are either present or wait for a random tag; random results
// are broadcast on the forwarding buses; the head is taken when ready with
// random probability. A queue model in the testbench gives the expected head,
// its readiness and operand values, the occupancy and `full` every cycle.
// The run must see the station full, wakeups and strictly in-order issue.
module tb_mfu_rs;
  import mfu_pkg::*;
  localparam int DEPTH = 8, ENQ_W = 4, NFWD = 5;
  logic clk = 0, rst_n;
  logic [ENQ_W-1:0] enq_valid;
  mfu_instr_t enq_instr [ENQ_W];
  logic [3:0] free_cnt, count;
  logic full, head_valid, head_ready, deq;
  mfu_instr_t head_instr;
  fwd_t fwd [NFWD];
  int checks = 0, failures = 0;

  mfu_rs #(.DEPTH(DEPTH), .ENQ_W(ENQ_W), .NFWD(NFWD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  mfu_instr_t q[$];

  function automatic operand_t m_wake(operand_t o);
    for (int k = 0; k < NFWD; k++)
      if (!o.rdy && fwd[k].valid && fwd[k].tag == o.tag) begin o.rdy = 1; o.val = fwd[k].val; end
    return o;
  endfunction

  function automatic operand_t rand_opnd();
    operand_t o;
    o.rdy = ($urandom_range(2, 0) == 0);
    o.tag = tag_t'($urandom_range(31, 0));
    o.val = o.rdy ? {$urandom, $urandom} : 64'd0;
    return o;
  endfunction

  initial begin
    int fulls = 0, wakes = 0, issued = 0, next_dst = 0;
    rst_n = 0; enq_valid = '0; deq = 0;
    foreach (fwd[k]) fwd[k] = '0;
    foreach (enq_instr[s]) enq_instr[s] = '0;
    @(negedge clk); rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int n;
      @(negedge clk);
      // New group
      n = $urandom_range(ENQ_W, 0);
      if (n > int'(free_cnt)) n = int'(free_cnt);
      enq_valid = '0;
      for (int s = 0; s < ENQ_W; s++) begin
        enq_instr[s] = '0;
        enq_instr[s].op  = mfu_op_e'($urandom_range(10, 0));
        enq_instr[s].dst = tag_t'(next_dst + s);
        enq_instr[s].a = rand_opnd();
        enq_instr[s].b = rand_opnd();
      end
      // valid slots need not be contiguous
      for (int s = 0, placed = 0; s < ENQ_W; s++)
        if (placed < n && ($urandom_range(1, 0) || ENQ_W - s == n - placed)) begin
          enq_valid[s] = 1; placed++;
        end
      foreach (fwd[k]) begin
        fwd[k].valid = ($urandom_range(3, 0) == 0);
        fwd[k].tag   = tag_t'($urandom_range(31, 0));
        fwd[k].val   = {$urandom, $urandom};
      end
      deq = head_ready && ($urandom_range(2, 0) != 0);
      #1;
      // Compare with the model
      checks++;
      if (head_valid != (q.size() > 0) || int'(count) != q.size() || full != (q.size() == DEPTH) ||
          int'(free_cnt) != DEPTH - q.size()) begin
        failures++; $display("FAIL occupancy count=%0d model=%0d", count, q.size());
      end
      if (q.size() > 0) begin
        bit r;
        r = q[0].a.rdy && q[0].b.rdy;
        checks++;
        if (head_ready != r || head_instr.dst != q[0].dst || head_instr.op != q[0].op ||
            (q[0].a.rdy && head_instr.a.val != q[0].a.val) || (q[0].b.rdy && head_instr.b.val != q[0].b.val)) begin
          failures++;
          if (failures < 20) $display("FAIL head dst=%0d exp %0d ready=%b exp %b", head_instr.dst, q[0].dst, head_ready, r);
        end
      end
      if (full) fulls++;
      // Model update (same clock edge)
      if (deq) begin void'(q.pop_front()); issued++; end
      foreach (q[i]) begin
        operand_t oa, ob;
        oa = m_wake(q[i].a); ob = m_wake(q[i].b);
        if (oa.rdy != q[i].a.rdy || ob.rdy != q[i].b.rdy) wakes++;
        q[i].a = oa; q[i].b = ob;
      end
      for (int s = 0; s < ENQ_W; s++)
        if (enq_valid[s]) begin
          mfu_instr_t ni;
          ni = enq_instr[s]; ni.a = m_wake(ni.a); ni.b = m_wake(ni.b);
          q.push_back(ni);
        end
      next_dst += ENQ_W;
    end
    checks++; if (fulls == 0)  begin failures++; $display("FAIL never full"); end
    checks++; if (wakes == 0)  begin failures++; $display("FAIL no wakeup"); end
    checks++; if (issued == 0) begin failures++; $display("FAIL nothing issued"); end
    $display("full cycles=%0d wakeups=%0d issued=%0d", fulls, wakes, issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
