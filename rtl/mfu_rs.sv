// mfu_rs: the reservation station dedicated to the MFU. Unlike the other
// reservation stations of the processor it issues strictly in order: only the
// oldest entry may go to the MFU, and it goes when both its operands are
// present and the MFU accepts it.
//
// Storage is a circular buffer of DEPTH entries (8 by default, the size found
// sufficient; 4 and 16 were also evaluated). Up to ENQ_W instructions of one
// dispatch group are written per cycle, in slot order, compacted behind the
// tail; the dispatch stage must not offer more than `free_cnt`. Every cycle
// each waiting operand compares its producer tag with the NFWD result buses
// of the forwarding bus and captures a matching value; instructions being
// written compare too, so a result broadcast in the dispatch cycle is not
// lost. An operand captured in cycle t is seen as ready from cycle t+1.
// `full` is high when all entries are in use.
// Multi-entry write, the forwarding-bus capture and the counts are choices of
// this design; the in-order issue and the entry count follow the MFU
// integration.
module mfu_rs
  import mfu_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned ENQ_W = 4,
  parameter int unsigned NFWD  = 5,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ENQ_W-1:0] enq_valid,
  input  mfu_instr_t       enq_instr [ENQ_W],
  output logic [CW-1:0]    free_cnt,
  output logic [CW-1:0]    count,
  output logic             full,
  input  fwd_t             fwd [NFWD],
  output logic             head_valid,
  output logic             head_ready,
  output mfu_instr_t       head_instr,
  input  logic             deq
);
  mfu_instr_t      mem [DEPTH];
  logic [PW-1:0]   head, tail;

  function automatic operand_t wake(operand_t o, fwd_t f [NFWD]);
    operand_t r;
    r = o;
    for (int k = 0; k < NFWD; k++)
      if (!r.rdy && f[k].valid && f[k].tag == r.tag) begin
        r.rdy = 1'b1;
        r.val = f[k].val;
      end
    return r;
  endfunction

  function automatic logic [PW-1:0] ptr_add(logic [PW-1:0] p, int unsigned n);
    return PW'((int'(p) + n) % DEPTH);
  endfunction

  logic [CW-1:0] n_enq;

  always_comb begin
    n_enq = '0;
    for (int s = 0; s < ENQ_W; s++) n_enq += CW'(enq_valid[s]);
    free_cnt   = CW'(DEPTH) - count;
    full       = (count == CW'(DEPTH));
    head_valid = (count != '0);
    head_instr = mem[head];
    head_ready = head_valid && head_instr.a.rdy && head_instr.b.rdy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (deq)  head <= ptr_add(head, 1);
      tail  <= ptr_add(tail, int'(n_enq));
      count <= count + n_enq - CW'(deq);
    end
  end

  // Entry storage: wakeup of the waiting entries, then the new ones.
  always_ff @(posedge clk) begin
    int unsigned pos;
    for (int e = 0; e < DEPTH; e++) begin
      mem[e].a <= wake(mem[e].a, fwd);
      mem[e].b <= wake(mem[e].b, fwd);
    end
    pos = 0;
    for (int s = 0; s < ENQ_W; s++) begin
      if (enq_valid[s]) begin
        mfu_instr_t ni;
        ni   = enq_instr[s];
        ni.a = wake(ni.a, fwd);
        ni.b = wake(ni.b, fwd);
        mem[ptr_add(tail, pos)] <= ni;
        pos++;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) n_enq <= free_cnt);
  a_deq_ready:   assert property (@(posedge clk) disable iff (!rst_n) deq |-> head_ready);
endmodule
