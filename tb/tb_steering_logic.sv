// tb_steering_logic: self-checking test of the steering stage. A reference
// model in the testbench runs the steering algorithm one instruction at a
// time over a random instruction stream, cut into random decode groups that
// are sometimes only partly dispatched (adv_cnt below the group size). Every decision and the counters are
// compared. Fixed sequences check the round-robin pattern (from reset, 3
// integer instructions to the MFU, then 12 elsewhere, then runs of 4) and
// the FP-add priority window (after one FP add, cfp = 4 keeps the next
// integer instructions away from the MFU).
module tb_steering_logic;
  localparam int DW = 4;
  logic clk = 0, rst_n;
  logic [DW-1:0] slot_valid, slot_fpadd, slot_mfu_int, to_mfu;
  logic [2:0] adv_cnt;
  logic [4:0] cfp;
  logic signed [5:0] crr;
  int checks = 0, failures = 0;

  steering_logic #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int m_cfp, m_crr;
  // One instruction through the reference: kind 0 = FP add, 1 = MFU-capable
  // integer, 2 = other. Returns 1 when it goes to the MFU.
  function automatic bit model_step(int kind, inout int c, inout int r);
    if (kind == 0) begin
      c = c + 4; if (c > 16) c = 16;
      return 1;
    end
    if (c > 0) c = c - 1;
    if (c != 0 || kind != 1) return 0;
    r = r + 1;
    if (r >= 4) r = r - 16;
    return r >= 0;
  endfunction

  int kinds[$];
  bit decisions[$];

  // Drive a stream through the DUT, groups of random size.
  task automatic run(int n, bit rand_adv);
    int idx = 0;
    decisions.delete();
    while (idx < n) begin
      int g, c, r, m_next_c, m_next_r;
      bit exp_m[DW];
      @(negedge clk);
      g = $urandom_range(DW, 1);
      if (idx + g > n) g = n - idx;
      slot_valid = '0; slot_fpadd = '0; slot_mfu_int = '0;
      for (int s = 0; s < g; s++) begin
        slot_valid[s]   = 1;
        slot_fpadd[s]   = kinds[idx + s] == 0;
        slot_mfu_int[s] = kinds[idx + s] == 1;
      end
      adv_cnt = rand_adv ? 3'($urandom_range(g, 0)) : 3'(g);
      c = m_cfp; r = m_crr;
      for (int s = 0; s < g; s++) begin
        exp_m[s] = model_step(kinds[idx + s], c, r);
        if (s + 1 == int'(adv_cnt)) begin m_next_c = c; m_next_r = r; end
      end
      #1;
      for (int s = 0; s < g; s++) begin
        checks++;
        if (to_mfu[s] !== exp_m[s]) begin
          failures++;
          if (failures < 20) $display("FAIL instr %0d kind %0d to_mfu=%b exp %b", idx + s, kinds[idx+s], to_mfu[s], exp_m[s]);
        end
      end
      checks++;
      if (int'(cfp) != m_cfp || int'(crr) != m_crr) begin
        failures++; $display("FAIL counters cfp=%0d crr=%0d exp %0d %0d", cfp, crr, m_cfp, m_crr);
      end
      if (adv_cnt != 0) begin
        for (int s = 0; s < int'(adv_cnt); s++) decisions.push_back(exp_m[s]);
        m_cfp = m_next_c; m_crr = m_next_r; idx += int'(adv_cnt);
      end
    end
    @(negedge clk); slot_valid = '0; adv_cnt = 0;
  endtask

  task automatic reset_all();
    rst_n = 0; slot_valid = '0; slot_fpadd = '0; slot_mfu_int = '0; adv_cnt = 0;
    m_cfp = 0; m_crr = 0;
    @(negedge clk); rst_n = 1;
  endtask

  initial begin
    int n_m;
    // Integer-only stream: expected 3 to MFU, 12 not, 4 to MFU, 12 not, ...
    reset_all();
    kinds.delete(); repeat (35) kinds.push_back(1);
    run(35, 0);
    n_m = 0;
    for (int i = 0; i < 35; i++) begin
      bit e;
      e = (i < 3) || ((i - 3) % 16 >= 12);
      checks++;
      if (decisions[i] != e) begin failures++; $display("FAIL rr pattern at %0d", i); end
    end
    // FP add then integers: the next 4 integers stay off the MFU.
    reset_all();
    kinds = '{0, 1, 1, 1, 1, 1, 1};
    run(7, 0);
    checks++;
    if (decisions[0] != 1 || decisions[1] || decisions[2] || decisions[3] || decisions[4] != 1 ||
        decisions[5] != 1 || decisions[6] != 1)
      begin failures++; $display("FAIL fp window"); end
    // Random streams with held-back groups.
    reset_all();
    kinds.delete();
    for (int i = 0; i < 4000; i++)
      kinds.push_back((i / 200) % 2 == 0 ? $urandom_range(2, 0) : ($urandom_range(9, 0) == 0 ? 0 : $urandom_range(2, 1)));
    run(4000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
