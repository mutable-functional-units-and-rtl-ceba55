// tb_mfu_lop: self-checking test of the leading-one/leading-zero counter:
// every single-bit position, zero, and random values with a known top bit.
module tb_mfu_lop;
  logic [63:0] mag;
  logic [6:0]  lz;
  logic        zero;
  int checks = 0, failures = 0;

  mfu_lop dut (.*);

  task automatic check(logic [63:0] m, int exp_lz);
    mag = m; #1;
    checks++;
    if (lz !== 7'(exp_lz) || zero !== (exp_lz == 64)) begin
      failures++;
      $display("FAIL mag=%h lz=%0d zero=%b exp %0d", m, lz, zero, exp_lz);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] r;
    check(64'd0, 64);
    for (int p = 0; p < 64; p++) check(64'd1 << p, 63 - p);
    for (int t = 0; t < 2000; t++) begin
      int p;
      p = $urandom_range(63, 0);
      r = {$urandom, $urandom};
      r = r & ((64'd1 << p) - 64'd1);   // clear everything from bit p up
      r[p] = 1'b1;
      check(r, 63 - p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
