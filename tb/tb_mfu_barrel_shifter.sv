// tb_mfu_barrel_shifter: self-checking test of the 64-bit barrel shifter.
// Random operands and amounts in all three modes; expected values are built
// bit by bit in the testbench (no shift operators), sticky included.
module tb_mfu_barrel_shifter;
  logic [63:0] din, dout;
  logic [5:0]  amt;
  logic        left, arith, sticky;
  int checks = 0, failures = 0;

  mfu_barrel_shifter dut (.*);

  function automatic logic [64:0] model(logic [63:0] d, int n, logic l, logic ar);
    logic [63:0] r; logic st;
    st = 1'b0;
    for (int i = 0; i < 64; i++) begin
      if (l) r[i] = (i - n >= 0) ? d[i-n] : 1'b0;
      else   r[i] = (i + n <= 63) ? d[i+n] : (ar ? d[63] : 1'b0);
    end
    if (!l) for (int i = 0; i < n; i++) st |= d[i];
    return {st, r};
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [64:0] exp_v;
    for (int t = 0; t < 3000; t++) begin
      din   = {$urandom, $urandom};
      if (t % 7 == 0) din = 64'h8000_0000_0000_0001;
      amt   = 6'($urandom);
      left  = 1'($urandom);
      arith = 1'($urandom);
      #1;
      exp_v = model(din, int'(amt), left, arith);
      checks++;
      if ({sticky, dout} !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL din=%h amt=%0d l=%b a=%b got %b/%h exp %b/%h",
                                    din, amt, left, arith, sticky, dout, exp_v[64], exp_v[63:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
