// tb_mfu_shift_left: self-checking test of the pack-stage left shifter,
// reference built bit by bit.
module tb_mfu_shift_left;
  logic [63:0] din, dout;
  logic [5:0]  amt;
  int checks = 0, failures = 0;

  mfu_shift_left dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] e;
    for (int t = 0; t < 2000; t++) begin
      din = {$urandom, $urandom}; amt = 6'($urandom);
      #1;
      for (int i = 0; i < 64; i++) e[i] = (i >= int'(amt)) ? din[i - int'(amt)] : 1'b0;
      checks++;
      if (dout !== e) begin failures++; $display("FAIL din=%h amt=%0d got %h exp %h", din, amt, dout, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
