// tb_mfu_add_sub: self-checking test of the 64-bit adder. The reference adds
// the operands as two 32-bit halves with an explicit carry.
module tb_mfu_add_sub;
  logic [63:0] x, y, sum, sum_p1;
  logic sub, cy;
  int checks = 0, failures = 0;

  mfu_add_sub dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] ye, e0, e1; logic [32:0] lo; logic [32:0] hi; logic c0;
    for (int t = 0; t < 3000; t++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      if (t % 5 == 0) y = x;
      if (t % 11 == 0) y = 64'hFFFF_FFFF_FFFF_FFFF;
      sub = 1'($urandom);
      #1;
      ye = sub ? (64'hFFFF_FFFF_FFFF_FFFF ^ y) : y;
      lo = {1'b0, x[31:0]} + {1'b0, ye[31:0]};
      hi = {1'b0, x[63:32]} + {1'b0, ye[63:32]} + {32'd0, lo[32]};
      e0 = {hi[31:0], lo[31:0]}; c0 = hi[32];
      lo = {1'b0, x[31:0]} + {1'b0, ye[31:0]} + 33'd1;
      hi = {1'b0, x[63:32]} + {1'b0, ye[63:32]} + {32'd0, lo[32]};
      e1 = {hi[31:0], lo[31:0]};
      checks++;
      if (sum !== e0 || sum_p1 !== e1 || cy !== c0) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h sub=%b got %h %h %b exp %h %h %b", x, y, sub, sum, sum_p1, cy, e0, e1, c0);
      end
      // Integer subtract through sum_p1 equals x - y.
      if (sub) begin
        checks++;
        if (sum_p1 !== x - y) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
