// tb_mfu_logic_unit: self-checking test of the logic unit, bit-wise reference.
module tb_mfu_logic_unit;
  import mfu_pkg::*;
  logic [63:0] a, b, y;
  lu_op_e op;
  int checks = 0, failures = 0;

  mfu_logic_unit dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] e;
    for (int t = 0; t < 2000; t++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      op = lu_op_e'(t % 4);
      #1;
      for (int i = 0; i < 64; i++)
        case (t % 4)
          0: e[i] = a[i] && b[i];
          1: e[i] = a[i] || b[i];
          2: e[i] = a[i] != b[i];
          default: e[i] = !(a[i] || b[i]);
        endcase
      checks++;
      if (y !== e) begin failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", t%4, a, b, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
