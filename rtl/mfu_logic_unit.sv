// mfu_logic_unit: the logic unit added beside the FP adder datapath so that
// the MFU can execute integer logic instructions in integer mode.
//
// It reads the stage-1 operand registers A1 and B1 directly and computes
// AND, OR, XOR or NOR of the two 64-bit operands in the same cycle
// (combinational). The set of functions is this design's choice of the usual
// MIPS logic instructions.
module mfu_logic_unit
  import mfu_pkg::*;
(
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  lu_op_e      op,
  output logic [63:0] y
);
  always_comb begin
    unique case (op)
      LU_AND:  y = a & b;
      LU_OR:   y = a | b;
      LU_XOR:  y = a ^ b;
      default: y = ~(a | b);
    endcase
  end
endmodule
