// mfu_pkg: types and constants shared by the mutable functional unit (MFU),
// its in-order reservation station, the steering stage and the integration top.
//
// The MFU executes 64-bit integer add/subtract, logic and shift instructions in
// its integer mode and IEEE 754 double-precision addition/subtraction in its
// floating-point mode. The operation encoding, the tag width and the layout of
// the structures below are choices of this design; the set of operations
// (integer add, subtract, logic, shift and FP add) follows the MFU definition.
package mfu_pkg;

  // Operation executed by the MFU.
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,   // 64-bit integer add
    OP_SUB  = 4'd1,   // 64-bit integer subtract (A - B)
    OP_AND  = 4'd2,
    OP_OR   = 4'd3,
    OP_XOR  = 4'd4,
    OP_NOR  = 4'd5,
    OP_SLL  = 4'd6,   // B << shamt
    OP_SRL  = 4'd7,   // B >> shamt, logical
    OP_SRA  = 4'd8,   // B >> shamt, arithmetic
    OP_FADD = 4'd9,   // double-precision A + B
    OP_FSUB = 4'd10   // double-precision A - B
  } mfu_op_e;

  // Logic-unit function.
  typedef enum logic [1:0] {LU_AND = 2'd0, LU_OR = 2'd1, LU_XOR = 2'd2, LU_NOR = 2'd3} lu_op_e;

  // Configuration of one pipeline stage of the MFU.
  typedef enum logic {MODE_INT = 1'b0, MODE_FP = 1'b1} mfu_mode_e;

  // Resource class of an instruction, as seen by the mutation controller:
  // FP add uses stages 1-2-3, an integer shift uses the stage-1 barrel
  // shifter, the other integer operations use the stage-2 adder/logic unit.
  typedef enum logic [1:0] {CLS_NONE = 2'd0, CLS_FP = 2'd1, CLS_SHIFT = 2'd2, CLS_ALU = 2'd3} mfu_cls_e;

  // Physical register tag width (64 integer + 64 FP physical registers).
  localparam int unsigned TAG_W = 7;
  localparam int unsigned XLEN  = 64;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [XLEN-1:0]  word_t;

  // One source operand as held by a reservation station.
  typedef struct packed {
    logic  rdy;   // value present
    tag_t  tag;   // producer tag while not ready
    word_t val;
  } operand_t;

  // One instruction waiting in, or issued from, the MFU reservation station.
  typedef struct packed {
    mfu_op_e    op;
    logic [5:0] shamt;  // shift amount carried in the instruction
    tag_t       dst;
    operand_t   a;
    operand_t   b;
  } mfu_instr_t;

  // One result broadcast on the forwarding bus.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t val;
  } fwd_t;

  // One decoded, renamed instruction entering the steering/dispatch stage.
  typedef struct packed {
    logic       is_fpadd;  // FP add or subtract
    logic       mfu_int;   // integer operation the MFU can also execute
    mfu_instr_t instr;
  } dispatch_slot_t;

  function automatic mfu_cls_e op_class(mfu_op_e op);
    case (op)
      OP_FADD, OP_FSUB:        return CLS_FP;
      OP_SLL, OP_SRL, OP_SRA:  return CLS_SHIFT;
      default:                 return CLS_ALU;
    endcase
  endfunction

  // Canonical quiet NaN returned for invalid operations and NaN operands.
  localparam word_t FP_QNAN = 64'h7FF8_0000_0000_0000;

endpackage
