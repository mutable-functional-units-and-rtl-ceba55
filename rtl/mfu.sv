// mfu: the mutable functional unit, a double-precision IEEE 754 floating-point
// adder extended so that it also executes 64-bit integer add, subtract, logic
// and shift instructions, switching ("mutating") between the two modes at run
// time.
//
// Datapath (three stages, registers between them):
//   stage 1 (align): operands A1/B1. Exponent differences B-A and A-B, swap of
//     the operands so that the larger exponent is on the A side, 64-bit barrel
//     shifter aligning the smaller significand (right shift with sticky bit),
//     larger exponent and signs kept for later. Switch RS1a disables the swap in
//     integer mode; switch RS1b gives the barrel shifter the instruction's
//     6-bit shift amount instead of the exponent difference. Integer shifts are
//     executed here and leave the unit at the end of this cycle.
//   stage 2 (add): operands A2/B2. The 64-bit ADD/SUB makes sum and sum+1;
//     switches RS2a/RS2b feed it from A1/B1 directly in integer mode, so
//     integer add, subtract and logic (LOGIC UNIT on A1/B1) complete in one
//     cycle. In FP mode the leading-one block counts the leading zeros of the
//     magnitude.
//   stage 3 (pack): sel 1comp picks sum+1 or the complement of sum, SIGN fixes
//     the result sign, the left shifter normalises, the exponent is reduced by
//     the shift amount, and the result is rounded to nearest-even and packed.
// Latency: integer 1 cycle, FP 3 cycles after the accepting cycle; one
// instruction enters and at most one result leaves per cycle. The mode of
// stages 1 and 2 and the issue decision come from mfu_mutation_ctrl.
//
// Significand layout (this design's choice): the 53-bit significand sits in
// bits 62..10 of the 64-bit datapath, bit 63 catches the carry of an addition
// and bits 9..0 hold guard bits, the lowest one being sticky. The original
// FP adder used only the 54 low bits; using the full width here gives the
// guard bits that correct rounding needs. Denormals, infinities and NaNs are
// handled (NaN results are the canonical quiet NaN); rounding is to nearest,
// ties to even. The integer left shift uses the barrel shifter, which performs
// both shift directions; the pack-stage shifter is used by FP only.
//
// Interface: `in_valid`/`in_ready` present the head instruction of the
// reservation station (valid = present, ready = operands present) and
// `in_accept` says it is taken this cycle. `int_res` and `fp_res` are the
// integer and FP result outputs, each with valid and destination tag.
module mfu
  import mfu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_ready,
  input  mfu_instr_t in_instr,
  output logic       in_accept,
  output fwd_t       int_res,
  output fwd_t       fp_res,
  output mfu_mode_e  mode1,
  output mfu_mode_e  mode2,
  output logic       reconf1,
  output logic       reconf2,
  output logic       mutation_stall
);
  mfu_cls_e e1_cls;
  logic     e2_valid, e3_valid;

  mfu_mutation_ctrl u_ctrl (
    .clk, .rst_n,
    .head_valid (in_valid),
    .head_ready (in_ready),
    .head_cls   (op_class(in_instr.op)),
    .accept     (in_accept),
    .e1_cls, .e2_valid, .e3_valid,
    .mode1, .mode2, .reconf1, .reconf2, .mutation_stall
  );

  // ---------------------------------------------------------------- stage 1
  word_t      a1, b1;
  mfu_op_e    e1_op;
  logic [5:0] e1_shamt;
  tag_t       e1_tag;

  always_ff @(posedge clk) begin
    if (in_accept) begin
      a1       <= in_instr.a.val;
      b1       <= in_instr.b.val;
      e1_op    <= in_instr.op;
      e1_shamt <= in_instr.shamt;
      e1_tag   <= in_instr.dst;
    end
  end

  logic        fp1;                  // stage 1 in FP mode
  logic        sa, sb;               // signs, B's flipped for subtraction
  logic [10:0] ea, eb;               // exponent fields
  logic [11:0] ea_e, eb_e;           // effective exponents (denormal -> 1)
  logic [11:0] b_minus_a, a_minus_b, diff;
  logic        swap;                 // RS1a
  word_t       ma, mb, pa, pb, sw_a, sw_b;
  logic [5:0]  bs_amt;               // RS1b
  word_t       bs_out;
  logic        bs_sticky;
  logic [11:0] e_big;
  logic        a_nan, b_nan, a_inf, b_inf;

  always_comb begin
    fp1  = (mode1 == MODE_FP);
    sa   = a1[63];
    sb   = b1[63] ^ (e1_op == OP_FSUB);
    ea   = a1[62:52];
    eb   = b1[62:52];
    ea_e = (ea == 11'd0) ? 12'd1 : {1'b0, ea};
    eb_e = (eb == 11'd0) ? 12'd1 : {1'b0, eb};
    b_minus_a = eb_e - ea_e;
    a_minus_b = ea_e - eb_e;
    swap = fp1 && b_minus_a[11] == 1'b0 && b_minus_a != 12'd0;
    diff = swap ? b_minus_a : a_minus_b;
    ma   = {1'b0, ea != 11'd0, a1[51:0], 10'd0};
    mb   = {1'b0, eb != 11'd0, b1[51:0], 10'd0};
    pa   = fp1 ? ma : a1;
    pb   = fp1 ? mb : b1;
    sw_a = swap ? pb : pa;
    sw_b = swap ? pa : pb;
    if (fp1) bs_amt = (diff > 12'd63) ? 6'd63 : diff[5:0];
    else     bs_amt = e1_shamt;
    e_big = swap ? eb_e : ea_e;
    a_nan = (ea == 11'h7FF) && (a1[51:0] != 52'd0);
    b_nan = (eb == 11'h7FF) && (b1[51:0] != 52'd0);
    a_inf = (ea == 11'h7FF) && (a1[51:0] == 52'd0);
    b_inf = (eb == 11'h7FF) && (b1[51:0] == 52'd0);
  end

  mfu_barrel_shifter u_bshift (
    .din (sw_b), .amt (bs_amt),
    .left  (!fp1 && e1_op == OP_SLL),
    .arith (!fp1 && e1_op == OP_SRA),
    .dout (bs_out), .sticky (bs_sticky)
  );

  word_t lu_out;
  mfu_logic_unit u_logic (
    .a (a1), .b (b1),
    .op (lu_op_e'(e1_op == OP_AND ? LU_AND : e1_op == OP_OR ? LU_OR :
                  e1_op == OP_XOR ? LU_XOR : LU_NOR)),
    .y (lu_out)
  );

  // ---------------------------------------------------------------- stage 2
  word_t       a2, b2;
  logic [11:0] e2_exp;
  logic        e2_sign, e2_effsub, e2_special;
  word_t       e2_special_val;
  tag_t        e2_tag;

  always_ff @(posedge clk) begin
    if (e1_cls == CLS_FP) begin
      a2      <= sw_a;
      b2      <= {bs_out[63:1], bs_out[0] | bs_sticky};
      e2_exp  <= e_big;
      e2_sign <= swap ? sb : sa;
      e2_effsub <= sa ^ sb;
      e2_tag  <= e1_tag;
      e2_special <= a_nan || b_nan || a_inf || b_inf;
      if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
        e2_special_val <= FP_QNAN;
      else if (a_inf)
        e2_special_val <= {sa, 11'h7FF, 52'd0};
      else
        e2_special_val <= {sb, 11'h7FF, 52'd0};
    end
  end

  logic  fp2, add_sub;
  word_t add_x, add_y, sum, sum_p1;
  logic  cy;
  word_t mag2;
  logic [6:0] lz2;
  logic  zero2;

  always_comb begin
    fp2     = (mode2 == MODE_FP);
    add_x   = fp2 ? a2 : a1;                      // RS2a
    add_y   = fp2 ? b2 : b1;                      // RS2b
    add_sub = fp2 ? e2_effsub : (e1_op == OP_SUB);
  end

  mfu_add_sub u_adder (
    .x (add_x), .y (add_y), .sub (add_sub),
    .sum, .sum_p1, .cy
  );

  assign mag2 = !e2_effsub ? sum : (cy ? sum_p1 : ~sum);

  mfu_lop u_lop (.mag (mag2), .lz (lz2), .zero (zero2));

  // ---------------------------------------------------------------- stage 3
  word_t       s3_sum, s3_sum_p1;
  logic        s3_cy, s3_effsub, s3_sign, s3_special, s3_zero;
  logic [6:0]  s3_lz;
  logic [11:0] s3_exp;
  word_t       s3_special_val;
  tag_t        s3_tag;

  always_ff @(posedge clk) begin
    if (e2_valid) begin
      s3_sum         <= sum;
      s3_sum_p1      <= sum_p1;
      s3_cy          <= cy;
      s3_effsub      <= e2_effsub;
      s3_sign        <= e2_sign;
      s3_lz          <= lz2;
      s3_zero        <= zero2;
      s3_exp         <= e2_exp;
      s3_special     <= e2_special;
      s3_special_val <= e2_special_val;
      s3_tag         <= e2_tag;
    end
  end

  word_t       mag3, norm;
  logic        sign3;
  logic [5:0]  nshift;
  logic [11:0] exp_pre;
  logic [10:0] exp_field;
  logic        guard, sticky3, round_up;
  logic [62:0] packed_r;
  word_t       fp_val;

  always_comb begin
    // sel 1comp and SIGN
    mag3  = !s3_effsub ? s3_sum : (s3_cy ? s3_sum_p1 : ~s3_sum);
    sign3 = s3_sign ^ (s3_effsub && !s3_cy);
    // shift amount: leading zeros, limited so the exponent stays >= 1
    if ({5'd0, s3_lz} > s3_exp) nshift = s3_exp[5:0];
    else                        nshift = s3_lz[5:0];
  end

  mfu_shift_left u_pack_shift (.din (mag3), .amt (nshift), .dout (norm));

  always_comb begin
    exp_pre   = s3_exp + 12'd1 - {6'd0, nshift};
    exp_field = norm[63] ? exp_pre[10:0] : 11'd0;
    guard     = norm[10];
    sticky3   = norm[9:0] != 10'd0;
    round_up  = guard && (sticky3 || norm[11]);
    packed_r  = {exp_field, norm[62:11]} + {62'd0, round_up};
    if (s3_special)
      fp_val = s3_special_val;
    else if (s3_zero)
      fp_val = {s3_effsub ? 1'b0 : s3_sign, 63'd0};
    else if (norm[63] && exp_pre >= 12'd2047)
      fp_val = {sign3, 11'h7FF, 52'd0};
    else
      fp_val = {sign3, packed_r};
  end

  // ---------------------------------------------------------------- results
  always_comb begin
    int_res.valid = (e1_cls == CLS_ALU) || (e1_cls == CLS_SHIFT);
    int_res.tag   = e1_tag;
    unique case (e1_op)
      OP_SLL, OP_SRL, OP_SRA:         int_res.val = bs_out;
      OP_AND, OP_OR, OP_XOR, OP_NOR:  int_res.val = lu_out;
      OP_SUB:                         int_res.val = sum_p1;
      default:                        int_res.val = sum;
    endcase
    fp_res.valid = e3_valid;
    fp_res.tag   = s3_tag;
    fp_res.val   = fp_val;
  end
endmodule
