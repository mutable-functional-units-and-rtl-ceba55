// mfu_integration: the MFU side of a 4-wide out-of-order superscalar core
// (MIPS R10000 style) whose floating-point adder has been replaced by a
// mutable functional unit.
//
// A decode group of up to DW renamed instructions arrives each cycle. The
// steering stage (steering_logic), working beside renaming, marks which of
// them go to the MFU: every FP add/subtract, and, while there is no recent FP
// demand, a round-robin share of the integer instructions. Valid slots form a
// prefix of the group (slot 0 is the oldest). Dispatch is in order: when the
// other reservation stations can take instructions (`other_rs_ready`), the
// longest prefix of the group whose MFU-bound part fits in the free entries
// of the in-order MFU reservation station (mfu_rs) is dispatched
// (`dec_count` slots); the front end offers the rest again next cycle, and
// the steering counters advance over the dispatched slots only. MFU-bound
// instructions enter mfu_rs, the others leave through `to_other` towards
// the integer, address and FP reservation stations of the core, which are
// outside this block. The head of mfu_rs is issued to the MFU
// (mfu) when its operands are present and the MFU, after mutating if needed,
// accepts it. MFU results, integer or FP (at most one per cycle), go out on
// `mfu_result` as one result bus of the core's forwarding bus; mfu_rs listens
// to that bus and to the NFWD_EXT result buses of the other functional units
// (`fwd_ext`).
//
// Timing: dispatch in the cycle `dec_accept` is high; an instruction with
// ready operands can issue the cycle after it was written; integer results one
// cycle after issue, FP results three. The prefix dispatch rule, the single
// `other_rs_ready` for the other stations and the number of external result
// buses (ALU1, ALU2, LSU, FPU2) are choices of this design.
module mfu_integration
  import mfu_pkg::*;
#(
  parameter int unsigned DW       = 4,
  parameter int unsigned RS_DEPTH = 8,
  parameter int unsigned NFWD_EXT = 4,
  parameter int unsigned CFP_MAX  = 16,
  parameter int unsigned CFP_INC  = 4,
  parameter int unsigned N_CHUNK  = 4,
  parameter int unsigned RR_MULT  = 4,
  localparam int unsigned CW      = $clog2(RS_DEPTH + 1),
  localparam int unsigned CFP_W   = $clog2(CFP_MAX + 1),
  localparam int unsigned CRR_W   = $clog2(RR_MULT * N_CHUNK + 1) + 1,
  localparam int unsigned AW      = $clog2(DW + 1)
)(
  input  logic                    clk,
  input  logic                    rst_n,
  // decode/rename group
  input  logic [DW-1:0]           dec_valid,
  input  dispatch_slot_t          dec_slot [DW],
  input  logic                    other_rs_ready,
  output logic                    dec_accept,   // at least one slot dispatched
  output logic [AW-1:0]           dec_count,    // slots 0..dec_count-1 dispatched
  output logic [DW-1:0]           to_other,
  // forwarding bus
  input  fwd_t                    fwd_ext [NFWD_EXT],
  output fwd_t                    mfu_result,
  // status
  output logic [DW-1:0]           to_mfu,
  output logic                    rs_stall,
  output logic                    rs_full,
  output logic [CW-1:0]           rs_count,
  output logic                    mfu_issue,
  output mfu_mode_e               mode1,
  output mfu_mode_e               mode2,
  output logic                    reconf1,
  output logic                    reconf2,
  output logic                    mutation_stall,
  output logic [CFP_W-1:0]        cfp,
  output logic signed [CRR_W-1:0] crr
);
  logic [DW-1:0]  slot_fpadd, slot_mfu_int, enq_valid;
  mfu_instr_t     enq_instr [DW];
  logic [CW-1:0]  free_cnt;
  logic [DW-1:0]  take;
  fwd_t           fwd [NFWD_EXT + 1];
  logic           head_valid, head_ready;
  mfu_instr_t     head_instr;
  fwd_t           int_res, fp_res;

  always_comb begin
    for (int s = 0; s < DW; s++) begin
      slot_fpadd[s]   = dec_slot[s].is_fpadd;
      slot_mfu_int[s] = dec_slot[s].mfu_int;
      enq_instr[s]    = dec_slot[s].instr;
    end
  end

  steering_logic #(
    .DW (DW), .CFP_MAX (CFP_MAX), .CFP_INC (CFP_INC), .N_CHUNK (N_CHUNK), .RR_MULT (RR_MULT)
  ) u_steer (
    .clk, .rst_n,
    .slot_valid (dec_valid), .slot_fpadd, .slot_mfu_int,
    .adv_cnt (dec_count), .to_mfu, .cfp, .crr
  );

  // In-order prefix dispatch limited by the free MFU station entries.
  always_comb begin
    int unsigned used;
    logic        stop;
    used      = 0;
    stop      = !other_rs_ready;
    take      = '0;
    dec_count = '0;
    rs_stall  = 1'b0;
    for (int s = 0; s < DW; s++) begin
      if (dec_valid[s] && !stop) begin
        if (to_mfu[s] && used + 1 > int'(free_cnt)) begin
          stop     = 1'b1;
          rs_stall = 1'b1;
        end else begin
          take[s]   = 1'b1;
          used     += int'(to_mfu[s]);
          dec_count = AW'(s + 1);
        end
      end else begin
        stop = 1'b1;
      end
    end
    dec_accept = (take != '0);
    enq_valid  = take & to_mfu;
    to_other   = take & ~to_mfu;
  end

  always_comb begin
    fwd[0] = mfu_result;
    for (int k = 0; k < NFWD_EXT; k++) fwd[k + 1] = fwd_ext[k];
  end

  mfu_rs #(.DEPTH (RS_DEPTH), .ENQ_W (DW), .NFWD (NFWD_EXT + 1)) u_rs (
    .clk, .rst_n,
    .enq_valid, .enq_instr, .free_cnt, .count (rs_count), .full (rs_full),
    .fwd, .head_valid, .head_ready, .head_instr, .deq (mfu_issue)
  );

  mfu u_mfu (
    .clk, .rst_n,
    .in_valid (head_valid), .in_ready (head_ready), .in_instr (head_instr),
    .in_accept (mfu_issue), .int_res, .fp_res,
    .mode1, .mode2, .reconf1, .reconf2, .mutation_stall
  );

  assign mfu_result = int_res.valid ? int_res : fp_res;
endmodule
