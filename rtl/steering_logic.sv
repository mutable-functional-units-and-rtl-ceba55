// steering_logic: the instruction steering stage that chooses which decoded
// instructions go to the MFU's reservation station. It works beside register
// renaming, on the up to DW instructions of one decode group, in program
// order, with two small counters:
//   cfp  saturating counter of recent FP-add demand. Each FP add or subtract
//        goes to the MFU and raises cfp by CFP_INC, saturating at CFP_MAX;
//        every other instruction lowers it by one, stopping at zero.
//   crr  round-robin counter. Only when cfp is zero are integer instructions
//        shared with the MFU: each one the MFU can execute increments crr;
//        when crr reaches N_CHUNK it is reduced by RR_MULT*N_CHUNK; the
//        instruction goes to the MFU if crr >= 0 and to the integer
//        reservation station otherwise. With the default values the MFU gets
//        runs of 4 consecutive integer instructions out of every 16.
// The decisions are combinational (`to_mfu`); the counters move to the state
// reached after the first `adv_cnt` slots, the ones actually dispatched this
// cycle (the rest of the group is offered again next cycle).
// The algorithm and the values cfp_max = 16, cfp_increment = 4 and n = 4
// follow the steering algorithm; the factor 4 in crr = crr - 4*n is taken as
// printed. Counting crr only for instructions the MFU can execute (memory,
// multiply, branch and other instructions keep their usual path) is this
// design's reading.
module steering_logic #(
  parameter int unsigned DW      = 4,
  parameter int unsigned CFP_MAX = 16,
  parameter int unsigned CFP_INC = 4,
  parameter int unsigned N_CHUNK = 4,
  parameter int unsigned RR_MULT = 4,
  localparam int unsigned CFP_W  = $clog2(CFP_MAX + 1),
  localparam int unsigned CRR_W  = $clog2(RR_MULT * N_CHUNK + 1) + 1,
  localparam int unsigned AW     = $clog2(DW + 1)
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [DW-1:0]           slot_valid,
  input  logic [DW-1:0]           slot_fpadd,    // FP add/subtract
  input  logic [DW-1:0]           slot_mfu_int,  // integer op the MFU can execute
  input  logic [AW-1:0]           adv_cnt,       // slots dispatched this cycle
  output logic [DW-1:0]           to_mfu,
  output logic [CFP_W-1:0]        cfp,
  output logic signed [CRR_W-1:0] crr
);
  logic [CFP_W-1:0]        cfp_n, cfp_after [DW];
  logic signed [CRR_W-1:0] crr_n, crr_after [DW];

  // Decisions and the counter values after each slot.
  always_comb begin
    int c, r;
    c = int'(cfp);
    r = int'(crr);
    to_mfu = '0;
    for (int s = 0; s < DW; s++) begin
      if (slot_valid[s]) begin
        if (slot_fpadd[s]) begin
          to_mfu[s] = 1'b1;
          c = (c + int'(CFP_INC) > int'(CFP_MAX)) ? int'(CFP_MAX) : c + int'(CFP_INC);
        end else begin
          c = (c > 0) ? c - 1 : 0;
          if (c == 0 && slot_mfu_int[s]) begin
            r = r + 1;
            if (r >= int'(N_CHUNK)) r = r - int'(RR_MULT * N_CHUNK);
            to_mfu[s] = (r >= 0);
          end
        end
      end
      cfp_after[s] = CFP_W'(c);
      crr_after[s] = CRR_W'(r);
    end
  end

  // State after the dispatched slots.
  always_comb begin
    cfp_n = cfp;
    crr_n = crr;
    for (int s = 0; s < DW; s++)
      if (s + 1 == int'(adv_cnt)) begin
        cfp_n = cfp_after[s];
        crr_n = crr_after[s];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfp <= '0;
      crr <= '0;
    end else begin
      cfp <= cfp_n;
      crr <= crr_n;
    end
  end
endmodule
