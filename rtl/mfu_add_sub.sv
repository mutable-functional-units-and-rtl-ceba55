// mfu_add_sub: the ADD/SUB block of the MFU's second stage, widened from the
// 54 bits of the original FP adder to 64 bits.
//
// It adds x and y, or x and the ones' complement of y when `sub` is set, and
// produces both `sum` (x + y') and `sum_p1` (x + y' + 1) together with the
// carry out `cy` of `sum`. Integer add uses `sum`, integer subtract uses
// `sum_p1` (two's complement). A floating-point effective subtraction uses the
// ones' complement scheme: if `cy` is set, x > y and the magnitude is `sum_p1`,
// otherwise the magnitude is ~`sum` and the result changes sign; the stage-3
// "sel 1comp" block makes that choice. Combinational.
module mfu_add_sub (
  input  logic [63:0] x,
  input  logic [63:0] y,
  input  logic        sub,
  output logic [63:0] sum,
  output logic [63:0] sum_p1,
  output logic        cy
);
  logic [63:0] y_eff;
  logic [64:0] s0;

  always_comb begin
    y_eff  = sub ? ~y : y;
    s0     = {1'b0, x} + {1'b0, y_eff};
    sum    = s0[63:0];
    sum_p1 = x + y_eff + 64'd1;
    cy     = s0[64];
  end
endmodule
