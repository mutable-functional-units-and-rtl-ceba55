// mfu_barrel_shifter: the 64-bit barrel shifter of the MFU's first stage.
//
// It replaces the 53-bit alignment right shifter of the original FP adder.
// In integer mode it executes the shift instructions (left logical, right
// logical, right arithmetic) on operand B. In floating-point mode it aligns
// the significand of the operand with the smaller exponent by shifting it
// right; `sticky` is the OR of every bit shifted out, so that the later
// rounding sees them. Purely combinational; the shift amount is 6 bits wide,
// as the MFU datapath gives it. Providing the sticky output is a choice of
// this design (needed for IEEE round-to-nearest).
module mfu_barrel_shifter (
  input  logic [63:0] din,
  input  logic [5:0]  amt,
  input  logic        left,    // 1: shift left, 0: shift right
  input  logic        arith,   // right shift replicates bit 63
  output logic [63:0] dout,
  output logic        sticky   // right shift: some 1 bit was shifted out
);
  logic [63:0] lost_mask;

  always_comb begin
    if (left)       dout = din << amt;
    else if (arith) dout = $signed(din) >>> amt;
    else            dout = din >> amt;
    lost_mask = (64'd1 << amt) - 64'd1;
    sticky    = !left && ((din & lost_mask) != 64'd0);
  end
endmodule
