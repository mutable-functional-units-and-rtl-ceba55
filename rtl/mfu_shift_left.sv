// mfu_shift_left: the normalising left shifter of the MFU's pack stage.
//
// It shifts the 64-bit magnitude left by the 6-bit amount derived from the
// leading-one count, so that the leading one reaches bit 63 (or, for a
// denormal result, so that the exponent reaches its minimum). Combinational.
module mfu_shift_left (
  input  logic [63:0] din,
  input  logic [5:0]  amt,
  output logic [63:0] dout
);
  assign dout = din << amt;
endmodule
