// mfu_lop: leading-one position of the floating-point adder result, used to
// normalise it in the pack stage.
//
// The block sits in stage 2 and its count is registered into stage 3, as in
// the MFU datapath. This design computes the exact count of leading zeros of
// the 64-bit magnitude (64 when it is zero) rather than a prediction from the
// adder inputs, which removes the one-bit correction a predictor needs.
// Combinational.
module mfu_lop (
  input  logic [63:0] mag,
  output logic [6:0]  lz,     // number of leading zeros, 0..64
  output logic        zero    // mag == 0
);
  always_comb begin
    lz = 7'd64;
    for (int i = 0; i < 64; i++) begin
      if (mag[i]) lz = 7'(63 - i);
    end
    zero = (mag == 64'd0);
  end
endmodule
