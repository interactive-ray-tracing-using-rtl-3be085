// rc_multiplier: 16x16-bit signed parallel multiplier of the RC.
//
// Combinational, single cycle: the 32-bit two's-complement product of two
// 16-bit operands. Fixed-point scaling of the product is done afterwards by the
// shifter. Signed operands are this design's reading of the document's
// two's-complement fixed-point arithmetic.
module rc_multiplier (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);

  always_comb p = 32'($signed(a) * $signed(b));

endmodule
