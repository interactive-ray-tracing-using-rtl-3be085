// rc_shifter: 32-bit combinational shifter that follows the ALU.
//
// It provides the "scaling" of fixed-point results: after a 16x16 multiply the
// 32-bit product is shifted right so that the wanted integer/fraction bits land
// in the low 16 bits written back to a register. Direction 0 shifts left
// (zeros in), direction 1 shifts right arithmetically (sign in); amount 0..31.
// The document gives a 32-bit combinational shifter and a multiple-bit shift
// instruction; the arithmetic right shift is this design's choice.
module rc_shifter (
  input  logic [31:0] d,
  input  logic        dir,
  input  logic [4:0]  amt,
  output logic [31:0] q
);

  always_comb begin
    if (dir) q = 32'($signed(d) >>> amt);
    else     q = d << amt;
  end

endmodule
