// alu_mult: the multiplier of the ALU.
//
// Signed W x W multiply giving the full 2W-bit product. With Q10.6 operands
// the product is Q20.12. Combinational; the synthesis tool picks the
// multiplier structure. The published design names a multiplier and keeps
// the whole 32-bit result; the signed arithmetic is this design's own.
module alu_mult #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // Both operands are signed, so they are sign-extended to the 2W-bit
  // context before the multiply.
  assign p = $signed(a) * $signed(b);

endmodule
