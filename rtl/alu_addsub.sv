// alu_addsub: the adder-subtractor of the ALU.
//
// y = a + b when sub is 0, y = a - b when sub is 1, done as one adder with b
// inverted and a carry in of 1 for subtraction. W-bit two's complement,
// wrapping on overflow. Combinational. The published design names this unit;
// its structure is this design's own.
module alu_addsub #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);

  assign y = a + (b ^ {W{sub}}) + W'(sub);

endmodule
