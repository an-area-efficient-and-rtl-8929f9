// signal_shifter: time shift of an input signal, done on its read address.
//
// Sample n of a signal whose zero sample sits at address base is read at
// base + n. Shifted right by s it becomes x(n-s), read at base + n - s;
// shifted left it becomes x(n+s), read at base + n + s. The selector sf is
// opcode bits 3:2: 2'b10 right, 2'b11 left, anything else no shift.
// Combinational; addresses wrap modulo 2**ADDR_W (circular buffer).
// Shift counts, direction bits and the meaning x(n-s)/x(n+s) follow the
// published instruction set; doing the shift on the address path and the
// wrap-around are this design's own.
module signal_shifter #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic [ADDR_W-1:0] base,
  input  logic [ADDR_W-1:0] n,
  input  logic [ADDR_W-1:0] shamt,
  input  logic [1:0]        sf,
  output logic [ADDR_W-1:0] addr
);

  logic [ADDR_W-1:0] origin;

  always_comb begin
    origin = base + n;
    unique case (sf)
      2'b10:   addr = origin - shamt;
      2'b11:   addr = origin + shamt;
      default: addr = origin;
    endcase
  end

endmodule
