// alu: arithmetic unit of the DSP processor.
//
// Works on the three samples t1, t2, t3 read at the (shifted) addresses of
// signals 1..3 and returns a 32-bit result as t5 (high word) and t4 (low
// word). Multiply keeps the full Q20.12 product; for multiply-add and
// multiply-subtract t3 is sign-extended and moved left by FRAC bits so its
// binary point lines up with the product's. Add, subtract and pass keep the
// Q10.6 format, sign-extended to 32 bits. Combinational.
// It is built from the multiplier and the adder-subtractor, two of the three
// units the published ALU names (the third, the shifter, acts on the read
// addresses, see signal_shifter). The binary-point alignment is this design's
// own choice.
module alu
  import dsp_pkg::*;
#(
  parameter int unsigned FRAC_P = dsp_pkg::FRAC
) (
  input  alu_op_t op,
  input  word_t   t1,
  input  word_t   t2,
  input  word_t   t3,
  output word_t   t4,
  output word_t   t5
);

  localparam int unsigned RW = 2 * DATA_W;

  logic [RW-1:0] prod;
  logic [RW-1:0] add_a, add_b, sum;
  logic          do_sub;
  logic [RW-1:0] t1_x, t2_x, t3_aligned;
  logic [RW-1:0] result;

  alu_mult #(.W(DATA_W)) u_mult (.a(t1), .b(t2), .p(prod));

  assign t1_x       = RW'($signed(t1));
  assign t2_x       = RW'($signed(t2));
  assign t3_aligned = RW'($signed(t3)) << FRAC_P;

  always_comb begin
    unique case (op)
      ALU_MAC: begin add_a = prod; add_b = t3_aligned; do_sub = 1'b0; end
      ALU_MSC: begin add_a = prod; add_b = t3_aligned; do_sub = 1'b1; end
      ALU_SUB: begin add_a = t1_x; add_b = t2_x;       do_sub = 1'b1; end
      default: begin add_a = t1_x; add_b = t2_x;       do_sub = 1'b0; end
    endcase
  end

  alu_addsub #(.W(RW)) u_addsub (.a(add_a), .b(add_b), .sub(do_sub), .y(sum));

  always_comb begin
    unique case (op)
      ALU_MUL:                   result = prod;
      ALU_ADD, ALU_SUB,
      ALU_MAC, ALU_MSC:          result = sum;
      ALU_PASS:                  result = t1_x;
      default:                   result = '0;
    endcase
  end

  assign t4 = result[DATA_W-1:0];
  assign t5 = result[RW-1:DATA_W];

endmodule
