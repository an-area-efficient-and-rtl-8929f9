// instr_decoder: instruction decode of the control unit.
//
// Splits a 32-bit instruction into its fields (three zero pointers, three
// shift counts, the shift selector op(3:2)) and turns the 8-bit opcode into
// the ALU operation and the two write enables. Combinational.
//   compound (op7=1): multiply t1*t2, then add t3 if op5, else subtract t3 if
//                     op4, else keep the product
//   single   (op7=0): multiply if op6, else add if op5, else subtract if op4,
//                     else pass signal 1 if op3 (shift only), else no operation
// The low word (rw1) is written for every operation but the no-op, the high
// word (rw2) only when a multiply is involved. The bit meanings follow the
// published opcode table; the priorities (addition over subtraction in a
// compound instruction, as its F8/FC codes mean addition) and what a
// shift-only instruction writes are this design's own reading.
module instr_decoder
  import dsp_pkg::*;
(
  input  instr_word_t instr,
  output instr_t      fields,
  output sf_t         sf,
  output alu_op_t     alu_op,
  output logic        we_lsb,
  output logic        we_msb
);

  opcode_t op;

  assign fields = instr_t'(instr);
  assign op     = fields.op;
  // Shift selector as op(3:2).
  assign sf     = {op.shift, op.left};

  always_comb begin
    if (op.compound) begin
      if (op.add)      alu_op = ALU_MAC;
      else if (op.sub) alu_op = ALU_MSC;
      else             alu_op = ALU_MUL;
    end else if (op.mul)   alu_op = ALU_MUL;
    else if (op.add)       alu_op = ALU_ADD;
    else if (op.sub)       alu_op = ALU_SUB;
    else if (op.shift)     alu_op = ALU_PASS;
    else                   alu_op = ALU_NOP;
  end

  assign we_lsb = (alu_op != ALU_NOP);
  assign we_msb = (alu_op == ALU_MUL) || (alu_op == ALU_MAC) || (alu_op == ALU_MSC);

endmodule
