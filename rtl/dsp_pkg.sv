// dsp_pkg: types and constants shared by the DSP processor.
//
// Data words are 16-bit signed two's complement fixed-point numbers with six
// fractional bits (Q10.6, e.g. 13.75 = 0000001101.110000). A product carries
// twelve fractional bits in 32 bits and is stored as two 16-bit words.
//
// An instruction is 32 bits:
//   [31:24] opcode   [23:20] zero pointer of signal 1   [19:16] of signal 2
//   [15:12] of signal 3   [11:8] shift count of signal 1   [7:4] of signal 2
//   [3:0] shift count of signal 3
// Opcode bits: [7] compound operation, [6] multiply, [5] add, [4] subtract,
// [3] shift the signals in time, [2] 1 = left (x(n+s)), 0 = right (x(n-s)).
// Bits [1:0] carry no meaning in this design.
// The field layout and opcode bits follow the published instruction format;
// the Q10.6 signedness and the ALU operation encoding are this design's own.
package dsp_pkg;

  localparam int unsigned DATA_W  = 16;
  localparam int unsigned FRAC    = 6;
  localparam int unsigned ADDR_W  = 4;
  localparam int unsigned DEPTH   = 1 << ADDR_W;
  localparam int unsigned INSTR_W = 32;

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [INSTR_W-1:0] instr_word_t;

  typedef struct packed {
    logic compound;   // OP(7)
    logic mul;        // OP(6)
    logic add;        // OP(5)
    logic sub;        // OP(4)
    logic shift;      // OP(3)
    logic left;       // OP(2)
    logic [1:0] rsvd; // OP(1:0)
  } opcode_t;

  typedef struct packed {
    opcode_t op;
    addr_t   p1;
    addr_t   p2;
    addr_t   p3;
    addr_t   s1;
    addr_t   s2;
    addr_t   s3;
  } instr_t;

  // Operation handed from the decoder to the ALU.
  typedef enum logic [2:0] {
    ALU_NOP  = 3'd0,  // nothing written
    ALU_MUL  = 3'd1,  // t1*t2
    ALU_ADD  = 3'd2,  // t1+t2
    ALU_SUB  = 3'd3,  // t1-t2
    ALU_PASS = 3'd4,  // t1 (shift only)
    ALU_MAC  = 3'd5,  // t1*t2 + t3
    ALU_MSC  = 3'd6   // t1*t2 - t3
  } alu_op_t;

  // Shift selector op(3:2): 2'b10 right, 2'b11 left, otherwise no shift.
  typedef logic [1:0] sf_t;

endpackage
