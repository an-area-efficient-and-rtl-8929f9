// instr_mem: instruction memory of the DSP processor.
//
// DEPTH_P 32-bit instructions, fixed at build time through PROGRAM and read
// combinationally at the program counter. The default program is the
// published 16-instruction test set: MUL, MAD, MAS, MRS, MLS, ADD, ARS, ALS,
// SUB, SRS, SLS, RS, LS, MAR, MAS and MSR, all working on signals whose zero
// pointers are 6, 7 and 8. A memory separate from the data memories follows
// the published architecture; the depth of 16 words is this design's choice.
module instr_mem
  import dsp_pkg::*;
#(
  parameter int unsigned DEPTH_P = dsp_pkg::DEPTH,
  parameter instr_word_t PROGRAM [DEPTH_P] = '{
    32'h40678000,   // MUL S1(n),S2(n)
    32'hE0678000,   // MAD S1(n),S2(n),S3(n)
    32'hD0678232,   // MAS S1(n),S2(n),S3(n)   multiply then subtract
    32'h48678200,   // MRS S1(n-2),S2(n)
    32'h4C678030,   // MLS S1(n),S2(n+3)
    32'h20678000,   // ADD S1(n),S2(n)
    32'h28678200,   // ARS S1(n-2),S2(n)
    32'h2C678102,   // ALS S1(n+1),S2(n)
    32'h10678000,   // SUB S1(n),S2(n)
    32'h18678232,   // SRS S1(n-2),S2(n-3)
    32'h1C678002,   // SLS S1(n),S2(n)
    32'h08678200,   // RS  S1(n-2)
    32'h0C678232,   // LS  S1(n+2),S2(n+3),S3(n+2)
    32'hF8678031,   // MAR S1(n),S2(n-3),S3(n-1)
    32'hFC678032,   // MAS S1(n),S2(n+3),S3(n+2) multiply then add
    32'hD8678030}   // MSR S1(n),S2(n-3),S3(n)
) (
  input  logic [$clog2(DEPTH_P)-1:0] raddr,
  output instr_word_t                rdata
);

  assign rdata = PROGRAM[raddr];

endmodule
