// tb_instr_decoder: checks the instruction decoder over all 256 opcodes with
// random pointer and shift fields: field extraction, shift selector, ALU
// operation and write enables, plus the named codes MUL, MAD,
// MAS, RS and MAR.
module tb_instr_decoder;
  import dsp_pkg::*;
  import dsp_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  instr_word_t instr;
  instr_t      fields;
  sf_t         sf;
  alu_op_t     alu_op;
  logic        we_lsb, we_msb;

  instr_decoder u_dut (.instr, .fields, .sf, .alu_op, .we_lsb, .we_msb);

  function automatic alu_op_t exp_op(input logic [7:0] op);
    if (op[7]) return op[5] ? ALU_MAC : (op[4] ? ALU_MSC : ALU_MUL);
    if (op[6]) return ALU_MUL;
    if (op[5]) return ALU_ADD;
    if (op[4]) return ALU_SUB;
    if (op[3]) return ALU_PASS;
    return ALU_NOP;
  endfunction

  task automatic check(input logic [31:0] w);
    bit w1, w2;
    logic [31:0] unused_r;
    instr = w;
    #1;
    unused_r = ref_result(w[31:24], 16'd0, 16'd0, 16'd0, w1, w2);
    checks++;
    if (alu_op !== exp_op(w[31:24]) || we_lsb !== w1 || we_msb !== w2 ||
        sf !== w[27:26] ||
        fields.p1 !== w[23:20] || fields.p2 !== w[19:16] || fields.p3 !== w[15:12] ||
        fields.s1 !== w[11:8] || fields.s2 !== w[7:4] || fields.s3 !== w[3:0]) begin
      failures++;
      if (failures < 10)
        $display("FAIL instr=%h op=%s we=%b%b sf=%b", w, alu_op.name(), we_msb, we_lsb, sf);
    end
  endtask

  initial begin
    for (int o = 0; o < 256; o++) check({8'(o), 24'($urandom)});
    // Named codes: MUL, MAD, MAS (multiply-subtract), RS, MAR
    check(32'h40678000); if (alu_op !== ALU_MUL)  begin failures++; $display("FAIL MUL"); end
    check(32'hE0678000); if (alu_op !== ALU_MAC)  begin failures++; $display("FAIL MAD"); end
    check(32'hD0678232); if (alu_op !== ALU_MSC || sf !== 2'b00) begin failures++; $display("FAIL MAS"); end
    check(32'h08678200); if (alu_op !== ALU_PASS || sf !== 2'b10 || we_msb) begin failures++; $display("FAIL RS"); end
    check(32'hF8678031); if (alu_op !== ALU_MAC || sf !== 2'b10) begin failures++; $display("FAIL MAR"); end
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
