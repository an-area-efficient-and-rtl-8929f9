// tb_alu: checks the ALU for every operation with random Q10.6 operands
// against the reference model, plus hand-worked cases:
// 6.0*1.0 = 6.0, 6.0*1.0 + 9.0 = 15.0, 1.0 - 9.0 = -8.0.
module tb_alu;
  import dsp_pkg::*;
  import dsp_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  alu_op_t op;
  word_t   t1, t2, t3, t4, t5;

  alu u_dut (.op, .t1, .t2, .t3, .t4, .t5);

  // Opcode byte that selects each ALU operation.
  function automatic logic [7:0] opcode_of(input alu_op_t o);
    case (o)
      ALU_MUL:  return 8'h40;
      ALU_ADD:  return 8'h20;
      ALU_SUB:  return 8'h10;
      ALU_PASS: return 8'h08;
      ALU_MAC:  return 8'hE0;
      ALU_MSC:  return 8'hD0;
      default:  return 8'h00;
    endcase
  endfunction

  task automatic check(input alu_op_t o, input word_t a, input word_t b, input word_t c);
    logic [31:0] e;
    bit w1, w2;
    op = o; t1 = a; t2 = b; t3 = c;
    #1;
    e = ref_result(opcode_of(o), a, b, c, w1, w2);
    checks++;
    // Only the written words matter.
    if ((w1 && t4 !== e[15:0]) || (w2 && t5 !== e[31:16])) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h %h %h -> %h_%h exp %h", o.name(), a, b, c, t5, t4, e);
    end
  endtask

  initial begin
    op = ALU_MUL; t1 = 16'h0180; t2 = 16'h0040; t3 = 16'h0240; #1; checks++;
    if ({t5, t4} !== 32'h00006000) begin failures++; $display("FAIL 6*1 = %h", {t5, t4}); end
    op = ALU_MAC; #1; checks++;
    if ({t5, t4} !== 32'h0000F000) begin failures++; $display("FAIL 6*1+9 = %h", {t5, t4}); end
    op = ALU_SUB; t1 = 16'h0040; t2 = 16'h0240; #1; checks++;
    if (t4 !== 16'hFE00) begin failures++; $display("FAIL 1-9 = %h", t4); end
    for (int k = 0; k < 3000; k++) begin
      alu_op_t o;
      o = alu_op_t'(k % 7);
      check(o, 16'($urandom), 16'($urandom), 16'($urandom));
    end
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
