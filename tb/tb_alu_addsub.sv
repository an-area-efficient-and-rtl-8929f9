// tb_alu_addsub: checks the adder-subtractor with random and corner operands
// against integer addition and subtraction modulo 2**32.
module tb_alu_addsub;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] a, b, y;
  logic        sub;

  alu_addsub u_dut (.a, .b, .sub, .y);

  task automatic check(input logic [31:0] x, input logic [31:0] z, input logic s);
    logic [31:0] e;
    a = x; b = z; sub = s;
    #1;
    e = s ? 32'(longint'(x) - longint'(z)) : 32'(longint'(x) + longint'(z));
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h = %h exp %h", x, s ? "-" : "+", z, y, e);
    end
  endtask

  initial begin
    check(0, 0, 0); check(0, 0, 1); check(32'hFFFFFFFF, 1, 0); check(0, 1, 1);
    check(32'h80000000, 1, 1); check(32'h7FFFFFFF, 1, 0);
    repeat (2000) check($urandom, $urandom, 1'($urandom));
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
