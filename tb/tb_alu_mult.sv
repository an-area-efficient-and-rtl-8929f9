// tb_alu_mult: checks the signed 16x16 multiplier against integer
// multiplication, including the extreme operands and the Q10.6 example
// 13.75 * 2.0 = 27.5 (Q20.12).
module tb_alu_mult;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a, b;
  logic [31:0] p;

  alu_mult u_dut (.a, .b, .p);

  task automatic check(input logic [15:0] x, input logic [15:0] z);
    logic [31:0] e;
    a = x; b = z;
    #1;
    e = 32'(int'($signed(x)) * int'($signed(z)));
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h exp %h", x, z, p, e);
    end
  endtask

  initial begin
    check(16'h8000, 16'h8000); check(16'h8000, 16'h7FFF); check(16'hFFFF, 16'hFFFF);
    check(16'h7FFF, 16'h7FFF); check(0, 16'h1234);
    // 13.75 = 0000001101.110000, times 2.0 = 0x0080 -> 27.5 in Q20.12 = 0x1B800
    a = 16'h0370; b = 16'h0080; #1; checks++;
    if (p !== 32'h0001B800) begin failures++; $display("FAIL 13.75*2 = %h", p); end
    repeat (2000) check(16'($urandom), 16'($urandom));
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
