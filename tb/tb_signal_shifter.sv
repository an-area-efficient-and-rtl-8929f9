// tb_signal_shifter: checks the address shifter exhaustively over base, n,
// shift count and the four values of the shift selector against the
// reference x(n-s) / x(n+s) addressing.
module tb_signal_shifter;
  import dsp_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] base, n, shamt, addr;
  logic [1:0] sf;

  signal_shifter u_dut (.base, .n, .shamt, .sf, .addr);

  initial begin
    for (int f = 0; f < 4; f++)
      for (int b = 0; b < 16; b++)
        for (int i = 0; i < 16; i++)
          for (int s = 0; s < 16; s++) begin
            logic [3:0] e;
            logic [7:0] op;
            base = 4'(b); n = 4'(i); shamt = 4'(s); sf = 2'(f);
            #1;
            op = {4'b0, sf, 2'b00};
            e = ref_addr(op, b, i, s);
            checks++;
            if (addr !== e) begin
              failures++;
              if (failures < 10) $display("FAIL sf=%b base=%0d n=%0d s=%0d addr=%0d exp %0d", sf, b, i, s, addr, e);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
