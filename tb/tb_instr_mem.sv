// tb_instr_mem: checks the instruction memory. Reads back the default
// program (the 16-instruction test set) word by word.
module tb_instr_mem;
  import dsp_pkg::*;

  localparam logic [31:0] EXP [16] = '{
    32'h40678000, 32'hE0678000, 32'hD0678232, 32'h48678200,
    32'h4C678030, 32'h20678000, 32'h28678200, 32'h2C678102,
    32'h10678000, 32'h18678232, 32'h1C678002, 32'h08678200,
    32'h0C678232, 32'hF8678031, 32'hFC678032, 32'hD8678030};

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t a;
  instr_word_t d;

  instr_mem u_dut (.raddr(a), .rdata(d));

  initial begin
    for (int i = 15; i >= 0; i--) begin
      a = addr_t'(i);
      @(posedge clk);
      checks++;
      if (d !== EXP[i]) begin failures++; $display("FAIL [%0d] %h exp %h", i, d, EXP[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
