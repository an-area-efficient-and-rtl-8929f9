// tb_result_mem: checks one result memory. Random writes (with the write
// enable sometimes low) against a model array, reading back a random address
// every cycle once it has been written.
module tb_result_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we;
  logic [3:0]  waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [16];
  bit          valid [16];

  result_mem u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    foreach (valid[i]) valid[i] = 0;
    repeat (400) begin
      @(negedge clk);
      raddr = 4'($urandom);
      #1;
      if (valid[raddr]) begin
        checks++;
        if (rdata !== model[raddr]) begin
          failures++; $display("FAIL read [%0d] %h exp %h", raddr, rdata, model[raddr]);
        end
      end
      we = ($urandom % 4) != 0;
      waddr = 4'($urandom);
      wdata = 16'($urandom);
      @(posedge clk);
      if (we) begin model[waddr] = wdata; valid[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
