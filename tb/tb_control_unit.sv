// tb_control_unit: checks the control unit on its own. The testbench plays
// the instruction memory (a random program), the three signal memories
// (random words) and a stand-in ALU (t4 = t1^t2^t3, t5 = t1+t2). Every
// cycle it predicts from the count of enabled cycles since reset where the
// FSM must be: one fetch cycle, then per instruction N_SAMPLES read/execute
// pairs, so 2*N_SAMPLES = 30 cycles per instruction. In each execute cycle
// it checks addrw, the registered samples t1..t3 (read at the shifted
// addresses), the ALU operation, dout1/dout2 and the write strobes; in all
// other cycles, and whenever enb is low, it checks that nothing is written.
// enb is dropped at random and reset is applied once mid-run.
module tb_control_unit;
  import dsp_pkg::*;
  import dsp_ref_pkg::*;

  localparam int N = 15;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, enb;
  addr_t       imem_addr;
  instr_word_t imem_data;
  addr_t       sig_addr [3];
  word_t       sig_data [3];
  alu_op_t     alu_op;
  word_t       t1, t2, t3, t4, t5;
  word_t       dout1, dout2;
  addr_t       addrw;
  logic        rw1, rw2;

  instr_word_t prog [16];
  word_t       sig  [3][16];

  assign imem_data = prog[imem_addr];
  always_comb for (int i = 0; i < 3; i++) sig_data[i] = sig[i][sig_addr[i]];
  assign t4 = t1 ^ t2 ^ t3;
  assign t5 = t1 + t2;

  control_unit #(.N_SAMPLES(N)) u_dut (
    .clk, .rst, .enb, .imem_addr, .imem_data, .sig_addr, .sig_data,
    .alu_op, .t1, .t2, .t3, .t4, .t5, .dout1, .dout2, .addrw, .rw1, .rw2);

  function automatic alu_op_t exp_op(input logic [7:0] op);
    if (op[7]) return op[5] ? ALU_MAC : (op[4] ? ALU_MSC : ALU_MUL);
    if (op[6]) return ALU_MUL;
    if (op[5]) return ALU_ADD;
    if (op[4]) return ALU_SUB;
    if (op[3]) return ALU_PASS;
    return ALU_NOP;
  endfunction

  int ac;          // enabled cycles since reset
  int stalls = 0, resets = 0, writes = 0;

  task automatic check_cycle();
    int idx, k, n;
    bit exec_cycle, w1, w2;
    logic [31:0] ins, unused_r;
    word_t e1, e2, e3;
    exec_cycle = 0;
    if (ac >= 1) begin
      idx = ac - 1;
      k = idx / (2 * N);
      n = (idx % (2 * N)) / 2;
      exec_cycle = (idx % 2) == 1;
    end
    checks++;
    if (!exec_cycle || !enb || rst) begin
      if (rw1 || rw2) begin failures++; $display("FAIL write outside execute, ac=%0d", ac); end
      return;
    end
    ins = prog[k % 16];
    e1 = sig[0][ref_addr(ins[31:24], int'(ins[23:20]), n, int'(ins[11:8]))];
    e2 = sig[1][ref_addr(ins[31:24], int'(ins[19:16]), n, int'(ins[7:4]))];
    e3 = sig[2][ref_addr(ins[31:24], int'(ins[15:12]), n, int'(ins[3:0]))];
    unused_r = ref_result(ins[31:24], e1, e2, e3, w1, w2);
    if (rw1) writes++;
    if (addrw !== addr_t'(n) || t1 !== e1 || t2 !== e2 || t3 !== e3 ||
        alu_op !== exp_op(ins[31:24]) || rw1 !== w1 || rw2 !== w2 ||
        dout1 !== (e1 ^ e2 ^ e3) || dout2 !== word_t'(e1 + e2)) begin
      failures++;
      if (failures < 10)
        $display("FAIL instr %0d (%h) n=%0d: addrw=%0d t=%h %h %h op=%s rw=%b%b",
                 k, ins, n, addrw, t1, t2, t3, alu_op.name(), rw2, rw1);
    end
  endtask

  initial begin
    foreach (prog[i]) prog[i] = $urandom;
    prog[3] = 32'h00000000;  // a no-op
    prog[4] = 32'hFCF0F0F3;  // wraps past the end of memory
    foreach (sig[i, j]) sig[i][j] = 16'($urandom);
    rst = 1; enb = 0; ac = 0;
    repeat (2) @(posedge clk);
    for (int cyc = 0; cyc < 1400; cyc++) begin
      @(negedge clk);
      rst = (cyc == 700);
      enb = ($urandom % 8) != 0;
      #1;
      if (!enb) stalls++;
      if (rst) resets++;
      check_cycle();
      @(posedge clk);
      if (rst) ac = 0;
      else if (enb) ac++;
    end
    if (stalls == 0 || resets == 0 || writes == 0) begin
      failures++; $display("FAIL mechanism not exercised");
    end
    $display("stalls=%0d resets=%0d writes=%0d", stalls, resets, writes);
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
