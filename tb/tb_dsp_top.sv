// tb_dsp_top: end-to-end test of the DSP processor at its default
// parameters: the built-in 16-instruction test program (MUL, MAD, MAS, MRS,
// MLS, ADD, ARS, ALS, SUB, SRS, SLS, RS, LS, MAR, MAS, MSR) on the built-in
// test pulse signals.
// The testbench keeps its own copy of the program and the signals and
// predicts, from the reference model, every write the processor must make:
// one per sample in the execute cycle, 2*15 = 30 enabled cycles per
// instruction after a single fetch cycle (600 ns per instruction at 20 ns).
// enb is dropped at random to stall the machine. At the end it reads both
// result memories back and compares them with its own model, and it counts
// how often each mechanism occurred (every operation kind, right and left
// signal shifts, address wrap-around, stalls, results that write only the
// low word, negative results); one that never occurs is a failure.
module tb_dsp_top;
  import dsp_pkg::*;
  import dsp_ref_pkg::*;

  localparam int N      = 15;
  localparam int NINSTR = 16;

  localparam logic [31:0] PROG [16] = '{
    32'h40678000, 32'hE0678000, 32'hD0678232, 32'h48678200,
    32'h4C678030, 32'h20678000, 32'h28678200, 32'h2C678102,
    32'h10678000, 32'h18678232, 32'h1C678002, 32'h08678200,
    32'h0C678232, 32'hF8678031, 32'hFC678032, 32'hD8678030};
  // 6, 1, 9, 2, 8 in Q10.6 (value * 64)
  localparam logic [15:0] S1 [16] = '{0, 0, 0, 0, 0, 0, 384, 64, 576, 128, 512, 0, 0, 0, 0, 0};
  localparam logic [15:0] S3 [16] = '{0, 0, 0, 0, 0, 384, 64, 576, 128, 512, 0, 0, 0, 0, 0, 0};

  localparam int MUL_EXAMPLE [5] = '{6, 9, 18, 16, 0};

  logic clk = 0;
  always #10 clk = ~clk;   // 20 ns period
  int checks = 0, failures = 0;

  logic  rst, enb;
  word_t dout1, dout2, res_lsb, res_msb;
  addr_t addrw, res_raddr;
  logic  rw1, rw2;

  dsp_top u_dut (.clk, .rst, .enb, .dout1, .dout2, .addrw, .rw1, .rw2,
                 .res_raddr, .res_lsb, .res_msb);

  logic [15:0] m_lsb [16], m_msb [16];
  bit          v_lsb [16], v_msb [16];

  int ac;
  int n_mul = 0, n_mac = 0, n_msc = 0, n_add = 0, n_sub = 0, n_pass = 0;
  int n_right = 0, n_left = 0, n_wrap = 0, n_stall = 0, n_lsb_only = 0, n_neg = 0;
  int n_w1 = 0, n_w2 = 0, last_write_ac = -1;

  task automatic check_cycle();
    int idx, k, n, a1, a2, a3;
    bit w1, w2;
    logic [7:0]  op;
    logic [31:0] ins, r;
    logic [15:0] e1, e2, e3;
    checks++;
    if (ac < 1 || ((ac - 1) % 2) == 0 || !enb || (ac - 1) / (2 * N) >= NINSTR) begin
      if (rw1 || rw2) begin failures++; $display("FAIL write outside execute, ac=%0d", ac); end
      return;
    end
    idx = ac - 1;
    k = idx / (2 * N);
    n = (idx % (2 * N)) / 2;
    ins = PROG[k];
    op = ins[31:24];
    a1 = int'(ref_addr(op, int'(ins[23:20]), n, int'(ins[11:8])));
    a2 = int'(ref_addr(op, int'(ins[19:16]), n, int'(ins[7:4])));
    a3 = int'(ref_addr(op, int'(ins[15:12]), n, int'(ins[3:0])));
    e1 = S1[a1]; e2 = S1[a2]; e3 = S3[a3];
    r = ref_result(op, e1, e2, e3, w1, w2);
    if (rw1 !== w1 || rw2 !== w2 || addrw !== addr_t'(n) ||
        (w1 && dout1 !== r[15:0]) || (w2 && dout2 !== r[31:16])) begin
      failures++;
      if (failures < 10)
        $display("FAIL instr %0d (%h) n=%0d: rw=%b%b addrw=%0d dout=%h_%h exp %h",
                 k + 1, ins, n, rw2, rw1, addrw, dout2, dout1, r);
    end
    // Worked example: MUL S1(n),S2(n) with pointers 6 and 7 gives
    // 6*1, 1*9, 9*2, 2*8, 8*0 = 6, 9, 18, 16, 0 (Q20.12, value * 4096).
    if (k == 0 && n < 5) begin
      checks++;
      if ({dout2, dout1} !== MUL_EXAMPLE[n] * 4096) begin
        failures++; $display("FAIL MUL example n=%0d: %h", n, {dout2, dout1});
      end
    end
    if (w1) begin m_lsb[n] = r[15:0]; v_lsb[n] = 1; n_w1++; last_write_ac = ac; end
    if (w2) begin m_msb[n] = r[31:16]; v_msb[n] = 1; n_w2++; end
    if (w1 && !w2) n_lsb_only++;
    if (w1 && r[31]) n_neg++;
    if (op[3] && !op[2] && ins[11:8] != 0) n_right++;
    if (op[3] && op[2] && (ins[11:8] != 0 || ins[7:4] != 0)) n_left++;
    if (int'(ins[23:20]) + n >= 16) n_wrap++;
    if (n == 0) begin
      if (op[7] && op[5]) n_mac++;
      else if (op[7] && op[4]) n_msc++;
      else if (op[6]) n_mul++;
      else if (op[5]) n_add++;
      else if (op[4]) n_sub++;
      else if (op[3]) n_pass++;
    end
  endtask

  initial begin
    rst = 1; enb = 0; res_raddr = '0; ac = 0;
    foreach (v_lsb[i]) begin v_lsb[i] = 0; v_msb[i] = 0; end
    repeat (2) @(posedge clk);
    while (ac <= 2 * N * NINSTR) begin
      @(negedge clk);
      rst = 0;
      enb = ($urandom % 10) != 0;
      #1;
      if (!enb) n_stall++;
      check_cycle();
      @(posedge clk);
      if (enb) ac++;
    end
    @(negedge clk);
    enb = 0;
    // Instruction time: the last write of instruction 16 lands in enabled
    // cycle 1 + 16*30 - 1 = 480.
    checks++;
    if (last_write_ac != 2 * N * NINSTR) begin
      failures++; $display("FAIL last write at enabled cycle %0d, exp %0d", last_write_ac, 2 * N * NINSTR);
    end
    checks++;
    if (n_w1 != N * NINSTR || n_w2 != N * 8) begin
      failures++; $display("FAIL write counts %0d/%0d exp %0d/%0d", n_w1, n_w2, N * NINSTR, N * 8);
    end
    for (int i = 0; i < 16; i++) begin
      res_raddr = addr_t'(i);
      #1;
      if (v_lsb[i]) begin
        checks++;
        if (res_lsb !== m_lsb[i]) begin failures++; $display("FAIL MEM2-1[%0d] %h exp %h", i, res_lsb, m_lsb[i]); end
      end
      if (v_msb[i]) begin
        checks++;
        if (res_msb !== m_msb[i]) begin failures++; $display("FAIL MEM2-2[%0d] %h exp %h", i, res_msb, m_msb[i]); end
      end
    end
    $display("mul=%0d mac=%0d msc=%0d add=%0d sub=%0d shift_only=%0d right=%0d left=%0d wrap=%0d stall=%0d lsb_only=%0d negative=%0d",
             n_mul, n_mac, n_msc, n_add, n_sub, n_pass, n_right, n_left, n_wrap, n_stall, n_lsb_only, n_neg);
    checks++;
    if (n_mul == 0 || n_mac == 0 || n_msc == 0 || n_add == 0 || n_sub == 0 || n_pass == 0 ||
        n_right == 0 || n_left == 0 || n_wrap == 0 || n_stall == 0 || n_lsb_only == 0 || n_neg == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
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
