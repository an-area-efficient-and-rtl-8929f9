// dsp_top: a small 16-bit fixed-point DSP processor for non-OS embedded use.
//
// Three input signals live in three independent memories (MEM1-1..3) so all
// three can be read in one cycle; 32-bit results go to two 16-bit result
// memories, MEM2-1 (low word) and MEM2-2 (high word). A separate instruction
// memory holds 32-bit instructions, each of which applies one operation
// (multiply, add, subtract, multiply-add, multiply-subtract or a plain time
// shift) over a whole signal, sample by sample, with each operand signal
// optionally delayed or advanced by its own shift count. The control unit
// (a Mealy FSM) fetches, decodes and sequences; the ALU computes.
// Ports: clk, rst (synchronous, active high), enb (runs the FSM); the write
// port of the result memories is brought out as dout1/dout2/addrw/rw1/rw2,
// and res_raddr/res_lsb/res_msb read the result memories back.
// Timing: 2*N_SAMPLES cycles per instruction (30 by default), plus one
// fetch cycle after reset.
// The memory organisation, instruction format, ports and instruction time
// follow the published design; the result read port is this design's
// addition.
module dsp_top
  import dsp_pkg::*;
#(
  parameter int unsigned N_SAMPLES = 15,
  parameter instr_word_t PROGRAM [DEPTH] = '{
    32'h40678000, 32'hE0678000, 32'hD0678232, 32'h48678200,
    32'h4C678030, 32'h20678000, 32'h28678200, 32'h2C678102,
    32'h10678000, 32'h18678232, 32'h1C678002, 32'h08678200,
    32'h0C678232, 32'hF8678031, 32'hFC678032, 32'hD8678030},
  // Test signals in Q10.6: a pulse 6, 1, 9, 2, 8 (0x180, 0x40, 0x240, 0x80,
  // 0x200) starting at address 6 in S1 and S2 and at address 5 in S3.
  parameter word_t S1_INIT [DEPTH] = '{
    16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0180, 16'h0040,
    16'h0240, 16'h0080, 16'h0200, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000},
  parameter word_t S2_INIT [DEPTH] = '{
    16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0180, 16'h0040,
    16'h0240, 16'h0080, 16'h0200, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000},
  parameter word_t S3_INIT [DEPTH] = '{
    16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0180, 16'h0040, 16'h0240,
    16'h0080, 16'h0200, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000}
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  enb,
  output word_t dout1,
  output word_t dout2,
  output addr_t addrw,
  output logic  rw1,
  output logic  rw2,
  input  addr_t res_raddr,
  output word_t res_lsb,
  output word_t res_msb
);

  addr_t       imem_addr;
  instr_word_t imem_data;
  addr_t       sig_addr [3];
  word_t       sig_data [3];
  alu_op_t     alu_op;
  word_t       t1, t2, t3, t4, t5;

  instr_mem #(.PROGRAM(PROGRAM)) u_imem (.raddr(imem_addr), .rdata(imem_data));

  signal_mem #(.INIT(S1_INIT)) u_mem1_1 (.raddr(sig_addr[0]), .rdata(sig_data[0]));
  signal_mem #(.INIT(S2_INIT)) u_mem1_2 (.raddr(sig_addr[1]), .rdata(sig_data[1]));
  signal_mem #(.INIT(S3_INIT)) u_mem1_3 (.raddr(sig_addr[2]), .rdata(sig_data[2]));

  control_unit #(.N_SAMPLES(N_SAMPLES)) u_cu (
    .clk, .rst, .enb,
    .imem_addr, .imem_data,
    .sig_addr, .sig_data,
    .alu_op, .t1, .t2, .t3, .t4, .t5,
    .dout1, .dout2, .addrw, .rw1, .rw2
  );

  alu u_alu (.op(alu_op), .t1, .t2, .t3, .t4, .t5);

  result_mem #(.DATA_W_P(DATA_W), .DEPTH_P(DEPTH)) u_mem2_1 (
    .clk, .we(rw1), .waddr(addrw), .wdata(dout1), .raddr(res_raddr), .rdata(res_lsb));
  result_mem #(.DATA_W_P(DATA_W), .DEPTH_P(DEPTH)) u_mem2_2 (
    .clk, .we(rw2), .waddr(addrw), .wdata(dout2), .raddr(res_raddr), .rdata(res_msb));

endmodule
