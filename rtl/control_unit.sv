// control_unit: the processor's control unit, a Mealy state machine.
//
// For each instruction the unit steps the sample index n from 0 to
// N_SAMPLES-1. For every n it spends two cycles:
//   READ  the three signal addresses (zero pointer + n, shifted by the
//         instruction's counts) go to MEM1-1..3; the samples are registered
//         as t1, t2, t3.
//   EXEC  the ALU works on t1..t3; its result goes out on dout1 (low word)
//         and dout2 (high word) with addrw = n, and rw1/rw2 strobe the two
//         result memories. The strobes are Mealy outputs: they need enb.
// In the EXEC cycle of the last sample the next instruction is loaded into
// the instruction register (Tinst) and the program counter (Ck1) advances,
// so in steady state one instruction takes 2*N_SAMPLES cycles; with the
// default 15 samples that is 30 cycles, 600 ns at a 20 ns clock. After reset
// one FETCH cycle loads the first instruction. The program counter wraps
// after the last instruction address.
// rst (synchronous, active high) returns to FETCH at address 0; enb low
// freezes every register and suppresses the write strobes.
// The Mealy machine, the enable, the 600 ns instruction time and the signal
// names follow the published design; the state split, the number of samples
// per instruction and the overlap of fetch with the last write are this
// design's own.
module control_unit
  import dsp_pkg::*;
#(
  parameter int unsigned N_SAMPLES = 15
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enb,
  // instruction memory
  output addr_t       imem_addr,
  input  instr_word_t imem_data,
  // input signal memories MEM1-1..3
  output addr_t       sig_addr [3],
  input  word_t       sig_data [3],
  // ALU
  output alu_op_t     alu_op,
  output word_t       t1,
  output word_t       t2,
  output word_t       t3,
  input  word_t       t4,
  input  word_t       t5,
  // result memories MEM2-1/MEM2-2
  output word_t       dout1,
  output word_t       dout2,
  output addr_t       addrw,
  output logic        rw1,
  output logic        rw2
);

  typedef enum logic [1:0] {
    ST_FETCH = 2'd0,
    ST_READ  = 2'd1,
    ST_EXEC  = 2'd2
  } cu_state_t;

  cu_state_t   curstat, nextstat;
  addr_t       ck1;        // program counter
  addr_t       n;          // sample index
  instr_word_t tinst;      // instruction register

  instr_t  fields;
  sf_t     sf;
  logic    we_lsb, we_msb;
  logic    last_sample;

  instr_decoder u_dec (
    .instr (tinst),
    .fields(fields),
    .sf    (sf),
    .alu_op(alu_op),
    .we_lsb(we_lsb),
    .we_msb(we_msb)
  );

  signal_shifter #(.ADDR_W(ADDR_W)) u_sh1 (
    .base(fields.p1), .n(n), .shamt(fields.s1), .sf(sf), .addr(sig_addr[0]));
  signal_shifter #(.ADDR_W(ADDR_W)) u_sh2 (
    .base(fields.p2), .n(n), .shamt(fields.s2), .sf(sf), .addr(sig_addr[1]));
  signal_shifter #(.ADDR_W(ADDR_W)) u_sh3 (
    .base(fields.p3), .n(n), .shamt(fields.s3), .sf(sf), .addr(sig_addr[2]));

  assign last_sample = (n == addr_t'(N_SAMPLES - 1));

  // The instruction memory is addressed at Ck1 in FETCH and at the next
  // address while the last sample of the current instruction executes.
  assign imem_addr = (curstat == ST_FETCH) ? ck1 : ck1 + 1'b1;

  always_comb begin
    unique case (curstat)
      ST_FETCH: nextstat = ST_READ;
      ST_READ:  nextstat = ST_EXEC;
      ST_EXEC:  nextstat = ST_READ;
      default:  nextstat = ST_FETCH;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      curstat <= ST_FETCH;
      ck1     <= '0;
      n       <= '0;
      tinst   <= '0;
      t1      <= '0;
      t2      <= '0;
      t3      <= '0;
    end else if (enb) begin
      curstat <= nextstat;
      unique case (curstat)
        ST_FETCH: begin
          tinst <= imem_data;
          n     <= '0;
        end
        ST_READ: begin
          t1 <= sig_data[0];
          t2 <= sig_data[1];
          t3 <= sig_data[2];
        end
        ST_EXEC: begin
          if (last_sample) begin
            n     <= '0;
            ck1   <= ck1 + 1'b1;
            tinst <= imem_data;
          end else begin
            n <= n + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  // Mealy write-back outputs.
  assign dout1 = t4;
  assign dout2 = t5;
  assign addrw = n;
  assign rw1   = enb && (curstat == ST_EXEC) && we_lsb;
  assign rw2   = enb && (curstat == ST_EXEC) && we_msb;

  // N_SAMPLES must fit the 4-bit result address.
  initial assert (N_SAMPLES >= 1 && N_SAMPLES <= DEPTH)
    else $error("control_unit: N_SAMPLES out of range");

endmodule
