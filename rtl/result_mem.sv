// result_mem: one half of the result memory (MEM2-1 for the low 16 bits of a
// result, MEM2-2 for the high 16 bits).
//
// A DEPTH_P x DATA_W_P RAM with one synchronous write port, driven by the
// control unit's addrw/rw/dout, and one combinational read port for reading
// results out. Splitting a 32-bit result over two 16-bit memories follows the
// published design; the read port and the absence of a clear on reset are this
// design's own choices.
module result_mem #(
  parameter int unsigned DATA_W_P = 16,
  parameter int unsigned DEPTH_P  = 16
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [$clog2(DEPTH_P)-1:0]  waddr,
  input  logic [DATA_W_P-1:0]         wdata,
  input  logic [$clog2(DEPTH_P)-1:0]  raddr,
  output logic [DATA_W_P-1:0]         rdata
);

  logic [DATA_W_P-1:0] mem [DEPTH_P];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
