// signal_mem: one input signal memory (MEM1-1, MEM1-2 or MEM1-3).
//
// Holds DEPTH samples of one input sequence as 16-bit Q10.6 words. The
// contents are fixed at build time through INIT (the processor's signals
// live inside the device, as in the published design); the default is the
// test pulse 6, 1, 9, 2, 8 at addresses 6..10. Read is combinational, a small
// LUT ROM; the control unit registers the word it reads. The three memories
// being independent, so that all three signals are read in the same cycle,
// follows the published architecture; the read timing is this design's own.
module signal_mem
  import dsp_pkg::*;
#(
  parameter int unsigned DEPTH_P = dsp_pkg::DEPTH,
  parameter word_t INIT [DEPTH_P] = '{
    16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0180, 16'h0040,
    16'h0240, 16'h0080, 16'h0200, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000}
) (
  input  logic [$clog2(DEPTH_P)-1:0] raddr,
  output word_t                      rdata
);

  assign rdata = INIT[raddr];

endmodule
