// dsp_ref_pkg: reference model of the DSP processor for the testbenches.
//
// Written from the instruction-set description, in plain integer arithmetic,
// without using any design module: the address of a shifted sample and the
// 32-bit result and write enables of one operation on three Q10.6 samples.
package dsp_ref_pkg;

  // Address of sample n of a signal with zero pointer base and shift count s.
  function automatic logic [3:0] ref_addr(input logic [7:0] op, input int base,
                                          input int n, input int s);
    int a;
    a = base + n;
    if (op[3]) a = op[2] ? a + s : a - s;
    return 4'(a & 15);
  endfunction

  // Result of one operation; w1/w2 tell whether the low/high word is written.
  function automatic logic [31:0] ref_result(input logic [7:0] op,
                                             input logic [15:0] t1,
                                             input logic [15:0] t2,
                                             input logic [15:0] t3,
                                             output bit w1, output bit w2);
    longint a, b, c, p, r;
    a = longint'($signed(t1));
    b = longint'($signed(t2));
    c = longint'($signed(t3));
    p = a * b;
    w1 = 1; w2 = 0; r = 0;
    if (op[7]) begin
      w2 = 1;
      if (op[5])      r = p + c * 64;
      else if (op[4]) r = p - c * 64;
      else            r = p;
    end else if (op[6]) begin
      w2 = 1; r = p;
    end else if (op[5]) r = a + b;
    else if (op[4])     r = a - b;
    else if (op[3])     r = a;
    else begin
      w1 = 0; r = 0;
    end
    return 32'(r);
  endfunction

endpackage
