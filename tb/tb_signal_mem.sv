// tb_signal_mem: checks the input signal memory. Reads every address of the
// default contents (the test pulse 6, 1, 9, 2, 8 in Q10.6 at addresses 6..10)
// and of an instance loaded with a random table.
module tb_signal_mem;
  import dsp_pkg::*;

  localparam word_t PULSE [16] = '{0, 0, 0, 0, 0, 0, 384, 64, 576, 128, 512, 0, 0, 0, 0, 0};

  function automatic word_t rnd_word(input int i);
    return word_t'((i * 40503 + 12345) ^ (i << 9));
  endfunction

  localparam word_t RND [16] = '{rnd_word(0), rnd_word(1), rnd_word(2), rnd_word(3),
    rnd_word(4), rnd_word(5), rnd_word(6), rnd_word(7), rnd_word(8), rnd_word(9),
    rnd_word(10), rnd_word(11), rnd_word(12), rnd_word(13), rnd_word(14), rnd_word(15)};

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t a;
  word_t d_def, d_rnd;

  signal_mem u_def (.raddr(a), .rdata(d_def));
  signal_mem #(.INIT(RND)) u_rnd (.raddr(a), .rdata(d_rnd));

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = addr_t'(i);
      @(posedge clk);
      checks += 2;
      if (d_def !== PULSE[i]) begin failures++; $display("FAIL default [%0d] %h exp %h", i, d_def, PULSE[i]); end
      if (d_rnd !== rnd_word(i)) begin failures++; $display("FAIL loaded [%0d] %h exp %h", i, d_rnd, rnd_word(i)); end
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
