// tb_ofdm_rx: feeds the OFDM demodulator a frame built by a floating-point
// model (random bits, conjugate-symmetric QPSK spectrum, scaled IDFT,
// cyclic prefix, rounded to integers, plus a little random noise) and
// checks every recovered word.  Two frames are sent, the second with gaps
// in the sample stream.
module tb_ofdm_rx;
  import wban_pkg::*;
  import tb_ref_pkg::*;
  localparam int NSYM = 4, N = 64, G = 2;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, in_valid = 0, in_first = 0, word_valid;
  logic [15:0] word;
  cplx_t in;
  logic [63:0] bits [NSYM];
  int nw;

  ofdm_rx dut (.clk, .rst_n, .start, .nsym(16'(NSYM)), .busy, .done, .in_valid, .in,
               .in_first, .word_valid, .word);

  always @(posedge clk) if (rst_n && word_valid) begin
    checks++;
    if (nw >= NSYM * 4 || word !== bits[nw/4][16*(nw%4) +: 16]) begin
      failures++;
      $display("FAIL word %0d: got %h", nw, word);
    end
    nw++;
  end

  task automatic run_frame(input bit gaps);
    real r, i;
    nw = 0;
    for (int s = 0; s < NSYM; s++) bits[s] = {$urandom, $urandom};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (5) @(negedge clk);
    for (int s = 0; s < NSYM; s++)
      for (int t = 0; t < N + G; t++) begin
        ref_sample(bits[s], N, (t < G) ? N - G + t : t - G, 1.0, r, i);
        while (gaps && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_first = (s == 0 && t == 0);
        in.re = 16'($rtoi(r) + $urandom_range(0, 6) - 3);
        in.im = 16'($rtoi(i) + $urandom_range(0, 6) - 3);
        @(negedge clk);
      end
    in_valid = 0;
    in_first = 0;
    wait (done);
    repeat (6) @(negedge clk);
    checks++;
    if (nw != NSYM * 4) begin failures++; $display("FAIL %0d words", nw); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
