// tb_mt_rx: multi-user test of the MT-CDMA demodulator.  The input is the
// sum of all eight users' signals (floating-point model: 16-point spectrum
// of each user's word, times that user's code chip per repetition, scaled
// IDFT, cyclic prefix), each at 1/8 amplitude so the sum fits the sample
// width.  The demodulator, tuned to one user, must recover that user's
// words exactly; this is repeated for three different users.
module tb_mt_rx;
  import wban_pkg::*;
  import tb_ref_pkg::*;
  localparam int NW = 2, N = 16, G = 2, L = 31, U = 8;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, in_valid = 0, in_first = 0, word_valid;
  logic [15:0] word;
  logic [2:0] user;
  cplx_t in;
  logic [15:0] words [U][NW];
  int nw;

  mt_rx dut (.clk, .rst_n, .start, .nwords(16'(NW)), .user, .busy, .done, .in_valid, .in,
             .in_first, .word_valid, .word);

  always @(posedge clk) if (rst_n && word_valid) begin
    checks++;
    if (nw >= NW || word !== words[user][nw]) begin
      failures++;
      $display("FAIL user %0d word %0d: got %h exp %h", user, nw, word, words[user][nw % NW]);
    end
    nw++;
  end

  task automatic run_frame(input int u);
    real r, i, sr, si;
    nw = 0;
    user = 3'(u);
    for (int v = 0; v < U; v++) for (int w = 0; w < NW; w++) words[v][w] = 16'($urandom);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int s = 0; s < NW * L; s++)
      for (int t = 0; t < N + G; t++) begin
        sr = 0; si = 0;
        for (int v = 0; v < U; v++) begin
          ref_sample(64'(words[v][s/L]), N, (t < G) ? N - G + t : t - G,
                     ref_chip(v, s % L) ? -1.0 : 1.0, r, i);
          sr += r / U; si += i / U;
        end
        in_valid = 1;
        in_first = (s == 0 && t == 0);
        in.re = 16'($rtoi(sr));
        in.im = 16'($rtoi(si));
        @(negedge clk);
      end
    in_valid = 0;
    in_first = 0;
    wait (done);
    repeat (4) @(negedge clk);
    checks++;
    if (nw != NW) begin failures++; $display("FAIL %0d words", nw); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(5);
    run_frame(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
