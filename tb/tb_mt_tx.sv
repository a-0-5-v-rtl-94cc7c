// tb_mt_tx: checks the MT-CDMA modulator sample by sample.  Random words
// for a random user are offered through a FIFO model; each output sample
// is compared with a floating-point model: the word's 16-point spectrum,
// multiplied by the user's code chip of the repetition, inverse
// transformed, with a 2-sample cyclic prefix.  Also checks that a word
// occupies 31 x 18 = 558 clocks (16 bits per 558 clocks at 5 MHz is
// 143 kbit/s) and that the burst is unbroken.
module tb_mt_tx;
  import wban_pkg::*;
  import tb_ref_pkg::*;
  localparam int NW = 3, N = 16, G = 2, L = 31;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, fifo_rd, fifo_empty, out_valid, out_first;
  logic [15:0] nwords = 16'(NW), fifo_rdata;
  logic [2:0] user;
  cplx_t out;
  logic [15:0] sent [NW];
  int rdp = 0, wrp = 0;

  mt_tx dut (.clk, .rst_n, .start, .nwords, .user, .busy, .done, .fifo_rd, .fifo_rdata,
             .fifo_empty, .out_valid, .out, .out_sym_first(out_first));

  assign fifo_empty = (rdp == wrp);
  assign fifo_rdata = fifo_empty ? 16'h0 : sent[rdp % NW];
  always @(posedge clk) if (fifo_rd && !fifo_empty) rdp <= rdp + 1;

  int n_out, first_cyc, last_cyc, cyc;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_valid) begin
    int s, w, m, t;
    real er, ei;
    s = n_out / (N + G);
    w = s / L;
    m = s % L;
    t = n_out % (N + G);
    t = (t < G) ? N - G + t : t - G;
    ref_sample(64'(sent[w]), N, t, ref_chip(int'(user), m) ? -1.0 : 1.0, er, ei);
    checks++;
    if (rabs(out.re - er) > 6.0 || rabs(out.im - ei) > 6.0) begin
      failures++;
      if (failures < 10) $display("FAIL sample %0d: got (%0d,%0d) exp (%f,%f)", n_out, out.re, out.im, er, ei);
    end
    if (n_out == 0) first_cyc = cyc;
    last_cyc = cyc;
    n_out++;
  end

  task automatic run_frame(input int u);
    n_out = 0;
    user = 3'(u);
    for (int i = 0; i < NW; i++) sent[i] = 16'($urandom);
    wrp = rdp + NW;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (n_out != NW * L * (N + G)) begin failures++; $display("FAIL count %0d", n_out); end
    checks++;
    if (last_cyc - first_cyc + 1 != NW * 558) begin
      failures++; $display("FAIL burst length %0d cycles", last_cyc - first_cyc + 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(int'($urandom_range(1, 7)));
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
