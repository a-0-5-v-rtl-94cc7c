// tb_ofdm_tx: checks the OFDM modulator sample by sample.  A frame of
// random words is offered through a show-ahead FIFO model; every output
// sample (cyclic prefix included) is compared with a floating-point scaled
// IDFT of the expected spectrum.  Also checks that the frame leaves as one
// unbroken burst of NSYM*66 samples, i.e. 64 bits per 66 clocks at 5 MHz
// (4.85 Mbit/s), and that a second frame after the first works as well.
module tb_ofdm_tx;
  import wban_pkg::*;
  import tb_ref_pkg::*;
  localparam int NSYM = 5, N = 64, G = 2, WPS = 4;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;                      // 5 MHz
  int checks = 0, failures = 0;

  logic start = 0, busy, done, fifo_rd, fifo_empty, out_valid, out_first;
  logic [15:0] nwords = 16'(NSYM * WPS), fifo_rdata;
  cplx_t out;
  logic [15:0] words [NSYM*WPS];
  int rdp = 0, wrp = 0;
  logic [15:0] sent [NSYM*WPS];

  ofdm_tx dut (.clk, .rst_n, .start, .nwords, .busy, .done, .fifo_rd, .fifo_rdata,
               .fifo_empty, .out_valid, .out, .out_sym_first(out_first));

  // show-ahead FIFO model, popped with a nonblocking update
  assign fifo_empty = (rdp == wrp);
  assign fifo_rdata = fifo_empty ? 16'h0 : words[rdp % (NSYM*WPS)];
  always @(posedge clk) if (fifo_rd && !fifo_empty) rdp <= rdp + 1;

  int n_out, first_cyc, last_cyc, cyc;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_valid) begin
    int s, t;
    real er, ei;
    logic [63:0] bits;
    s = n_out / (N + G);
    t = n_out % (N + G);
    t = (t < G) ? N - G + t : t - G;
    bits = {sent[s*WPS+3], sent[s*WPS+2], sent[s*WPS+1], sent[s*WPS]};
    ref_sample(bits, N, t, 1.0, er, ei);
    checks++;
    if (rabs(out.re - er) > 8.0 || rabs(out.im - ei) > 8.0) begin
      failures++;
      if (failures < 10) $display("FAIL sample %0d: got (%0d,%0d) exp (%f,%f)", n_out, out.re, out.im, er, ei);
    end
    checks++;
    if (out_first != (n_out % (N + G) == 0)) failures++;
    if (n_out == 0) first_cyc = cyc;
    last_cyc = cyc;
    n_out++;
  end

  task automatic run_frame();
    n_out = 0;
    for (int i = 0; i < NSYM * WPS; i++) begin sent[i] = 16'($urandom); words[i] = sent[i]; end
    wrp = rdp + NSYM * WPS;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);                               // high with the last sample
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (n_out != NSYM * (N + G)) begin failures++; $display("FAIL count %0d", n_out); end
    checks++;
    if (last_cyc - first_cyc + 1 != NSYM * (N + G)) begin
      failures++; $display("FAIL burst not continuous: %0d cycles", last_cyc - first_cyc + 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame();
    repeat (10) @(negedge clk);
    run_frame();
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
