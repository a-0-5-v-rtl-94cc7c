// tb_dl_rx: end-to-end test of the node's downlink receiver.  A downlink
// preamble (2 x 8 short, 2 x 4 guard, 2 x 64 long, 3 x (4 + 64) SCO) is
// synthesised in floating point from the reference spectrum and passed
// through both impairments of a free-running node clock: a carrier offset
// eps (sample n turned by exp(j*2*pi*eps*n)) and a sampling offset delta
// (sample n taken at time n*(1+delta)).  Checks cfo = -eps*2^24 within
// 1e-4 cycles/sample, sco = delta*2^24 within 12 ppm and the FE command
// within one LSB (40 ppm) of delta/40 ppm, for offsets up to 100 ppm.
module tb_dl_rx;
  import wban_pkg::*;
  import tb_ref_pkg::*;
  localparam logic [63:0] PB = 64'h9A3C_57E1_0F6B_D248;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_first = 0, est_done;
  cplx_t in;
  logic signed [23:0] cfo, sco;
  logic signed [7:0] fe;

  dl_rx dut (.clk, .rst_n, .in_valid, .in, .in_first, .cfo, .sco, .fe, .est_done);

  // preamble waveform (period 64, bins k = 0 mod step) at fractional time t
  function automatic void wave(input int step, input real gain, input real t,
                               output real re, output real im);
    real br, bi, th;
    int ks;
    re = 0; im = 0;
    for (int k = 0; k < 64; k += step) begin
      ref_bin(PB, 64, k, br, bi);
      ks = (k > 32) ? k - 64 : k;
      th = 2.0 * PI * ks * t / 64.0;
      if (k == 32) re += br * $cos(th);
      else begin
        re += br * $cos(th) - bi * $sin(th);
        im += br * $sin(th) + bi * $cos(th);
      end
    end
    re = re * gain / 64.0; im = im * gain / 64.0;
  endfunction

  task automatic run(input real eps, input real delta);
    real r, i, th, d;
    int li, step;
    real gain, tl;
    for (int n = 0; n < 420; n++) begin
      d = n * delta;
      step = 1; gain = 2.0;
      if (n < 16)       begin step = 8; gain = 8.0; tl = n % 8; end
      else if (n < 24)  tl = 60 + (n - 16) % 4;
      else if (n < 152) tl = (n - 24) % 64;
      else if (n < 356) begin li = (n - 152) % 68; tl = li - 4; end
      else              tl = n % 64;
      wave(step, gain, tl + d, r, i);
      th = 2.0 * PI * eps * n;
      in.re = 16'($rtoi(r * $cos(th) - i * $sin(th)));
      in.im = 16'($rtoi(r * $sin(th) + i * $cos(th)));
      in_valid = 1; in_first = (n == 0);
      @(negedge clk);
    end
    in_valid = 0;
    fork
      begin wait (est_done); end
      begin repeat (2000) @(posedge clk); end
    join_any
    disable fork;
    @(negedge clk);
    checks++;
    if (rabs(real'(cfo) + eps * 16777216.0) > 1678.0) begin
      failures++; $display("FAIL eps=%f delta=%e: cfo %0d", eps, delta, cfo);
    end
    checks++;
    if (rabs(real'(sco) - delta * 16777216.0) > 201.0) begin
      failures++; $display("FAIL eps=%f delta=%e: sco %0d", eps, delta, sco);
    end
    checks++;
    if (rabs(real'(fe) - delta / 40e-6) > 1.0) begin
      failures++; $display("FAIL eps=%f delta=%e: fe %0d", eps, delta, fe);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0.0, 0.0);
    run(0.02795, 100e-6);       // 100 ppm on both carrier and sampling clock
    run(-0.02795, -100e-6);
    run(0.01, 60e-6);
    run(-0.005, -45e-6);
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
