// tb_sco_estimator: synthesises the SCO part of a downlink frame as seen
// through a sampling clock that is off by delta and starts tau0 samples
// late: frame sample n is the band-limited preamble waveform evaluated at
// time n*(1+delta) + tau0 (exact continuous-time inverse DFT of the
// reference spectrum).  The estimator must report delta*2^24 within 12 ppm (the fixed-point phase noise of the pilots limits it)
// and the last preamble's pilot-phase slope C1 = tau/64 turn per bin.
module tb_sco_estimator;
  import wban_pkg::*;
  import tb_ref_pkg::*;
  localparam logic [63:0] PB = 64'h9A3C_57E1_0F6B_D248;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_first = 0, sco_valid;
  cplx_t in;
  logic signed [23:0] sco;
  logic signed [15:0] c0, c1;

  sco_estimator dut (.clk, .rst_n, .in_valid, .in, .in_first, .sco_valid, .sco, .c0, .c1);

  // reference waveform at fractional time t (period 64), gain 2
  function automatic void wave(input real t, output real re, output real im);
    real br, bi, th;
    int ks;
    re = 0; im = 0;
    for (int k = 0; k < 64; k++) begin
      ref_bin(PB, 64, k, br, bi);
      ks = (k > 32) ? k - 64 : k;
      th = 2.0 * PI * ks * t / 64.0;
      if (k == 32) begin re += br * $cos(th); end
      else begin
        re += br * $cos(th) - bi * $sin(th);
        im += br * $sin(th) + bi * $cos(th);
      end
    end
    re = re * 2.0 / 64.0; im = im * 2.0 / 64.0;
  endfunction

  task automatic run(input real delta, input real tau0);
    real t, r, i, exp_sco, exp_c1, tau_last;
    int li;
    for (int n = 0; n < 400; n++) begin
      if (n >= 152 && n < 356) begin
        li = (n - 152) % 68;
        t = real'(li - 4) + n * delta + tau0;     // guard samples wrap periodically
        wave(t, r, i);
      end else begin
        r = 500.0; i = 0.0;
      end
      in.re = 16'($rtoi(r)); in.im = 16'($rtoi(i));
      in_valid = 1; in_first = (n == 0);
      @(negedge clk);
    end
    in_valid = 0;
    fork
      begin wait (sco_valid); end
      begin repeat (2000) @(posedge clk); end
    join_any
    disable fork;
    @(negedge clk);
    exp_sco = delta * 16777216.0;
    checks++;
    if (rabs(real'(sco) - exp_sco) > 201.0) begin
      failures++; $display("FAIL delta=%e tau0=%f: sco %0d expected %f", delta, tau0, sco, exp_sco);
    end
    // slope of the last preamble: its samples are centred near n = 322
    tau_last = tau0 + 322.0 * delta;
    exp_c1 = tau_last / 64.0 * 65536.0;
    checks++;
    if (rabs(real'(c1) - exp_c1) > 8.0) begin
      failures++; $display("FAIL delta=%e tau0=%f: c1 %0d expected %f", delta, tau0, c1, exp_c1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0.0, 0.0);
    run(100e-6, 0.0);
    run(-100e-6, 0.1);
    run(50e-6, -0.25);
    run(-30e-6, 0.3);
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
