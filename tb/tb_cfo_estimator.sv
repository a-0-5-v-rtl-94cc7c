// tb_cfo_estimator: builds downlink preambles (two random short preambles
// of 8 samples, two guard samples of 4, two random long preambles of 64,
// then filler) and passes them through a frequency offset eps: sample n is
// multiplied by exp(j*2*pi*eps*n) with a random start phase.  The
// estimator must report -eps*2^24 within 1e-4 cycles per sample, both
// for small offsets and for offsets beyond what the long preamble alone
// could resolve (|eps| > 1/128), up to the 100 ppm of a 1397.5 MHz carrier
// at 5 MHz sampling (0.028 cycles per sample) and beyond.
module tb_cfo_estimator;
  import wban_pkg::*;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_first = 0, cfo_valid;
  cplx_t in;
  logic signed [23:0] cfo;

  cfo_estimator dut (.clk, .rst_n, .in_valid, .in, .in_first, .cfo_valid, .cfo);

  task automatic run(input real eps);
    real sr[8], si[8], lr[64], li[64], xr, xi, th, ph0;
    int got;
    real exp_v;
    for (int i = 0; i < 8; i++) begin sr[i] = $urandom_range(0, 1) ? 6000.0 : -6000.0; si[i] = $urandom_range(0, 1) ? 6000.0 : -6000.0; end
    for (int i = 0; i < 64; i++) begin lr[i] = $urandom_range(0, 1) ? 6000.0 : -6000.0; li[i] = $urandom_range(0, 1) ? 6000.0 : -6000.0; end
    ph0 = $urandom_range(0, 999) / 1000.0;
    for (int nn = 0; nn < 200; nn++) begin
      if (nn < 16)       begin xr = sr[nn % 8]; xi = si[nn % 8]; end
      else if (nn < 24)  begin xr = lr[60 + nn % 4]; xi = li[60 + nn % 4]; end
      else if (nn < 152) begin xr = lr[(nn - 24) % 64]; xi = li[(nn - 24) % 64]; end
      else               begin xr = 1000.0; xi = 0.0; end
      th = 2.0 * 3.141592653589793 * (eps * nn + ph0);
      in.re = 16'($rtoi(xr * $cos(th) - xi * $sin(th)));
      in.im = 16'($rtoi(xr * $sin(th) + xi * $cos(th)));
      in_valid = 1;
      in_first = (nn == 0);
      @(negedge clk);
    end
    in_valid = 0;
    fork
      begin wait (cfo_valid); end
      begin repeat (100) @(posedge clk); end
    join_any
    disable fork;
    @(negedge clk);
    got = int'(cfo);
    exp_v = -eps * 16777216.0;
    checks++;
    if (got - exp_v > 1678.0 || exp_v - got > 1678.0) begin
      failures++;
      $display("FAIL eps=%f got %0d expected %f", eps, got, exp_v);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0.0);
    run(0.001);
    run(-0.003);
    run(0.02795);          // 100 ppm of 1397.5 MHz at 5 MHz
    run(-0.02795);
    run(0.04);
    for (int i = 0; i < 6; i++) run((real'($urandom_range(0, 1200)) - 600.0) / 10000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
