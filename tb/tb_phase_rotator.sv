// tb_phase_rotator: random frames of random samples, with random carrier
// steps, go through the rotator; the output of sample n of a frame must be
// the input turned by exp(-j*2*pi*n*step/2^24), within the error of the
// 256-entry table (2.6 % of the amplitude: 1/256 turn) plus rounding.
module tb_phase_rotator;
  import wban_pkg::*;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, in_valid = 0, in_first = 0, out_valid, out_first;
  logic signed [23:0] cfo_step = 0;
  cplx_t in = '0, out;
  phase_rotator dut (.*);

  real er[$], ei[$];
  always @(negedge clk) if (out_valid) begin
    real xr, xi, tol, orr, oi;
    xr = er.pop_front(); xi = ei.pop_front();
    tol = 0.026 * $sqrt(xr * xr + xi * xi) + 4.0;
    orr = $itor(out.re); oi = $itor(out.im);
    checks++;
    if ((xr - orr) > tol || (orr - xr) > tol || (xi - oi) > tol || (oi - xi) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL got %f,%f expected %f,%f", orr, oi, xr, xi);
    end
  end
  initial begin
    #(100000000);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      int n;
      int step;
      n = 0;
      step = $signed($urandom_range(0, 1400000)) - 700000;
      cfo_step <= 24'(step);
      @(posedge clk);
      for (int s = 0; s < 200; s++) begin
        real th;
        logic signed [15:0] vr, vi;
        logic v;
        vr = 16'($signed($urandom_range(0, 32000)) - 16000);
        vi = 16'($signed($urandom_range(0, 32000)) - 16000);
        v  = ($urandom_range(0, 3) != 0) || s == 0;
        in.re <= vr; in.im <= vi; in_valid <= v;
        in_first <= (s == 0);
        clear    <= (s == 0);
        if (v) begin
          th = -2.0 * 3.14159265358979 * $itor(n) * $itor(step) / 16777216.0;
          er.push_back($itor(vr) * $cos(th) - $itor(vi) * $sin(th));
          ei.push_back($itor(vr) * $sin(th) + $itor(vi) * $cos(th));
          n++;
        end
        @(posedge clk);
      end
      in_valid <= 0; in_first <= 0; clear <= 0;
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
