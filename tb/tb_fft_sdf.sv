// tb_fft_sdf: self-checking test of the pipelined FFT.  Random blocks are
// streamed through a 64-point forward and a 16-point inverse transform with
// random pauses in the input; every result is compared with a DFT computed
// here in floating point (scaled by 1/N), within a small rounding tolerance.
// It also checks the pipeline latency of N-1+log2(N) enabled cycles.
module tb_fft_sdf;
  import wban_pkg::*;
  localparam int NB = 4;                       // blocks per transform
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------- 64-point forward ----------
  logic en64, ov64, ol64; cplx_t di64, do64; logic [5:0] oi64;
  fft_sdf #(.N(64), .INVERSE(1'b0)) dut64 (.clk, .rst_n, .clear(1'b0), .en(en64), .din(di64),
    .out_valid(ov64), .dout(do64), .out_idx(oi64), .out_last(ol64));
  // ---------- 16-point inverse ----------
  logic en16, ov16, ol16; cplx_t di16, do16; logic [3:0] oi16;
  fft_sdf #(.N(16), .INVERSE(1'b1)) dut16 (.clk, .rst_n, .clear(1'b0), .en(en16), .din(di16),
    .out_valid(ov16), .dout(do16), .out_idx(oi16), .out_last(ol16));

  int xr64[], xi64[], xr16[], xi16[];

  task automatic check_bin(input int n, input bit inv, input int blk, input int k,
                           input cplx_t got, ref int xr[], ref int xi[]);
    real ar, ai, th;
    ar = 0; ai = 0;
    for (int t = 0; t < n; t++) begin
      th = (inv ? 2.0 : -2.0) * 3.141592653589793 * k * t / n;
      ar += xr[blk*n+t] * $cos(th) - xi[blk*n+t] * $sin(th);
      ai += xr[blk*n+t] * $sin(th) + xi[blk*n+t] * $cos(th);
    end
    ar /= n; ai /= n;
    checks++;
    if ((got.re - ar) > 8.0 || (ar - got.re) > 8.0 || (got.im - ai) > 8.0 || (ai - got.im) > 8.0) begin
      failures++;
      $display("FAIL N=%0d blk=%0d k=%0d got=(%0d,%0d) exp=(%f,%f)", n, blk, k, got.re, got.im, ar, ai);
    end
  endtask

  // driver: en with random gaps, NB data blocks then zeros
  task automatic drive(input int n, ref logic en, ref cplx_t di, ref int xr[], ref int xi[]);
    int i;
    i = 0;
    while (i < (NB + 2) * n) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        en = 0;
      end else begin
        en = 1;
        if (i < NB * n) begin di.re = 16'(xr[i]); di.im = 16'(xi[i]); end
        else di = '0;
        i++;
      end
    end
    @(negedge clk); en = 0;
  endtask

  int cnt64 = 0, cnt16 = 0;
  always @(posedge clk) if (rst_n) begin
    if (ov64 && cnt64 < NB*64) begin check_bin(64, 0, cnt64/64, int'(oi64), do64, xr64, xi64); cnt64++; end
    if (ov16 && cnt16 < NB*16) begin check_bin(16, 1, cnt16/16, int'(oi16), do16, xr16, xi16); cnt16++; end
  end

  // latency: count enabled cycles from the first input to the first output
  int en_seen = 0, lat = -1;
  always @(posedge clk) if (rst_n) begin
    if (ov64 && lat < 0) lat = en_seen;
    if (en64) en_seen++;
  end

  initial begin
    xr64 = new[NB*64]; xi64 = new[NB*64]; xr16 = new[NB*16]; xi16 = new[NB*16];
    for (int i = 0; i < NB*64; i++) begin xr64[i] = $urandom_range(0, 16383) - 8192; xi64[i] = $urandom_range(0, 16383) - 8192; end
    for (int i = 0; i < NB*16; i++) begin xr16[i] = $urandom_range(0, 16383) - 8192; xi16[i] = $urandom_range(0, 16383) - 8192; end
    en64 = 0; en16 = 0; di64 = '0; di16 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      drive(64, en64, di64, xr64, xi64);
      drive(16, en16, di16, xr16, xi16);
    join
    repeat (5) @(posedge clk);
    checks++;
    if (cnt64 != NB*64 || cnt16 != NB*16) begin failures++; $display("FAIL output count %0d %0d", cnt64, cnt16); end
    checks++;
    // first output appears after the enabled cycle that is number T = 64-1+6
    if (lat != 64 - 1 + 6) begin failures++; $display("FAIL latency %0d", lat); end
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
