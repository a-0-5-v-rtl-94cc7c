// tb_dl_tx: checks the downlink frame sample by sample against a
// floating-point model of the layout (2 x 8-sample short preamble, 2 x 4
// guard, 2 x 64 long preamble, 3 x (4 guard + 64 SCO preamble), then one
// 66-sample OFDM information symbol), and checks the preamble length of
// 356 samples and that the preamble is one unbroken burst.
module tb_dl_tx;
  import wban_pkg::*;
  import tb_ref_pkg::*;
  localparam logic [63:0] PB = 64'h9A3C_57E1_0F6B_D248;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, out_valid, out_first, out_pre;
  logic [63:0] info;
  cplx_t out;

  dl_tx dut (.clk, .rst_n, .start, .info, .busy, .done, .out_valid, .out, .out_first, .out_pre);

  // reference preamble sample: gain/64 * sum over bins k = 0 mod step
  function automatic void pre_ref(input int step, input real gain, input int t,
                                  output real re, output real im);
    real br, bi, th;
    re = 0; im = 0;
    for (int k = 0; k < 64; k += step) begin
      ref_bin(PB, 64, k, br, bi);
      th = 2.0 * PI * k * t / 64;
      re += br * $cos(th) - bi * $sin(th);
      im += br * $sin(th) + bi * $cos(th);
    end
    re = re * gain / 64; im = im * gain / 64;
  endfunction

  int n, npre, ninfo, pre_first_cyc, pre_last_cyc, cyc;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && out_valid) begin
    real er, ei;
    int li;
    if (n < 16)       pre_ref(8, 8.0, n % 8, er, ei);
    else if (n < 24)  pre_ref(1, 2.0, 60 + (n - 16) % 4, er, ei);
    else if (n < 152) pre_ref(1, 2.0, (n - 24) % 64, er, ei);
    else if (n < 356) begin
      li = (n - 152) % 68;
      pre_ref(1, 2.0, (li < 4) ? 60 + li : li - 4, er, ei);
    end else begin
      li = n - 356;
      ref_sample(info, 64, (li < 2) ? 62 + li : li - 2, 1.0, er, ei);
    end
    checks++;
    if (rabs(out.re - er) > 6.0 || rabs(out.im - ei) > 6.0) begin
      failures++;
      if (failures < 10) $display("FAIL sample %0d got (%0d,%0d) exp (%f,%f)", n, out.re, out.im, er, ei);
    end
    checks++;
    if (out_first != (n == 0) || out_pre != (n < 356)) failures++;
    if (out_pre) begin
      if (npre == 0) pre_first_cyc = cyc;
      pre_last_cyc = cyc;
      npre++;
    end else ninfo++;
    n++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      n = 0; npre = 0; ninfo = 0;
      info = {$urandom, $urandom};
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (done);
      repeat (3) @(negedge clk);
      checks++;
      if (npre != 356 || ninfo != 66 || pre_last_cyc - pre_first_cyc != 355) begin
        failures++;
        $display("FAIL lengths pre=%0d info=%0d span=%0d", npre, ninfo, pre_last_cyc - pre_first_cyc);
      end
    end
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
