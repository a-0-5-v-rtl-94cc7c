// tb_pmc: random on/off commands to a power management cell.  Checks the
// wake-up order (supply first, isolation released SETTLE clocks later,
// then the function enable) and the shut-down order (isolation first,
// then the enable, then the supply), that the outputs are clamped high
// whenever isolated, and that `active` is high exactly when the domain is
// usable.
module tb_pmc;
  localparam int W = 8, SETTLE = 4;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;
  logic on = 0, enable_in = 1, pgd_en, vdd_on, iso, active;
  logic [W-1:0] sig_in = '0, sig_out;
  pmc #(.W(W), .SETTLE(SETTLE)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  // invariants, every clock
  logic vdd_d = 0, iso_d = 1, en_d = 0;
  int   vdd_age = 0;
  always @(negedge clk) if (rst_n) begin
    chk(sig_out == (iso ? {W{1'b1}} : sig_in), "isolation clamp");
    chk(!pgd_en || vdd_on, "enable without supply");
    chk(!(!iso && !vdd_on), "isolation released without supply");
    chk(active == (vdd_on && !iso && pgd_en == enable_in), "active flag");
    if (iso_d && !iso) chk(vdd_age >= SETTLE, "isolation released before supply settled");
    if (!iso_d && iso) chk(en_d, "isolation after enable removed");
    if (vdd_d && !vdd_on) chk(iso && !pgd_en, "supply cut while enabled or not isolated");
    vdd_age = vdd_on ? vdd_age + 1 : 0;
    vdd_d = vdd_on; iso_d = iso; en_d = pgd_en;
    sig_in = W'($urandom);
  end

  int n_on = 0, n_off = 0;
  initial begin
    #(100000000);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); on <= 1;
      repeat (SETTLE + 3) @(posedge clk);
      chk(active && pgd_en && !iso && vdd_on, "domain up");
      n_on++;
      repeat ($urandom_range(0, 20)) @(posedge clk);
      on <= 0;
      repeat (4) @(posedge clk);
      chk(!vdd_on && iso && !pgd_en && !active, "domain down");
      n_off++;
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
