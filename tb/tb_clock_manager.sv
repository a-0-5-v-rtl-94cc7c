// tb_clock_manager: checks the spacing of the two enable strobes of the
// clock manager with its default dividers (8197 and 31 clocks), over
// several periods, and that each strobe is one clock wide.
module tb_clock_manager;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;
  logic en_su, en_code;
  clock_manager dut (.clk, .rst_n, .en_su, .en_code);

  int cyc = 0, last_su = -1, last_code = -1, n_su = 0, n_code = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (en_su) begin
      if (last_su >= 0) begin
        checks++;
        if (cyc - last_su != 8197) begin failures++; $display("FAIL su spacing %0d", cyc - last_su); end
      end
      last_su = cyc; n_su++;
    end
    if (en_code) begin
      if (last_code >= 0) begin
        checks++;
        if (cyc - last_code != 31) begin failures++; $display("FAIL code spacing %0d", cyc - last_code); end
      end
      last_code = cyc; n_code++;
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
    repeat (4 * 8197 + $urandom_range(0, 100)) @(posedge clk);
    checks++;
    if (n_su < 3 || n_code < 1000) begin failures++; $display("FAIL too few strobes %0d %0d", n_su, n_code); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
