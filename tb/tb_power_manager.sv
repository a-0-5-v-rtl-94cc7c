// tb_power_manager: the power manager drives three power management cells
// while random domain requests arrive.  Checks that `ready` only comes
// when every requested domain is active and every other one is unpowered,
// that it does come within a bounded time, that the front end is on
// exactly while something is requested, and `sleeping` when all is off.
module tb_power_manager;
  localparam int ND = 3;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;
  logic [ND-1:0] req = '0, dom_active, dom_vdd, dom_on, iso, en;
  logic fe_on, ready, sleeping;
  power_manager #(.ND(ND)) dut (.*);
  for (genvar d = 0; d < ND; d++) begin : g_cell
    logic [7:0] so;
    pmc #(.W(8), .SETTLE(4)) u_cell (
      .clk, .rst_n, .on(dom_on[d]), .enable_in(1'b1), .sig_in(8'h00), .sig_out(so),
      .pgd_en(en[d]), .vdd_on(dom_vdd[d]), .iso(iso[d]), .active(dom_active[d]));
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (ready) chk((dom_active & req) == req && (dom_vdd & ~req) == '0, "ready too early");
    chk(sleeping == (dom_vdd == '0 && !fe_on), "sleeping flag");
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
    for (int i = 0; i < 40; i++) begin
      int t;
      @(posedge clk); req <= ND'($urandom);
      @(posedge clk);
      t = 0;
      while (!ready && t < 100) begin @(posedge clk); t++; end
      chk(ready, "ready never came");
      @(negedge clk);
      chk(fe_on == (req != 0), "front-end turn-on");
      repeat ($urandom_range(0, 10)) @(posedge clk);
    end
    req <= '0;
    repeat (20) @(posedge clk);
    chk(sleeping, "not sleeping with nothing requested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
