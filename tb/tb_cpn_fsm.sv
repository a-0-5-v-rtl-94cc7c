// tb_cpn_fsm: the central-node controller against a simple model of its
// surroundings (domains settle a random time after each request change;
// the downlink and the reception end after random delays).  For random
// modes, checks: downlink transmitter and the mode's receiver requested
// on `link_start`; both started together once powered; the downlink
// transmitter released after its frame; everything off after reception;
// `busy` over the whole link.
module tb_cpn_fsm;
  import wban_pkg::*;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;
  mode_e mode = MODE_OFDM;
  logic link_start = 0, pm_ready, dl_done = 0, rx_done = 0;
  logic [2:0] dom_req;
  logic dl_start, rx_start, busy;
  cpn_fsm dut (.*);

  logic [2:0] req_d = '0;
  int settle = 0;
  always @(posedge clk) begin
    if (dom_req != req_d) settle <= $urandom_range(2, 9);
    else if (settle > 0) settle <= settle - 1;
    req_d <= dom_req;
  end
  assign pm_ready = (dom_req == req_d) && (settle == 0);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  int n_dl = 0, n_rx = 0;
  always @(posedge clk) begin
    if (dl_start) begin n_dl++; chk(rx_start && pm_ready, "starts together when powered"); end
    if (rx_start) n_rx++;
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
    for (int i = 0; i < 30; i++) begin
      logic [2:0] want;
      int t, d0;
      mode = ($urandom_range(0, 1) != 0) ? MODE_MT : MODE_OFDM;
      want = (mode == MODE_MT) ? 3'b011 : 3'b101;
      d0 = n_dl;
      repeat ($urandom_range(1, 10)) @(posedge clk);
      chk(!busy && dom_req == 0, "idle");
      link_start <= 1; @(posedge clk); link_start <= 0;
      @(negedge clk);
      chk(busy && dom_req == want, "link request");
      t = 0;
      while (n_dl == d0 && t < 50) begin @(negedge clk); t++; end
      chk(n_dl == d0 + 1 && n_rx == d0 + 1, "one start each");
      repeat ($urandom_range(5, 60)) @(posedge clk);
      dl_done <= 1; @(posedge clk); dl_done <= 0;
      @(negedge clk);
      chk(dom_req == (want & 3'b110) && busy, "downlink transmitter released");
      repeat ($urandom_range(5, 60)) @(posedge clk);
      rx_done <= 1; @(posedge clk); rx_done <= 0;
      @(negedge clk);
      chk(dom_req == 0, "all off after reception");
      t = 0;
      while (busy && t < 50) begin @(negedge clk); t++; end
      chk(!busy, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
