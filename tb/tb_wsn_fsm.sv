// tb_wsn_fsm: the node controller against a simple model of its
// surroundings (domains come up a random time after being requested; the
// downlink estimate and the end of transmission come after random delays,
// sometimes never for the downlink).  For random modes, checks the
// sequence: wake on a full frame with the receiver and the mode's
// transmitter requested, listen, start the transmitter once (with the
// frame taken) after the estimate or after the timeout, release the
// receiver, and power everything down after the transmission.
module tb_wsn_fsm;
  import wban_pkg::*;
  localparam int TMO = 200;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;
  mode_e mode = MODE_OFDM;
  logic frame_ready = 0, pm_ready, est_done = 0, tx_done = 0;
  logic [2:0] dom_req;
  logic dl_enable, tx_start, frame_taken, tx_active, dl_timeout;
  wsn_fsm #(.DL_TIMEOUT(TMO)) dut (.*);

  // domains settle 2..9 clocks after each change of request
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

  int n_start = 0, n_tmo = 0, n_mt = 0;
  always @(posedge clk) begin
    if (tx_start) n_start++;
    if (dl_timeout) n_tmo++;
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
      bit no_dl;
      int s0, t;
      mode = ($urandom_range(0, 1) != 0) ? MODE_MT : MODE_OFDM;
      if (mode == MODE_MT) n_mt++;
      want = (mode == MODE_MT) ? 3'b011 : 3'b101;
      no_dl = ($urandom_range(0, 4) == 0);
      repeat ($urandom_range(1, 10)) @(posedge clk);
      chk(dom_req == 0 && !tx_active, "asleep before frame");
      frame_ready <= 1;
      @(posedge clk); @(negedge clk);
      chk(dom_req == want, "wake request");
      t = 0;
      while (!dl_enable && t < 50) begin @(negedge clk); t++; end
      chk(dl_enable && pm_ready, "listening once powered");
      s0 = n_start;
      if (!no_dl) begin
        repeat ($urandom_range(1, TMO / 2)) @(posedge clk);
        chk(n_start == s0, "transmitter started before estimate");
        est_done <= 1; @(posedge clk); est_done <= 0;
      end
      t = 0;
      while (!frame_taken && t < TMO + 10) begin @(negedge clk); t++; end
      chk(frame_taken && tx_start, "transmitter start with frame taken");
      frame_ready <= 0;
      @(negedge clk);
      chk(dom_req == (want & 3'b110) && tx_active && !dl_enable, "receiver released");
      repeat ($urandom_range(5, 40)) @(posedge clk);
      tx_done <= 1; @(posedge clk); tx_done <= 0;
      @(negedge clk);
      chk(dom_req == 0, "powered down after transmission");
      t = 0;
      while (tx_active && t < 50) begin @(negedge clk); t++; end
      repeat (12) @(posedge clk);
      chk(n_start == s0 + 1, "one transmitter start per frame");
    end
    chk(n_tmo > 0 && n_mt > 0, "timeout and MT mode exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
