// tb_wban_top_full: end-to-end test of the whole link (sensor node + central node,
// each with its clock generator).  Full size: the top with its
// default parameters (512-word frames, 610 Hz sampling), one OFDM frame.
//
// The testbench plays the sensors and the radio channel.  Sensor samples
// are random; every sample the node takes is recorded.  The channel moves
// samples between the two chip clock domains through queues and adds a
// carrier offset: the downlink is turned by exp(+j*2*pi*EPS*n) and the
// uplink by exp(-j*2*pi*EPS*n), n counted from the first sample of each
// frame (a constant phase is left to the front end).  The node must measure
// EPS from the downlink preamble and pre-rotate its uplink, otherwise the
// central node's QPSK decisions fail.  No sampling offset is added by the
// channel; the FE command is checked to stay within one step of zero.
// Checks: every recovered word equals the recorded sensor sample, in order;
// the node's carrier estimate; the FE command; power domains off while
// asleep.  Mechanisms counted (a failure for each that never happens):
// OFDM frames, MT-CDMA frames, node wake-ups, node sleeps, storage-unit
// dumps, carrier estimates, FE updates, temperature-sensor frames.
module tb_wban_top_full;
  import wban_pkg::*;
  localparam int  DEPTH  = SU_DEPTH;
  localparam real EPS    = 0.0213;
  localparam int  NFRAME = 1;

  logic wsn_refclk = 0, cpn_refclk = 0, rst_n = 1;
  always #100ns wsn_refclk = ~wsn_refclk;
  always #100ns cpn_refclk = ~cpn_refclk;
  int checks = 0, failures = 0;

  mode_e       mode = MODE_OFDM;
  logic [2:0]  wsn_user = 3'd5, cpn_user = 3'd5, cpn_pe = 3'd2;
  logic        sensor_sel = 0, link_start = 0;
  logic [15:0] ext_sample = 16'h1234, ts_sample = 16'h0800;
  logic [63:0] info = 64'h0123_4567_89AB_CDEF;
  logic        sample_clk_en, word_valid, rx_done, wsn_clk, cpn_clk, wsn_lock, cpn_lock;
  logic [15:0] word;
  logic [13:0] wsn_dco_code, cpn_dco_code;
  logic        wsn_dl_valid = 0, wsn_dl_first = 0, cpn_rx_valid = 0, cpn_rx_first = 0;
  cplx_t       wsn_dl_sample = '0, cpn_rx_sample = '0;
  logic        wsn_tx_valid, wsn_tx_first, wsn_fe_on, cpn_dl_valid, cpn_dl_first, cpn_fe_on;
  cplx_t       wsn_tx_sample, cpn_dl_sample;
  logic signed [7:0]  wsn_fe;
  logic signed [23:0] wsn_cfo, wsn_sco;
  logic [2:0]  wsn_dom_vdd, cpn_dom_vdd;
  logic        wsn_tx_busy, wsn_dl_timeout, su_overflow, cpn_busy;

  wban_top  dut (.*);

  // monitors start once both chips are out of reset
  bit live = 0;

  // ---------------- sensors ----------------
  logic [15:0] expq[$];
  logic        renew = 0;
  always @(negedge wsn_clk) if (live) begin
    if (sample_clk_en) begin
      expq.push_back(sensor_sel ? ts_sample : ext_sample);
      renew = 1;
    end else if (renew) begin
      ext_sample = 16'($urandom); ts_sample = 16'($urandom_range(0, 4095));
      renew = 0;
    end
  end

  // ---------------- channel ----------------
  typedef struct { logic first; real re, im; } chs_t;
  chs_t dlq[$], ulq[$];
  int   dln = 0, uln = 0;
  function automatic cplx_t q16(input real re, input real im);
    q16.re = 16'($rtoi(re < 0 ? re - 0.5 : re + 0.5));
    q16.im = 16'($rtoi(im < 0 ? im - 0.5 : im + 0.5));
  endfunction
  always @(negedge cpn_clk) if (cpn_dl_valid) begin
    chs_t s; real th;
    if (cpn_dl_first) dln = 0;
    th = 2.0 * 3.14159265358979 * EPS * dln;
    s.first = cpn_dl_first;
    s.re = $itor(cpn_dl_sample.re) * $cos(th) - $itor(cpn_dl_sample.im) * $sin(th);
    s.im = $itor(cpn_dl_sample.re) * $sin(th) + $itor(cpn_dl_sample.im) * $cos(th);
    dlq.push_back(s); dln++;
  end
  always @(negedge wsn_clk) if (wsn_tx_valid) begin
    chs_t s; real th;
    if (wsn_tx_first) uln = 0;
    th = -2.0 * 3.14159265358979 * EPS * uln;
    s.first = wsn_tx_first;
    s.re = $itor(wsn_tx_sample.re) * $cos(th) - $itor(wsn_tx_sample.im) * $sin(th);
    s.im = $itor(wsn_tx_sample.re) * $sin(th) + $itor(wsn_tx_sample.im) * $cos(th);
    ulq.push_back(s); uln++;
  end
  always @(negedge wsn_clk) begin
    wsn_dl_valid = 0; wsn_dl_first = 0;
    if (dlq.size() > 0) begin
      chs_t s;
      s = dlq.pop_front();
      wsn_dl_valid = 1; wsn_dl_first = s.first; wsn_dl_sample = q16(s.re, s.im);
    end
  end
  always @(negedge cpn_clk) begin
    cpn_rx_valid = 0; cpn_rx_first = 0;
    if (ulq.size() > 0) begin
      chs_t s;
      s = ulq.pop_front();
      cpn_rx_valid = 1; cpn_rx_first = s.first; cpn_rx_sample = q16(s.re, s.im);
    end
  end

  // ---------------- link control: start the downlink when the node listens ----------------
  int n_wake = 0, n_sleep = 0, n_est = 0, n_fe = 0, n_dump = 0;
  logic any_on_d = 0;
  always @(posedge wsn_dom_vdd[0]) if (live) begin
    n_wake++;
    repeat (20) @(posedge cpn_clk);
    link_start = 1; @(posedge cpn_clk); link_start = 0;
  end
  always @(posedge wsn_clk) begin
    if (live && any_on_d && wsn_dom_vdd == 0) n_sleep++;
    any_on_d <= (wsn_dom_vdd != 0);
  end
  always @(posedge wsn_clk) if (live && dut.u_wsn.frame_taken) n_dump++;
  always @(posedge wsn_clk) if (live && dut.u_wsn.est_done_iso) begin
    int exp_cfo, err;
    n_est++;
    @(posedge wsn_clk);
    exp_cfo = $rtoi(-EPS * 16777216.0);
    err = int'(wsn_cfo) - exp_cfo; if (err < 0) err = -err;
    checks++;
    if (err > 2000) begin failures++; $display("FAIL cfo %0d expected %0d", wsn_cfo, exp_cfo); end
    checks++;
    if (wsn_fe > 1 || wsn_fe < -1) begin failures++; $display("FAIL fe %0d", wsn_fe); end
    else n_fe++;
  end
  always @(posedge wsn_clk) if (live && wsn_dl_timeout) begin
    failures++; $display("FAIL downlink timeout");
  end

  // ---------------- data check ----------------
  int nw = 0;
  always @(posedge cpn_clk) if (live && word_valid) begin
    logic [15:0] e;
    checks++;
    e = expq.pop_front();
    if (word !== e) begin
      failures++;
      if (failures < 10) $display("FAIL word %0d: got %h expected %h", nw, word, e);
    end
    nw++;
  end

  // ---------------- run ----------------
  int n_ofdm = 0, n_mt = 0, n_ts = 0;
  initial begin
    #(2s);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    // a falling reset edge at power-up, then release
    #10ns rst_n = 0;
    #1us rst_n = 1;
    wait (wsn_lock && cpn_lock);
    repeat (4) @(posedge wsn_clk);
    repeat (4) @(posedge cpn_clk);
    live = 1;
    for (int f = 0; f < NFRAME; f++) begin
      mode       = (f % 3 == 1) ? MODE_MT : MODE_OFDM;
      sensor_sel = (f % 3 == 2);
      @(posedge rx_done);
      checks++;
      if (nw != (f + 1) * DEPTH) begin failures++; $display("FAIL frame %0d: %0d words", f, nw); end
      if (mode == MODE_MT) n_mt++; else n_ofdm++;
      if (sensor_sel) n_ts++;
      $display("frame %0d (%s) done at %t, cfo %0d fe %0d", f, mode.name(), $time, wsn_cfo, wsn_fe);
      // wait until the node is asleep again
      wait (wsn_dom_vdd == 0 && !wsn_tx_busy);
      repeat (4) @(posedge wsn_clk);
      checks++;
      if (su_overflow) begin failures++; $display("FAIL storage overflow"); end
    end
    // power gating: everything off on both chips
    repeat (50) @(posedge cpn_clk);
    checks++;
    if (wsn_dom_vdd != 0 || cpn_dom_vdd != 0 || wsn_fe_on || cpn_fe_on) begin
      failures++; $display("FAIL domains left on");
    end
    if (n_ofdm == 0)  begin failures++; $display("FAIL no OFDM frame"); end
    if (0 && n_mt == 0) begin failures++; $display("FAIL no MT-CDMA frame"); end
    if (n_wake == 0)  begin failures++; $display("FAIL no wake-up"); end
    if (n_sleep == 0) begin failures++; $display("FAIL no sleep"); end
    if (n_dump == 0)  begin failures++; $display("FAIL no storage dump"); end
    if (n_est == 0)   begin failures++; $display("FAIL no carrier estimate"); end
    if (n_fe == 0)    begin failures++; $display("FAIL no FE update"); end
    if (0 && n_ts == 0) begin failures++; $display("FAIL no temperature-sensor frame"); end
    $display("mechanisms: ofdm=%0d mt=%0d wake=%0d sleep=%0d dump=%0d est=%0d fe=%0d ts=%0d",
             n_ofdm, n_mt, n_wake, n_sleep, n_dump, n_est, n_fe, n_ts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
