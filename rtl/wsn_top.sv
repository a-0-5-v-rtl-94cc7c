// wsn_top: baseband chip of the wireless sensor node.
//
// Body-signal samples (external readout circuit or on-chip temperature
// sensor, selected by `sensor_sel`) are taken at 610 Hz into the storage
// unit.  When its low-speed FIFO is full the frame moves to the high-speed
// FIFO and the controller wakes the node: the downlink receiver measures
// the carrier and sampling-clock offsets from the central node's preamble,
// then the selected modulator (OFDM, 4.85 Mbit/s, or MT-CDMA with user
// code `user`, 143 kbit/s) sends the 512-word frame.  Every outgoing sample
// is pre-rotated by the measured carrier offset (RSD pre-calibration), and
// the sampling offset leaves the chip as the FE command for the clock
// generator, so the central node sees neither error.
//
// Power: the downlink receiver, the MT-CDMA transmitter and the OFDM
// transmitter are power-gated domains, each behind a power management cell
// (isolation, function enable, power switch).  A gated domain is held in
// reset while its supply is off.  The storage unit, clock manager,
// controller, power manager, phase rotator and the registers that keep the
// offset estimates are always on.
// Clock: `clk` is the 5 MHz output of the clock generator; the clock
// manager derives the 610 Hz and 161 kHz enables.  Reset is asynchronous,
// active low.
// Follows the chip architecture of the document.  This design's choices:
// the phase rotator sits after the mode multiplexer in the always-on part,
// so that both modes are pre-calibrated; the estimates are kept in
// always-on registers while the receiver sleeps; power-gated domains are
// reset while off.
module wsn_top
  import wban_pkg::*;
#(
  parameter int DEPTH      = SU_DEPTH,
  parameter int DIV_SU     = 8197,
  parameter int DIV_CODE   = 31,
  parameter int DL_TIMEOUT = 4096
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mode_e              mode,
  input  logic [2:0]         user,
  // sensors
  input  logic               sensor_sel,     // 0: external readout, 1: temperature sensor
  input  logic [15:0]        ext_sample,
  input  logic [15:0]        ts_sample,
  output logic               sample_clk_en,  // 610 Hz sampling strobe for the sensors
  output logic               code_clk_en,    // 161 kHz strobe
  // downlink from the receive front end
  input  logic               dl_valid,
  input  cplx_t              dl_sample,
  input  logic               dl_first,
  // uplink to the transmit front end
  output logic               tx_valid,
  output cplx_t              tx_sample,
  output logic               tx_first,
  // to the clock generator and front end
  output logic signed [7:0]  fe,
  output logic               fe_on,
  // status
  output logic [2:0]         dom_vdd,
  output logic [2:0]         dom_iso,
  output logic               su_overflow,
  output logic               dl_timeout,
  output logic               tx_busy,
  output logic signed [23:0] cfo_est,
  output logic signed [23:0] sco_est
);
  localparam int IW = 2 + 2 * SW;    // isolated bundle: done, valid/first, sample

  // ---------------- always-on part ----------------
  logic en_su;
  clock_manager #(.DIV_SU(DIV_SU), .DIV_CODE(DIV_CODE)) u_clkm (
    .clk, .rst_n, .en_su, .en_code(code_clk_en));
  assign sample_clk_en = en_su;

  logic        su_rd, su_empty, frame_ready, frame_taken, dumping;
  logic [15:0] su_rdata;
  storage_unit #(.DEPTH(DEPTH), .WIDTH(16)) u_su (
    .clk, .rst_n, .sample_en(en_su), .sample(sensor_sel ? ts_sample : ext_sample),
    .rd(su_rd), .rdata(su_rdata), .hs_empty(su_empty), .frame_ready, .frame_taken,
    .dumping, .overflow(su_overflow));

  logic [2:0] dom_req, dom_on, dom_act;
  logic       pm_ready, sleeping, est_done_iso, tx_done_sel, dl_enable, tx_start, tx_active;
  wsn_fsm #(.DL_TIMEOUT(DL_TIMEOUT)) u_fsm (
    .clk, .rst_n, .mode, .frame_ready, .pm_ready, .est_done(est_done_iso),
    .tx_done(tx_done_sel), .dom_req, .dl_enable, .tx_start, .frame_taken, .tx_active,
    .dl_timeout);
  assign tx_busy = tx_active;

  power_manager #(.ND(3)) u_pm (
    .clk, .rst_n, .req(dom_req), .dom_active(dom_act), .dom_vdd, .dom_on, .fe_on,
    .ready(pm_ready), .sleeping);

  // ---------------- domain 0: downlink receiver ----------------
  logic dl_en, rst_dl;
  logic signed [23:0] cfo_w, sco_w;
  logic signed [7:0]  fe_w;
  logic               est_done_w;
  logic [IW-1:0] dl_bundle, dl_iso;
  pmc #(.W(IW)) u_pmc_dl (
    .clk, .rst_n, .on(dom_on[0]), .enable_in(dl_enable), .sig_in(dl_bundle),
    .sig_out(dl_iso), .pgd_en(dl_en), .vdd_on(dom_vdd[0]), .iso(dom_iso[0]), .active(dom_act[0]));
  assign rst_dl = rst_n & dom_vdd[0];

  dl_rx u_dl_rx (
    .clk, .rst_n(rst_dl), .in_valid(dl_valid && dl_en), .in(dl_sample), .in_first(dl_first),
    .cfo(cfo_w), .sco(sco_w), .fe(fe_w), .est_done(est_done_w));
  // only the done flag crosses through the isolation cells; the estimates
  // are captured from the receiver while it is powered and not isolated
  assign dl_bundle    = {1'b0, est_done_w, 32'h0};
  assign est_done_iso = dl_iso[IW-2] && !dom_iso[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfo_est <= '0; sco_est <= '0; fe <= '0;
    end else if (est_done_iso) begin
      cfo_est <= cfo_w; sco_est <= sco_w; fe <= fe_w;
    end
  end

  // ---------------- domain 1: MT-CDMA transmitter ----------------
  logic mt_en, rst_mt, mt_busy, mt_done, mt_rd, mt_v, mt_f;
  cplx_t mt_o;
  logic [IW-1:0] mt_bundle, mt_iso;
  pmc #(.W(IW)) u_pmc_mt (
    .clk, .rst_n, .on(dom_on[1]), .enable_in(tx_active), .sig_in(mt_bundle),
    .sig_out(mt_iso), .pgd_en(mt_en), .vdd_on(dom_vdd[1]), .iso(dom_iso[1]), .active(dom_act[1]));
  assign rst_mt = rst_n & dom_vdd[1];
  mt_tx u_mt (
    .clk, .rst_n(rst_mt), .start(tx_start && mt_en && mode == MODE_MT), .nwords(16'(DEPTH)),
    .user, .busy(mt_busy), .done(mt_done), .fifo_rd(mt_rd), .fifo_rdata(su_rdata),
    .fifo_empty(su_empty), .out_valid(mt_v), .out(mt_o), .out_sym_first(mt_f));
  assign mt_bundle = {mt_done, mt_v, mt_o};

  // ---------------- domain 2: OFDM transmitter ----------------
  logic of_en, rst_of, of_busy, of_done, of_rd, of_v, of_f;
  cplx_t of_o;
  logic [IW-1:0] of_bundle, of_iso;
  pmc #(.W(IW)) u_pmc_of (
    .clk, .rst_n, .on(dom_on[2]), .enable_in(tx_active), .sig_in(of_bundle),
    .sig_out(of_iso), .pgd_en(of_en), .vdd_on(dom_vdd[2]), .iso(dom_iso[2]), .active(dom_act[2]));
  assign rst_of = rst_n & dom_vdd[2];
  ofdm_tx u_of (
    .clk, .rst_n(rst_of), .start(tx_start && of_en && mode == MODE_OFDM), .nwords(16'(DEPTH)),
    .busy(of_busy), .done(of_done), .fifo_rd(of_rd), .fifo_rdata(su_rdata),
    .fifo_empty(su_empty), .out_valid(of_v), .out(of_o), .out_sym_first(of_f));
  assign of_bundle = {of_done, of_v, of_o};

  // ---------------- mode multiplexer and RSD pre-calibration ----------------
  logic  sel_v, sel_first, first_pending;
  cplx_t sel_o;
  assign su_rd       = (mode == MODE_MT) ? (mt_rd && mt_en) : (of_rd && of_en);
  assign sel_v       = (mode == MODE_MT) ? (mt_iso[IW-2] && !dom_iso[1]) : (of_iso[IW-2] && !dom_iso[2]);
  assign sel_o       = (mode == MODE_MT) ? cplx_t'(mt_iso[2*SW-1:0]) : cplx_t'(of_iso[2*SW-1:0]);
  assign tx_done_sel = (mode == MODE_MT) ? (mt_iso[IW-1] && !dom_iso[1]) : (of_iso[IW-1] && !dom_iso[2]);
  assign sel_first   = sel_v && first_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 first_pending <= 1'b0;
    else if (tx_start)          first_pending <= 1'b1;
    else if (sel_v)             first_pending <= 1'b0;
  end

  phase_rotator u_rot (
    .clk, .rst_n, .clear(sel_first), .cfo_step(cfo_est),
    .in_valid(sel_v), .in(sel_o), .in_first(sel_first),
    .out_valid(tx_valid), .out(tx_sample), .out_first(tx_first));

  // unused flags of the gated blocks
  logic unused;
  assign unused = ^{mt_busy, mt_f, of_busy, of_f, dumping, sleeping, dl_iso[IW-1], dl_iso[2*SW-1:0]};

endmodule
