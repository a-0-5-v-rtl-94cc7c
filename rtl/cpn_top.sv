// cpn_top: baseband chip of the central processing node.
//
// On `link_start` the central node broadcasts the downlink frame (timing
// preambles and one OFDM information symbol carrying `info`) that the
// sensor nodes use to measure their carrier and sampling-clock offsets,
// then demodulates the uplink frame in the selected mode: OFDM (all 64
// bits of each symbol) or MT-CDMA (despreading with the code of `user`).
// Recovered 16-bit words leave on `word_valid`/`word` in transmit order.
//
// Power: the downlink transmitter, the MT-CDMA receiver and the OFDM
// receiver are power-gated domains behind power management cells, held in
// reset while unpowered; the controller and the power manager are always
// on.  Clock: `clk` is the 5 MHz output of the clock generator.  Reset is
// asynchronous, active low.  The receiver needs the first sample of the
// uplink frame marked on `rx_first` by the front end's frame detector.
// Follows the chip architecture of the document.  This design's choices:
// receiver and downlink transmitter are powered together for the whole
// link, the uplink frame length is fixed at DEPTH words, and the phase
// selection of the clock generator is an input of the system top rather
// than being derived here, since the document does not say how it is
// computed.
module cpn_top
  import wban_pkg::*;
#(
  parameter int DEPTH = SU_DEPTH
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic [2:0]  user,
  input  logic        link_start,
  input  logic [63:0] info,
  // downlink to the transmit front end
  output logic        dl_valid,
  output cplx_t       dl_sample,
  output logic        dl_first,
  // uplink from the receive front end
  input  logic        rx_valid,
  input  cplx_t       rx_sample,
  input  logic        rx_first,
  // recovered data
  output logic        word_valid,
  output logic [15:0] word,
  output logic        rx_done,
  // status
  output logic        fe_on,
  output logic        busy,
  output logic [2:0]  dom_vdd,
  output logic [2:0]  dom_iso
);
  localparam int IW = 3 + 2 * SW;    // done, valid, first, sample
  localparam int WW = 2 + 16;        // done, valid, word

  logic [2:0] dom_req, dom_on, dom_act;
  logic       pm_ready, sleeping, dl_done_i, dl_start, rx_start;
  cpn_fsm u_fsm (
    .clk, .rst_n, .mode, .link_start, .pm_ready, .dl_done(dl_done_i), .rx_done,
    .dom_req, .dl_start, .rx_start, .busy);

  power_manager #(.ND(3)) u_pm (
    .clk, .rst_n, .req(dom_req), .dom_active(dom_act), .dom_vdd, .dom_on, .fe_on,
    .ready(pm_ready), .sleeping);

  // ---------------- domain 0: downlink transmitter ----------------
  logic dt_en, rst_dt, dt_busy, dt_done, dt_v, dt_f, dt_pre;
  cplx_t dt_o;
  logic [IW-1:0] dt_bundle, dt_iso;
  pmc #(.W(IW)) u_pmc_dt (
    .clk, .rst_n, .on(dom_on[0]), .enable_in(busy), .sig_in(dt_bundle),
    .sig_out(dt_iso), .pgd_en(dt_en), .vdd_on(dom_vdd[0]), .iso(dom_iso[0]), .active(dom_act[0]));
  assign rst_dt = rst_n & dom_vdd[0];
  dl_tx u_dl (
    .clk, .rst_n(rst_dt), .start(dl_start && dt_en), .info, .busy(dt_busy), .done(dt_done),
    .out_valid(dt_v), .out(dt_o), .out_first(dt_f), .out_pre(dt_pre));
  assign dt_bundle = {dt_done, dt_v, dt_f, dt_o};
  assign dl_done_i = dt_iso[IW-1] && !dom_iso[0];
  assign dl_valid  = dt_iso[IW-2] && !dom_iso[0];
  assign dl_first  = dt_iso[IW-3] && !dom_iso[0];
  assign dl_sample = cplx_t'(dt_iso[2*SW-1:0]);

  // ---------------- domain 1: MT-CDMA receiver ----------------
  logic mr_en, rst_mr, mr_busy, mr_done, mr_v;
  logic [15:0] mr_w;
  logic [WW-1:0] mr_iso;
  pmc #(.W(WW)) u_pmc_mr (
    .clk, .rst_n, .on(dom_on[1]), .enable_in(busy), .sig_in({mr_done, mr_v, mr_w}),
    .sig_out(mr_iso), .pgd_en(mr_en), .vdd_on(dom_vdd[1]), .iso(dom_iso[1]), .active(dom_act[1]));
  assign rst_mr = rst_n & dom_vdd[1];
  mt_rx u_mr (
    .clk, .rst_n(rst_mr), .start(rx_start && mr_en && mode == MODE_MT), .nwords(16'(DEPTH)),
    .user, .busy(mr_busy), .done(mr_done), .in_valid(rx_valid && mr_en), .in(rx_sample),
    .in_first(rx_first), .word_valid(mr_v), .word(mr_w));

  // ---------------- domain 2: OFDM receiver ----------------
  logic or_en, rst_or, or_busy, or_done, or_v;
  logic [15:0] or_w;
  logic [WW-1:0] or_iso;
  pmc #(.W(WW)) u_pmc_or (
    .clk, .rst_n, .on(dom_on[2]), .enable_in(busy), .sig_in({or_done, or_v, or_w}),
    .sig_out(or_iso), .pgd_en(or_en), .vdd_on(dom_vdd[2]), .iso(dom_iso[2]), .active(dom_act[2]));
  assign rst_or = rst_n & dom_vdd[2];
  ofdm_rx u_or (
    .clk, .rst_n(rst_or), .start(rx_start && or_en && mode == MODE_OFDM),
    .nsym(16'(DEPTH / 4)), .busy(or_busy), .done(or_done), .in_valid(rx_valid && or_en),
    .in(rx_sample), .in_first(rx_first), .word_valid(or_v), .word(or_w));

  // ---------------- output multiplexer ----------------
  always_comb begin
    if (mode == MODE_MT) begin
      word_valid = mr_iso[WW-2] && !dom_iso[1];
      word       = mr_iso[15:0];
      rx_done    = mr_iso[WW-1] && !dom_iso[1];
    end else begin
      word_valid = or_iso[WW-2] && !dom_iso[2];
      word       = or_iso[15:0];
      rx_done    = or_iso[WW-1] && !dom_iso[2];
    end
  end

  logic unused;
  assign unused = ^{dt_busy, dt_pre, mr_busy, or_busy, sleeping};

endmodule
