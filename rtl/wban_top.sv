// wban_top: the dual-mode biotelemetry link - one sensor-node baseband
// chip and one central-node baseband chip, each clocked by its own
// phase-frequency tunable clock generator.
//
// The sensor node's generator locks to `wsn_refclk` (the node's crystal-less
// clock source) and receives the FE command from the node's downlink
// receiver, so after each downlink the node clock is pulled towards the
// central node's clock.  Its PH0 tap clocks the node.  The central node's
// generator locks to `cpn_refclk`; the tap chosen by `cpn_pe` clocks the
// central node.  Each chip is held in reset until its generator reports
// lock; the reset release is synchronised to the chip clock.
//
// The radio front ends and the channel are outside this module: the node's
// uplink samples (`wsn_tx_*`) and the central node's downlink samples
// (`cpn_dl_*`) leave the top, and the received samples come back on
// `wsn_dl_*` and `cpn_rx_*`, each in the clock domain of the chip that
// receives them.  The chip clocks are exported for that purpose.
// The clock generators are behavioural models (see pftcg); everything else
// is synthesizable.
// From the document: the two chips, the generator per chip, FE from the
// node's receiver to its generator, PE to the central node's generator.
// This design's choices: lock-gated resets and the top-level pins.
module wban_top
  import wban_pkg::*;
#(
  parameter int DEPTH      = SU_DEPTH,
  parameter int DIV_SU     = 8197,
  parameter int DIV_CODE   = 31,
  parameter int DL_TIMEOUT = 4096
) (
  input  logic        wsn_refclk,
  input  logic        cpn_refclk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic [2:0]  wsn_user,
  input  logic [2:0]  cpn_user,
  // sensor node sensors
  input  logic        sensor_sel,
  input  logic [15:0] ext_sample,
  input  logic [15:0] ts_sample,
  output logic        sample_clk_en,
  // central node control and data
  input  logic        link_start,
  input  logic [63:0] info,
  input  logic [2:0]  cpn_pe,
  output logic        word_valid,
  output logic [15:0] word,
  output logic        rx_done,
  // clocks and generator status
  output logic        wsn_clk,
  output logic        cpn_clk,
  output logic        wsn_lock,
  output logic        cpn_lock,
  output logic [13:0] wsn_dco_code,
  output logic [13:0] cpn_dco_code,
  // sensor node front-end side
  input  logic        wsn_dl_valid,
  input  cplx_t       wsn_dl_sample,
  input  logic        wsn_dl_first,
  output logic        wsn_tx_valid,
  output cplx_t       wsn_tx_sample,
  output logic        wsn_tx_first,
  output logic        wsn_fe_on,
  // central node front-end side
  output logic        cpn_dl_valid,
  output cplx_t       cpn_dl_sample,
  output logic        cpn_dl_first,
  input  logic        cpn_rx_valid,
  input  cplx_t       cpn_rx_sample,
  input  logic        cpn_rx_first,
  output logic        cpn_fe_on,
  // node status
  output logic signed [7:0]  wsn_fe,
  output logic signed [23:0] wsn_cfo,
  output logic signed [23:0] wsn_sco,
  output logic [2:0]  wsn_dom_vdd,
  output logic [2:0]  cpn_dom_vdd,
  output logic        wsn_tx_busy,
  output logic        wsn_dl_timeout,
  output logic        su_overflow,
  output logic        cpn_busy
);
  // ---------------- clock generators ----------------
  logic [7:0] wsn_ph, cpn_ph;
  logic       wsn_out_unused;
  pftcg u_wsn_clk (
    .refclk(wsn_refclk), .rst_n, .fe(wsn_fe), .relock(1'b0), .pe(3'd0),
    .ph(wsn_ph), .out_clk(wsn_out_unused), .lock(wsn_lock), .dco_code(wsn_dco_code));
  pftcg u_cpn_clk (
    .refclk(cpn_refclk), .rst_n, .fe(8'sd0), .relock(1'b0), .pe(cpn_pe),
    .ph(cpn_ph), .out_clk(cpn_clk), .lock(cpn_lock), .dco_code(cpn_dco_code));
  assign wsn_clk = wsn_ph[0];

  // ---------------- lock-gated reset synchronisers ----------------
  logic [1:0] wsn_rs, cpn_rs;
  logic       wsn_lk, cpn_lk;
  assign wsn_lk = rst_n & wsn_lock;
  assign cpn_lk = rst_n & cpn_lock;
  always_ff @(posedge wsn_clk or negedge wsn_lk)
    if (!wsn_lk) wsn_rs <= '0; else wsn_rs <= {wsn_rs[0], 1'b1};
  always_ff @(posedge cpn_clk or negedge cpn_lk)
    if (!cpn_lk) cpn_rs <= '0; else cpn_rs <= {cpn_rs[0], 1'b1};

  // ---------------- sensor node chip ----------------
  logic wsn_code_en;
  logic [2:0] wsn_iso;
  wsn_top #(.DEPTH(DEPTH), .DIV_SU(DIV_SU), .DIV_CODE(DIV_CODE), .DL_TIMEOUT(DL_TIMEOUT)) u_wsn (
    .clk(wsn_clk), .rst_n(wsn_rs[1]), .mode, .user(wsn_user),
    .sensor_sel, .ext_sample, .ts_sample, .sample_clk_en, .code_clk_en(wsn_code_en),
    .dl_valid(wsn_dl_valid), .dl_sample(wsn_dl_sample), .dl_first(wsn_dl_first),
    .tx_valid(wsn_tx_valid), .tx_sample(wsn_tx_sample), .tx_first(wsn_tx_first),
    .fe(wsn_fe), .fe_on(wsn_fe_on), .dom_vdd(wsn_dom_vdd), .dom_iso(wsn_iso),
    .su_overflow, .dl_timeout(wsn_dl_timeout), .tx_busy(wsn_tx_busy),
    .cfo_est(wsn_cfo), .sco_est(wsn_sco));

  // ---------------- central node chip ----------------
  logic [2:0] cpn_iso;
  cpn_top #(.DEPTH(DEPTH)) u_cpn (
    .clk(cpn_clk), .rst_n(cpn_rs[1]), .mode, .user(cpn_user), .link_start, .info,
    .dl_valid(cpn_dl_valid), .dl_sample(cpn_dl_sample), .dl_first(cpn_dl_first),
    .rx_valid(cpn_rx_valid), .rx_sample(cpn_rx_sample), .rx_first(cpn_rx_first),
    .word_valid, .word, .rx_done, .fe_on(cpn_fe_on), .busy(cpn_busy),
    .dom_vdd(cpn_dom_vdd), .dom_iso(cpn_iso));

  logic unused;
  assign unused = ^{wsn_ph[7:1], cpn_ph, wsn_out_unused, wsn_code_en, wsn_iso, cpn_iso};

endmodule
