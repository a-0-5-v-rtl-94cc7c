// wsn_fsm: behaviour controller of the sensor node.
//
// The node sleeps while the storage unit fills.  When a full frame is
// ready it wakes the downlink receiver and the transmitter of the selected
// mode, receives the downlink preamble to measure the frequency offsets
// (the estimates are loaded into the phase rotator and the clock
// generator by the estimators themselves), then sends the stored frame and
// goes back to sleep with every power-gated domain off.
// Sequence: SLEEP -> WAKE (domains power up) -> DL_RX (until the offset
// estimates are in, or DL_TIMEOUT clocks without a downlink) -> TX (start
// modulator, wait for done) -> SLEEP.  Domain bits of `dom_req`:
// 0 = downlink receiver, 1 = MT-CDMA transmitter, 2 = OFDM transmitter.
// The document gives the operating cycle (sleep, setup, preamble, data)
// and that an FSM controls it; the states and the timeout are this
// design's choices.
module wsn_fsm
  import wban_pkg::*;
#(
  parameter int DL_TIMEOUT = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        frame_ready,    // storage unit holds a frame
  input  logic        pm_ready,       // requested domains are up
  input  logic        est_done,       // downlink estimates available
  input  logic        tx_done,
  output logic [2:0]  dom_req,
  output logic        dl_enable,      // function enable of the receiver
  output logic        tx_start,
  output logic        frame_taken,
  output logic        tx_active,
  output logic        dl_timeout
);
  typedef enum logic [2:0] {F_SLEEP, F_WAKE, F_DL_RX, F_TX_START, F_TX, F_DOWN} fstate_e;
  fstate_e st;
  logic [$clog2(DL_TIMEOUT+1)-1:0] tmo;
  logic [2:0] want;

  assign want = (mode == MODE_MT) ? 3'b011 : 3'b101;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_SLEEP; dom_req <= '0; tmo <= '0; tx_start <= 1'b0; frame_taken <= 1'b0;
      dl_timeout <= 1'b0;
    end else begin
      tx_start    <= 1'b0;
      frame_taken <= 1'b0;
      dl_timeout  <= 1'b0;
      case (st)
        F_SLEEP:    if (frame_ready) begin dom_req <= want; st <= F_WAKE; end
        F_WAKE:     if (pm_ready) begin tmo <= '0; st <= F_DL_RX; end
        F_DL_RX: begin
          tmo <= tmo + 1'b1;
          if (est_done) st <= F_TX_START;
          else if (int'(tmo) == DL_TIMEOUT - 1) begin dl_timeout <= 1'b1; st <= F_TX_START; end
        end
        F_TX_START: begin
          dom_req     <= want & 3'b110;         // receiver can sleep now
          tx_start    <= 1'b1;
          frame_taken <= 1'b1;
          st          <= F_TX;
        end
        F_TX:       if (tx_done) begin dom_req <= '0; st <= F_DOWN; end
        F_DOWN:     if (pm_ready) st <= F_SLEEP;
        default:    st <= F_SLEEP;
      endcase
    end
  end

  assign dl_enable = (st == F_DL_RX);
  assign tx_active = (st == F_TX) || (st == F_TX_START);

endmodule
