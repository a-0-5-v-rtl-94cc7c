// cpn_fsm: behaviour controller of the central node.
//
// On `link_start` the central node powers up its downlink transmitter and
// the receiver of the selected mode, broadcasts the downlink frame
// (preambles for the nodes' synchronisation and offset estimation), then
// keeps only the receiver on and demodulates the uplink frame of `nwords`
// words, and finally powers everything down.
// Sequence: IDLE -> WAKE -> DL_TX (until the frame is sent) -> RX (until
// the receiver is done) -> DOWN -> IDLE.  Domain bits of `dom_req`:
// 0 = downlink transmitter, 1 = MT-CDMA receiver, 2 = OFDM receiver.
// The document says the central node broadcasts the downlink before every
// uplink; the states are this design's choice.
module cpn_fsm
  import wban_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        link_start,
  input  logic        pm_ready,
  input  logic        dl_done,
  input  logic        rx_done,
  output logic [2:0]  dom_req,
  output logic        dl_start,
  output logic        rx_start,
  output logic        busy
);
  typedef enum logic [2:0] {C_IDLE, C_WAKE, C_DL, C_RX, C_DOWN} cstate_e;
  cstate_e st;
  logic [2:0] want;

  assign want = (mode == MODE_MT) ? 3'b011 : 3'b101;
  assign busy = (st != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; dom_req <= '0; dl_start <= 1'b0; rx_start <= 1'b0;
    end else begin
      dl_start <= 1'b0;
      rx_start <= 1'b0;
      case (st)
        C_IDLE: if (link_start) begin dom_req <= want; st <= C_WAKE; end
        C_WAKE: if (pm_ready) begin dl_start <= 1'b1; rx_start <= 1'b1; st <= C_DL; end
        C_DL:   if (dl_done) begin dom_req <= want & 3'b110; st <= C_RX; end
        C_RX:   if (rx_done) begin dom_req <= '0; st <= C_DOWN; end
        C_DOWN: if (pm_ready) st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
