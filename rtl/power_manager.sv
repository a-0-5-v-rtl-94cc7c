// power_manager: turns the power-gated domains and the front end on and off.
//
// The controller FSM asks for a set of domains (`req`, one bit per domain).
// The power manager passes each request to its domain's power management
// cell as the ON/OFF command, switches the front-end circuits on whenever
// any domain is requested (TURN-ON), and reports `ready` once every
// requested domain is active and every other one is fully off, so the FSM
// never starts a block that is still waking up.  `sleeping` is high when
// all domains are off.  The document gives the block's role (ON/OFF to
// the front end and to the cells); the handshake is this design's choice.
module power_manager #(
  parameter int ND = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [ND-1:0] req,
  input  logic [ND-1:0] dom_active,   // from the power management cells
  input  logic [ND-1:0] dom_vdd,      // supply state from the cells
  output logic [ND-1:0] dom_on,       // ON/OFF to the cells
  output logic          fe_on,        // TURN-ON to the front end
  output logic          ready,
  output logic          sleeping
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dom_on <= '0;
      fe_on  <= 1'b0;
    end else begin
      dom_on <= req;
      fe_on  <= |req;
    end
  end

  assign ready    = (dom_on == req) && ((dom_active & req) == req) && ((dom_vdd & ~req) == '0);
  assign sleeping = (dom_vdd == '0) && !fe_on;

endmodule
