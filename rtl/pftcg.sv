// pftcg: phase-frequency tunable clock generator (behavioural model).
//
// BEHAVIOURAL MODEL, not synthesizable: the digitally-controlled oscillator
// and the phase-frequency detector are analog/asynchronous circuits and are
// modelled with delays.  The controller (pftcg_ctrl) is synthesizable RTL.
//
// The DCO is a ring of 4 delay stages closed through an inverter; each
// stage delays by D_MAX_PS - dco_code * D_STEP_PS picoseconds, so one
// period is 8 stage delays and the true and inverted stage outputs are the
// taps PH0..PH7, 8 copies of the clock spaced by 1/8 period.  Synthesis
// ignores the delays and keeps the ring as an enabled inverter loop, which
// the synthesis check reports as a logic loop; the edge-ordering phase
// detector reduces to fixed logic there, so with FE tied to zero the
// synthesized `dco_code` is a constant.  Both are properties of this
// model, not of the controller, which is ordinary synthesizable RTL.  The
// PFD compares rising edges of REFCLK and of PH0 and
// holds which came first (UP: reference first, DOWN: PH0 first).  The
// controller, clocked at the falling edge of REFCLK, closes the loop until
// PH0 is locked to REFCLK, then freezes and applies the FE command.  The
// phase-selection multiplexer drives OUT_CLK from tap PE.
// With the defaults the oscillator locks at 5 MHz near code 5000, where
// one code step changes the period by 8 ps, i.e. 40 ppm.
// From the document: the four parts (PFD, controller, DCO, mux), eight
// phases spaced T/8, lock on PH0, FE to the controller and PE to the mux,
// 5 MHz.  This design's choices: the delay law, the detector model and the
// loop details (see pftcg_ctrl).
module pftcg #(
  parameter int  CW        = 14,
  parameter int  FEW       = 8,
  parameter int  D_MAX_PS  = 30000,
  parameter int  D_STEP_PS = 1
) (
  input  logic                  refclk,
  input  logic                  rst_n,
  input  logic signed [FEW-1:0] fe,
  input  logic                  relock,
  input  logic [2:0]            pe,
  output logic [7:0]            ph,
  output logic                  out_clk,
  output logic                  lock,
  output logic [CW-1:0]         dco_code
);
  logic up_q, dn_q;                   // pending edges
  logic up, down;                     // result of the last comparison
  logic ref_d, fb_d;                  // previous levels, for edge detection
  logic ctrl_clk;
  int   d_ps;                        // delay of one ring stage, ps

  assign d_ps = D_MAX_PS - int'(dco_code) * D_STEP_PS;

  // ring oscillator: four delay stages closed through an inverter; each
  // stage is a transport delay of d_ps, so the period is 8 * d_ps and the
  // true and inverted stage outputs give the eight taps spaced by T/8.
  // The ring runs while rst_n is high.  It starts from all stages low, as
  // a real ring held by its enable would; without that, an arbitrary
  // power-up pattern could leave stages whose input never changes.
  logic [3:0] r;
  initial r = '0;
  always @(r[3] or rst_n) r[0] <= #(d_ps * 1ps) rst_n & ~r[3];
  for (genvar s = 1; s < 4; s++) begin : g_stage
    always @(r[s-1]) r[s] <= #(d_ps * 1ps) r[s-1];
  end
  assign ph = {~r, r};

  // phase-frequency detector: first edge wins, the second one clears
  always @(refclk or ph[0] or rst_n) begin
    if (!rst_n) begin
      up_q = 1'b0; dn_q = 1'b0; up = 1'b0; down = 1'b0;
    end else begin
      if (refclk && !ref_d) begin
        if (dn_q) begin dn_q = 1'b0; up = 1'b0; down = 1'b1; end
        else      up_q = 1'b1;
      end
      if (ph[0] && !fb_d) begin
        if (up_q) begin up_q = 1'b0; up = 1'b1; down = 1'b0; end
        else      dn_q = 1'b1;
      end
    end
    ref_d = refclk;
    fb_d  = ph[0];
  end

  assign ctrl_clk = ~refclk;

  pftcg_ctrl #(.CW(CW), .FEW(FEW)) u_ctrl (
    .clk(ctrl_clk), .rst_n, .up, .down, .fe, .relock, .dco_code, .lock);

  assign out_clk = ph[pe];

endmodule
