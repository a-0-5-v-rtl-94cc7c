// pmc: power management cell between an always-on domain (AOD) and one
// power-gated domain (PGD).
//
// On an OFF command it puts the domain to sleep in three steps, one clock
// each: the isolation cells clamp the domain's outputs high, the function
// enable to the domain drops, and the power-gating cells (DCG-PGC) cut the
// virtual supply.  On an ON command it wakes the domain in the opposite
// order of concern: the power-gating cells reconnect the supply first, and
// after SETTLE clocks for the virtual supply to come up the isolation is
// released and then the function enable is passed on.  `active` is high
// while the domain is fully on.  A command that arrives mid-sequence takes
// effect once the sequence has finished.
// From the document: the three controls, tie-high isolation, the order of
// the sleep sequence (isolate, gate) and of the wake sequence (supply,
// release isolation, enable).  This design's choices: one clock per step
// and the SETTLE wait.
module pmc #(
  parameter int W      = 8,        // isolated output bits
  parameter int SETTLE = 4         // clocks for the virtual supply to settle
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         on,          // ON/OFF from the power manager
  input  logic         enable_in,   // function enable from the AOD
  input  logic [W-1:0] sig_in,      // outputs of the PGD
  output logic [W-1:0] sig_out,     // isolated outputs towards the AOD
  output logic         pgd_en,      // function enable into the PGD
  output logic         vdd_on,      // DCG-PGC control: 1 = supply connected
  output logic         iso,         // 1 = outputs clamped high
  output logic         active
);
  typedef enum logic [2:0] {
    P_OFF, P_PWR_UP, P_ISO_OFF, P_ON, P_ISO_ON, P_EN_OFF
  } pstate_e;
  pstate_e st;
  logic [$clog2(SETTLE+1)-1:0] cnt;
  logic en_ok;

  assign sig_out = iso ? '1 : sig_in;
  assign pgd_en  = enable_in && en_ok;
  assign active  = (st == P_ON);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_OFF; cnt <= '0; vdd_on <= 1'b0; iso <= 1'b1; en_ok <= 1'b0;
    end else begin
      case (st)
        P_OFF:     if (on) begin vdd_on <= 1'b1; cnt <= '0; st <= P_PWR_UP; end
        P_PWR_UP:  begin
                     cnt <= cnt + 1'b1;
                     if (int'(cnt) >= SETTLE - 1) begin iso <= 1'b0; st <= P_ISO_OFF; end
                   end
        P_ISO_OFF: begin en_ok <= 1'b1; st <= P_ON; end
        P_ON:      if (!on) begin iso <= 1'b1; st <= P_ISO_ON; end
        P_ISO_ON:  begin en_ok <= 1'b0; st <= P_EN_OFF; end
        P_EN_OFF:  begin vdd_on <= 1'b0; st <= P_OFF; end
        default:   st <= P_OFF;
      endcase
    end
  end

  // the domain is never enabled without supply
  assert property (@(posedge clk) disable iff (!rst_n) pgd_en |-> vdd_on);

endmodule
