// pftcg_ctrl: digital controller of the phase-frequency tunable clock
// generator.
//
// Runs once per reference cycle.  During acquisition it is a bang-bang
// proportional-integral loop filter: `up` (the reference edge came first,
// so the oscillator is slow) or `down` moves the integral code by one LSB
// and adds a proportional step of KP LSBs to the code sent to the DCO.
// When the integral code has stayed within +-2 LSB for LOCK_CYC cycles the
// loop is declared locked: the integral code is frozen and LOCK rises.
// From then on the frequency-error command FE (signed, in DCO LSBs) is
// added to the frozen code, which fine-tunes the generated frequency
// without the loop pulling it back.  `relock` clears the lock and resumes
// tracking.
// From the document: the PFD's UP/DOWN driving the controller, DCO_CODE,
// LOCK and the FE input for frequency fine tuning.  The loop filter, the
// lock criterion and freezing the loop to apply FE are this design's
// choices.
module pftcg_ctrl #(
  parameter int CW        = 14,      // DCO code width
  parameter int CODE_INIT = 4900,
  parameter int KP        = 4,
  parameter int LOCK_CYC  = 32,
  parameter int FEW       = 8        // FE width
) (
  input  logic                  clk,        // reference-rate clock
  input  logic                  rst_n,
  input  logic                  up,
  input  logic                  down,
  input  logic signed [FEW-1:0] fe,
  input  logic                  relock,
  output logic [CW-1:0]         dco_code,
  output logic                  lock
);
  logic [CW-1:0] integ, win_ref;
  logic [$clog2(LOCK_CYC+1)-1:0] win_cnt;
  logic signed [CW+1:0] code_s, dev;

  always_comb begin
    code_s = $signed({2'b00, integ});
    if (lock)            code_s = code_s + (CW+2)'(fe);
    else if (up && !down) code_s = code_s + (CW+2)'(KP);
    else if (down && !up) code_s = code_s - (CW+2)'(KP);
    if (code_s < 0)                           dco_code = '0;
    else if (code_s > $signed({2'b00, {CW{1'b1}}})) dco_code = '1;
    else                                      dco_code = code_s[CW-1:0];
    dev = $signed({2'b00, integ}) - $signed({2'b00, win_ref});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ   <= CW'(CODE_INIT);
      win_ref <= CW'(CODE_INIT);
      win_cnt <= '0;
      lock    <= 1'b0;
    end else if (relock) begin
      lock    <= 1'b0;
      win_cnt <= '0;
      win_ref <= integ;
    end else if (!lock) begin
      if (up && !down && integ != '1)       integ <= integ + 1'b1;
      else if (down && !up && integ != '0)  integ <= integ - 1'b1;
      if (dev > 2 || dev < -2) begin
        win_ref <= integ;
        win_cnt <= '0;
      end else if (int'(win_cnt) == LOCK_CYC - 1) begin
        lock <= 1'b1;
      end else begin
        win_cnt <= win_cnt + 1'b1;
      end
    end
  end

endmodule
