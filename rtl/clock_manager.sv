// clock_manager: derives the slower rates of the baseband from the 5 MHz
// clock of the phase-frequency tunable clock generator.
//
// Produces one-cycle clock-enable strobes: `en_su` at 5 MHz / DIV_SU
// (610 Hz, the sensor sampling and storage rate) and `en_code` at
// 5 MHz / DIV_CODE (161 kHz, the MT-CDMA spreading-code clock).  The 5 MHz
// clock itself is used directly by the signal-processing blocks and the
// front end.  The rates are the document's; using enables on one clock
// instead of separate divided clocks is this design's choice.
module clock_manager #(
  parameter int DIV_SU   = 8197,    // 5 MHz / 8197 = 609.98 Hz
  parameter int DIV_CODE = 31       // 5 MHz / 31   = 161.3 kHz
) (
  input  logic clk,
  input  logic rst_n,
  output logic en_su,
  output logic en_code
);
  logic [$clog2(DIV_SU)-1:0]   cnt_su;
  logic [$clog2(DIV_CODE)-1:0] cnt_code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_su   <= '0;
      cnt_code <= '0;
      en_su    <= 1'b0;
      en_code  <= 1'b0;
    end else begin
      en_su   <= (int'(cnt_su) == DIV_SU - 1);
      en_code <= (int'(cnt_code) == DIV_CODE - 1);
      cnt_su   <= (int'(cnt_su) == DIV_SU - 1) ? '0 : cnt_su + 1'b1;
      cnt_code <= (int'(cnt_code) == DIV_CODE - 1) ? '0 : cnt_code + 1'b1;
    end
  end

endmodule
