// dl_rx: downlink receiver of the sensor node (offset calculator).
//
// Measures, from the downlink preambles, the two frequency errors of the
// node's own clock source relative to the central node:
//  - the carrier frequency offset (cfo_estimator, short and long
//    preambles), delivered on `cfo` for the uplink phase rotator;
//  - the sampling clock offset (sco_estimator, SCO preambles).  The SCO
//    preambles are first delayed by DLY samples, long enough for the CFO
//    estimate to be ready, and de-rotated with it, so the pilot phases hold
//    only the timing drift.  The SCO estimate is converted into the FE
//    command for the clock generator: FE = round(sco / FE_LSB), where
//    FE_LSB is the relative frequency step of one DCO code (40 ppm =
//    671 / 2^24 with the default oscillator); positive FE speeds the clock up.
// `est_done` pulses once both estimates of a frame are in; `cfo`, `sco`
// and `fe` hold their values until the next frame.  The input stream must
// be frame-aligned (`in_first` on the first preamble sample).
// From the document: the offset calculator feeding CFO to the transmitter
// and FE to the clock generator, and the estimation methods.  Not built:
// the frame synchroniser (boundary detection), which the document only
// names.
module dl_rx
  import wban_pkg::*;
#(
  parameter int DLY    = 48,
  parameter int FE_LSB = 671,
  parameter int FEW    = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  cplx_t                 in,
  input  logic                  in_first,
  output logic signed [23:0]    cfo,
  output logic signed [23:0]    sco,
  output logic signed [FEW-1:0] fe,
  output logic                  est_done
);
  logic cfo_valid, sco_valid, sco_valid_d, got_cfo;
  logic signed [23:0] sco_w;
  logic signed [15:0] c0, c1;

  cfo_estimator u_cfo (.clk, .rst_n, .in_valid, .in, .in_first, .cfo_valid, .cfo);

  // delay line for the SCO path
  cplx_t dd   [DLY];
  logic  dv   [DLY];
  logic  dfst [DLY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DLY; i++) begin dd[i] <= '0; dv[i] <= 1'b0; dfst[i] <= 1'b0; end
    end else begin
      dd[0] <= in; dv[0] <= in_valid; dfst[0] <= in_valid && in_first;
      for (int i = 1; i < DLY; i++) begin dd[i] <= dd[i-1]; dv[i] <= dv[i-1]; dfst[i] <= dfst[i-1]; end
    end
  end

  // remove the downlink CFO: cfo = -eps, the rotator multiplies by exp(-j 2 pi step n)
  logic  rv, rfirst;
  cplx_t rd;
  phase_rotator u_derot (
    .clk, .rst_n, .clear(dfst[DLY-1]), .cfo_step(-cfo),
    .in_valid(dv[DLY-1]), .in(dd[DLY-1]), .in_first(dfst[DLY-1]),
    .out_valid(rv), .out(rd), .out_first(rfirst));

  sco_estimator u_sco (.clk, .rst_n, .in_valid(rv), .in(rd), .in_first(rfirst),
                       .sco_valid, .sco(sco_w), .c0, .c1);

  logic signed [31:0] fe_full;
  always_comb begin
    fe_full = 32'(sco) / FE_LSB;
    if (32'(sco) % FE_LSB > FE_LSB / 2)       fe_full = fe_full + 1;
    else if (32'(sco) % FE_LSB < -FE_LSB / 2) fe_full = fe_full - 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sco <= '0; fe <= '0; est_done <= 1'b0; got_cfo <= 1'b0; sco_valid_d <= 1'b0;
    end else begin
      est_done <= 1'b0;
      if (in_valid && in_first) got_cfo <= 1'b0;
      if (cfo_valid) got_cfo <= 1'b1;
      if (sco_valid) sco <= sco_w;
      sco_valid_d <= sco_valid;
      // when the new sco has reached `fe`
      if (got_cfo && sco_valid_d) est_done <= 1'b1;
      if (fe_full > (2 ** (FEW - 1)) - 1)  fe <= FEW'((2 ** (FEW - 1)) - 1);
      else if (fe_full < -(2 ** (FEW - 1))) fe <= FEW'(-(2 ** (FEW - 1)));
      else                                 fe <= FEW'(fe_full);
    end
  end

endmodule
