// sco_estimator: sampling-clock-offset estimator of the node's downlink
// receiver (least-squares fit of pilot phases).
//
// Works on the frame-aligned, CFO-corrected downlink stream.  Each of the
// NSCO SCO preambles (GL-sample guard + LL-sample symbol of the known
// reference spectrum) is transformed by a 64-point FFT.  For the pilot
// bins k = +-4, +-12, +-20, +-28 the phase of Y[k]*conj(X[k]) is taken by a
// CORDIC.  A timing offset of tau samples turns bin k by 2*pi*k*tau/64, so
// for preamble l the phases follow theta_{l,k} = C_{l,0} + C_{l,1}*k.  With
// pilots placed symmetrically around 0 the least-squares solution
// C_l = (K^T K)^-1 K^T theta_l reduces to
//   C_{l,0} = sum(theta)/8,   C_{l,1} = sum(k*theta)/sum(k^2), sum(k^2) = 2688.
// A sampling-clock offset makes tau grow linearly, so the slope change
// between the first and the last preamble, spaced (NSCO-1)*(GL+LL) samples,
// gives the SCO:
//   sco = (C_{last,1} - C_{first,1}) * 64 / ((NSCO-1)*(GL+LL))
// reported as a ratio scaled by 2^24 (positive: the node samples too
// slowly).  `c0`/`c1` give C_{l,0} (2^-16 turn) and C_{l,1} (2^-16 turn per
// bin) of the last preamble.  The phases are processed after the last
// preamble; `sco_valid` pulses about 24*18 clocks later.
// From the document: pilot phases of the preambles after CFO correction,
// the linear phase model (9), the matrix form (10) and the least-squares
// solution (11).  This design's choices: the pilot set, the slope-
// difference SCO formula and all fixed-point formats.
module sco_estimator
  import wban_pkg::*;
#(
  parameter int          SCO_START = 152,    // first sample of the first SCO guard
  parameter int          GL        = 4,
  parameter int          LL        = 64,
  parameter int          NSCO      = 3,
  parameter logic [63:0] PRE_BITS  = 64'h9A3C_57E1_0F6B_D248
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  cplx_t              in,
  input  logic               in_first,
  output logic               sco_valid,
  output logic signed [23:0] sco,
  output logic signed [15:0] c0,
  output logic signed [15:0] c1
);
  localparam int NP   = 8;                           // pilots
  localparam int PK [NP] = '{4, 12, 20, 28, 36, 44, 52, 60};   // bins; >32 means k-64
  localparam int SUMK2 = 2688;
  localparam int SPAN  = (NSCO - 1) * (GL + LL);
  localparam int END_N = SCO_START + NSCO * (GL + LL);

  typedef enum logic [2:0] {Z_IDLE, Z_RUN, Z_FLUSH, Z_PROC, Z_ANGLE, Z_OUT} zstate_e;
  zstate_e st;

  logic [11:0] n;
  logic        en, fo_valid, fo_last, clr;
  logic [5:0]  fo_idx;
  cplx_t       fo, fft_in;
  cplx_t       pil [NSCO][NP];
  logic [1:0]  l_out;
  int          li;

  // position inside the SCO part of the frame
  always_comb begin
    li = (int'(n) - SCO_START) % (GL + LL);
  end

  assign clr    = in_valid && in_first;
  assign en     = (st == Z_FLUSH) ||
                  (st == Z_RUN && in_valid && int'(n) >= SCO_START && int'(n) < END_N && li >= GL);
  assign fft_in = (st == Z_FLUSH) ? '0 : in;

  fft_sdf #(.N(LL), .INVERSE(1'b0)) u_fft (
    .clk, .rst_n, .clear(clr), .en, .din(fft_in),
    .out_valid(fo_valid), .dout(fo), .out_idx(fo_idx), .out_last(fo_last));

  // pilot processing
  logic [$clog2(NSCO*NP+1)-1:0] pidx;
  logic        c_start, c_busy, c_done;
  logic signed [15:0] c_angle;
  logic signed [31:0] cx, cy;
  logic signed [31:0] sum_kt [NSCO];
  logic signed [31:0] sum_t;
  cplx_t       pv;
  logic        xr_neg, xi_neg;
  int          pl, pj, kk;

  always_comb begin
    pl = int'(pidx) / NP;
    pj = int'(pidx) % NP;
    kk = (PK[pj] > LL / 2) ? PK[pj] - LL : PK[pj];
    pv = pil[pl % NSCO][pj];
    // known reference value X[k] = (+-A, +-jA); Y * conj(X) up to the factor A
    xr_neg = PRE_BITS[2 * ((kk < 0) ? -kk : kk)];
    xi_neg = PRE_BITS[2 * ((kk < 0) ? -kk : kk) + 1] ^ (kk < 0);
    // (a + jb)(xr - j xi) with xr, xi = +-1
    cx = (xr_neg ? -32'(pv.re) : 32'(pv.re)) + (xi_neg ? -32'(pv.im) : 32'(pv.im));
    cy = (xr_neg ? -32'(pv.im) : 32'(pv.im)) - (xi_neg ? -32'(pv.re) : 32'(pv.re));
  end

  cordic_atan2 #(.W(32), .ITER(16)) u_atan (
    .clk, .rst_n, .start(c_start), .x(cx), .y(cy),
    .busy(c_busy), .done(c_done), .angle(c_angle));

  assign c_start = (st == Z_ANGLE) && !c_busy && !c_done;

  logic signed [47:0] dprod;
  assign dprod = 48'(sum_kt[NSCO-1] - sum_kt[0]) * 48'sd2937 * 48'(64 * 136) / 48'(64 * SPAN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= Z_IDLE; n <= '0; l_out <= '0; pidx <= '0; sum_t <= '0;
      sco_valid <= 1'b0; sco <= '0; c0 <= '0; c1 <= '0;
      for (int l = 0; l < NSCO; l++) sum_kt[l] <= '0;
    end else begin
      sco_valid <= 1'b0;
      if (clr) begin
        st <= Z_RUN; n <= 12'd1; l_out <= '0;
      end else begin
        if (st == Z_RUN && in_valid) begin
          n <= n + 1'b1;
          if (int'(n) == END_N - 1) st <= Z_FLUSH;
        end
        if (fo_valid && (st == Z_RUN || st == Z_FLUSH)) begin
          for (int j = 0; j < NP; j++)
            if (int'(fo_idx) == PK[j]) pil[l_out][j] <= fo;
          if (fo_last) begin
            l_out <= l_out + 1'b1;
            if (int'(l_out) == NSCO - 1) begin
              st   <= Z_ANGLE;
              pidx <= '0;
              sum_t <= '0;
              for (int l = 0; l < NSCO; l++) sum_kt[l] <= '0;
            end
          end
        end
        if (st == Z_ANGLE && c_done) begin
          sum_kt[pl] <= sum_kt[pl] + 32'(kk) * 32'(c_angle);
          if (pl == NSCO - 1) sum_t <= sum_t + 32'(c_angle);
          pidx <= pidx + 1'b1;
          if (int'(pidx) == NSCO * NP - 1) st <= Z_OUT;
        end
        if (st == Z_OUT) begin
          // (dS / 2688) * 64 / SPAN turns -> * 2^24 / 2^16; 2937/65536 = 2^14/(2688*136)
          sco       <= 24'(dprod >>> 16);
          c0        <= 16'(sum_t / NP);
          c1        <= 16'(sum_kt[NSCO-1] / SUMK2);
          sco_valid <= 1'b1;
          st        <= Z_IDLE;
        end
      end
    end
  end

endmodule
