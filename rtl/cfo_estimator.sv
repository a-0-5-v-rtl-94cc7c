// cfo_estimator: carrier-frequency-offset calculator of the node's
// downlink receiver.
//
// Works on the frame-aligned downlink stream.  The frame starts with two
// identical short preambles of SL samples, two guard intervals of GL
// samples and two identical long preambles of LL samples.  A periodic
// preamble r seen through a frequency offset eps (cycles per sample)
// satisfies r[n+L] = r[n] * exp(j*2*pi*eps*L), so the correlation
// z = sum r[n+L] * conj(r[n]) over one period has the angle 2*pi*eps*L.
//  - coarse: z_s over the short preambles, a_s = angle(z_s) (turns over SL
//    samples, unambiguous up to |eps| < 1/(2*SL));
//  - fine:   z_l over the long preambles.  Its angle a_l,raw covers LL
//    samples, so it is ambiguous; removing the coarse part, which over LL
//    samples is a_s*LL/SL, leaves a small residual that is taken modulo
//    one turn: a_l = wrap(a_l,raw - a_s*LL/SL).
// The estimate is eps = a_s/SL + a_l/LL (the coarse and the fine value
// added).  The node's uplink will carry the opposite offset to the one its
// downlink shows, so `cfo` is reported as -eps, in cycles per sample
// scaled by 2^24, ready for the phase rotator, which multiplies by
// exp(-j*2*pi*cfo*n).  `cfo_valid` pulses once per frame, about 2*ITER
// clocks after the last long-preamble sample.
// The correlation estimator, the arctangent and the sum of short- and
// long-preamble estimates are the document's; the preamble lengths (8, 4
// and 64, which with three SCO preambles give the document's 356-sample
// preamble), the fixed-point scaling and the sign convention are this
// design's choices.
module cfo_estimator
  import wban_pkg::*;
#(
  parameter int SL = 8,      // short preamble length
  parameter int GL = 4,      // guard interval length
  parameter int LL = 64      // long preamble length
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  cplx_t              in,
  input  logic               in_first,
  output logic               cfo_valid,
  output logic signed [23:0] cfo
);
  localparam int SHIFT = 12;                 // product scaling before summing
  localparam int S_END = 2 * SL;             // first sample after short preambles
  localparam int L_BEG = 2 * SL + 2 * GL;    // first long-preamble sample
  localparam int L_END = L_BEG + 2 * LL;
  localparam int NB    = 12;

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_ATAN_S, S_WAIT_L, S_ATAN_L} state_e;
  state_e state;

  cplx_t buf_s [SL];
  cplx_t buf_l [LL];
  logic [NB-1:0] n;                          // sample index in the frame
  logic signed [31:0] zr, zi;
  logic signed [31:0] zs_r, zs_i;
  cplx_t ref_c;
  logic signed [31:0] pr, pi;
  logic in_s1, in_s2, in_l1, in_l2;
  logic        c_start, c_done, c_busy;
  logic signed [15:0] c_angle, a_s;

  assign in_s1 = (int'(n) < SL);
  assign in_s2 = (int'(n) >= SL) && (int'(n) < S_END);
  assign in_l1 = (int'(n) >= L_BEG) && (int'(n) < L_BEG + LL);
  assign in_l2 = (int'(n) >= L_BEG + LL) && (int'(n) < L_END);

  // r[n+L] * conj(r[n])
  always_comb begin
    ref_c = in_s2 ? buf_s[int'(n) - SL] : buf_l[(int'(n) - L_BEG - LL) % LL];
    pr = (32'(in.re) * 32'(ref_c.re) + 32'(in.im) * 32'(ref_c.im)) >>> SHIFT;
    pi = (32'(in.im) * 32'(ref_c.re) - 32'(in.re) * 32'(ref_c.im)) >>> SHIFT;
  end

  cordic_atan2 #(.W(32), .ITER(16)) u_atan (
    .clk, .rst_n, .start(c_start),
    .x((state == S_ATAN_S) ? zs_r : zr), .y((state == S_ATAN_S) ? zs_i : zi),
    .busy(c_busy), .done(c_done), .angle(c_angle));

  assign c_start = ((state == S_ATAN_S) || (state == S_ATAN_L)) && !c_busy && !c_done;

  logic signed [23:0] coarse_ll, fine;
  always_comb begin
    coarse_ll = 24'(a_s) * 24'(LL / SL);                 // a_s * LL/SL, unwrapped
    fine      = 24'(signed'(16'(c_angle - 16'(coarse_ll))));  // wrapped residual
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; n <= '0; zr <= '0; zi <= '0; zs_r <= '0; zs_i <= '0;
      a_s <= '0; cfo_valid <= 1'b0; cfo <= '0;
    end else begin
      cfo_valid <= 1'b0;
      if (in_valid && in_first) begin
        state <= S_RUN;
        n     <= 1;
        zr    <= '0;
        zi    <= '0;
        buf_s[0] <= in;
      end else begin
        if (in_valid && state != S_IDLE && int'(n) < L_END) begin
          n <= n + 1'b1;
          if (in_s1) buf_s[n[$clog2(SL)-1:0]] <= in;
          if (in_l1) buf_l[int'(n) - L_BEG] <= in;
          if (in_s2 || in_l2) begin
            zr <= zr + pr;
            zi <= zi + pi;
          end
          if (int'(n) == S_END - 1) begin
            zs_r  <= zr + pr;
            zs_i  <= zi + pi;
            zr    <= '0;
            zi    <= '0;
            state <= S_ATAN_S;
          end
          if (int'(n) == L_END - 1) state <= S_ATAN_L;
        end
        if (state == S_ATAN_S && c_done) begin
          a_s   <= c_angle;
          state <= S_WAIT_L;
        end
        if (state == S_ATAN_L && c_done) begin
          // eps*2^24 = (a_s*LL/SL + fine) * 2^24 / (2^16 * LL)
          cfo       <= 24'(-((32'(coarse_ll) + 32'(fine)) * 256 / LL));
          cfo_valid <= 1'b1;
          state     <= S_IDLE;
        end
      end
    end
  end

endmodule
