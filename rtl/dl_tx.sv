// dl_tx: downlink frame generator of the central node.
//
// Broadcasts the frame every node uses for synchronisation and frequency
// estimation before it transmits, laid out as
//   short preamble x2 | guard x2 | long preamble x2 | (guard + SCO preamble) x NSCO | information
// The short preamble is periodic with SL = 8 samples (only every 8th bin
// of the reference spectrum is used); the long and SCO preambles are the
// LL = 64-sample inverse transform of a fixed reference spectrum
// (PRE_BITS mapped like data), and every guard is a cyclic prefix of GL
// samples taken from the end of the long preamble.  The total preamble is
// 2*8 + 2*4 + 2*64 + 3*(4+64) = 356 samples.  The information part is one
// OFDM symbol (64-point, 2-sample guard) carrying the 64-bit `info` word;
// it follows the preamble after the symbol engine's pipeline delay, with
// `out_valid` low in between.  Preamble tables are computed at
// elaboration from the reference spectrum.
// From the document: the frame order, its use of OFDM, and the 356-sample
// preamble.  This design's choice: the individual lengths, the reference
// spectrum, the gains, and the single information symbol.
module dl_tx
  import wban_pkg::*;
#(
  parameter int          SL       = 8,
  parameter int          GL       = 4,
  parameter int          LL       = 64,
  parameter int          NSCO     = 3,
  parameter logic [63:0] PRE_BITS = 64'h9A3C_57E1_0F6B_D248
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] info,
  output logic        busy,
  output logic        done,
  output logic        out_valid,
  output cplx_t       out,
  output logic        out_first,
  output logic        out_pre       // sample belongs to the preamble
);
  localparam int PRE_LEN = 2 * SL + 2 * GL + 2 * LL + NSCO * (GL + LL);
  localparam int SHORT_GAIN = 8;
  localparam int LONG_GAIN  = 2;
  typedef logic [31:0] tab_t [LL];          // {re, im}

  // x[t] = gain/LL * sum_k X[k] exp(j 2 pi k t / LL), over bins k = 0 mod step
  function automatic tab_t mk_pre(input int step, input int gain);
    tab_t r;
    real ar, ai, th, br, bi;
    int kk;
    for (int t = 0; t < LL; t++) begin
      ar = 0.0; ai = 0.0;
      for (int k = 0; k < LL; k += step) begin
        // same mapping as map_bin, in floating point
        kk = (k > LL / 2) ? LL - k : k;
        bi = 0.0;
        if (kk == 0)           br = PRE_BITS[0] ? -8192.0 : 8192.0;
        else if (kk == LL / 2) br = PRE_BITS[1] ? -8192.0 : 8192.0;
        else begin
          br = PRE_BITS[2*kk]   ? -8192.0 : 8192.0;
          bi = PRE_BITS[2*kk+1] ? -8192.0 : 8192.0;
          if (k > LL / 2) bi = -bi;
        end
        th = 2.0 * 3.141592653589793 * k * t / LL;
        ar += br * $cos(th) - bi * $sin(th);
        ai += br * $sin(th) + bi * $cos(th);
      end
      r[t] = {16'($rtoi($floor(ar * gain / LL + 0.5))), 16'($rtoi($floor(ai * gain / LL + 0.5)))};
    end
    return r;
  endfunction

  localparam tab_t LONG_T  = mk_pre(1, LONG_GAIN);
  localparam tab_t SHORT_T = mk_pre(LL / SL, SHORT_GAIN);

  logic [$clog2(PRE_LEN+1)-1:0] n;
  logic        pre_act, eng_start, eng_busy, eng_done, eng_valid, eng_first;
  logic        feed, sym_adv;
  logic [5:0]  k;
  cplx_t       eng_out, bin, pre_s;
  int          li;

  assign bin = map_bin(info, int'(k), 64);

  ofdm_sym_tx #(.N(64), .G(2)) u_info (
    .clk, .rst_n, .start(eng_start), .nsym(16'd1), .busy(eng_busy), .done(eng_done),
    .feed, .k, .sym_adv, .ready(1'b1), .bin,
    .out_valid(eng_valid), .out(eng_out), .out_sym_first(eng_first));

  // preamble sample n
  always_comb begin
    li = 0;
    pre_s = '0;
    if (int'(n) < 2 * SL)                   pre_s = cplx_t'(SHORT_T[int'(n) % SL]);
    else if (int'(n) < 2 * SL + 2 * GL)     pre_s = cplx_t'(LONG_T[LL - GL + (int'(n) - 2 * SL) % GL]);
    else if (int'(n) < 2 * SL + 2 * GL + 2 * LL) pre_s = cplx_t'(LONG_T[(int'(n) - 2 * SL - 2 * GL) % LL]);
    else begin
      li = (int'(n) - 2 * SL - 2 * GL - 2 * LL) % (GL + LL);
      pre_s = cplx_t'((li < GL) ? LONG_T[LL - GL + li] : LONG_T[li - GL]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n <= '0; pre_act <= 1'b0; busy <= 1'b0; done <= 1'b0; eng_start <= 1'b0;
      out_valid <= 1'b0; out <= '0; out_first <= 1'b0; out_pre <= 1'b0;
    end else begin
      done      <= 1'b0;
      eng_start <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_pre   <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        pre_act <= 1'b1;
        n       <= '0;
      end else if (pre_act) begin
        out_valid <= 1'b1;
        out_pre   <= 1'b1;
        out       <= pre_s;
        out_first <= (n == 0);
        n         <= n + 1'b1;
        if (int'(n) == PRE_LEN - 1) begin
          pre_act   <= 1'b0;
          eng_start <= 1'b1;
        end
      end else if (busy) begin
        out_valid <= eng_valid;
        out       <= eng_out;
        if (eng_done) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
