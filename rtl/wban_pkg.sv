// wban_pkg: types and constants shared by the dual-mode WBAN baseband.
//
// Baseband samples are complex fixed-point numbers (cplx_t) with 16-bit
// signed I and Q parts.  Frequency-domain subcarrier values use the same
// type.  Both modulation modes (OFDM and MT-CDMA) use QPSK on conjugate-
// symmetric subcarriers, so an N-point symbol carries exactly N bits:
// BPSK on the DC and Nyquist bins, QPSK on bins 1..N/2-1, and the complex
// conjugate on bins N/2+1..N-1 (real-valued time signal).
//
// Following the document: 5 MHz processing clock, OFDM with a 64-point
// transform and a guard interval of 1/32 symbol (2 samples), MT-CDMA with
// a 16-point transform, a guard interval of 1/8 symbol (2 samples) and a
// spreading code of length 31, a 512-word storage unit of 16-bit samples.
// The fixed-point formats and the bit-to-bin mapping are this design's own.
package wban_pkg;

  localparam int SW = 16;                    // sample width (I and Q each)

  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } cplx_t;

  typedef enum logic {
    MODE_OFDM = 1'b0,
    MODE_MT   = 1'b1
  } mode_e;

  // Modulation parameters (Table I of the source description)
  localparam int OFDM_N      = 64;
  localparam int OFDM_GI     = 2;            // 1/32 of 64
  localparam int MT_N        = 16;
  localparam int MT_GI       = 2;            // 1/8 of 16
  localparam int CODE_LEN    = 31;
  localparam int NUM_USERS   = 8;

  // Storage unit
  localparam int SU_DEPTH    = 512;
  localparam int SU_WIDTH    = 16;

  // QPSK amplitude of one I or Q component before the scaled IFFT
  localparam logic signed [SW-1:0] QPSK_AMP = 16'sd8192;

  // Value of frequency bin k of an N-point conjugate-symmetric symbol that
  // carries the N bits in `bits` (only bits [N-1:0] are used).
  function automatic cplx_t map_bin(input logic [63:0] bits, input int unsigned k,
                                    input int unsigned n);
    cplx_t v;
    int unsigned kk;
    logic conj;
    v = '0;
    conj = (k > n/2);
    kk = conj ? n - k : k;
    if (kk == 0) begin
      v.re = bits[0] ? -QPSK_AMP : QPSK_AMP;
    end else if (kk == n/2) begin
      v.re = bits[1] ? -QPSK_AMP : QPSK_AMP;
    end else begin
      v.re = bits[2*kk]   ? -QPSK_AMP : QPSK_AMP;
      v.im = bits[2*kk+1] ? -QPSK_AMP : QPSK_AMP;
      if (conj) v.im = -v.im;
    end
    return v;
  endfunction

  // Length-31 maximal-length sequence from the 5-bit LFSR x^5 + x^3 + 1,
  // seed 5'b00001.  User u spreads with this sequence cyclically shifted
  // by CODE_SHIFT*u chips (bit value 1 means chip -1).
  localparam int CODE_SHIFT = 4;

  function automatic logic [CODE_LEN-1:0] mseq31();
    logic [4:0] st;
    logic [CODE_LEN-1:0] r;
    st = 5'b00001;
    for (int i = 0; i < CODE_LEN; i++) begin
      r[i] = st[0];
      st = {st[0] ^ st[3], st[4:1]};
    end
    return r;
  endfunction

  localparam logic [CODE_LEN-1:0] MSEQ = mseq31();

  function automatic logic user_chip(input logic [2:0] user, input logic [4:0] m);
    int unsigned idx;
    idx = (int'(m) + CODE_SHIFT * int'(user)) % CODE_LEN;
    return MSEQ[idx];
  endfunction

  // Bit reversal of the low `bits` bits of x
  function automatic int unsigned bitrev(input int unsigned x, input int unsigned bits);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 16; i++)
      if (i < bits) r = (r << 1) | ((x >> i) & 1);
    return r;
  endfunction

endpackage
