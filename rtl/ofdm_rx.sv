// ofdm_rx: OFDM demodulator of the central node.
//
// Removes the cyclic prefix, transforms each N-sample symbol with the
// forward FFT and takes hard QPSK decisions on the sign of every bin of the
// conjugate-symmetric spectrum: bit 0 from DC, bit 1 from the Nyquist bin,
// bits 2k and 2k+1 from the real and imaginary parts of bin k
// (1 <= k < N/2).  The N bits of a symbol leave as N/16 words, lowest bits
// first, on `word_valid`/`word` right after the symbol's last bin.
// `done` pulses the cycle after the last word of the frame, so a
// controller may power the block down on it.
// This is the exact inverse of ofdm_tx.  The document names the block but
// does not describe it; hard-decision demapping of a frame-aligned stream
// without equalisation is this design's choice.
module ofdm_rx
  import wban_pkg::*;
#(
  parameter int N = OFDM_N,
  parameter int G = OFDM_GI
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] nsym,
  output logic        busy,
  output logic        done,
  input  logic        in_valid,
  input  cplx_t       in,
  input  logic        in_first,
  output logic        word_valid,
  output logic [15:0] word
);
  localparam int WPS = N / 16;

  logic                 bv, bl;
  logic [$clog2(N)-1:0] bi;
  cplx_t                b;
  logic [N-1:0]         bits, hold;
  logic [$clog2(WPS+1)-1:0] wcnt;
  logic                 front_done, done_pend;

  ofdm_sym_rx #(.N(N), .G(G)) u_front (
    .clk, .rst_n, .start, .nsym, .busy, .done(front_done),
    .in_valid, .in, .in_first,
    .bin_valid(bv), .bin_idx(bi), .bin(b), .bin_last(bl));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0; hold <= '0; wcnt <= '0; word_valid <= 1'b0; word <= '0;
      done <= 1'b0; done_pend <= 1'b0;
    end else begin
      if (bv) begin
        if (int'(bi) == 0)                              bits[0] <= b.re[15];
        else if (int'(bi) == N/2)                       bits[1] <= b.re[15];
        else if (int'(bi) < N/2) begin
          bits[2*int'(bi)]   <= b.re[15];
          bits[2*int'(bi)+1] <= b.im[15];
        end
      end
      // `done` follows the last word of the frame
      done <= 1'b0;
      if (front_done) done_pend <= 1'b1;
      else if (done_pend && wcnt == 0 && !bl) begin done <= 1'b1; done_pend <= 1'b0; end
      word_valid <= 1'b0;
      if (wcnt != 0) begin
        word_valid <= 1'b1;
        word       <= hold[16*(WPS-int'(wcnt)) +: 16];
        wcnt       <= wcnt - 1'b1;
      end
      if (bl) begin
        // the last bin is written to `bits` in this same cycle
        hold <= bits;
        if (int'(bi) == 0) hold[0] <= b.re[15];
        else if (int'(bi) == N/2) hold[1] <= b.re[15];
        else if (int'(bi) < N/2) begin
          hold[2*int'(bi)]   <= b.re[15];
          hold[2*int'(bi)+1] <= b.im[15];
        end
        wcnt <= ($bits(wcnt))'(WPS);
      end
    end
  end

endmodule
