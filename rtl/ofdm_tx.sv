// ofdm_tx: OFDM modulator of the sensor node (high-rate mode).
//
// Reads the frame from the storage unit's high-speed FIFO, N/16 sixteen-bit
// words per symbol, and maps each symbol's N bits onto a conjugate-
// symmetric N-point spectrum (BPSK on DC and Nyquist, QPSK on bins
// 1..N/2-1, mirrored conjugates above), so the inverse transform is a real
// signal.  The shared symbol engine performs the IFFT and inserts the
// G-sample cyclic prefix.  With N = 64 and G = 2 at 5 MHz the mode carries
// 64 bits per 66 samples: 4.85 Mbit/s.
// Interface: `start` with `nwords` (a multiple of N/16) sends one frame;
// the FIFO is read show-ahead; the output is one sample per clock while
// `out_valid` is high; `done` pulses at the end.  Word w of a symbol
// supplies bits 16w..16w+15 of that symbol.
// From the document: 64-point transform, QPSK, conjugate symmetry, GI of
// 1/32 symbol, 4.85 Mbit/s.  This design's choice: the bit-to-bin mapping,
// the BPSK use of DC and Nyquist bins that makes the rate come out exactly,
// and the double buffer that prefetches the next symbol's words.
module ofdm_tx
  import wban_pkg::*;
#(
  parameter int N = OFDM_N,
  parameter int G = OFDM_GI
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] nwords,
  output logic        busy,
  output logic        done,
  // high-speed FIFO
  output logic        fifo_rd,
  input  logic [15:0] fifo_rdata,
  input  logic        fifo_empty,
  // samples
  output logic        out_valid,
  output cplx_t       out,
  output logic        out_sym_first
);
  localparam int WPS = N / 16;                  // words per symbol
  localparam int WB  = (WPS > 1) ? $clog2(WPS) : 1;

  logic [N-1:0] cur, nxt;
  logic         cur_v, nxt_v;
  logic [WB:0]  nxt_cnt;
  logic [15:0]  words_left;
  logic         feed, sym_adv;
  logic [$clog2(N)-1:0] k;
  cplx_t        bin;
  logic [15:0]  nsym;

  assign nsym    = nwords / 16'(WPS);
  assign fifo_rd = !nxt_v && (words_left != 0) && !fifo_empty;
  assign bin     = map_bin(64'(cur), int'(k), N);

  ofdm_sym_tx #(.N(N), .G(G)) u_eng (
    .clk, .rst_n, .start, .nsym, .busy, .done,
    .feed, .k, .sym_adv, .ready(cur_v), .bin,
    .out_valid, .out, .out_sym_first);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0; nxt <= '0; cur_v <= 1'b0; nxt_v <= 1'b0; nxt_cnt <= '0; words_left <= '0;
    end else begin
      if (start && !busy) begin
        words_left <= nwords;
        cur_v <= 1'b0; nxt_v <= 1'b0; nxt_cnt <= '0;
      end else begin
        if (fifo_rd) begin
          nxt[16*int'(nxt_cnt[WB-1:0]) +: 16] <= fifo_rdata;
          words_left <= words_left - 1'b1;
          if (int'(nxt_cnt) == WPS - 1) begin
            nxt_v   <= 1'b1;
            nxt_cnt <= '0;
          end else begin
            nxt_cnt <= nxt_cnt + 1'b1;
          end
        end
        // move the prefetched symbol into place when the current one is gone
        if ((!cur_v || sym_adv) && nxt_v) begin
          cur   <= nxt;
          cur_v <= 1'b1;
          nxt_v <= 1'b0;
        end else if (sym_adv) begin
          cur_v <= 1'b0;
        end
      end
    end
  end

  // the feeder only consumes bins of a loaded symbol
  assert property (@(posedge clk) disable iff (!rst_n) feed |-> cur_v);

endmodule
