// ofdm_sym_tx: multicarrier symbol engine shared by the transmitters.
//
// Turns a frame of NSYM symbols, each given as N frequency-domain bin
// values, into the time-domain sample stream with a cyclic-prefix guard
// interval of G samples: per symbol it sends samples N-G..N-1 and then
// 0..N-1 of the scaled inverse transform, N+G samples in all, one per
// clock, back to back.
//
// How it works: a feeder walks bins k = 0..N-1 of each symbol through the
// pipelined IFFT, pausing G cycles after every symbol so that the input and
// output rates match.  The caller supplies the bin value for the current
// `k` combinationally on `bin` and must present the next symbol's data
// after the cycle in which `sym_adv` is high; `ready` low before a symbol
// holds the feeder.  After the last symbol, zero symbols flush the IFFT
// pipeline until the last data symbol has left it.  The IFFT output, in bit-reversed order, is written into
// one of two N-word banks; a full bank is read out in natural order with
// the cyclic prefix in front while the other bank fills.
// Timing: the first output sample appears about 2N+log2(N)+G cycles after
// `start`; `done` is high together with the last sample of the frame.
// The guard-interval lengths and transform sizes are the document's; the
// buffering scheme is this design's.
module ofdm_sym_tx
  import wban_pkg::*;
#(
  parameter int N = 64,
  parameter int G = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [15:0]          nsym,
  output logic                 busy,
  output logic                 done,
  // bin request to the caller
  output logic                 feed,      // bin `k` is consumed this cycle
  output logic [$clog2(N)-1:0] k,
  output logic                 sym_adv,   // last bin of a data symbol consumed
  input  logic                 ready,     // caller has the current symbol
  input  cplx_t                bin,
  // time-domain output
  output logic                 out_valid,
  output cplx_t                out,
  output logic                 out_sym_first
);
  localparam int LB = $clog2(N);
  localparam int L  = N + G;

  typedef enum logic [1:0] {S_IDLE, S_FEED, S_GAP, S_DRAIN} state_e;
  state_e state;

  logic [15:0] sym_cnt;                  // symbols fed, data and flush
  logic [$clog2(G+1)-1:0] gap_cnt;
  logic        flushing;
  logic        en;
  logic [15:0] wsym, rsym;                 // symbols written / read by the reorder stage
  cplx_t       fft_in, fft_out;
  logic        fo_valid, fo_last;
  logic [LB-1:0] fo_idx;

  assign flushing = (sym_cnt >= nsym);
  assign en       = (state == S_FEED) && (flushing || ready);
  assign feed     = en && !flushing;
  assign sym_adv  = feed && (k == LB'(N - 1));
  assign fft_in   = flushing ? '0 : bin;

  logic clr;
  assign clr = (state == S_IDLE) && start;

  fft_sdf #(.N(N), .INVERSE(1'b1)) u_ifft (
    .clk, .rst_n, .clear(clr), .en, .din(fft_in),
    .out_valid(fo_valid), .dout(fft_out), .out_idx(fo_idx), .out_last(fo_last));

  // ---------------- feeder ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      k       <= '0;
      sym_cnt <= '0;
      gap_cnt <= '0;
    end else begin
      case (state)
        S_IDLE: if (start && nsym != 0) begin
          state   <= S_FEED;
          k       <= '0;
          sym_cnt <= '0;
        end
        S_FEED: if (en) begin
          k <= k + 1'b1;
          if (k == LB'(N - 1)) begin
            sym_cnt <= sym_cnt + 1'b1;
            gap_cnt <= '0;
            state   <= S_GAP;
          end
        end
        S_GAP: begin
          gap_cnt <= gap_cnt + 1'b1;
          if (int'(gap_cnt) >= G - 1) state <= (flushing && wsym == nsym) ? S_DRAIN : S_FEED;
        end
        S_DRAIN: if (done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- reorder + cyclic prefix ----------------
  cplx_t bank [2][N];
  logic        wb, rb;                   // write / read bank
  logic [1:0]  nfull;
  logic [$clog2(L)-1:0] rcnt;
  logic        full_pulse, rd_act, rd_last;
  logic [LB-1:0] raddr;

  assign full_pulse = fo_valid && fo_last && (wsym < nsym) && busy;
  assign rd_act     = (nfull != 0);
  assign rd_last    = rd_act && (int'(rcnt) == L - 1);
  assign raddr      = (int'(rcnt) < G) ? LB'(N - G + int'(rcnt)) : LB'(int'(rcnt) - G);

  always_ff @(posedge clk) begin
    if (fo_valid) bank[wb][fo_idx] <= fft_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb <= 1'b0; rb <= 1'b0; nfull <= '0; wsym <= '0; rsym <= '0; rcnt <= '0;
      out_valid <= 1'b0; out <= '0; out_sym_first <= 1'b0; done <= 1'b0; busy <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clr && nsym != 0) begin
        busy <= 1'b1; wsym <= '0; rsym <= '0; wb <= 1'b0; rb <= 1'b0;
      end
      if (fo_valid && fo_last && !clr) begin
        wb <= ~wb;
        if (busy && wsym < nsym) wsym <= wsym + 1'b1;
      end
      nfull <= nfull + 2'(full_pulse) - 2'(rd_last);
      out_valid     <= rd_act;
      out           <= bank[rb][raddr];
      out_sym_first <= rd_act && (rcnt == 0);
      if (rd_act) begin
        rcnt <= rd_last ? '0 : rcnt + 1'b1;
        if (rd_last && !clr) begin
          rb   <= ~rb;
          rsym <= rsym + 1'b1;
          if (rsym + 16'd1 == nsym) begin
            done <= 1'b1;
            busy <= 1'b0;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) nfull != 2'd3);

endmodule
