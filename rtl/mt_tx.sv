// mt_tx: MT-CDMA modulator with user-code spreader (multi-user mode).
//
// Each 16-bit word from the high-speed FIFO is one data symbol: its 16
// bits are mapped like an OFDM symbol onto a conjugate-symmetric 16-point
// spectrum.  The spreader then repeats that symbol over CODE_LEN (31)
// consecutive multitone symbols, multiplying all bins of repetition m by
// the user's code chip c_u[m] = +-1.  Each repetition is transformed by a
// 16-point IFFT and gets a 2-sample cyclic prefix.  At 5 MHz that gives
// 16 bits per 31 x 18 samples: 143 kbit/s.  Up to eight nodes share the
// channel by using different codes: the user code is a length-31
// maximal-length sequence cyclically shifted by 4*user chips.
// Interface as ofdm_tx: `start` with `nwords`, show-ahead FIFO, one output
// sample per clock while `out_valid`.  `user` selects the code.
// From the document: 16-point transform, QPSK, conjugate symmetry, GI of
// 1/8 symbol, code length 31, 143 kbit/s, up to 8 users.  This design's
// choice: spreading in time across repetitions of a symbol, the code
// family, and the bit mapping.
module mt_tx
  import wban_pkg::*;
#(
  parameter int N = MT_N,
  parameter int G = MT_GI
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] nwords,
  input  logic [2:0]  user,
  output logic        busy,
  output logic        done,
  output logic        fifo_rd,
  input  logic [15:0] fifo_rdata,
  input  logic        fifo_empty,
  output logic        out_valid,
  output cplx_t       out,
  output logic        out_sym_first
);
  logic [15:0] cur, nxt;
  logic        cur_v, nxt_v;
  logic [15:0] words_left;
  logic [4:0]  chip_idx;
  logic        feed, sym_adv, chip;
  logic [$clog2(N)-1:0] k;
  cplx_t       bin, b0;
  logic [15:0] nsym;

  assign nsym    = 16'(nwords * 16'(CODE_LEN));
  assign fifo_rd = !nxt_v && (words_left != 0) && !fifo_empty;
  assign chip    = user_chip(user, chip_idx);
  assign b0      = map_bin(64'(cur), int'(k), N);
  assign bin     = chip ? cplx_t'{re: -b0.re, im: -b0.im} : b0;

  ofdm_sym_tx #(.N(N), .G(G)) u_eng (
    .clk, .rst_n, .start, .nsym, .busy, .done,
    .feed, .k, .sym_adv, .ready(cur_v), .bin,
    .out_valid, .out, .out_sym_first);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0; nxt <= '0; cur_v <= 1'b0; nxt_v <= 1'b0; words_left <= '0; chip_idx <= '0;
    end else begin
      if (start && !busy) begin
        words_left <= nwords;
        cur_v <= 1'b0; nxt_v <= 1'b0; chip_idx <= '0;
      end else begin
        if (fifo_rd) begin
          nxt        <= fifo_rdata;
          nxt_v      <= 1'b1;
          words_left <= words_left - 1'b1;
        end
        if (sym_adv) chip_idx <= (int'(chip_idx) == CODE_LEN - 1) ? '0 : chip_idx + 1'b1;
        // a data word is used for CODE_LEN repetitions
        if ((!cur_v || (sym_adv && int'(chip_idx) == CODE_LEN - 1)) && nxt_v) begin
          cur   <= nxt;
          cur_v <= 1'b1;
          nxt_v <= 1'b0;
        end else if (sym_adv && int'(chip_idx) == CODE_LEN - 1) begin
          cur_v <= 1'b0;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) feed |-> cur_v);

endmodule
