// mt_rx: MT-CDMA demodulator with user-code despreader (central node).
//
// Removes the cyclic prefix of each 16-point multitone symbol and
// transforms it.  For each of the N/2+1 independent bins it accumulates
// the bin value multiplied by the selected user's code chip over the
// CODE_LEN (31) repetitions of a data symbol; signals of other users,
// spread with other shifts of the code, largely cancel in this sum.  After
// the 31st repetition the signs of the sums give the 16 bits (mapping as in
// mt_tx) and `word_valid` pulses with the recovered word.  `done` pulses
// after the last word of the frame.
// The document names the block; the correlation despreader and hard
// decisions are this design's choice, the inverse of mt_tx.
module mt_rx
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
  input  logic        in_valid,
  input  cplx_t       in,
  input  logic        in_first,
  output logic        word_valid,
  output logic [15:0] word
);
  localparam int NB = N / 2 + 1;               // independent bins
  localparam int AW = 24;                      // accumulator width

  logic                 bv, bl;
  logic [$clog2(N)-1:0] bi;
  cplx_t                b;
  logic [4:0]           chip_idx;
  logic                 chip;
  logic signed [AW-1:0] acc_re [NB];
  logic signed [AW-1:0] acc_im [NB];
  logic signed [AW-1:0] nre, nim;
  logic [15:0]          nsym;
  logic                 front_done, done_d;
  logic [N-1:0]         dec;

  assign nsym = 16'(nwords * 16'(CODE_LEN));
  assign chip = user_chip(user, chip_idx);

  ofdm_sym_rx #(.N(N), .G(G)) u_front (
    .clk, .rst_n, .start, .nsym, .busy, .done(front_done),
    .in_valid, .in, .in_first,
    .bin_valid(bv), .bin_idx(bi), .bin(b), .bin_last(bl));

  // despread contribution of the current bin
  always_comb begin
    nre = chip ? -AW'(b.re) : AW'(b.re);
    nim = chip ? -AW'(b.im) : AW'(b.im);
    if (int'(bi) < NB) begin
      nre = acc_re[bi] + nre;
      nim = acc_im[bi] + nim;
    end
  end

  // decisions from the accumulators, the current bin's update included
  always_comb begin
    logic signed [AW-1:0] r, i;
    dec = '0;
    for (int kk = 0; kk < NB; kk++) begin
      r = (int'(bi) == kk) ? nre : acc_re[kk];
      i = (int'(bi) == kk) ? nim : acc_im[kk];
      if (kk == 0)          dec[0] = r[AW-1];
      else if (kk == N / 2) dec[1] = r[AW-1];
      else begin
        dec[2*kk]   = r[AW-1];
        dec[2*kk+1] = i[AW-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chip_idx <= '0; word_valid <= 1'b0; word <= '0; done_d <= 1'b0; done <= 1'b0;
      for (int kk = 0; kk < NB; kk++) begin acc_re[kk] <= '0; acc_im[kk] <= '0; end
    end else begin
      // `done` two cycles after the front end's, so it follows the last word
      done_d <= front_done;
      done   <= done_d;
      word_valid <= 1'b0;
      if (start && !busy) chip_idx <= '0;
      if (bv && int'(bi) < NB) begin
        acc_re[bi] <= nre;
        acc_im[bi] <= nim;
      end
      if (bl) begin
        if (int'(chip_idx) == CODE_LEN - 1) begin
          chip_idx   <= '0;
          word_valid <= 1'b1;
          word       <= 16'(dec);
          for (int kk = 0; kk < NB; kk++) begin acc_re[kk] <= '0; acc_im[kk] <= '0; end
        end else begin
          chip_idx <= chip_idx + 1'b1;
        end
      end
    end
  end

endmodule
