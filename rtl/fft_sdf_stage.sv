// fft_sdf_stage: one radix-2 single-path delay-feedback (SDF) stage of a
// decimation-in-frequency FFT.
//
// The stage works on blocks of 2*D samples (D = N >> (STAGE+1)).  During
// the first half of a block the incoming samples are pushed into a D-deep
// delay line while the stage emits the twiddled differences left there by
// the previous block.  During the second half the delay-line head `a` meets
// the incoming sample `b`: (a+b)/2 is emitted at once and (a-b)/2 is pushed
// back for twiddling on the way out.  Each butterfly halves its result, so
// an N-point transform is scaled by 1/N overall and never overflows.
// Twiddle factors are W_N^(n*2^STAGE), exp(-j...) or exp(+j...) when
// INVERSE is set, taken from a 1.14 fixed-point table built at elaboration.
//
// Everything advances only on `en`; `pos` is the index of the current input
// within its 2*D block.  The output register is valid one `en` later.
// The SDF structure is a standard FFT architecture chosen for this design;
// the source document only states the transform sizes.
module fft_sdf_stage
  import wban_pkg::*;
#(
  parameter int N       = 64,
  parameter int STAGE   = 0,
  parameter bit INVERSE = 1'b0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic [$clog2(2*(N>>(STAGE+1)))-1:0] pos,
  input  cplx_t                       din,
  output cplx_t                       dout
);
  localparam int D  = N >> (STAGE + 1);
  localparam int TWN = N / 2;

  typedef logic signed [15:0] tw_t [TWN];

  function automatic tw_t mk_cos();
    tw_t r;
    for (int k = 0; k < TWN; k++)
      r[k] = 16'($rtoi($floor(16384.0 * $cos(2.0 * 3.141592653589793 * k / N) + 0.5)));
    return r;
  endfunction

  function automatic tw_t mk_sin();
    tw_t r;
    for (int k = 0; k < TWN; k++)
      r[k] = 16'($rtoi($floor(16384.0 * $sin(2.0 * 3.141592653589793 * k / N) + 0.5)));
    return r;
  endfunction

  localparam tw_t COS_T = mk_cos();
  localparam tw_t SIN_T = mk_sin();

  cplx_t dline [D];
  cplx_t head, sum_h, dif_h, tw_out;
  logic signed [SW:0] sr, si, dr, di;
  logic first_half;
  logic signed [15:0] wr, wi;
  logic signed [31:0] pr, pi;

  assign head       = dline[D-1];
  assign first_half = (int'(pos) < D);

  // butterfly with 1/2 scaling
  always_comb begin
    sr = 17'(head.re) + 17'(din.re);
    si = 17'(head.im) + 17'(din.im);
    dr = 17'(head.re) - 17'(din.re);
    di = 17'(head.im) - 17'(din.im);
    sum_h.re = sr[SW:1];
    sum_h.im = si[SW:1];
    dif_h.re = dr[SW:1];
    dif_h.im = di[SW:1];
  end

  // twiddle of the delay-line head while it drains (n = pos in first half)
  always_comb begin
    int unsigned ti;
    ti = (int'(pos) << STAGE) % TWN;
    wr = COS_T[ti];
    // forward: exp(-j theta) -> (cos, -sin); inverse: (cos, +sin)
    wi = INVERSE ? SIN_T[ti] : -SIN_T[ti];
    pr = 32'(head.re) * 32'(wr) - 32'(head.im) * 32'(wi);
    pi = 32'(head.re) * 32'(wi) + 32'(head.im) * 32'(wr);
    tw_out.re = 16'(pr >>> 14);
    tw_out.im = 16'(pi >>> 14);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
      for (int i = 0; i < D; i++) dline[i] <= '0;
    end else if (en) begin
      for (int i = D - 1; i > 0; i--) dline[i] <= dline[i-1];
      if (first_half) begin
        dline[0] <= din;
        dout     <= tw_out;
      end else begin
        dline[0] <= dif_h;
        dout     <= sum_h;
      end
    end
  end

endmodule
