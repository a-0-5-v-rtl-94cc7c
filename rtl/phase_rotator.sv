// phase_rotator: carrier-frequency-offset pre-calibration of the uplink.
//
// Multiplies every outgoing sample r[n] by exp(-j*2*pi*eps*n), where eps
// (`cfo_step`) is the carrier frequency offset measured on the downlink,
// in cycles per sample scaled by 2^PW.  A PW-bit phase accumulator advances
// by `cfo_step` for each valid sample and restarts from zero on `clear`
// (given with the first sample of a frame, which is then rotated by 0).
// The top LUTB bits of the phase address a cosine table (1.14 fixed point, built at elaboration); the sine is read from
// the same table a quarter turn later.  Latency: one clock.
// From the document: the rotation by exp(-j 2 pi eps n) and its place
// between modulator and front end.  This design's choice: the accumulator
// and table sizes, and rounding by truncation.
module phase_rotator
  import wban_pkg::*;
#(
  parameter int PW   = 24,    // phase accumulator width (one turn = 2^PW)
  parameter int LUTB = 8      // phase bits used to address the table
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic signed [PW-1:0] cfo_step,
  input  logic                 in_valid,
  input  cplx_t                in,
  input  logic                 in_first,
  output logic                 out_valid,
  output cplx_t                out,
  output logic                 out_first
);
  localparam int TN = 1 << LUTB;
  typedef logic signed [15:0] lut_t [TN];

  function automatic lut_t mk_cos();
    lut_t r;
    for (int i = 0; i < TN; i++)
      r[i] = 16'($rtoi($floor(16384.0 * $cos(2.0 * 3.141592653589793 * i / TN) + 0.5)));
    return r;
  endfunction

  localparam lut_t COS_T = mk_cos();

  logic [PW-1:0]   acc, ph;
  logic [LUTB-1:0] ic, is;
  logic signed [15:0] c, s;
  logic signed [31:0] pr, pi;

  assign ph = clear ? '0 : acc;                // phase of the current sample
  assign ic = ph[PW-1 -: LUTB];
  assign is = ic - LUTB'(TN / 4);              // sin(x) = cos(x - pi/2)
  assign c  = COS_T[ic];
  assign s  = COS_T[is];

  always_comb begin
    pr = 32'(in.re) * 32'(c) + 32'(in.im) * 32'(s);
    pi = 32'(in.im) * 32'(c) - 32'(in.re) * 32'(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      out <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_first <= in_first;
      if (in_valid) begin
        out.re <= 16'(pr >>> 14);
        out.im <= 16'(pi >>> 14);
        acc    <= ph + cfo_step;
      end else if (clear) begin
        acc <= '0;
      end
    end
  end

endmodule
