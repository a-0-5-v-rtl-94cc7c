// fft_sdf: pipelined N-point radix-2 FFT/IFFT (single-path delay feedback,
// decimation in frequency), one sample per enabled clock.
//
// Samples enter in natural order, one per cycle with `en` high; the stream
// may pause (en low) at any time, e.g. during a guard interval.  A result
// leaves the last stage T = N-1+log2(N) enabled cycles after the sample that
// completes it, flagged by `out_valid` one clock after that `en`.  Results
// come out in bit-reversed order; `out_idx` is the frequency (or time) index
// of the current result and `out_last` marks the last result of a block.
// The transform is scaled by 1/N (each of the log2(N) stages halves), so the
// inverse transform is the exact scaled IDFT and the forward transform
// returns X[k]/N.  A block is only complete once T further samples have
// followed its first; callers flush the pipe with zeros at the end of a
// frame; `clear` (synchronous) restarts the block alignment and discards
// whatever is left in the pipe.  The architecture is this design's choice; the document gives only
// the transform sizes (64 for OFDM, 16 for MT-CDMA).
module fft_sdf
  import wban_pkg::*;
#(
  parameter int N       = 64,
  parameter bit INVERSE = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,     // restart block alignment
  input  logic                  en,
  input  cplx_t                 din,
  output logic                  out_valid,
  output cplx_t                 dout,
  output logic [$clog2(N)-1:0]  out_idx,
  output logic                  out_last
);
  localparam int S  = $clog2(N);
  localparam int LB = $clog2(N);
  localparam int T  = N - 1 + S;               // latency in enabled cycles

  logic [LB-1:0] tick;                         // input index within block
  logic [$clog2(T+1)-1:0] primed;              // enabled cycles seen, saturating
  cplx_t sd [S+1];

  assign sd[0] = din;

  // Start offset of stage s: T_s = sum_{j<s} (N>>(j+1)) + s
  function automatic int unsigned stage_off(input int s);
    int unsigned o;
    o = 0;
    for (int j = 0; j < s; j++) o += (N >> (j + 1)) + 1;
    return o;
  endfunction

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int D  = N >> (s + 1);
    localparam int PB = $clog2(2 * D);
    logic [LB-1:0] p;
    assign p = tick - LB'(stage_off(s));
    fft_sdf_stage #(.N(N), .STAGE(s), .INVERSE(INVERSE)) u_stage (
      .clk, .rst_n, .en,
      .pos (p[PB-1:0]),
      .din (sd[s]),
      .dout(sd[s+1])
    );
  end

  assign dout = sd[S];

  logic [LB-1:0] m;                            // output element being written
  assign m = tick - LB'(T - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick      <= '0;
      primed    <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_last  <= 1'b0;
    end else if (clear) begin
      tick      <= '0;
      primed    <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= en && (int'(primed) >= T - 1);
      if (en) begin
        tick    <= tick + 1'b1;
        if (int'(primed) < T) primed <= primed + 1'b1;
        out_idx  <= LB'(bitrev(int'(m), LB));
        out_last <= (m == LB'(N - 1));
      end
    end
  end

endmodule
