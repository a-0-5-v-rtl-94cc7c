// tb_ref_pkg: floating-point reference models used by the testbenches.
//
// Written independently of the RTL: the subcarrier mapping of a symbol's
// bits, the scaled inverse DFT that turns it into time samples, and the
// user spreading code from the recurrence a[i+5] = a[i] xor a[i+3].
package tb_ref_pkg;

  localparam real AMP = 8192.0;
  localparam real PI  = 3.141592653589793;

  // spectrum value of bin k of an n-point symbol carrying `bits`
  function automatic void ref_bin(input logic [63:0] bits, input int n, input int k,
                                  output real re, output real im);
    int kk;
    kk = (k > n / 2) ? n - k : k;
    im = 0.0;
    if (kk == 0)          re = bits[0] ? -AMP : AMP;
    else if (kk == n / 2) re = bits[1] ? -AMP : AMP;
    else begin
      re = bits[2*kk]   ? -AMP : AMP;
      im = bits[2*kk+1] ? -AMP : AMP;
      if (k > n / 2) im = -im;
    end
  endfunction

  // time sample t of the scaled IDFT, times `sgn` (the code chip)
  function automatic void ref_sample(input logic [63:0] bits, input int n, input int t,
                                     input real sgn, output real re, output real im);
    real br, bi, th;
    re = 0.0; im = 0.0;
    for (int k = 0; k < n; k++) begin
      ref_bin(bits, n, k, br, bi);
      th = 2.0 * PI * k * t / n;
      re += br * $cos(th) - bi * $sin(th);
      im += br * $sin(th) + bi * $cos(th);
    end
    re = re * sgn / n;
    im = im * sgn / n;
  endfunction

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // chip m (0..30) of user u: 1 means -1
  function automatic bit ref_chip(input int u, input int m);
    bit a[31];
    a[0] = 1; a[1] = 0; a[2] = 0; a[3] = 0; a[4] = 0;
    for (int i = 0; i + 5 < 31; i++) a[i+5] = a[i] ^ a[i+3];
    return a[(m + 4 * u) % 31];
  endfunction

endpackage
