// fft_ref_pkg: reference arithmetic for the testbenches.
//
// Bit-exact models of the FFT data path written with plain integer
// arithmetic (64-bit `*`, division-free rounding on the remainder), so they
// share nothing with the Booth/partial-product structure of the RTL:
//   rnd_ref   round half to even of v / 2^sh, low 32 bits kept
//   bf_ref    y0 = rnd(x0 + x1*W), y1 = rnd(x0 - x1*W), product truncated
//             to its Q2.60 part before the 32-bit final add, as in the RTL
//   tw_ref    twiddle W_N^k in Q2.30 for an N = 2^log2n table
//   fft_ref   in-place radix-2 DIT FFT of 2^log2n points, halving on every
//             odd stage, output in natural order
package fft_ref_pkg;
  localparam int  NMAX = 1024;
  localparam real PI   = 3.14159265358979323846;

  typedef logic signed [31:0] word_t;

  function automatic word_t rnd_ref(longint v, int sh);
    longint q, r, half;
    q    = v >>> sh;
    r    = v - (q <<< sh);          // 0 .. 2^sh-1
    half = longint'(1) <<< (sh - 1);
    if (r > half || (r == half && q[0])) q = q + 1;
    return word_t'(q);
  endfunction

  function automatic void bf_ref(input word_t x0r, x0i, x1r, x1i, twr, twi,
                                 input bit scale,
                                 output word_t y0r, y0i, y1r, y1i);
    longint pr, pi, tr, ti;
    int sh;
    pr = longint'(x1r) * longint'(twr) - longint'(x1i) * longint'(twi);
    pi = longint'(x1r) * longint'(twi) + longint'(x1i) * longint'(twr);
    tr = (pr <<< 2) >>> 2;          // keep the Q2.60 part
    ti = (pi <<< 2) >>> 2;
    sh = scale ? 31 : 30;
    y0r = rnd_ref((longint'(x0r) <<< 30) + tr, sh);
    y0i = rnd_ref((longint'(x0i) <<< 30) + ti, sh);
    y1r = rnd_ref((longint'(x0r) <<< 30) - tr, sh);
    y1i = rnd_ref((longint'(x0i) <<< 30) - ti, sh);
  endfunction

  function automatic void tw_ref(input int log2n, input int k,
                                 output word_t twr, output word_t twi);
    real ang;
    ang = 2.0 * PI * real'(k) / real'(1 << log2n);
    twr = word_t'(longint'($floor( $cos(ang) * 1073741824.0 + 0.5)));
    twi = word_t'(longint'($floor(-$sin(ang) * 1073741824.0 + 0.5)));
  endfunction

  function automatic int bitrev(int n, int bits);
    int r = 0;
    for (int b = 0; b < bits; b++) if (n[b]) r |= 1 << (bits - 1 - b);
    return r;
  endfunction

  // xr/xi: input in natural order; replaced by the output in natural order
  function automatic void fft_ref(input int log2n,
                                  inout word_t xr[NMAX], inout word_t xi[NMAX]);
    word_t ar[NMAX], ai[NMAX];
    word_t twr, twi, y0r, y0i, y1r, y1i;
    int n, half, i0, i1;
    n = 1 << log2n;
    for (int k = 0; k < n; k++) begin
      ar[bitrev(k, log2n)] = xr[k];
      ai[bitrev(k, log2n)] = xi[k];
    end
    for (int s = 0; s < log2n; s++) begin
      half = 1 << s;
      for (int g = 0; g < n; g += 2 * half)
        for (int p = 0; p < half; p++) begin
          i0 = g + p;
          i1 = i0 + half;
          // same table as the hardware: the 1024-point one, subsampled
          tw_ref(10, p * (NMAX / (2 * half)), twr, twi);
          bf_ref(ar[i0], ai[i0], ar[i1], ai[i1], twr, twi, s[0],
                 y0r, y0i, y1r, y1i);
          ar[i0] = y0r; ai[i0] = y0i;
          ar[i1] = y1r; ai[i1] = y1i;
        end
    end
    for (int k = 0; k < n; k++) begin
      xr[k] = ar[k];
      xi[k] = ai[k];
    end
  endfunction
endpackage
