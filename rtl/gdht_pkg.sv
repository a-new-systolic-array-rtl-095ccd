// gdht_pkg -- constants and elaboration-time functions shared by the odd-time
// GDHT processor.
//
// The processor computes Y(k) = sum_i x(i) * cas((2i+1) k pi / N) for a prime
// length N. The index arithmetic follows the band-correlation formulation:
// with a primitive root G of N, column m (and output row m) of each
// band-correlation belongs to the folded index psi(m) = fold(<G^(m+1)>_N),
// where fold(v) = v for v <= (N-1)/2 and N-v otherwise, and stream element s
// carries the coefficient c(<G^(s+2)>_N) = cos(2 pi <G^(s+2)>_N / N).
// N = 13 and G = 2 are the values of the worked example this design is built
// around; every module takes them as parameters.
//
// Fixed-point format (a choice of this design, not taken from elsewhere):
// samples are XW-bit signed integers; coefficients are CW-bit signed with CF
// fraction bits (CF = CW-2 so that |cos| <= 1 is always representable).
// Every width downstream is sized so that no intermediate value can overflow.
// All functions here are evaluated at elaboration only; no logic is built
// from them beyond constants.
package gdht_pkg;

  // Default configuration.
  localparam int N_DEF  = 13;  // transform length (prime)
  localparam int G_DEF  = 2;   // primitive root of N_DEF
  localparam int XW_DEF = 16;  // input sample width
  localparam int CW_DEF = 16;  // coefficient width
  localparam int CF_DEF = 14;  // coefficient fraction bits

  localparam real PI = 3.14159265358979323846;

  // <b^e>_n
  function automatic int modpow(input int b, input int e, input int n);
    int r;
    r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % n;
    return r;
  endfunction

  // Fold an index of 1..n-1 into 1..(n-1)/2 using the symmetry of cos.
  function automatic int fold(input int v, input int n);
    return (v <= (n - 1) / 2) ? v : n - v;
  endfunction

  // 1 when g generates every non-zero residue mod n (n assumed prime).
  function automatic bit is_primitive_root(input int g, input int n);
    for (int e = 1; e < n - 1; e++)
      if (modpow(g, e, n) == 1) return 1'b0;
    return (modpow(g, n - 1, n) == 1);
  endfunction

  // Folded index of column/row m (0-based) of the band-correlation.
  function automatic int psi(input int m, input int g, input int n);
    return fold(modpow(g, m + 1, n), n);
  endfunction

  // round(v * 2^f) to the nearest integer, halves away from zero.
  function automatic int quant(input real v, input int f);
    real s;
    s = v * (2.0 ** f);
    return $rtoi(s + ((s >= 0.0) ? 0.5 : -0.5));
  endfunction

  // Band-correlation coefficient c(j) = cos(j * 2 pi / n).
  function automatic int coef_c(input int j, input int n, input int f);
    return quant($cos(2.0 * PI * j / n), f);
  endfunction

  // Coefficient carried by stream element s: c(<g^(s+2)>_n).
  function automatic int stream_coef(input int s, input int g, input int n, input int f);
    return coef_c(modpow(g, s + 2, n), n, f);
  endfunction

  // Output rotation factors cos(k pi / n) and sin(k pi / n).
  function automatic int rot_cos(input int k, input int n, input int f);
    return quant($cos(PI * k / n), f);
  endfunction

  function automatic int rot_sin(input int k, input int n, input int f);
    return quant($sin(PI * k / n), f);
  endfunction

  // Derived widths.
  // x_C / x_S: a running sum of up to n samples.
  function automatic int aux_width(input int xw, input int n);
    return xw + $clog2(n);
  endfunction
  // Folded operand x(psi) + x(n-psi).
  function automatic int opnd_width(input int xw, input int n);
    return aux_width(xw, n) + 1;
  endfunction
  // Band-correlation result: (n-1)/2 products of operand x coefficient.
  function automatic int corr_width(input int xw, input int cw, input int n);
    return opnd_width(xw, n) + cw + $clog2((n - 1) / 2);
  endfunction
  // Transform output: |Y| <= sqrt(2) * n * 2^(xw-1).
  function automatic int out_width(input int xw, input int n);
    return xw + $clog2(n) + 1;
  endfunction

endpackage
