// dct13_ref_pkg: reference models used by the testbenches.
//
// The functions compute, straight from the definitions and without the
// array's reordering, what the hardware must produce:
//   ref_xa   : xa(i) = x(i) + ... + x(12)
//   ref_sin  : sin(m*pi/13) for any integer m, as a signed entry of the
//              quantised table s(1..6) (sign and index folded by symmetry)
//   ref_t    : T(k) = sum_{i=1..12} xa(i) sin(i*k*pi/13), exact integer with
//              the quantised table
//   ref_y    : the post-processing formula on those T(k), rounded as the
//              hardware does
//   real_dct : the unscaled DCT-II in floating point, for a tolerance check
package dct13_ref_pkg;
  import dct13_pkg::*;

  typedef longint arr13_t [13];

  function automatic arr13_t ref_xa(input arr13_t x);
    arr13_t xa;
    longint acc = 0;
    for (int i = N - 1; i >= 0; i--) begin
      acc   = acc + x[i];
      xa[i] = acc;
    end
    return xa;
  endfunction

  // sin(m*pi/13) * 2^CF, quantised through the table s(1..6).
  function automatic longint ref_sin(input int m);
    int mm, sg;
    mm = m % 26;
    if (mm < 0) mm += 26;
    sg = 1;
    if (mm > 13) begin
      mm = mm - 13;
      sg = -1;
    end
    if (mm > 6) mm = 13 - mm;   // sin(pi - a) = sin(a)
    return (mm == 0) ? 0 : sg * longint'(S_COEF[mm]);
  endfunction

  function automatic arr13_t ref_t(input arr13_t xa);
    arr13_t t;
    t[0] = 0;
    for (int k = 1; k < N; k++) begin
      t[k] = 0;
      for (int i = 1; i < N; i++) t[k] += xa[i] * ref_sin(i * k);
    end
    return t;
  endfunction

  function automatic arr13_t ref_y(input longint xa0, input arr13_t t);
    arr13_t y;
    longint full;
    int sh = 2 * CF - OF;
    for (int k = 0; k < N; k++) begin
      if (k == 0) full = xa0 <<< (2 * CF);
      else full = ((xa0 * longint'(COS_K[k])) <<< CF) - t[k] * longint'(SIN2_K[k]);
      y[k] = (full + (longint'(1) <<< (sh - 1))) >>> sh;
    end
    return y;
  endfunction

  function automatic real real_dct(input arr13_t x, input int k);
    real acc = 0.0;
    real pi = 3.14159265358979323846;
    for (int i = 0; i < N; i++) acc += real'(x[i]) * $cos(real'((2 * i + 1) * k) * pi / 26.0);
    return acc;
  endfunction

endpackage
