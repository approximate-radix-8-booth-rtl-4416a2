// aaac_ref_pkg: reference arithmetic for the testbenches, written from the
// number-level definitions rather than from the RTL structure.
//   booth_digit    radix-4 digit of b at position i: -2*b[2i+1] + b[2i] + b[2i-1]
//   booth_row      row i of the Booth array: digit*A, minus 1 when the digit
//                  is negative (ones complement), times 4^i, modulo 2^2N
//   mult_trunc     accurate part of the Booth array only (no compensation)
//   mult_model     expected fixed-width multiplier output for a given ECU
//                  window k and bias
//   sq_model       expected fixed-width squarer output, the truncated-column
//                  sums taken from the plain triangular array
//   round_hi       upper N bits of a 2N-bit value, rounded to nearest
package aaac_ref_pkg;

  function automatic int booth_digit(longint unsigned b, int i);
    int hi, mid, lo;
    hi  = int'((b >> (2*i+1)) & 1);
    mid = int'((b >> (2*i)) & 1);
    lo  = (i == 0) ? 0 : int'((b >> (2*i-1)) & 1);
    return -2*hi + mid + lo;
  endfunction

  function automatic longint signed sext(longint unsigned v, int n);
    longint unsigned m;
    m = longint'(1) << (n-1);
    v = v & ((longint'(1) << n) - 1);
    return longint'((v ^ m)) - longint'(m);
  endfunction

  function automatic longint unsigned booth_row(longint unsigned a, longint unsigned b,
                                                int i, int n);
    longint signed d, v;
    d = longint'(booth_digit(b, i));
    v = d * sext(a, n);
    if (d < 0) v = v - 1;
    return longint'(v << (2*i)) & ((longint'(1) << (2*n)) - 1);
  endfunction

  function automatic longint unsigned booth_neg_row(longint unsigned b, int n);
    longint unsigned r;
    r = 0;
    for (int i = 0; i < n/2; i++)
      if (booth_digit(b, i) < 0) r = r | (longint'(1) << (2*i));
    return r;
  endfunction

  function automatic longint unsigned round_hi(longint unsigned v, int n);
    return ((v + (longint'(1) << (n-1))) >> n) & ((longint'(1) << n) - 1);
  endfunction

  // fixed-width multiplier output: high parts summed, plus the compensation
  function automatic longint unsigned mult_model(longint unsigned a, longint unsigned b,
                                                 int n, int k, int bias);
    longint unsigned hi, top, r;
    hi  = 0;
    top = 0;
    for (int i = 0; i <= n/2; i++) begin
      r   = (i < n/2) ? booth_row(a, b, i, n) : booth_neg_row(b, n);
      hi  = hi + (r >> n);
      top = top + ((r >> (n-k)) % (longint'(1) << k));
    end
    return (hi + ((top + longint'(bias)) >> k)) & ((longint'(1) << n) - 1);
  endfunction

  // direct truncation: the accurate part of the Booth array alone
  function automatic longint unsigned mult_trunc(longint unsigned a, longint unsigned b, int n);
    longint unsigned hi;
    hi = booth_neg_row(b, n) >> n;
    for (int i = 0; i < n/2; i++) hi = hi + (booth_row(a, b, i, n) >> n);
    return hi & ((longint'(1) << n) - 1);
  endfunction

  // weighted sum of the squaring-array bits in columns lo_col .. hi_col,
  // weight 1 at column lo_col
  function automatic longint unsigned sq_window(longint unsigned a, int n,
                                                int lo_col, int hi_col);
    longint unsigned s;
    int c;
    s = 0;
    for (int i = 0; i < n; i++) begin
      c = 2*i;
      if (c >= lo_col && c <= hi_col && ((a >> i) & 1) == 1) s += longint'(1) << (c - lo_col);
      for (int j = i + 1; j < n; j++) begin
        c = i + j + 1;
        if (c >= lo_col && c <= hi_col && ((a >> i) & 1) == 1 && ((a >> j) & 1) == 1)
          s += longint'(1) << (c - lo_col);
      end
    end
    return s;
  endfunction

  function automatic longint unsigned sq_model(longint unsigned a, int n, int k, int bias);
    longint unsigned hi, top;
    hi  = sq_window(a, n, n, 2*n-1);
    top = sq_window(a, n, n-k, n-1);
    return (hi + ((top + longint'(bias)) >> k)) & ((longint'(1) << n) - 1);
  endfunction

  // signed difference of two n-bit values, wrapped to [-2^(n-1), 2^(n-1))
  function automatic longint signed wrap_diff(longint unsigned x, longint unsigned y, int n);
    return sext(x - y, n);
  endfunction

endpackage
