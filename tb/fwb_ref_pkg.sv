// fwb_ref_pkg: arithmetic reference for the fixed-width Booth multiplier
// testbenches.  It works from the numbers, not from the circuit: each radix-4
// digit d_j = -2*b(2j+1) + b(2j) + b(2j-1) scales A, a negative row is the
// one's complement of |d_j|*A (N+1 bits) plus a correction 1 at its LSB, and
// the value of every bit that falls below column N-1 is summed (Smin, with the
// last row's LSB and correction bit counted as their sum bit only).  The
// fixed-width product is then
//     floor((A*B + 2^(N-1) * (1 + I) - Smin) / 2^N)  mod 2^N,
// I = max(0, floor((k-1)/2)), k = number of non-zero digits.
// N is at most 30 here (64-bit arithmetic).
package fwb_ref_pkg;

  typedef struct {
    longint unsigned p;       // expected fixed-width product
    longint          smin;    // value of the dropped bits
    int              k;       // non-zero Booth digits
    int              phi;     // index of the non-zero digits (bit j = digit j)
    bit              lambda;  // carry of the pre-added last-row LSB
    bit              s0;      // sign of row 0
    int              n_neg;   // negative digits
    int              n_two;   // digits of magnitude 2
  } ref_t;

  function automatic longint sext(input longint unsigned v, input int n);
    longint unsigned m;
    m = (64'd1 << n) - 1;
    v = v & m;
    return v[n-1] ? longint'(v) - longint'(64'd1 << n) : longint'(v);
  endfunction

  function automatic ref_t fw_ref(input longint unsigned a, input longint unsigned b,
                                  input int n);
    ref_t   r;
    longint sa, sb, d, mag;
    longint unsigned bits, rowmask, bx;
    longint unsigned rows [32];
    bit     cs [32];
    int     nr, tr, I;
    nr      = n / 2;
    rowmask = (64'd1 << (n + 1)) - 1;
    sa      = sext(a, n);
    sb      = sext(b, n);
    bx      = (b & ((64'd1 << n) - 1)) << 1;
    r.k = 0; r.phi = 0; r.smin = 0; r.n_neg = 0; r.n_two = 0;
    for (int j = 0; j < nr; j++) begin
      tr  = int'((bx >> (2 * j)) & 7);
      d   = -2 * longint'(tr >> 2) + longint'((tr >> 1) & 1) + longint'(tr & 1);
      mag = d < 0 ? -d : d;
      if (d != 0) begin r.k++; r.phi |= (1 << j); end
      if (d < 0) r.n_neg++;
      if (mag == 2) r.n_two++;
      bits    = longint'(mag * sa);
      rows[j] = (d < 0) ? (~bits & rowmask) : (bits & rowmask);
      cs[j]   = d < 0;
    end
    for (int j = 0; j < nr; j++) begin
      for (int k = 0; k < n; k++)
        if (2 * j + k <= n - 2 && !(j == nr - 1 && k == 0))
          r.smin += longint'((rows[j] >> k) & 1) << (2 * j + k);
      if (j < nr - 1) r.smin += longint'(cs[j]) << (2 * j);
    end
    r.smin  += longint'((rows[nr-1] & 1) ^ longint'(cs[nr-1])) << (n - 2);
    r.lambda = bit'(rows[nr-1] & 1) & cs[nr-1];
    r.s0     = bit'((rows[0] >> n) & 1);
    I        = r.k > 1 ? (r.k - 1) / 2 : 0;
    r.p = longint'(sa * sb + (longint'(1) << (n - 1)) * (1 + I) - r.smin) >>> n;
    r.p = r.p & ((64'd1 << n) - 1);
    return r;
  endfunction

endpackage
