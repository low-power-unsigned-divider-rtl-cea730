// aa_ref_pkg - arithmetic reference models for the testbenches.
//
// Each function restates the approximation in plain integer arithmetic
// (powers of two as multiplications and divisions, leading one by a
// logarithm loop), independently of the RTL's shifters and encoders.
package aa_ref_pkg;

  // Position of the most significant 1; 0 for x = 0.
  function automatic int ref_lead(input longint unsigned x);
    int l;
    l = 0;
    while (x > 1) begin
      x = x / 2;
      l++;
    end
    return l;
  endfunction

  function automatic longint unsigned pow2(input int e);
    return longint'(1) << e;
  endfunction

  // Keep w bits starting at leading position l: x * 2^(w-1-l), floored.
  function automatic longint unsigned ref_prune(input longint unsigned x,
                                                input int l, input int w);
    if (l >= w - 1) return x / pow2(l - w + 1);
    else            return x * pow2(w - 1 - l);
  endfunction

  function automatic longint unsigned ref_isqrt(input longint unsigned x);
    longint unsigned r;
    r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  // Approximate 2n/n division, equation Q = floor(Ap/Bp) * 2^(lA-lB-k),
  // clamped to 2^n - 1.
  function automatic longint unsigned ref_aaxd(input longint unsigned a,
                                               input longint unsigned b,
                                               input int n, input int k);
    int la, lb, e;
    longint unsigned ap, bp, qd, v;
    la = ref_lead(a);
    lb = ref_lead(b);
    ap = ref_prune(a, la, 2 * k);
    bp = ref_prune(b, lb, k);
    qd = ap / bp;
    e  = la - lb - k;
    v  = (e >= 0) ? qd * pow2(e) : qd / pow2(-e);
    return (v >= pow2(n)) ? pow2(n) - 1 : v;
  endfunction

  // Approximate 2n-bit square root with the leading position made odd.
  function automatic longint unsigned ref_aasr(input longint unsigned a,
                                               input int k);
    int la, h;
    longint unsigned ap, r;
    la = ref_lead(a);
    if (la % 2 == 0) la = la + 1;
    ap = ref_prune(a, la, 2 * k);
    r  = ref_isqrt(ap);
    h  = (la - 2 * k + 1) / 2;
    return (h >= 0) ? r * pow2(h) : r / pow2(-h);
  endfunction

  // Analytical bound on the divider's error distance:
  // ceil((2^n-1)(2^(n-k)-1) / (2^(n-1)+2^(n-k)-1)).
  function automatic longint unsigned div_ed_bound(input int n, input int k);
    longint unsigned num, den;
    num = (pow2(n) - 1) * (pow2(n - k) - 1);
    den = pow2(n - 1) + pow2(n - k) - 1;
    return (num + den - 1) / den;
  endfunction

endpackage
