// abp_ref_pkg: reference model for the packed arithmetic testbenches.
//
// It works on whole sub-datatype fields with ordinary integer arithmetic,
// independently of the bit-level equations used in the RTL. Vectors are
// held in 64-bit containers; n is the word width in use (n <= 32 so that a
// 2n-bit product fits). The sub-datatypes of a mask are the bit ranges
// lo .. hi where mask[lo] = 1 (bit 0 always starts one) and hi is the bit
// below the next marked bit, or n-1.
package abp_ref_pkg;

  typedef logic [63:0] vec_t;

  // Lowest bit of the sub-datatype that holds bit i.
  function automatic int seg_lo(vec_t mask, int n, int i);
    int k;
    k = i;
    while (k > 0 && !mask[k]) k--;
    return k;
  endfunction

  // Highest bit of the sub-datatype that holds bit i.
  function automatic int seg_hi(vec_t mask, int n, int i);
    int k;
    k = i;
    while (k + 1 < n && !mask[k+1]) k++;
    return k;
  endfunction

  function automatic vec_t field(vec_t v, int lo, int hi);
    vec_t f;
    f = '0;
    for (int k = lo; k <= hi; k++) f[k-lo] = v[k];
    return f;
  endfunction

  // Packed addition. cin supplies the carry into each sub-datatype at its
  // lowest bit. Returns the sum; cout gets, in every bit of a sub-datatype,
  // that sub-datatype's carry-out.
  function automatic vec_t add(vec_t a, vec_t b, vec_t mask, vec_t cin, int n,
                               output vec_t cout);
    vec_t s, fs;
    int lo, hi;
    s = '0;
    cout = '0;
    lo = 0;
    while (lo < n) begin
      hi = seg_hi(mask, n, lo);
      fs = field(a, lo, hi) + field(b, lo, hi) + vec_t'(cin[lo]);
      for (int k = lo; k <= hi; k++) begin
        s[k] = fs[k-lo];
        cout[k] = fs[hi-lo+1];
      end
      lo = hi + 1;
    end
    return s;
  endfunction

  // Packed multiplication: the product of the fields lo .. hi is placed in
  // bits 2*lo .. 2*hi+1.
  function automatic vec_t mul(vec_t a, vec_t b, vec_t mask, int n);
    vec_t p, fp;
    int lo, hi;
    p = '0;
    lo = 0;
    while (lo < n) begin
      hi = seg_hi(mask, n, lo);
      fp = field(a, lo, hi) * field(b, lo, hi);
      for (int k = 0; k < 2 * (hi - lo + 1); k++) p[2*lo+k] = fp[k];
      lo = hi + 1;
    end
    return p;
  endfunction

  // Mask array element: bits k and l share a sub-datatype.
  function automatic logic marr(vec_t mask, int n, int k, int l);
    return seg_lo(mask, n, k) == seg_lo(mask, n, l);
  endfunction

  // Carry-bubble product term: j is the top bit of the sub-datatype of k.
  function automatic logic cterm(vec_t mask, int n, int k, int j);
    return seg_hi(mask, n, k) == j;
  endfunction

  // A random mask with sub-datatypes of 1 .. maxw bits.
  function automatic vec_t rand_mask(int n, int maxw);
    vec_t m;
    int k;
    m = '0;
    k = 0;
    while (k < n) begin
      m[k] = 1'b1;
      k += 1 + ($urandom % maxw);
    end
    return m;
  endfunction

endpackage
