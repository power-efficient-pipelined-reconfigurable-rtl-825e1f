// rfw_ref_pkg: reference arithmetic for the testbenches, written from the
// Baugh-Wooley equations rather than from the RTL.
//
//   prod_off(a,b,w)  = a*b + 2^(2w), a and b signed w-bit (always >= 0)
//   low_sum(a,b,w)   = sum of a_i*b_j*2^(i+j) over i+j <= w-2 (the
//                      truncated part; none of these terms is complemented)
//   fw(a,b,w,c)      = fixed-width result: ((a*b + 2^(2w) - low_sum
//                      + c*2^(w-1)) >> w) mod 2^w, c = compensation count
//   cm1_comp(a,b,w)  = compensation of the n x n mode: OR1 + OR2, or 1 when
//                      both are 0, where OR1/OR2 are the ORs of the weight
//                      w-2 terms in rows below / from w/2
//   bw_region(...)   = sum of Baugh-Wooley terms over a row/column window
package rfw_ref_pkg;

  typedef logic [127:0] big_t;

  function automatic big_t prod_off(longint unsigned a, longint unsigned b, int w);
    logic signed [127:0] sa, sb, pr;
    sa = $signed({64'd0, a});
    sb = $signed({64'd0, b});
    if (a[w-1]) sa = sa - (128'sd1 <<< w);
    if (b[w-1]) sb = sb - (128'sd1 <<< w);
    pr = sa * sb + (128'sd1 <<< (2 * w));
    return big_t'(pr);
  endfunction

  function automatic big_t low_sum(longint unsigned a, longint unsigned b, int w);
    big_t s = '0;
    for (int i = 0; i < w; i++)
      for (int j = 0; j < w; j++)
        if (i + j <= w - 2 && a[i] && b[j]) s = s + (big_t'(1) << (i + j));
    return s;
  endfunction

  function automatic longint unsigned fw(longint unsigned a, longint unsigned b, int w, int c);
    big_t s;
    s = prod_off(a, b, w) - low_sum(a, b, w) + (big_t'(c) << (w - 1));
    s = s >> w;
    return longint'(s & ((big_t'(1) << w) - 1));
  endfunction

  function automatic int cm1_comp(longint unsigned a, longint unsigned b, int w);
    bit or1 = 0, or2 = 0;
    for (int j = 0; j <= w - 2; j++) begin
      if (a[w-2-j] && b[j]) begin
        if (j < w / 2) or1 = 1;
        else           or2 = 1;
      end
    end
    return int'(or1) + int'(or2) + int'(!or1 && !or2);
  endfunction

  // exact product of w-bit signed a, b, mod 2^(2w)
  function automatic longint unsigned exact(longint unsigned a, longint unsigned b, int w);
    big_t s = prod_off(a, b, w);
    return longint'(s & ((big_t'(1) << (2 * w)) - 1));
  endfunction

  // Sum of Baugh-Wooley terms x_i*y_j (complemented when exactly one of
  // i, j is w-1) over i in [i0,i1], j in [j0,j1] and weight >= wmin.
  function automatic big_t bw_region(longint unsigned a, longint unsigned b, int w,
                                     int i0, int i1, int j0, int j1, int wmin);
    big_t s = '0;
    for (int i = i0; i <= i1; i++)
      for (int j = j0; j <= j1; j++) begin
        bit v = a[i] & b[j];
        if ((i == w - 1) != (j == w - 1)) v = !v;
        if (i + j >= wmin && v) s = s + (big_t'(1) << (i + j));
      end
    return s;
  endfunction

  // true when bits [hi:lo] of v are all zero
  function automatic bit zero_field(longint unsigned v, int hi, int lo);
    for (int i = lo; i <= hi; i++) if (v[i]) return 0;
    return 1;
  endfunction

endpackage
