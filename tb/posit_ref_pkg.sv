// posit_ref_pkg: reference arithmetic for the posit testbenches.
//
// Works on patterns of up to 32 bits held in a longint and on real numbers,
// so the expected values are reached by a different route from the RTL:
//   ref_decode   - walks the pattern bit by bit and returns regime value,
//                  exponent, fraction bits and fraction width
//   ref_value    - exact value of a pattern as a real (0 for zero and NaR)
//   ref_nearest  - the posit nearest to a real value, found by scanning all
//                  positive patterns; ties go to the even pattern, values
//                  past maxpos give maxpos and non-zero values below minpos
//                  give minpos. For ES = 0 this is the posit rounding rule.
//   ref_pack     - packs sign, scale and a 2n-bit significand product into an
//                  n-bit posit by listing the result bits one by one (regime,
//                  exponent, fraction) and rounding that list to nearest
//                  even; this is the rule for any ES
package posit_ref_pkg;

  function automatic void ref_decode(input longint x, input int n, input int es,
                                     output int k, output int e,
                                     output longint f, output int fw);
    longint a;
    int pos, run;
    bit r;
    a = x;
    if ((a >> (n - 1)) & 1) a = ((longint'(1) << n) - a) & ((longint'(1) << n) - 1);
    pos = n - 2;
    r   = (a >> pos) & 1;
    run = 0;
    while (pos >= 0 && (((a >> pos) & 1) == longint'(r))) begin
      run++;
      pos--;
    end
    k = r ? run - 1 : -run;
    pos--;                     // skip terminating bit
    e = 0;
    for (int i = 0; i < es; i++) begin
      e = e * 2;
      if (pos >= 0) begin
        e = e + int'((a >> pos) & 1);
        pos--;
      end
    end
    fw = (pos >= 0) ? pos + 1 : 0;
    f  = (fw > 0) ? (a & ((longint'(1) << fw) - 1)) : 0;
  endfunction

  function automatic real ref_value(input longint x, input int n, input int es);
    int k, e, fw;
    longint f;
    real v;
    if (x == 0 || x == (longint'(1) << (n - 1))) return 0.0;
    ref_decode(x, n, es, k, e, f, fw);
    v = 1.0 + real'(f) / (2.0 ** fw);
    v = v * (2.0 ** (k * (1 << es) + e));
    if ((x >> (n - 1)) & 1) v = -v;
    return v;
  endfunction

  function automatic longint ref_nearest(input real v, input int n, input int es);
    real    av, best_d, d;
    longint best, maxp;
    if (v == 0.0) return 0;
    av     = (v < 0.0) ? -v : v;
    maxp   = (longint'(1) << (n - 1)) - 1;
    best   = 1;
    best_d = av - ref_value(1, n, es);
    if (best_d < 0.0) best_d = -best_d;
    for (longint p = 2; p <= maxp; p++) begin
      d = av - ref_value(p, n, es);
      if (d < 0.0) d = -d;
      if (d < best_d || (d == best_d && (p & 1) == 0)) begin
        best   = p;
        best_d = d;
      end
    end
    if (v < 0.0) best = ((longint'(1) << n) - best) & ((longint'(1) << n) - 1);
    return best;
  endfunction

  function automatic logic [63:0] ref_pack(input bit sign, input int scale,
                                          input logic [127:0] prod, input int n, input int es);
    bit          bits[$];
    int          t, sc, k, e;
    logic [63:0] mag;
    bit          guard, sticky;
    t = -1;
    for (int i = 0; i < 128; i++) if (prod[i]) t = i;
    if (t < 0) return 0;
    sc = scale + t - (2 * n - 2);
    k  = sc >>> es;
    e  = sc - (k <<< es);
    if (k > n - 2)         mag = (64'(1) << (n - 1)) - 1;
    else if (k < -(n - 2)) mag = 1;
    else begin
      if (k >= 0) begin
        repeat (k + 1) bits.push_back(1'b1);
        bits.push_back(1'b0);
      end else begin
        repeat (-k) bits.push_back(1'b0);
        bits.push_back(1'b1);
      end
      for (int i = es - 1; i >= 0; i--) bits.push_back(bit'((e >> i) & 1));
      for (int i = t - 1; i >= 0; i--) bits.push_back(prod[i]);
      while (bits.size() < n + 1) bits.push_back(1'b0);
      mag = 0;
      for (int i = 0; i < n - 1; i++) mag = (mag << 1) | 64'(bits[i]);
      guard  = bits[n - 1];
      sticky = 0;
      for (int i = n; i < bits.size(); i++) sticky |= bits[i];
      if (guard && (mag[0] || sticky)) mag = mag + 1;
    end
    if (sign) mag = (64'(1) << n) - mag;
    return mag & ((n == 64) ? '1 : ((64'(1) << n) - 1));
  endfunction

endpackage
