// ref_pkg: bit-exact reference model for the testbenches.
//
// Every operand is turned into its exact value as a wide unsigned fixed-point
// magnitude (value = mag * 2^-FB) plus a sign. Sums and products are computed
// exactly on those magnitudes and then rounded to the target format by a
// binary search over its (monotone) positive encodings:
//  * IEEE 754: the two neighbouring encodings are found and the exact value is
//    compared with their arithmetic midpoint; ties go to the even encoding.
//    The encoding after the largest finite number is infinity, valued
//    2^(emax+1) for this comparison, which gives the round-to-nearest
//    overflow rule. Flags {invalid, overflow, underflow, inexact}; underflow
//    is "tiny before rounding and inexact". NaN results are the quiet NaN
//    with sign 0 and only the fraction MSB set.
//  * posit: the midpoint between neighbours p and p+1 is the (n+1)-bit posit
//    {p,1}, which is round-to-nearest-even on the bit string; values beyond
//    maxpos give maxpos and non-zero values below minpos give minpos.
// None of this follows the structure of the hardware under test.
// The single entry point is ref_op(); the format is (posit, n, es) for posits
// and (IEEE, exponent bits, fraction bits) for IEEE 754.
package ref_pkg;

  localparam int FB = 320;              // fraction bits of the fixed point
  localparam int MW = 768;              // magnitude width
  typedef logic [MW-1:0]   fx_t;
  typedef logic [2*MW-1:0] fx2_t;

  // Exact magnitude of an encoding. Posit: fa = n, fb = es. IEEE: fa = exponent
  // bits, fb = fraction bits (the all-ones exponent is valued as if normal).
  function automatic fx_t val(input logic posit, input int fa, input int fb, input logic [63:0] code_in);
    logic [63:0] code, f;
    int i, m, k, e, nf, scale, bias;
    logic r0;
    if (posit) begin
      code = code_in & ((64'd1 << fa) - 1);
      if (code == 0) return '0;
      if (code[fa-1]) code = (-code) & ((64'd1 << fa) - 1);
      i = fa - 2;
      r0 = code[i];
      m = 0;
      while (i >= 0 && code[i] == r0) begin m++; i--; end
      k = r0 ? m - 1 : -m;
      if (i >= 0) i--;                  // termination bit
      e = 0;
      for (int j = 0; j < fb; j++) begin
        e = e * 2 + ((i >= 0) ? int'(code[i]) : 0);
        i--;
      end
      nf = (i >= 0) ? i + 1 : 0;
      f = (nf > 0) ? (code & ((64'd1 << nf) - 1)) : 64'd0;
      scale = k * (1 << fb) + e;
      return fx_t'((64'd1 << nf) | f) << (FB + scale - nf);
    end
    bias = (1 << (fa - 1)) - 1;
    e    = int'((code_in >> fb) & ((64'd1 << fa) - 1));
    f    = code_in & ((64'd1 << fb) - 1);
    if (e == 0) return fx_t'(f) << (FB + 1 - bias - fb);
    return fx_t'((64'd1 << fb) | f) << (FB + e - bias - fb);
  endfunction

  // Rounds an exact non-negative magnitude to the format and applies the sign.
  function automatic logic [63:0] round_to(input logic posit, input int fa, input int fb,
                                           input logic neg, input fx_t mag, output logic [3:0] flags);
    logic [63:0] lo, hi, mid, top, p, res, probe;
    fx_t  v [3];
    fx2_t twice, sum;
    logic inexact, ovf, tiny;
    flags = 4'b0;
    if (mag == '0) return posit ? 64'd0 : (64'(neg) << (fa + fb));
    // Largest encoding considered: maxpos, or the infinity encoding.
    top = posit ? ((64'd1 << (fa - 1)) - 1) : (((64'd1 << fa) - 1) << fb);
    lo = posit ? 64'd1 : 64'd0;
    hi = top;
    while (lo < hi) begin
      mid = (lo + hi + 1) >> 1;
      if (val(posit, fa, fb, mid) <= mag) lo = mid; else hi = mid - 1;
    end
    p = lo;
    // v[0] = value of p, v[1] = next encoding, v[2] = smallest normal (IEEE)
    // or the posit midpoint {p,1} at n+1 bits.
    for (int t = 0; t < 3; t++) begin
      logic [63:0] c;
      int          w;
      c = (t == 0) ? p : (t == 1) ? ((p == top) ? p : p + 1) :
          (posit ? ((p << 1) | 64'd1) : (64'd1 << fb));
      w = (posit && t == 2) ? fa + 1 : fa;
      v[t] = val(posit, w, fb, c);
    end
    res = p;
    if (p != top && v[0] < mag) begin
      if (posit) begin
        if (mag > v[2] || (mag == v[2] && p[0])) res = p + 1;
      end else begin
        twice = fx2_t'(mag) << 1;
        sum   = fx2_t'(v[0]) + fx2_t'(v[1]);
        if (twice > sum || (twice == sum && p[0])) res = p + 1;
      end
    end
    if (posit) begin
      if (neg) res = (-res) & ((64'd1 << fa) - 1);
      return res;
    end
    ovf     = (res == top);
    inexact = ovf || ((res == p) ? (v[0] != mag) : (v[1] != mag));
    tiny    = (mag < v[2]);
    flags   = {1'b0, ovf, tiny & inexact, inexact};
    return res | (64'(neg) << (fa + fb));
  endfunction

  // x + y (mul = 0) or x * y (mul = 1) in the given format.
  function automatic logic [63:0] ref_op(input logic posit, input logic mul, input int fa, input int fb,
                                         input logic [63:0] x, input logic [63:0] y,
                                         output logic [3:0] flags);
    fx_t  m [2];
    logic s [2], nan [2], snan [2], inf [2], zero [2];
    logic [63:0] ops [2], einf, qnan;
    fx2_t prod;
    logic neg;
    fx_t  mag;
    int   sbit;
    flags = 4'b0;
    ops[0] = x; ops[1] = y;
    sbit = posit ? fa - 1 : fa + fb;
    einf = ((64'd1 << fa) - 1) << fb;
    qnan = einf | (64'd1 << (fb - 1));
    for (int i = 0; i < 2; i++) begin
      logic [63:0] c;
      c = ops[i];
      s[i]    = c[sbit];
      m[i]    = val(posit, fa, fb, c);
      zero[i] = (m[i] == '0);
      if (posit) begin
        inf[i]  = (c == (64'd1 << (fa - 1)));            // NaR
        nan[i]  = 1'b0;
        snan[i] = 1'b0;
      end else begin
        inf[i]  = ((c & ~(64'd1 << sbit)) == einf);
        nan[i]  = ((c & einf) == einf) && ((c & ((64'd1 << fb) - 1)) != 0);
        snan[i] = nan[i] && !c[fb-1];
      end
    end
    if (posit) begin
      if (inf[0] || inf[1]) return 64'd1 << (fa - 1);
    end else begin
      if (nan[0] || nan[1]) begin
        flags[3] = snan[0] || snan[1];
        return qnan;
      end
      if (mul ? ((inf[0] && zero[1]) || (inf[1] && zero[0])) : (inf[0] && inf[1] && s[0] != s[1])) begin
        flags[3] = 1'b1;
        return qnan;
      end
      if (inf[0] || inf[1]) return einf | (64'(mul ? s[0] ^ s[1] : (inf[0] ? s[0] : s[1])) << sbit);
    end
    if (mul) begin
      prod = fx2_t'(m[0]) * fx2_t'(m[1]);
      mag  = fx_t'(prod >> FB);
      neg  = s[0] ^ s[1];
    end else if (s[0] == s[1]) begin
      mag = m[0] + m[1];
      neg = s[0];
    end else begin
      mag = (m[0] >= m[1]) ? m[0] - m[1] : m[1] - m[0];
      neg = (m[0] >= m[1]) ? s[0] : s[1];
      if (mag == '0) neg = 1'b0;        // x - x = +0
    end
    return round_to(posit, fa, fb, neg, mag, flags);
  endfunction

endpackage
