// seerad_ref_pkg: reference model of the SEERAD divider for the testbenches.
//
// Written independently of the RTL: the (L, D) table is typed in again, the
// leading one and the group bits are found with plain loops, and the product
// uses the `*` operator. ref_q() returns the quotient in the same fixed-point
// form as the divider: 2n+L bits with n+L fraction bits, two's complement when
// signed, zero for a zero divisor. Widths up to n = 32 are supported.
package seerad_ref_pkg;

  function automatic int ref_l(input int level);
    int lt [4] = '{3, 4, 5, 7};
    return lt[level-1];
  endfunction

  function automatic int ref_d(input int level, input int idx);
    int d1 [1] = '{5};
    int d2 [2] = '{12, 9};
    int d3 [4] = '{28, 24, 20, 17};
    int d4 [8] = '{120, 108, 97, 88, 82, 76, 70, 66};
    case (level)
      1: return d1[0];
      2: return d2[idx];
      3: return d3[idx];
      default: return d4[idx];
    endcase
  endfunction

  // Position of the leading one of x (n bits), -1 when x is zero.
  function automatic int ref_k(input logic [63:0] x, input int n);
    int k = -1;
    for (int i = 0; i < n; i++)
      if (x[i]) k = i;
    return k;
  endfunction

  // Group index: the level-1 bits below the leading one (missing bits are 0).
  function automatic int ref_index(input logic [63:0] x, input int n, input int level);
    int k   = ref_k(x, n);
    int idx = 0;
    for (int j = 1; j < level; j++) begin
      idx = idx * 2;
      if (k - j >= 0 && x[k-j]) idx = idx + 1;
    end
    return idx;
  endfunction

  // Magnitude of an n-bit value read as two's complement (sgn) or unsigned.
  function automatic logic [63:0] ref_abs(input logic [63:0] x, input int n, input bit sgn);
    logic [63:0] m = x & ((64'd1 << n) - 1);
    if (sgn && m[n-1]) m = ((64'd1 << n) - m) & ((64'd1 << n) - 1);
    return m;
  endfunction

  function automatic logic [127:0] ref_q(input int level, input int n, input bit sgn,
                                         input logic [63:0] a, input logic [63:0] b);
    logic [63:0]  am = ref_abs(a, n, sgn);
    logic [63:0]  bm = ref_abs(b, n, sgn);
    int           k  = ref_k(bm, n);
    int           l  = ref_l(level);
    logic [127:0] p, q, mask;
    bit           neg;
    if (k < 0) return '0;
    p    = 128'(am) * 128'(ref_d(level, ref_index(bm, n, level)));
    q    = p << (n - k);              // value p / 2^(k+l) with n+l fraction bits
    mask = (128'd1 << (2 * n + l)) - 1;
    neg  = sgn && (a[n-1] ^ b[n-1]);
    if (neg) q = (~q + 1) & mask;
    return q & mask;
  endfunction

  // Real value of a quotient word (2n+l bits, n+l fraction bits).
  function automatic real ref_real(input logic [127:0] q, input int n, input int level, input bit sgn);
    int   w = 2 * n + ref_l(level);
    real  v;
    logic [127:0] m = q;
    bit neg = sgn && q[w-1];
    if (neg) m = ((128'd1 << w) - q) & ((128'd1 << w) - 1);
    v = 0.0;
    for (int i = w - 1; i >= 0; i--) v = v * 2.0 + (m[i] ? 1.0 : 0.0);
    v = v / (2.0 ** (n + ref_l(level)));
    return neg ? -v : v;
  endfunction

endpackage
