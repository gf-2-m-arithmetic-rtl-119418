// gf_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL algorithms. Elements are held in a fixed 576-bit vector and the
// field degree m and polynomial F are run-time arguments.
//   ref_mul  : LSB-first shift-and-add multiplication (the RTL goes MSB first)
//   ref_inv  : inversion by Fermat, a^(2^m - 2) (the RTL divides directly)
//   ref_div  : y * ref_inv(x)
//   ref_padd : affine group law with the point at infinity as an explicit flag
//   ref_smul : left-to-right double-and-add (the RTL scans right to left)
package gf_ref_pkg;

  typedef logic [575:0] elem_t;

  typedef struct packed {
    logic  inf;
    elem_t x;
    elem_t y;
  } point_t;

  function automatic elem_t ref_mul(int m, elem_t f, elem_t a, elem_t b);
    elem_t r = '0;
    for (int i = 0; i < m; i++) begin
      if (b[i]) r ^= a;
      a = a << 1;
      if (a[m]) a ^= f;
    end
    return r;
  endfunction

  function automatic elem_t ref_inv(int m, elem_t f, elem_t a);
    elem_t r = 1;
    elem_t s = a;
    for (int i = 1; i < m; i++) begin
      s = ref_mul(m, f, s, s);
      r = ref_mul(m, f, r, s);
    end
    return r;
  endfunction

  function automatic elem_t ref_div(int m, elem_t f, elem_t y, elem_t x);
    return ref_mul(m, f, y, ref_inv(m, f, x));
  endfunction

  function automatic logic on_curve(int m, elem_t f, elem_t a, elem_t b, point_t p);
    elem_t lhs, rhs, x2;
    if (p.inf) return 1'b1;
    x2  = ref_mul(m, f, p.x, p.x);
    lhs = ref_mul(m, f, p.y, p.y) ^ ref_mul(m, f, p.x, p.y);
    rhs = ref_mul(m, f, x2, p.x) ^ ref_mul(m, f, a, x2) ^ b;
    return lhs == rhs;
  endfunction

  function automatic point_t ref_padd(int m, elem_t f, elem_t a, point_t p, point_t q);
    point_t r;
    elem_t  l;
    r = '0;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y != q.y || p.x == '0) begin
        r.inf = 1'b1;
        return r;
      end
      l   = p.x ^ ref_div(m, f, p.y, p.x);
      r.x = ref_mul(m, f, l, l) ^ l ^ a;
      r.y = ref_mul(m, f, p.x, p.x) ^ ref_mul(m, f, l, r.x) ^ r.x;
    end else begin
      l   = ref_div(m, f, p.y ^ q.y, p.x ^ q.x);
      r.x = ref_mul(m, f, l, l) ^ l ^ p.x ^ q.x ^ a;
      r.y = ref_mul(m, f, l, p.x ^ r.x) ^ r.x ^ p.y;
    end
    return r;
  endfunction

  function automatic point_t ref_smul(int m, elem_t f, elem_t a, elem_t k, point_t p);
    point_t r;
    r = '0;
    r.inf = 1'b1;
    for (int i = m - 1; i >= 0; i--) begin
      r = ref_padd(m, f, a, r, r);
      if (k[i]) r = ref_padd(m, f, a, r, p);
    end
    return r;
  endfunction

  // The hardware codes the point at infinity as (0,0).
  function automatic point_t to_hw(point_t p);
    point_t r = p;
    if (p.inf) begin
      r.x = '0;
      r.y = '0;
    end
    return r;
  endfunction

  function automatic elem_t rand_elem(int m);
    elem_t e;
    for (int i = 0; i < 18; i++) e[i*32 +: 32] = $urandom;
    return e & ((elem_t'(1) << m) - 1);
  endfunction

endpackage
