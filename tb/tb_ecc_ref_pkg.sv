// Reference arithmetic for the DF-ECC testbenches, written independently of
// the RTL: bit-serial modular multiplication, binary extended-Euclid
// inversion, and a textbook left-to-right double-and-add scalar
// multiplication in affine coordinates for y^2 = x^3+ax+b over GF(p) and
// y^2+xy = x^3+ax^2+b over GF(2^m) (fld = 1). Elements are N-bit vectors.
package tb_ecc_ref_pkg;
  localparam int unsigned N = 521;
  typedef logic [N-1:0] fe_t;

  function automatic fe_t addm(fe_t a, fe_t b, logic fld, fe_t p);
    logic [N+1:0] s;
    if (fld) return a ^ b;
    s = {2'b0, a} + {2'b0, b};
    if (s >= {2'b0, p}) s = s - {2'b0, p};
    return s[N-1:0];
  endfunction

  function automatic fe_t subm(fe_t a, fe_t b, logic fld, fe_t p);
    if (fld) return a ^ b;
    if (a >= b) return a - b;
    return a + (p - b);
  endfunction

  function automatic fe_t dblm(fe_t a, logic fld, fe_t p, int m);
    logic [N:0] s;
    s = {a, 1'b0};
    if (fld) begin
      if (s[m]) s = s ^ {1'b0, p};
      return s[N-1:0];
    end
    if (s >= {1'b0, p}) s = s - {1'b0, p};
    return s[N-1:0];
  endfunction

  function automatic fe_t mulm(fe_t a, fe_t b, logic fld, fe_t p, int m);
    fe_t acc = '0;
    for (int k = m - 1; k >= 0; k--) begin
      acc = dblm(acc, fld, p, m);
      if (b[k]) acc = addm(acc, a, fld, p);
    end
    return acc;
  endfunction

  function automatic fe_t half(fe_t g, logic fld, fe_t p);
    logic [N:0] t;
    if (!g[0]) return g >> 1;
    if (fld) return (g ^ p) >> 1;
    t = {1'b0, g} + {1'b0, p};
    return t[N:1];
  endfunction

  // binary extended Euclid: a^-1 mod p (a != 0)
  function automatic fe_t inv(fe_t a, logic fld, fe_t p);
    fe_t u = a, v = p, g1 = 1, g2 = 0;
    while (u != 1 && v != 1) begin
      while (!u[0]) begin u = u >> 1; g1 = half(g1, fld, p); end
      while (!v[0]) begin v = v >> 1; g2 = half(g2, fld, p); end
      if (u >= v) begin
        u  = fld ? (u ^ v) : (u - v);
        g1 = subm(g1, g2, fld, p);
      end else begin
        v  = fld ? (v ^ u) : (v - u);
        g2 = subm(g2, g1, fld, p);
      end
    end
    return (u == 1) ? g1 : g2;
  endfunction

  function automatic fe_t pow2(int e, logic fld, fe_t p, int m);
    fe_t acc = 1;
    for (int k = 0; k < e; k++) acc = dblm(acc, fld, p, m);
    return acc;
  endfunction

  // affine point doubling / addition (no point at infinity handling)
  task automatic pdbl(inout fe_t x, inout fe_t y, input fe_t a, input logic fld, input fe_t p, input int m);
    fe_t l, x3, y3, t;
    if (!fld) begin
      t  = mulm(x, x, fld, p, m);
      t  = addm(addm(t, t, fld, p), t, fld, p);
      t  = addm(t, a, fld, p);
      l  = mulm(t, inv(addm(y, y, fld, p), fld, p), fld, p, m);
      x3 = subm(subm(mulm(l, l, fld, p, m), x, fld, p), x, fld, p);
      y3 = subm(mulm(l, subm(x, x3, fld, p), fld, p, m), y, fld, p);
    end else begin
      l  = x ^ mulm(y, inv(x, fld, p), fld, p, m);
      x3 = mulm(l, l, fld, p, m) ^ l ^ a;
      y3 = mulm(x, x, fld, p, m) ^ mulm(l ^ 1, x3, fld, p, m);
    end
    x = x3; y = y3;
  endtask

  task automatic padd(inout fe_t x1, inout fe_t y1, input fe_t x2, input fe_t y2, input fe_t a,
                      input logic fld, input fe_t p, input int m);
    fe_t l, x3, y3;
    l = mulm(subm(y2, y1, fld, p), inv(subm(x2, x1, fld, p), fld, p), fld, p, m);
    if (!fld) begin
      x3 = subm(subm(mulm(l, l, fld, p, m), x1, fld, p), x2, fld, p);
      y3 = subm(mulm(l, subm(x1, x3, fld, p), fld, p, m), y1, fld, p);
    end else begin
      x3 = mulm(l, l, fld, p, m) ^ l ^ x1 ^ x2 ^ a;
      y3 = mulm(l, x1 ^ x3, fld, p, m) ^ x3 ^ y1;
    end
    x1 = x3; y1 = y3;
  endtask

  // K*P by left-to-right double-and-add over bits m-1..0 (K != 0)
  task automatic smul(input fe_t k, input fe_t px, input fe_t py, input fe_t a, input logic fld,
                      input fe_t p, input int m, output fe_t rx, output fe_t ry);
    int top = m - 1;
    while (top > 0 && !k[top]) top--;
    rx = px; ry = py;
    for (int i = top - 1; i >= 0; i--) begin
      pdbl(rx, ry, a, fld, p, m);
      if (k[i]) padd(rx, ry, px, py, a, fld, p, m);
    end
  endtask

  function automatic fe_t rand_elem(logic fld, fe_t p, int m);
    fe_t x;
    for (int k = 0; k < N; k += 32) x[k +: 32] = $urandom;
    if (m < N) x = x & ((fe_t'(1) << m) - 1);
    if (!fld) while (x >= p) x = x - p;
    return x;
  endfunction
endpackage
