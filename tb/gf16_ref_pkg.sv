// gf16_ref_pkg: reference arithmetic for the GF(16) multiplier testbenches.
//
// Written independently of the RTL: products are formed by shift-and-add
// with reduction by x^4 + x + 1, the powers of alpha are the canonical table
// of the field (alpha^0 .. alpha^14), the dual basis is derived from the
// trace Tr(x) = x + x^2 + x^4 + x^8, and composite-field products are formed
// by schoolbook polynomial multiplication over GF(4) with reduction by
// y^2 + y + omega. iso_to_composite maps a polynomial-basis element to the
// composite encoding through a root beta of x^4 + x + 1 in the composite
// field (alpha^i -> beta^i).
package gf16_ref_pkg;

  typedef logic [3:0] elem_t;

  // Canonical representation of alpha^0 .. alpha^14.
  localparam elem_t ALPHA_POW [15] = '{
    4'b0001, 4'b0010, 4'b0100, 4'b1000, 4'b0011, 4'b0110, 4'b1100, 4'b1011,
    4'b0101, 4'b1010, 4'b0111, 4'b1110, 4'b1111, 4'b1101, 4'b1001
  };

  function automatic elem_t ref_mul(elem_t x, elem_t y);
    logic [4:0] acc;
    logic [4:0] xs;
    acc = '0;
    xs  = {1'b0, x};
    for (int i = 0; i < 4; i++) begin
      if (y[i]) acc ^= xs;
      xs = xs << 1;
      if (xs[4]) xs ^= 5'b1_0011;
    end
    return acc[3:0];
  endfunction

  function automatic logic ref_trace(elem_t x);
    elem_t x2, x4, x8, t;
    x2 = ref_mul(x, x);
    x4 = ref_mul(x2, x2);
    x8 = ref_mul(x4, x4);
    t  = x ^ x2 ^ x4 ^ x8;
    return t[0];
  endfunction

  // Dual-basis coordinates: bit i = Tr(alpha^i * x).
  function automatic elem_t to_dual(elem_t x);
    elem_t d;
    for (int i = 0; i < 4; i++) d[i] = ref_trace(ref_mul(ALPHA_POW[i], x));
    return d;
  endfunction

  // GF(4) = GF(2)[w]/(w^2 + w + 1), shift-and-add.
  function automatic logic [1:0] ref_gf4_mul(logic [1:0] x, logic [1:0] y);
    logic [2:0] acc;
    acc = '0;
    for (int i = 0; i < 2; i++) if (y[i]) acc ^= ({1'b0, x} << i);
    if (acc[2]) acc ^= 3'b111;
    return acc[1:0];
  endfunction

  // Composite field product, element = {hi digit, lo digit}.
  function automatic elem_t ref_cmul(elem_t x, elem_t y);
    logic [1:0] prod [3];
    logic [1:0] xd [2];
    logic [1:0] yd [2];
    xd[0] = x[1:0]; xd[1] = x[3:2];
    yd[0] = y[1:0]; yd[1] = y[3:2];
    for (int k = 0; k < 3; k++) prod[k] = '0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        prod[i+j] ^= ref_gf4_mul(xd[i], yd[j]);
    // y^2 = y + omega
    prod[1] ^= prod[2];
    prod[0] ^= ref_gf4_mul(prod[2], 2'b10);
    return {prod[1], prod[0]};
  endfunction

  function automatic elem_t ref_cpow(elem_t x, int n);
    elem_t r;
    r = 4'b0001;
    for (int i = 0; i < n; i++) r = ref_cmul(r, x);
    return r;
  endfunction

  // A root of x^4 + x + 1 in the composite field.
  function automatic elem_t composite_beta();
    for (int v = 2; v < 16; v++)
      if ((ref_cpow(elem_t'(v), 4) ^ elem_t'(v) ^ 4'b0001) == 4'b0000)
        return elem_t'(v);
    return 4'b0000;
  endfunction

  function automatic elem_t iso_to_composite(elem_t x);
    elem_t beta;
    if (x == 4'b0000) return 4'b0000;
    beta = composite_beta();
    for (int i = 0; i < 15; i++)
      if (ALPHA_POW[i] == x) return ref_cpow(beta, i);
    return 4'b0000;
  endfunction

  // Exponent n of a nonzero element x = alpha^n.
  function automatic int log_alpha(elem_t x);
    for (int i = 0; i < 15; i++) if (ALPHA_POW[i] == x) return i;
    return -1;
  endfunction

endpackage
