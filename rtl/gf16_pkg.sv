// gf16_pkg: types and constants shared by the GF(16) multipliers.
//
// GF(16) elements are 4-bit vectors. In the polynomial basis bit i is the
// coefficient of alpha^i, where alpha is a root of the field polynomial
// x^4 + x + 1 (alpha^4 = alpha + 1, i.e. 0011). The composite-basis
// multiplier views an element as two GF(4) digits, and GF(4) elements are
// 2-bit vectors reduced by x^2 + x + 1. The choice of the GF(4) polynomial
// and the GF((2^2)^2) extension constant is this design's own.
package gf16_pkg;

  localparam int unsigned M = 4;                       // bits per GF(16) element
  localparam logic [M:0]  FIELD_POLY = 5'b1_0011;      // x^4 + x + 1
  localparam int unsigned PIPE_LATENCY = 2;            // cycles from operands to product

  typedef logic [M-1:0] gf16_t;
  typedef logic [1:0]   gf4_t;

  // Composite-basis element: high and low GF(4) digits, a = a_h*y + a_l,
  // with y^2 = y + LAMBDA.
  typedef struct packed {
    gf4_t h;
    gf4_t l;
  } gf16_composite_t;

  localparam gf4_t LAMBDA = 2'b10;                     // omega, root of x^2 + x + 1

  // GF(4) product with x^2 = x + 1. Each result bit depends on four input
  // bits, which is one 4-input lookup table on an FPGA.
  function automatic gf4_t gf4_mul(gf4_t x, gf4_t y);
    gf4_t r;
    r[1] = (x[1] & y[1]) ^ (x[1] & y[0]) ^ (x[0] & y[1]);
    r[0] = (x[1] & y[1]) ^ (x[0] & y[0]);
    return r;
  endfunction

endpackage
