// gf16_paar_rosner_ii_mult: pipelined GF(16) multiplier in a composite basis.
//
// An element is a pair of GF(4) digits, a = a_h*y + a_l, where GF(4) is
// GF(2)[x]/(x^2 + x + 1) and y is a root of y^2 + y + LAMBDA over GF(4),
// LAMBDA = omega (2'b10). Multiplying out and substituting y^2 = y + LAMBDA:
//   c_h = a_h*b_h + a_h*b_l + a_l*b_h
//   c_l = LAMBDA*(a_h*b_h) + a_l*b_l
// The first logic block forms the four GF(4) products P = a_h*b_h,
// Q = a_h*b_l, R = a_l*b_h and S = a_l*b_l: eight partial bits, each a
// function of four operand bits (one 4-input lookup table). A register bank
// holds them, and the second block combines them; LAMBDA*P = {p1^p0, p1} is a
// fixed XOR, so
//   c3 = p1^q1^r1   c2 = p0^q0^r0   c1 = p1^p0^s1   c0 = p1^s0
// and registers the result. Computing the product through GF(4) arithmetic
// follows the composite-basis approach; laying it out as registered partial
// products followed by a registered combining stage follows the pipelined
// recasting the design is based on. The field polynomials, the use of four
// GF(4) products rather than three, the bit order ({a_h, a_l}, high digit in
// bits 3:2) and the valid/reset handshake are this design's own.
//
// Interface and timing are those of gf16_pipelined_comb_mult: operands with
// in_valid in cycle t, product with out_valid in cycle t+2, one pair per
// cycle; rst_n (synchronous, active low) clears the valid pipeline.
module gf16_paar_rosner_ii_mult
  import gf16_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  gf16_composite_t a,
  input  gf16_composite_t b,
  output logic            out_valid,
  output gf16_composite_t c
);

  typedef struct packed {
    gf4_t p;   // a_h * b_h
    gf4_t q;   // a_h * b_l
    gf4_t r;   // a_l * b_h
    gf4_t s;   // a_l * b_l
  } partials_t;

  partials_t pp_d, pp_q;
  logic      v_q;

  always_comb begin
    pp_d.p = gf4_mul(a.h, b.h);
    pp_d.q = gf4_mul(a.h, b.l);
    pp_d.r = gf4_mul(a.l, b.h);
    pp_d.s = gf4_mul(a.l, b.l);
  end

  always_ff @(posedge clk) begin
    pp_q <= pp_d;
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end

  always_ff @(posedge clk) begin
    c.h[1] <= pp_q.p[1] ^ pp_q.q[1] ^ pp_q.r[1];
    c.h[0] <= pp_q.p[0] ^ pp_q.q[0] ^ pp_q.r[0];
    c.l    <= gf4_mul(LAMBDA, pp_q.p) ^ pp_q.s;
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_q;
  end

endmodule
