// gf16_morii_berlekamp_ii_mult: pipelined dual-basis GF(16) multiplier.
//
// Operand a and the product c are in the dual basis of the polynomial basis
// {1, alpha, alpha^2, alpha^3} (alpha a root of x^4 + x + 1) with respect to
// the trace: a_i = Tr(alpha^i * A). Operand b is in the polynomial basis.
// Then c_i = Tr(alpha^i * A * B) = sum_j b_j * a_(i+j), where the sequence
// a_k continues by the recurrence of the field polynomial,
// a_(k+4) = a_(k+1) + a_k:
//   a4 = a0^a1   a5 = a1^a2   a6 = a2^a3
// In the bit-serial form an LFSR steps through windows (a_i .. a_(i+3)) and an
// AND-XOR block forms one product bit per clock. Here all four windows are
// expanded at once and every bit c_i is split into partials of at most four
// operand bits (one 4-input lookup table each):
//   c0 = [a0b0^a1b1] ^ [a2b2^a3b3]
//   c1 = [a1(b0^b3)^a0b3] ^ [a2b1^a3b2]
//   c2 = [a2(b0^b3)] ^ [a3b1^a0b2] ^ [a1(b2^b3)]
//   c3 = [a3(b0^b3)] ^ [a1(b1^b2)^a0b1] ^ [a2(b2^b3)]
// The ten partials are registered, then XORed and registered again. The
// dual-basis product rule and the pipelined two-block layout follow the
// design this is based on; the trace-dual basis (generator Tr(x)), the
// grouping into partials and the valid/reset handshake are this design's own.
//
// Interface and timing: operands with in_valid in cycle t, product with
// out_valid in cycle t+2, one pair per cycle; rst_n (synchronous, active low)
// clears the valid pipeline.
module gf16_morii_berlekamp_ii_mult
  import gf16_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  gf16_t a,
  input  gf16_t b,
  output logic  out_valid,
  output gf16_t c
);

  localparam int unsigned NUM_PARTIALS = 10;

  logic [NUM_PARTIALS-1:0] p_d, p_q;
  logic                    v_q;

  always_comb begin
    p_d[0] = (a[0] & b[0]) ^ (a[1] & b[1]);
    p_d[1] = (a[2] & b[2]) ^ (a[3] & b[3]);
    p_d[2] = (a[1] & (b[0] ^ b[3])) ^ (a[0] & b[3]);
    p_d[3] = (a[2] & b[1]) ^ (a[3] & b[2]);
    p_d[4] = a[2] & (b[0] ^ b[3]);
    p_d[5] = (a[3] & b[1]) ^ (a[0] & b[2]);
    p_d[6] = a[1] & (b[2] ^ b[3]);
    p_d[7] = a[3] & (b[0] ^ b[3]);
    p_d[8] = (a[1] & (b[1] ^ b[2])) ^ (a[0] & b[1]);
    p_d[9] = a[2] & (b[2] ^ b[3]);
  end

  always_ff @(posedge clk) begin
    p_q <= p_d;
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end

  always_ff @(posedge clk) begin
    c[0] <= p_q[0] ^ p_q[1];
    c[1] <= p_q[2] ^ p_q[3];
    c[2] <= p_q[4] ^ p_q[5] ^ p_q[6];
    c[3] <= p_q[7] ^ p_q[8] ^ p_q[9];
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_q;
  end

endmodule
