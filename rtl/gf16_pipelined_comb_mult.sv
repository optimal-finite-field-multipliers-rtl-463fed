// gf16_pipelined_comb_mult: two-stage pipelined GF(16) multiplier, polynomial
// basis, field polynomial x^4 + x + 1.
//
// The product equations c = a*b (bit i is the coefficient of alpha^i)
//   c3 = a3b3 + a3b0 + a2b1 + a1b2 + a0b3
//   c2 = a3b3 + a3b2 + a2b3 + a2b0 + a1b1 + a0b2
//   c1 = a3b2 + a2b3 + a3b1 + a2b2 + a1b3 + a1b0 + a0b1
//   c0 = a3b1 + a2b2 + a1b3 + a0b0
// are split into eleven partial products, each a function of at most four
// operand bits so that one 4-input lookup table computes it. The first
// logic block forms the partials, a register bank holds them, and the second
// block XORs at most three partials into each product bit, which is
// registered again. Splitting into eleven partials, two-level logic with a
// register bank between the blocks, a two-cycle latency and one product per
// clock follow the published design; the particular grouping of terms into
// the eleven partials, the registered output and the valid/reset handshake
// are this design's own.
//
// Interface: present a, b with in_valid in cycle t; c and out_valid show the
// product in cycle t+2 (after the second rising edge). A new pair may be
// presented every cycle. rst_n (synchronous, active low) clears the valid
// pipeline only; data registers are free-running.
module gf16_pipelined_comb_mult
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

  localparam int unsigned NUM_PARTIALS = 11;

  logic [NUM_PARTIALS-1:0] p_d, p_q;
  logic                    v_q;

  // First logic block: eleven partial products, each of <= 4 operand bits.
  always_comb begin
    // bit 0
    p_d[0]  = (a[3] & b[1]) ^ (a[1] & b[3]);
    p_d[1]  = (a[2] & b[2]) ^ (a[0] & b[0]);
    // bit 1
    p_d[2]  = (a[3] & (b[1] ^ b[2])) ^ (a[0] & b[1]);
    p_d[3]  = a[2] & (b[2] ^ b[3]);
    p_d[4]  = a[1] & (b[3] ^ b[0]);
    // bit 2
    p_d[5]  = a[3] & (b[3] ^ b[2]);
    p_d[6]  = a[2] & (b[3] ^ b[0]);
    p_d[7]  = (a[1] & b[1]) ^ (a[0] & b[2]);
    // bit 3
    p_d[8]  = a[3] & (b[3] ^ b[0]);
    p_d[9]  = (a[2] & b[1]) ^ (a[1] & b[2]);
    p_d[10] = a[0] & b[3];
  end

  // Register bank between the two logic blocks.
  always_ff @(posedge clk) begin
    p_q <= p_d;
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end

  // Second logic block: combine the partials, register the product.
  always_ff @(posedge clk) begin
    c[0] <= p_q[0] ^ p_q[1];
    c[1] <= p_q[2] ^ p_q[3] ^ p_q[4];
    c[2] <= p_q[5] ^ p_q[6] ^ p_q[7];
    c[3] <= p_q[8] ^ p_q[9] ^ p_q[10];
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_q;
  end

endmodule
