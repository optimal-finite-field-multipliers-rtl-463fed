// gf16_mult_top: the three pipelined GF(16) multipliers side by side.
//
// Each multiplier takes a pair of 4-bit operands every clock and returns the
// product two clocks later; they differ only in how field elements are
// encoded:
//   pc_*  polynomial basis (gf16_pipelined_comb_mult)
//   pr_*  composite GF((2^2)^2) basis (gf16_paar_rosner_ii_mult)
//   mb_*  dual basis for a and c, polynomial basis for b
//         (gf16_morii_berlekamp_ii_mult)
// The three share clock and reset and are otherwise independent, each with
// its own valid, operand and product ports, so any one of them can be taken
// as the multiplier of a larger datapath. Conversion between the encodings
// is outside this block.
module gf16_mult_top
  import gf16_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // polynomial basis
  input  logic            pc_in_valid,
  input  gf16_t           pc_a,
  input  gf16_t           pc_b,
  output logic            pc_out_valid,
  output gf16_t           pc_c,
  // composite basis
  input  logic            pr_in_valid,
  input  gf16_composite_t pr_a,
  input  gf16_composite_t pr_b,
  output logic            pr_out_valid,
  output gf16_composite_t pr_c,
  // dual basis
  input  logic            mb_in_valid,
  input  gf16_t           mb_a,
  input  gf16_t           mb_b,
  output logic            mb_out_valid,
  output gf16_t           mb_c
);

  gf16_pipelined_comb_mult u_pc (
    .clk, .rst_n,
    .in_valid (pc_in_valid), .a (pc_a), .b (pc_b),
    .out_valid(pc_out_valid), .c (pc_c)
  );

  gf16_paar_rosner_ii_mult u_pr (
    .clk, .rst_n,
    .in_valid (pr_in_valid), .a (pr_a), .b (pr_b),
    .out_valid(pr_out_valid), .c (pr_c)
  );

  gf16_morii_berlekamp_ii_mult u_mb (
    .clk, .rst_n,
    .in_valid (mb_in_valid), .a (mb_a), .b (mb_b),
    .out_valid(mb_out_valid), .c (mb_c)
  );

endmodule
