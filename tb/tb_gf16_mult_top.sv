// tb_gf16_mult_top: end-to-end testbench of the three pipelined multipliers.
//
// The same stream of field-element pairs (A, B) is fed to all three
// multipliers, each in its own encoding: polynomial basis, composite basis
// (alpha^i -> beta^i with beta a root of x^4 + x + 1 in GF((2^2)^2)), and
// dual basis for A. Every product, converted back to the polynomial basis,
// must equal the shift-and-add product A*B, so the three multipliers are also
// held against each other. The stream exercises the mechanisms of the
// pipeline and counts them: back-to-back products (one per clock), bubbles
// in in_valid that must give bubbles in out_valid two clocks later, and a
// synchronous reset while products are in flight, which must discard them.
// Each product must appear exactly two clocks after its operands. Inputs
// are driven and outputs sampled on the falling edge.
module tb_gf16_mult_top;
  import gf16_pkg::*;
  import gf16_ref_pkg::*;

  localparam int unsigned WATCHDOG_CYCLES = 10000;
  localparam int unsigned NUM_RANDOM      = 2000;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            pc_in_valid, pr_in_valid, mb_in_valid;
  gf16_t           pc_a, pc_b, mb_a, mb_b;
  gf16_composite_t pr_a, pr_b;
  logic            pc_out_valid, pr_out_valid, mb_out_valid;
  gf16_t           pc_c, mb_c;
  gf16_composite_t pr_c;

  int checks   = 0;
  int failures = 0;

  gf16_mult_top dut (.*);

  always #5 clk = ~clk;

  elem_t to_comp [16];
  elem_t from_comp [16];
  elem_t from_dual [16];

  logic  hv [2];
  elem_t hc [2];
  int    cycle = 0;
  int    first_in = -1, first_out = -1;
  logic  prev_out_valid = 1'b0;
  // mechanism counters
  int    n_back_to_back = 0;   // product cycles directly following a product cycle
  int    n_bubbles      = 0;   // expected idle output cycles between products
  int    n_flushed      = 0;   // products discarded by a reset while in flight
  int    n_products     = 0;

  task automatic expect_eq(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL cycle %0d: %s gave %h expected %h", cycle, what, got, exp);
    end
  endtask

  task automatic check_outputs();
    expect_eq("pc_out_valid", 4'(pc_out_valid), 4'(hv[1]));
    expect_eq("pr_out_valid", 4'(pr_out_valid), 4'(hv[1]));
    expect_eq("mb_out_valid", 4'(mb_out_valid), 4'(hv[1]));
    if (hv[1]) begin
      expect_eq("polynomial-basis product", pc_c, hc[1]);
      expect_eq("composite-basis product", from_comp[pr_c], hc[1]);
      expect_eq("dual-basis product", from_dual[mb_c], hc[1]);
      n_products++;
      if (prev_out_valid) n_back_to_back++;
      if (first_out < 0) first_out = cycle;
    end else if (n_products > 0) n_bubbles++;
    prev_out_valid = hv[1];
  endtask

  task automatic step(logic rst, logic v, elem_t x, elem_t y);
    @(negedge clk);
    cycle++;
    check_outputs();
    rst_n       = !rst;
    pc_in_valid = v;  pc_a = x;               pc_b = y;
    pr_in_valid = v;  pr_a = to_comp[x];      pr_b = to_comp[y];
    mb_in_valid = v;  mb_a = to_dual(x);      mb_b = y;
    if (v && first_in < 0) first_in = cycle;
    if (rst) begin
      // the reset edge clears both valid stages
      if (hv[0]) n_flushed++;
      if (v)     n_flushed++;
      hv[0] = 1'b0;
    end
    hv[1] = hv[0];            hc[1] = hc[0];
    hv[0] = v && !rst;        hc[0] = ref_mul(x, y);
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      to_comp[v] = iso_to_composite(elem_t'(v));
      from_comp[to_comp[v]] = elem_t'(v);
      from_dual[to_dual(elem_t'(v))] = elem_t'(v);
    end
    rst_n = 1'b0;
    pc_in_valid = 1'b0; pr_in_valid = 1'b0; mb_in_valid = 1'b0;
    pc_a = '0; pc_b = '0; pr_a = '0; pr_b = '0; mb_a = '0; mb_b = '0;
    for (int i = 0; i < 2; i++) begin hv[i] = 1'b0; hc[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // every pair, back to back
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        step(1'b0, 1'b1, elem_t'(x), elem_t'(y));
    checks++;
    if (first_out - first_in != PIPE_LATENCY) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", first_out - first_in, PIPE_LATENCY);
    end
    // random pairs with bubbles and occasional resets while busy
    for (int n = 0; n < NUM_RANDOM; n++)
      step(($urandom % 97) == 0, ($urandom % 4) != 0, elem_t'($urandom), elem_t'($urandom));
    // a reset with two products in flight
    step(1'b0, 1'b1, 4'h7, 4'h9);
    step(1'b0, 1'b1, 4'hA, 4'h3);
    step(1'b1, 1'b1, 4'h5, 4'hE);
    repeat (3) step(1'b0, 1'b0, '0, '0);
    $display("mechanisms: products=%0d back_to_back=%0d bubbles=%0d flushed_by_reset=%0d",
             n_products, n_back_to_back, n_bubbles, n_flushed);
    checks++;
    if (n_back_to_back < 255) begin failures++; $display("FAIL too few back-to-back products"); end
    checks++;
    if (n_bubbles == 0) begin failures++; $display("FAIL no bubble seen"); end
    checks++;
    if (n_flushed == 0) begin failures++; $display("FAIL no product flushed by reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
