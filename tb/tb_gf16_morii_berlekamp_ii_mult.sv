// tb_gf16_morii_berlekamp_ii_mult: self-checking testbench of the dual-basis
// pipelined multiplier.
//
// Phase 1 streams all 256 field-element pairs (A, B) back to back (one per
// clock), A converted to dual-basis coordinates Tr(alpha^i * A) and B in the
// polynomial basis, and compares every product with the dual-basis
// coordinates of the shift-and-add product A*B; for nonzero operands the
// product is also held against alpha^i * alpha^j = alpha^((i+j) mod 15).
// Phase 2 sends random pairs with random gaps in in_valid. Each
// product must appear exactly two clocks after its operands, out_valid must
// be low in every other cycle, and phase 1 must deliver 256 products in 256
// consecutive cycles. Inputs are driven and outputs sampled on the falling
// edge.
module tb_gf16_morii_berlekamp_ii_mult;
  import gf16_pkg::*;
  import gf16_ref_pkg::*;

  localparam int unsigned WATCHDOG_CYCLES = 5000;
  localparam int unsigned NUM_RANDOM      = 1000;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  in_valid;
  gf16_t a, b;
  logic  out_valid;
  gf16_t c;

  int checks   = 0;
  int failures = 0;

  gf16_morii_berlekamp_ii_mult dut (.*);

  always #5 clk = ~clk;

  // Expected outputs of the two previous falling edges.
  logic  hv [2];
  gf16_t hc [2];
  gf16_t ha [2];
  gf16_t hb [2];
  int    cycle = 0;
  int    first_in = -1, first_out = -1;
  int    run = 0, max_run = 0;

  task automatic check_outputs();
    checks++;
    if (out_valid !== hv[1]) begin
      failures++;
      $display("FAIL cycle %0d: out_valid=%0b expected %0b", cycle, out_valid, hv[1]);
    end
    if (hv[1]) begin
      checks++;
      if (c !== hc[1]) begin
        failures++;
        $display("FAIL cycle %0d: %h*%h gave %h expected %h", cycle, ha[1], hb[1], c, hc[1]);
      end
      if (ha[1] != 0 && hb[1] != 0) begin
        checks++;
        if (c !== to_dual(ALPHA_POW[(log_alpha(ha[1]) + log_alpha(hb[1])) % 15])) begin
          failures++;
          $display("FAIL cycle %0d: %h*%h disagrees with the table of powers", cycle, ha[1], hb[1]);
        end
      end
    end
    if (out_valid) begin
      run++;
      if (first_out < 0) first_out = cycle;
    end else run = 0;
    if (run > max_run) max_run = run;
  endtask

  task automatic step(logic v, gf16_t x, gf16_t y);
    @(negedge clk);
    cycle++;
    check_outputs();
    in_valid = v;
    a = to_dual(x);
    b = y;
    if (v && first_in < 0) first_in = cycle;
    hv[1] = hv[0]; hc[1] = hc[0]; ha[1] = ha[0]; hb[1] = hb[0];
    hv[0] = v;     hc[0] = to_dual(ref_mul(x, y)); ha[0] = x; hb[0] = y;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0;
    for (int i = 0; i < 2; i++) begin hv[i] = 1'b0; hc[i] = '0; ha[i] = '0; hb[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Phase 1: every pair, back to back.
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        step(1'b1, gf16_t'(x), gf16_t'(y));
    step(1'b0, '0, '0);
    step(1'b0, '0, '0);
    step(1'b0, '0, '0);
    checks++;
    if (first_out - first_in != PIPE_LATENCY) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", first_out - first_in, PIPE_LATENCY);
    end
    checks++;
    if (max_run != 256) begin
      failures++;
      $display("FAIL longest run of products %0d, expected 256", max_run);
    end
    // Phase 2: random pairs with gaps.
    for (int n = 0; n < NUM_RANDOM; n++)
      step(($urandom % 3) != 0, gf16_t'($urandom), gf16_t'($urandom));
    step(1'b0, '0, '0);
    step(1'b0, '0, '0);
    step(1'b0, '0, '0);
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
