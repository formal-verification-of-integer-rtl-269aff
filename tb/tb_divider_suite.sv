// tb_divider_suite: end-to-end test of the divider suite at its default
// parameters (modular divide-by-3 divider, 32-bit dividend, one bit per
// block; gate-level divide-by-3 block; restoring divide-by-3 divider,
// 16-bit dividend; 20-bit generic restoring divider).
//
// Each operation drives all four dividers and checks them against integer
// arithmetic worked out here and against each other:
//   * the modular divider divides a 32-bit dividend by 3;
//   * two modular divisions chained through the carry-in divide a 64-bit
//     number by 3 (high word first, its remainder becoming the carry-in of
//     the low word);
//   * the gate-level block is stepped over the 32 dividend bits, most
//     significant first, feeding its remainder back as its carry-in, and
//     must produce the same quotient and remainder as the modular divider;
//   * the restoring constant divider divides the low 16 bits by 3;
//   * the generic divider divides the low 20 bits by a random divisor.
// The testbench counts how often each case named below happens and counts
// a failure for any case that never happened: stand-alone division, chained
// division with a non-zero carry-in, zero remainder, largest remainder
// (D-1), quotient zero, generic division by zero, by one, and by a divisor
// larger than the dividend.
module tb_divider_suite;

  int checks   = 0;
  int failures = 0;

  logic [1:0]  mod_c_in, mod_r, g3_c, g3_r, rc_r;
  logic [31:0] mod_x, mod_q;
  logic        g3_x, g3_q;
  logic [15:0] rc_x, rc_q;
  logic [19:0] gen_x, gen_d, gen_q, gen_r;

  divider_suite dut (
    .mod_c_in (mod_c_in), .mod_x (mod_x), .mod_q (mod_q), .mod_r (mod_r),
    .g3_c     (g3_c),     .g3_x  (g3_x),  .g3_q  (g3_q),  .g3_r  (g3_r),
    .rc_x     (rc_x),     .rc_q  (rc_q),  .rc_r  (rc_r),
    .gen_x    (gen_x),    .gen_d (gen_d), .gen_q (gen_q), .gen_r (gen_r)
  );

  // event counters
  int n_standalone, n_chained, n_rem_zero, n_rem_max, n_q_zero;
  int n_gen_div0, n_gen_div1, n_gen_big;

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // 32-bit division through the gate-level block, one bit per step.
  task automatic gate_divide(input logic [31:0] x, output logic [31:0] q, output logic [1:0] r);
    logic [1:0] c;
    c = '0;
    for (int b = 31; b >= 0; b--) begin
      g3_c = c; g3_x = x[b]; #1;
      q[b] = g3_q;
      c    = g3_r;
    end
    r = c;
  endtask

  task automatic one_operation(input logic [63:0] big, input logic [19:0] d);
    logic [31:0] qh, ql, gq;
    logic [1:0]  rh, rl, gr;
    logic [31:0] lo;
    lo = big[31:0];
    // stand-alone 32-bit division
    mod_c_in = '0; mod_x = lo; rc_x = lo[15:0]; gen_x = lo[19:0]; gen_d = d; #1;
    n_standalone++;
    expect_eq("mod q", mod_q, lo / 3);
    expect_eq("mod r", mod_r, lo % 3);
    if (mod_r == 0) n_rem_zero++;
    if (mod_r == 2) n_rem_max++;
    expect_eq("rc q", rc_q, lo[15:0] / 3);
    expect_eq("rc r", rc_r, lo[15:0] % 3);
    if (rc_q == 0) n_q_zero++;
    if (d == 0) begin
      n_gen_div0++;
      expect_eq("gen q /0", gen_q, 20'hFFFFF);
      expect_eq("gen r /0", gen_r, lo[19:0]);
    end else begin
      if (d == 1) n_gen_div1++;
      if (d > lo[19:0]) n_gen_big++;
      expect_eq("gen q", gen_q, lo[19:0] / d);
      expect_eq("gen r", gen_r, lo[19:0] % d);
    end
    // generic divider with divisor 3 agrees with the constant dividers
    gen_d = 20'd3; #1;
    expect_eq("gen/3 vs mod", gen_r, 20'(lo[19:0] % 3));
    // gate-level block stepped over the word agrees with the modular divider
    mod_x = lo; #1;
    gate_divide(lo, gq, gr);
    expect_eq("gate q vs mod", gq, mod_q);
    expect_eq("gate r vs mod", gr, mod_r);
    // 64-bit division: two chained 32-bit divisions
    mod_c_in = '0; mod_x = big[63:32]; #1;
    qh = mod_q; rh = mod_r;
    mod_c_in = rh; mod_x = big[31:0]; #1;
    ql = mod_q; rl = mod_r;
    if (rh != 0) n_chained++;
    expect_eq("chain q", {qh, ql}, big / 3);
    expect_eq("chain r", rl, big % 3);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_standalone = 0; n_chained = 0; n_rem_zero = 0; n_rem_max = 0; n_q_zero = 0;
    n_gen_div0 = 0; n_gen_div1 = 0; n_gen_big = 0;
    one_operation(64'h0, 20'd0);
    one_operation(64'hFFFF_FFFF_FFFF_FFFF, 20'd1);
    one_operation(64'h0000_0001_0000_0002, 20'd5);
    one_operation(64'h0000_0002_0000_0001, 20'hFFFFF);
    for (int i = 0; i < 2000; i++)
      one_operation({$urandom, $urandom}, (i % 3 == 0) ? 20'($urandom % 16) : 20'($urandom));
    $display("events: standalone=%0d chained=%0d rem_zero=%0d rem_max=%0d q_zero=%0d gen_div0=%0d gen_div1=%0d gen_big=%0d",
             n_standalone, n_chained, n_rem_zero, n_rem_max, n_q_zero, n_gen_div0, n_gen_div1, n_gen_big);
    if (n_standalone == 0) begin failures++; $display("FAIL: no stand-alone division"); end
    if (n_chained    == 0) begin failures++; $display("FAIL: no chained division with carry-in"); end
    if (n_rem_zero   == 0) begin failures++; $display("FAIL: no zero remainder"); end
    if (n_rem_max    == 0) begin failures++; $display("FAIL: no largest remainder"); end
    if (n_q_zero     == 0) begin failures++; $display("FAIL: no zero quotient"); end
    if (n_gen_div0   == 0) begin failures++; $display("FAIL: no division by zero"); end
    if (n_gen_div1   == 0) begin failures++; $display("FAIL: no division by one"); end
    if (n_gen_big    == 0) begin failures++; $display("FAIL: no divisor above dividend"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
