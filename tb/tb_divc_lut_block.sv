// tb_divc_lut_block: exhaustive self-checking test of the look-up-table
// divider block.
//
// Three instances with different divisors and block widths (D=3/n=1, the
// default; D=17/n=2; D=283/n=4) are driven with every valid address
// {C, X}, C < D. For each address the testbench checks, with its own integer
// arithmetic, that C*2^n + X = D*Q + R and R < D. Everything is
// combinational, so each vector is applied and checked after a 1 ns delay.
// A watchdog ends the run with a failure if it does not complete in time.
module tb_divc_lut_block;

  int checks   = 0;
  int failures = 0;

  // D = 3, n = 1
  logic [1:0] c3;  logic       x3;  logic       q3;  logic [1:0] r3;
  // D = 17, n = 2
  logic [4:0] c17; logic [1:0] x17; logic [1:0] q17; logic [4:0] r17;
  // D = 283, n = 4
  logic [8:0] c283; logic [3:0] x283; logic [3:0] q283; logic [8:0] r283;

  divc_lut_block dut3 (.c_i(c3), .x_i(x3), .q_o(q3), .r_o(r3));
  divc_lut_block #(.D(17),  .N_BITS(2)) dut17  (.c_i(c17),  .x_i(x17),  .q_o(q17),  .r_o(r17));
  divc_lut_block #(.D(283), .N_BITS(4)) dut283 (.c_i(c283), .x_i(x283), .q_o(q283), .r_o(r283));

  task automatic check(input string name, input int d, input int n,
                       input int c, input int x, input int q, input int r);
    int v;
    v = c * (1 << n) + x;
    checks++;
    if (q != v / d || r != v % d) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: C=%0d X=%0d got Q=%0d R=%0d expected Q=%0d R=%0d",
                 name, c, x, q, r, v / d, v % d);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 3; c++)
      for (int x = 0; x < 2; x++) begin
        c3 = 2'(c); x3 = 1'(x); #1;
        check("D3", 3, 1, c, x, int'(q3), int'(r3));
      end
    for (int c = 0; c < 17; c++)
      for (int x = 0; x < 4; x++) begin
        c17 = 5'(c); x17 = 2'(x); #1;
        check("D17", 17, 2, c, x, int'(q17), int'(r17));
      end
    for (int c = 0; c < 283; c++)
      for (int x = 0; x < 16; x++) begin
        c283 = 9'(c); x283 = 4'(x); #1;
        check("D283", 283, 4, c, x, int'(q283), int'(r283));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
