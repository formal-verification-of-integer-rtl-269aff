// tb_restoring_const_divider: exhaustive self-checking test of the restoring
// divider with a hardwired divisor.
//
// The default instance (D=3, 16-bit dividend) and instances with D=61 and
// D=283 are driven with all 65536 dividends; quotient and remainder are
// compared with integer division done in the testbench.
module tb_restoring_const_divider;

  int checks   = 0;
  int failures = 0;

  logic [15:0] x, q3, q61, q283;
  logic [1:0]  r3;
  logic [5:0]  r61;
  logic [8:0]  r283;

  restoring_const_divider                  u3   (.x(x), .q(q3),   .r(r3));
  restoring_const_divider #(.D(61),  .K(16)) u61  (.x(x), .q(q61),  .r(r61));
  restoring_const_divider #(.D(283), .K(16)) u283 (.x(x), .q(q283), .r(r283));

  task automatic check(input string name, input int d, input int xv, input int q, input int r);
    checks++;
    if (q != xv / d || r != xv % d) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: x=%0d got q=%0d r=%0d expected q=%0d r=%0d",
                 name, xv, q, r, xv / d, xv % d);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 65536; xv++) begin
      x = 16'(xv); #1;
      check("D3",   3,   xv, int'(q3),   int'(r3));
      check("D61",  61,  xv, int'(q61),  int'(r61));
      check("D283", 283, xv, int'(q283), int'(r283));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
