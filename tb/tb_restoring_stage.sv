// tb_restoring_stage: exhaustive self-checking test of one restoring row.
//
// With W = 5, every divisor d = 1..31, every partial remainder r_in < d and
// both dividend bits are applied. Expected: v = 2*r_in + x; quotient bit
// (v >= d) and new remainder (v - d or v). Division by zero is checked too:
// for d = 0 the row must give quotient bit 1 and pass 2*r_in + x on,
// truncated to W bits.
module tb_restoring_stage;

  localparam int W = 5;

  int checks   = 0;
  int failures = 0;

  logic [W-1:0] r_in, d, r_out;
  logic         x_i, q_o;

  restoring_stage #(.W(W)) dut (.r_in(r_in), .x_i(x_i), .d(d), .q_o(q_o), .r_out(r_out));

  task automatic check(input int dv, input int rv, input int xv);
    int v, eq, er;
    v  = 2 * rv + xv;
    eq = (v >= dv) ? 1 : 0;
    er = ((v >= dv) ? v - dv : v) % (1 << W);
    checks++;
    if (int'(q_o) != eq || int'(r_out) != er) begin
      failures++;
      if (failures <= 10)
        $display("FAIL: d=%0d r_in=%0d x=%0d got q=%0d r=%0d expected q=%0d r=%0d",
                 dv, rv, xv, q_o, r_out, eq, er);
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
    for (int dv = 1; dv < (1 << W); dv++)
      for (int rv = 0; rv < dv; rv++)
        for (int xv = 0; xv < 2; xv++) begin
          d = W'(dv); r_in = W'(rv); x_i = 1'(xv); #1;
          check(dv, rv, xv);
        end
    for (int rv = 0; rv < (1 << (W - 1)); rv++)
      for (int xv = 0; xv < 2; xv++) begin
        d = '0; r_in = W'(rv); x_i = 1'(xv); #1;
        check(0, rv, xv);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
