// tb_restoring_generic_divider: self-checking test of the restoring divider
// with a divisor input.
//
// A 6-bit instance is tested exhaustively (every dividend and divisor,
// including division by zero, which must give an all-ones quotient and the
// dividend as remainder). The default 20-bit instance gets corner operands
// and random dividend/divisor pairs, with divisors drawn from several
// magnitudes so that quotients of every size occur.
module tb_restoring_generic_divider;

  int checks   = 0;
  int failures = 0;

  logic [5:0]  x6, d6, q6, r6;
  logic [19:0] x20, d20, q20, r20;

  restoring_generic_divider #(.W(6)) u6  (.x(x6),  .d(d6),  .q(q6),  .r(r6));
  restoring_generic_divider          u20 (.x(x20), .d(d20), .q(q20), .r(r20));

  task automatic check(input string name, input int w, input int xv, input int dv,
                       input int q, input int r);
    int eq, er;
    if (dv == 0) begin
      eq = (1 << w) - 1; er = xv;
    end else begin
      eq = xv / dv; er = xv % dv;
    end
    checks++;
    if (q != eq || r != er) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: x=%0d d=%0d got q=%0d r=%0d expected q=%0d r=%0d",
                 name, xv, dv, q, r, eq, er);
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
    int xv, dv;
    for (xv = 0; xv < 64; xv++)
      for (dv = 0; dv < 64; dv++) begin
        x6 = 6'(xv); d6 = 6'(dv); #1;
        check("W6", 6, xv, dv, int'(q6), int'(r6));
      end
    for (int i = 0; i < 30000; i++) begin
      xv = int'($urandom % (1 << 20));
      case (i % 5)
        0: dv = int'($urandom % (1 << 20));
        1: dv = int'($urandom % (1 << 10));
        2: dv = int'($urandom % 16);
        3: dv = xv;
        default: dv = (1 << 20) - 1 - int'($urandom % 4);
      endcase
      if (i < 4) begin
        xv = (i < 2) ? (1 << 20) - 1 : 0;
        dv = (i % 2 == 0) ? 1 : 0;
      end
      x20 = 20'(xv); d20 = 20'(dv); #1;
      check("W20", 20, xv, dv, int'(q20), int'(r20));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
