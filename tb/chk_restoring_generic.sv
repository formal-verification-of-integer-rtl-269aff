// chk_restoring_generic: checker used by the workload testbenches. It builds
// one restoring_generic_divider of width W and drives it with every
// dividend/divisor pair (EXHAUSTIVE) or with NRAND random pairs, comparing
// with integer division (division by zero: all-ones quotient, remainder
// equal to the dividend). Counts are returned on the ports; done rises at
// the end.
module chk_restoring_generic #(
  parameter int unsigned W          = 8,
  parameter bit          EXHAUSTIVE = 1'b1,
  parameter int unsigned NRAND      = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);

  logic [W-1:0] x, d, q, r;

  restoring_generic_divider #(.W(W)) dut (.x(x), .d(d), .q(q), .r(r));

  task automatic apply(input longint unsigned xv, input longint unsigned dv);
    longint unsigned eq, er;
    x = W'(xv); d = W'(dv); #1;
    if (d == 0) begin
      eq = (longint'(1) << W) - 1; er = longint'(x);
    end else begin
      eq = longint'(x) / longint'(d); er = longint'(x) % longint'(d);
    end
    checks++;
    if (longint'(q) != eq || longint'(r) != er) begin
      failures++;
      if (failures <= 5)
        $display("FAIL generic W=%0d: x=%0d d=%0d got q=%0d r=%0d", W, x, d, q, r);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    if (EXHAUSTIVE) begin
      for (longint unsigned xv = 0; xv < (longint'(1) << W); xv++)
        for (longint unsigned dv = 0; dv < (longint'(1) << W); dv++) apply(xv, dv);
    end else begin
      for (int unsigned i = 0; i < NRAND; i++)
        apply($urandom, (i % 2 == 0) ? $urandom : $urandom % 64);
    end
    done = 1'b1;
  end

endmodule
