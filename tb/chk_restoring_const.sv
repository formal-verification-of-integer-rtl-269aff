// chk_restoring_const: checker used by the workload testbenches. It builds
// one restoring_const_divider with the given divisor and dividend width and
// drives it with every dividend (EXHAUSTIVE) or with NRAND random ones,
// comparing with integer division. Counts are returned on the ports; done
// rises at the end.
module chk_restoring_const #(
  parameter int unsigned D          = 3,
  parameter int unsigned K          = 16,
  parameter bit          EXHAUSTIVE = 1'b1,
  parameter int unsigned NRAND      = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int unsigned M = divider_pkg::rem_bits(D);

  logic [K-1:0] x, q;
  logic [M-1:0] r;

  restoring_const_divider #(.D(D), .K(K)) dut (.x(x), .q(q), .r(r));

  task automatic apply(input longint unsigned xv);
    x = K'(xv); #1;
    checks++;
    if (longint'(q) != longint'(x) / D || longint'(r) != longint'(x) % D) begin
      failures++;
      if (failures <= 5)
        $display("FAIL restoring D=%0d K=%0d: x=%0d got q=%0d r=%0d", D, K, x, q, r);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    if (EXHAUSTIVE) begin
      for (longint unsigned xv = 0; xv < (longint'(1) << K); xv++) apply(xv);
    end else begin
      for (int unsigned i = 0; i < NRAND; i++) apply({$urandom, $urandom});
    end
    done = 1'b1;
  end

endmodule
