// chk_divc_modular: checker used by the workload testbenches. It builds one
// divc_modular with the given divisor, dividend width and block width and
// drives it on its own: exhaustively over every dividend when EXHAUSTIVE is
// set (stand-alone, carry-in 0), otherwise with corner values and NRAND
// random dividends and carry-ins below D. Results are compared with integer
// arithmetic; the counts are returned on the ports and done rises at the end.
module chk_divc_modular #(
  parameter int unsigned D          = 3,
  parameter int unsigned K          = 32,
  parameter int unsigned N_BITS     = 1,
  parameter bit          EXHAUSTIVE = 1'b0,
  parameter int unsigned NRAND      = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int unsigned M    = divider_pkg::rem_bits(D);
  localparam int unsigned NBLK = divider_pkg::num_blocks(K, N_BITS);
  localparam int unsigned QW   = NBLK * N_BITS;

  logic [M-1:0]  c_in, r;
  logic [K-1:0]  x;
  logic [QW-1:0] q;

  divc_modular #(.D(D), .K(K), .N_BITS(N_BITS)) dut (.c_in(c_in), .x(x), .q(q), .r(r));

  task automatic apply(input longint unsigned cv, input longint unsigned xv);
    longint unsigned v;
    c_in = M'(cv); x = K'(xv); #1;
    v = (longint'(c_in) << QW) + longint'(x);
    checks++;
    if (longint'(q) != v / D || longint'(r) != v % D) begin
      failures++;
      if (failures <= 5)
        $display("FAIL D=%0d K=%0d n=%0d: c=%0d x=%0d got q=%0d r=%0d expected q=%0d r=%0d",
                 D, K, N_BITS, c_in, x, q, r, v / D, v % D);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    if (EXHAUSTIVE) begin
      for (longint unsigned xv = 0; xv < (longint'(1) << K); xv++) apply(0, xv);
    end else begin
      apply(0, 0);
      apply(0, (longint'(1) << K) - 1);
      apply(D - 1, (longint'(1) << K) - 1);
      apply(D - 1, 0);
      for (int unsigned i = 0; i < NRAND; i++)
        apply((i % 2 == 0) ? 0 : longint'($urandom % D), {$urandom, $urandom});
    end
    done = 1'b1;
  end

endmodule
