// tb_div3_gate_block: exhaustive self-checking test of the gate-level
// divide-by-3 block.
//
// All six valid inputs (carry-in 0..2, dividend bit 0/1) are applied and the
// outputs compared with 2*C + X = 3*Q + R, R < 3, worked out here. The two
// don't-care inputs (carry-in 3) are also applied and compared with the
// values the chosen minimisation gives (Q=1, R=2 for X=1; Q=1, R=3 for X=0),
// so the gate network is pinned down completely.
module tb_div3_gate_block;

  int checks   = 0;
  int failures = 0;

  logic c1, c0, x0, q0, r1, r0;

  div3_gate_block dut (.c1(c1), .c0(c0), .x0(x0), .q0(q0), .r1(r1), .r0(r0));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, eq, er;
    for (int c = 0; c < 4; c++)
      for (int x = 0; x < 2; x++) begin
        {c1, c0} = 2'(c); x0 = 1'(x); #1;
        v = 2 * c + x;
        if (c < 3) begin
          eq = v / 3; er = v % 3;
        end else begin
          eq = 1; er = (x == 1) ? 2 : 3;
        end
        checks++;
        if (int'(q0) != eq || int'({r1, r0}) != er) begin
          failures++;
          $display("FAIL: C=%0d X=%0d got Q=%0d R=%0d expected Q=%0d R=%0d",
                   c, x, q0, {r1, r0}, eq, er);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
