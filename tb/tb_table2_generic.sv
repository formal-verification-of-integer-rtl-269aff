// tb_table2_generic: runs the generic restoring divider at several operand
// widths: 3 to 10 bits over every dividend/divisor pair,
// and 20 bits with random operands.
module tb_table2_generic;

  localparam int unsigned NW = 8;  // widths 3 .. 10

  int c [NW+1], f [NW+1];  logic d [NW+1];

  for (genvar w = 0; w < NW; w++) begin : g_w
    chk_restoring_generic #(.W(w + 3), .EXHAUSTIVE(1'b1))
      u_chk (.checks(c[w]), .failures(f[w]), .done(d[w]));
  end
  chk_restoring_generic #(.W(20), .EXHAUSTIVE(1'b0), .NRAND(20000))
    u_chk20 (.checks(c[NW]), .failures(f[NW]), .done(d[NW]));

  function automatic bit all_done();
    for (int i = 0; i <= NW; i++) if (!d[i]) return 1'b0;
    return 1'b1;
  endfunction

  int checks, failures;

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #2;
    while (!all_done()) #100;
    checks = 0; failures = 0;
    for (int i = 0; i <= NW; i++) begin
      checks += c[i]; failures += f[i];
      $display("width %0d: %0d checks, %0d failures", (i < NW) ? i + 3 : 20, c[i], f[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
