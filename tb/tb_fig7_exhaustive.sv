// tb_fig7_exhaustive: exhaustive simulation of the constant dividers for the
// divisors 257 and 283.
//
// For each divisor, the modular look-up-table divider (one-bit blocks) and
// the restoring constant divider are simulated over every dividend of 8, 12,
// 16, 20 and 24 bits, and every result is compared with integer division. (Dividends
// of 28 and 32 bits are covered by random vectors in tb_table1_divisors;
// exhausting them is out of reach of a short simulation.)
module tb_fig7_exhaustive;

  localparam int unsigned NW = 5;
  localparam int unsigned WIDTHS [NW] = '{8, 12, 16, 20, 24};
  localparam int unsigned DS [2] = '{257, 283};

  int   cm [2][NW], fm [2][NW];  logic dm [2][NW];
  int   cr [2][NW], fr [2][NW];  logic dr [2][NW];

  for (genvar j = 0; j < 2; j++) begin : g_div
    for (genvar w = 0; w < NW; w++) begin : g_width
      chk_divc_modular #(.D(DS[j]), .K(WIDTHS[w]), .N_BITS(1), .EXHAUSTIVE(1'b1))
        u_mod (.checks(cm[j][w]), .failures(fm[j][w]), .done(dm[j][w]));
      chk_restoring_const #(.D(DS[j]), .K(WIDTHS[w]), .EXHAUSTIVE(1'b1))
        u_rc (.checks(cr[j][w]), .failures(fr[j][w]), .done(dr[j][w]));
    end
  end

  function automatic bit all_done();
    for (int j = 0; j < 2; j++)
      for (int w = 0; w < NW; w++)
        if (!dm[j][w] || !dr[j][w]) return 1'b0;
    return 1'b1;
  endfunction

  int checks, failures;

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #2;
    while (!all_done()) #100;
    checks = 0; failures = 0;
    for (int j = 0; j < 2; j++)
      for (int w = 0; w < NW; w++) begin
        checks   += cm[j][w] + cr[j][w];
        failures += fm[j][w] + fr[j][w];
        $display("D=%0d width=%0d  LUT modular: %0d checks %0d failures  restoring: %0d checks %0d failures",
                 DS[j], WIDTHS[w], cm[j][w], fm[j][w], cr[j][w], fr[j][w]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
