// tb_table1_divisors: runs a set of divisors from 3 to 283.
//
// Modular divide-by-constant dividers with a 32-bit dividend and one-bit
// blocks are built for every divisor of the set (3, 11, 17, 31, 61, 89, 113,
// 139, 191, 251, 257, 283; remainders of 2 to 9 bits); two-bit and four-bit
// block versions for 3, 11, 17, 31 and 61; and 16-bit restoring constant
// dividers for 3, 11, 17, 31 and 61, the latter tested over every dividend.
// Each instance is checked by its own checker; the totals are reported once
// all checkers have finished.
module tb_table1_divisors;

  localparam int unsigned NDIV = 12;
  localparam int unsigned DIVS [NDIV] = '{3, 11, 17, 31, 61, 89, 113, 139, 191, 251, 257, 283};
  localparam int unsigned NSML = 5;  // divisors used for wider blocks / restoring

  int   c1 [NDIV], f1 [NDIV];  logic d1 [NDIV];
  int   c2 [NSML], f2 [NSML];  logic d2 [NSML];
  int   c4 [NSML], f4 [NSML];  logic d4 [NSML];
  int   cr [NSML], fr [NSML];  logic dr [NSML];

  for (genvar i = 0; i < NDIV; i++) begin : g_one_bit
    chk_divc_modular #(.D(DIVS[i]), .K(32), .N_BITS(1), .NRAND(3000))
      u_chk (.checks(c1[i]), .failures(f1[i]), .done(d1[i]));
  end

  for (genvar i = 0; i < NSML; i++) begin : g_small
    chk_divc_modular #(.D(DIVS[i]), .K(32), .N_BITS(2), .NRAND(3000))
      u_chk2 (.checks(c2[i]), .failures(f2[i]), .done(d2[i]));
    chk_divc_modular #(.D(DIVS[i]), .K(32), .N_BITS(4), .NRAND(3000))
      u_chk4 (.checks(c4[i]), .failures(f4[i]), .done(d4[i]));
    chk_restoring_const #(.D(DIVS[i]), .K(16), .EXHAUSTIVE(1'b1))
      u_chkr (.checks(cr[i]), .failures(fr[i]), .done(dr[i]));
  end

  function automatic bit all_done();
    for (int i = 0; i < NDIV; i++) if (!d1[i]) return 1'b0;
    for (int i = 0; i < NSML; i++) if (!d2[i] || !d4[i] || !dr[i]) return 1'b0;
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
    for (int i = 0; i < NDIV; i++) begin
      checks += c1[i]; failures += f1[i];
      $display("D=%0d  1-bit blocks: %0d checks, %0d failures", DIVS[i], c1[i], f1[i]);
    end
    for (int i = 0; i < NSML; i++) begin
      checks += c2[i] + c4[i] + cr[i]; failures += f2[i] + f4[i] + fr[i];
      $display("D=%0d  2-bit: %0d/%0d  4-bit: %0d/%0d  restoring: %0d/%0d (checks/failures)",
               DIVS[i], c2[i], f2[i], c4[i], f4[i], cr[i], fr[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
