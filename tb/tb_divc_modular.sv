// tb_divc_modular: self-checking test of the modular divide-by-constant
// divider.
//
// Four configurations run side by side:
//   u_def  defaults: D=3, 32-bit dividend, one bit per block;
//   u_17   D=17, 30-bit dividend, two bits per block (15 blocks);
//   u_283  D=283, 30-bit dividend, four bits per block (8 blocks, the top
//          block has two padded dividend bits);
//   u_5    D=5, 4-bit dividend, one bit per block, tested exhaustively over
//          every dividend and every carry-in 0..4;
//   u_f5   D=3, 4-bit dividend in two 2-bit blocks, exhaustive likewise.
// The others get corner values (0, all ones, multiples of D and their
// neighbours) and random dividends and carry-ins below D. The reference is
// 64-bit integer arithmetic on c_in * 2^(blocks*n) + x.
module tb_divc_modular;

  int checks   = 0;
  int failures = 0;

  logic [1:0]  c_def;  logic [31:0] x_def;  logic [31:0] q_def;  logic [1:0] r_def;
  logic [4:0]  c_17;   logic [29:0] x_17;   logic [29:0] q_17;   logic [4:0] r_17;
  logic [8:0]  c_283;  logic [29:0] x_283;  logic [31:0] q_283;  logic [8:0] r_283;
  logic [2:0]  c_5;    logic [3:0]  x_5;    logic [3:0]  q_5;    logic [2:0] r_5;
  logic [1:0]  c_f5;   logic [3:0]  x_f5;   logic [3:0]  q_f5;   logic [1:0] r_f5;

  divc_modular u_def (.c_in(c_def), .x(x_def), .q(q_def), .r(r_def));
  divc_modular #(.D(17),  .K(30), .N_BITS(2)) u_17  (.c_in(c_17),  .x(x_17),  .q(q_17),  .r(r_17));
  divc_modular #(.D(283), .K(30), .N_BITS(4)) u_283 (.c_in(c_283), .x(x_283), .q(q_283), .r(r_283));
  divc_modular #(.D(5),   .K(4),  .N_BITS(1)) u_5   (.c_in(c_5),   .x(x_5),   .q(q_5),   .r(r_5));
  divc_modular #(.D(3),   .K(4),  .N_BITS(2)) u_f5  (.c_in(c_f5),  .x(x_f5),  .q(q_f5),  .r(r_f5));

  task automatic check(input string name, input longint unsigned d, input int qbits,
                       input longint unsigned c, input longint unsigned x,
                       input longint unsigned q, input longint unsigned r);
    longint unsigned v;
    v = (c << qbits) + x;
    checks++;
    if (q != v / d || r != v % d) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: c=%0d x=%0d got q=%0d r=%0d expected q=%0d r=%0d",
                 name, c, x, q, r, v / d, v % d);
    end
  endtask

  task automatic apply_all(input longint unsigned xv, input int unsigned cv);
    c_def = 2'(cv % 3);   x_def = 32'(xv);
    c_17  = 5'(cv % 17);  x_17  = 30'(xv);
    c_283 = 9'(cv % 283); x_283 = 30'(xv);
    #1;
    check("D3",   3,   32, longint'(c_def), longint'(x_def), longint'(q_def), longint'(r_def));
    check("D17",  17,  30, longint'(c_17),  longint'(x_17),  longint'(q_17),  longint'(r_17));
    check("D283", 283, 32, longint'(c_283), longint'(x_283), longint'(q_283), longint'(r_283));
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned corner [8];
    corner = '{0, 1, 2, 64'hFFFF_FFFF, 64'h3FFF_FFFF, 3 * 17 * 283 * 100, 3 * 17 * 283 * 100 - 1, 64'h8000_0000};
    // exhaustive small divider
    for (int c = 0; c < 5; c++)
      for (int x = 0; x < 16; x++) begin
        c_5 = 3'(c); x_5 = 4'(x); #1;
        check("D5", 5, 4, longint'(c), longint'(x), longint'(q_5), longint'(r_5));
      end
    // two 2-bit blocks dividing a 4-bit word by 3, every carry-in and dividend
    for (int c = 0; c < 3; c++)
      for (int x = 0; x < 16; x++) begin
        c_f5 = 2'(c); x_f5 = 4'(x); #1;
        check("D3n2", 3, 4, longint'(c), longint'(x), longint'(q_f5), longint'(r_f5));
      end
    // corners, stand-alone (carry-in 0) and with the largest carry-in
    foreach (corner[i]) begin
      apply_all(corner[i], 0);
      c_def = 2; c_17 = 16; c_283 = 282; #1;
      check("D3",   3,   32, longint'(c_def), longint'(x_def), longint'(q_def), longint'(r_def));
      check("D17",  17,  30, longint'(c_17),  longint'(x_17),  longint'(q_17),  longint'(r_17));
      check("D283", 283, 32, longint'(c_283), longint'(x_283), longint'(q_283), longint'(r_283));
    end
    // random
    for (int i = 0; i < 20000; i++)
      apply_all({32'h0, $urandom}, (i % 4 == 0) ? 0 : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
