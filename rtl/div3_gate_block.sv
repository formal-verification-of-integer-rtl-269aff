// div3_gate_block: one-bit block of a divide-by-3 divider, written as gates.
//
// Same function as divc_lut_block with D = 3 and one dividend bit per block
// (n = 1, m = 2): from the carry-in {c1, c0} (a remainder, 0..2) and the
// dividend bit x0 it returns the quotient bit q0 and the remainder {r1, r0}
// with 2*C + x0 = 3*q0 + R. Instead of a table, the outputs are two-level
// AND/OR logic derived from the block's truth table:
//     q0 = c1 | (c0 & x0)
//     r1 = (c0 & ~x0) | (c1 & x0)
//     r0 = (~c1 & ~c0 & x0) | (c1 & ~x0)
// The carry-in value 3 ({c1, c0} = 11) never occurs in a correct cascade and
// was used as a don't-care when minimising these equations, so for that
// input the outputs are not a valid division result (for x0 = 1 the block
// returns 3*q0 + R = 5 instead of 7). The gate equations are this design's
// own minimisation of the truth table.
//
// Timing: purely combinational.
module div3_gate_block (
  input  logic c1,  // carry-in bit 1
  input  logic c0,  // carry-in bit 0
  input  logic x0,  // dividend bit
  output logic q0,  // quotient bit
  output logic r1,  // remainder bit 1
  output logic r0   // remainder bit 0
);

  logic nx0, nc0, nc1;     // inverters
  logic g_c0x, g_c0nx;     // AND terms
  logic g_c1x, g_c1nx;
  logic g_n1n0x;

  assign nx0     = ~x0;
  assign nc0     = ~c0;
  assign nc1     = ~c1;

  assign g_c0x   = c0 & x0;
  assign g_c0nx  = c0 & nx0;
  assign g_c1x   = c1 & x0;
  assign g_c1nx  = c1 & nx0;
  assign g_n1n0x = nc1 & nc0 & x0;

  assign q0      = c1 | g_c0x;
  assign r1      = g_c0nx | g_c1x;
  assign r0      = g_n1n0x | g_c1nx;

endmodule
