// divc_lut_block: basic block of a table-based divide-by-constant divider.
//
// The block takes an n-bit chunk X_i of the dividend and an m-bit carry-in
// C_i (the remainder left by the more significant block) and returns the
// n-bit quotient chunk Q_i and the m-bit remainder R_i such that
//     C_i * 2^n + X_i = D * Q_i + R_i,   R_i < D.
// Because C_i < D, the quotient always fits in n bits.
//
// How it works: the block is a read-only look-up table addressed by the
// concatenation {C_i, X_i}; each entry holds {Q_i, R_i}. The table is filled
// at elaboration time from the formula above, one constant entry per
// address, so the hardware is a constant table followed by a multiplexer.
// Addresses with C_i >= D can never occur in a correct cascade (the carry-in
// is a remainder). The divider description treats them as don't-cares; this
// design fills them with zeros so that the block has a defined output.
//
// Parameters: D is the hardwired divisor (default 3, the worked example),
// N_BITS is n, the number of dividend bits per block (default 1).
// m = rem_bits(D) = floor(log2(D-1)) + 1.
//
// The block equation, the {C, X} addressing and the carry width follow the
// published table-based divide-by-constant architecture; generating the
// table at elaboration and zero-filling unreachable entries are this
// design's choices.
//
// Timing: purely combinational, no clock.
module divc_lut_block
  import divider_pkg::*;
#(
  parameter int unsigned D      = 3,
  parameter int unsigned N_BITS = 1,
  localparam int unsigned M     = rem_bits(D)
) (
  input  logic [M-1:0]      c_i,  // carry-in: remainder of the previous block, must be < D
  input  logic [N_BITS-1:0] x_i,  // dividend chunk
  output logic [N_BITS-1:0] q_o,  // quotient chunk
  output logic [M-1:0]      r_o   // remainder, carry-in of the next block
);

  localparam int unsigned ADDR_W  = M + N_BITS;
  localparam int unsigned ENTRIES = 1 << ADDR_W;

  if (D < 2) begin : g_bad_divisor
    $error("divc_lut_block: divisor D must be at least 2");
  end

  // Table entry {Q, R}.
  logic [N_BITS+M-1:0] lut [ENTRIES];

  for (genvar e = 0; e < ENTRIES; e++) begin : g_entry
    localparam int unsigned CARRY = int'(e) >> N_BITS;
    localparam int unsigned QV    = int'(e) / D;
    localparam int unsigned RV    = int'(e) % D;
    if (CARRY < D) begin : g_valid
      assign lut[e] = {QV[N_BITS-1:0], RV[M-1:0]};
    end else begin : g_invalid
      assign lut[e] = '0;
    end
  end

  assign {q_o, r_o} = lut[{c_i, x_i}];

endmodule
