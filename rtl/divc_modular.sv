// divc_modular: table-based divide-by-constant divider, modular architecture.
//
// Divides the word {c_in, x} by the hardwired constant D. The k-bit dividend
// x is cut into N = ceil(k / n) chunks of n bits. One divc_lut_block handles
// each chunk, working like long division done by hand: the most significant
// block receives the external carry-in c_in, and each block passes its
// remainder on as the carry-in of the next less significant block. The
// quotient chunks, concatenated, form the quotient; the remainder of the
// least significant block is the remainder of the whole division:
//     c_in * 2^(N*n) + x = D * q + r,   r < D.
// If k is not a multiple of n, the most significant block gets zeros in its
// unused dividend inputs, and q is N*n bits wide (its top bits are zero when
// c_in is zero). For a stand-alone divider tie c_in to zero; a non-zero c_in
// (which must be below D) lets several dividers be chained.
//
// The block boundaries are kept as module instances, which is the "modular"
// form: every block is a separate table. Flattening this module in synthesis
// gives the fully unrolled form of the same divider.
//
// Parameters: D divisor (default 3), K dividend width (default 32),
// N_BITS dividend bits per block (default 1). The remainder/carry width is
// m = rem_bits(D).
//
// The cascade, the external carry-in and the zero padding of the top block
// follow the published architecture; taking the block width n (rather than
// the block count) as the parameter is this design's choice.
//
// Timing: combinational; the carry ripples through all N blocks.
module divc_modular
  import divider_pkg::*;
#(
  parameter int unsigned D      = 3,
  parameter int unsigned K      = 32,
  parameter int unsigned N_BITS = 1,
  localparam int unsigned M     = rem_bits(D),
  localparam int unsigned NBLK  = num_blocks(K, N_BITS),
  localparam int unsigned QW    = NBLK * N_BITS
) (
  input  logic [M-1:0]  c_in,  // carry-in of the most significant block, < D (0 when stand-alone)
  input  logic [K-1:0]  x,     // dividend
  output logic [QW-1:0] q,     // quotient
  output logic [M-1:0]  r      // remainder
);

  logic [QW-1:0] x_pad;             // dividend with zeros above bit K-1
  logic [M-1:0]  carry [NBLK+1];    // carry[j+1] enters block j, carry[j] leaves it

  assign x_pad       = QW'(x);
  assign carry[NBLK] = c_in;

  for (genvar j = 0; j < NBLK; j++) begin : g_blk
    divc_lut_block #(
      .D      (D),
      .N_BITS (N_BITS)
    ) u_blk (
      .c_i (carry[j+1]),
      .x_i (x_pad[j*N_BITS +: N_BITS]),
      .q_o (q[j*N_BITS +: N_BITS]),
      .r_o (carry[j])
    );
  end

  assign r = carry[0];

endmodule
