// restoring_stage: one row of an unrolled restoring divider.
//
// The row shifts the next dividend bit x_i into the partial remainder r_in,
// subtracts the divisor d from the result and looks at the borrow:
//   no borrow -> quotient bit 1, the difference becomes the new remainder;
//   borrow    -> quotient bit 0, the shifted remainder is kept ("restored").
// Precondition: r_in < d (or d = 0), which every row of a restoring divider
// guarantees to the next. The new remainder is then again below d and fits
// in W bits. With d = 0 the row always returns quotient bit 1 and passes the
// shifted remainder on (truncated to W bits).
//
// The same row serves the generic divider (d is an input) and the constant
// divider (d is tied to a constant, and synthesis simplifies the subtractor).
//
// The row is the textbook restoring step; its width and the divide-by-zero
// behaviour are this design's choices.
//
// Parameters: W, width of the partial remainder and of the divisor.
// Timing: purely combinational.
module restoring_stage #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] r_in,  // partial remainder from the previous row
  input  logic         x_i,   // next dividend bit, most significant first
  input  logic [W-1:0] d,     // divisor
  output logic         q_o,   // quotient bit
  output logic [W-1:0] r_out  // new partial remainder
);

  logic [W:0]   shifted;  // 2 * r_in + x_i
  logic [W+1:0] diff;     // shifted - d, top bit is the borrow

  always_comb begin
    shifted = {r_in, x_i};
    diff    = {1'b0, shifted} - {2'b00, d};
    q_o     = ~diff[W+1];
    r_out   = q_o ? diff[W-1:0] : shifted[W-1:0];
  end

endmodule
