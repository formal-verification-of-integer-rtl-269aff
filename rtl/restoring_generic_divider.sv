// restoring_generic_divider: unrolled restoring divider with a divisor input.
//
// Computes q = x / d and r = x mod d for W-bit unsigned operands. The array
// has W rows (restoring_stage), one per dividend bit, most significant bit
// first; each row shifts in a dividend bit, trial-subtracts d and keeps or
// restores the partial remainder. The partial remainder is W bits wide.
//
// Division by zero: every trial subtraction succeeds, so q is all ones and
// r equals x. That result is a property of the restoring algorithm, kept
// here as the defined behaviour (this design's choice; the published
// description leaves it open). The one-row-per-bit array is the standard
// restoring structure.
//
// Parameters: W operand width (default 20).
// Timing: purely combinational; the remainder ripples through all W rows.
module restoring_generic_divider #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] x,  // dividend
  input  logic [W-1:0] d,  // divisor
  output logic [W-1:0] q,  // quotient
  output logic [W-1:0] r   // remainder
);

  logic [W-1:0] rem [W+1];  // rem[i] enters row i

  assign rem[0] = '0;

  for (genvar i = 0; i < W; i++) begin : g_row
    restoring_stage #(
      .W (W)
    ) u_row (
      .r_in  (rem[i]),
      .x_i   (x[W-1-i]),
      .d     (d),
      .q_o   (q[W-1-i]),
      .r_out (rem[i+1])
    );
  end

  assign r = rem[W];

endmodule
