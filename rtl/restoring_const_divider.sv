// restoring_const_divider: restoring divider with a hardwired divisor.
//
// Computes q = x / D and r = x mod D for a K-bit dividend x and the constant
// divisor D. It is a standard restoring divider unrolled into K rows
// (restoring_stage), one per dividend bit, most significant bit first; row i
// produces quotient bit K-1-i. The divisor input of every row is tied to the
// constant D, so a synthesis tool propagates the constant bits through the
// subtractors and multiplexers. Because the partial remainder is always
// below D, each row only needs m = rem_bits(D) bits of remainder.
//
// Hardwiring the divisor into a standard restoring divider follows the
// published architecture; the m-bit rows are this design's choice.
//
// Parameters: D divisor (default 3, at least 2), K dividend width
// (default 16).
// Timing: purely combinational; the remainder ripples through all K rows.
module restoring_const_divider
  import divider_pkg::*;
#(
  parameter int unsigned D = 3,
  parameter int unsigned K = 16,
  localparam int unsigned M = rem_bits(D)
) (
  input  logic [K-1:0] x,  // dividend
  output logic [K-1:0] q,  // quotient
  output logic [M-1:0] r   // remainder
);

  localparam logic [M-1:0] DIV = M'(D);

  if (D < 2) begin : g_bad_divisor
    $error("restoring_const_divider: divisor D must be at least 2");
  end

  logic [M-1:0] rem [K+1];  // rem[i] enters row i

  assign rem[0] = '0;

  for (genvar i = 0; i < K; i++) begin : g_row
    restoring_stage #(
      .W (M)
    ) u_row (
      .r_in  (rem[i]),
      .x_i   (x[K-1-i]),
      .d     (DIV),
      .q_o   (q[K-1-i]),
      .r_out (rem[i+1])
    );
  end

  assign r = rem[K];

endmodule
