// divider_suite: the integer divider architectures side by side.
//
// Four independent combinational dividers, each with its own ports:
//   mod_*  divc_modular: table-based divide-by-constant divider, a cascade
//          of look-up-table blocks (32-bit dividend, one bit per block,
//          divisor 3 by default). mod_c_in is the carry-in of the most
//          significant block (0 for a stand-alone division, < MOD_D).
//   g3_*   div3_gate_block: a single one-bit divide-by-3 block built from
//          gates, the building block of a gate-level divide-by-3 cascade.
//   rc_*   restoring_const_divider: restoring divider with the divisor
//          hardwired to RC_D (16-bit dividend by default).
//   gen_*  restoring_generic_divider: restoring divider with a divisor input
//          (20-bit operands by default).
// All dividers are unsigned and purely combinational; there is no clock.
// Grouping them in one top is this design's own choice; they share nothing.
module divider_suite
  import divider_pkg::*;
#(
  parameter int unsigned MOD_D      = 3,
  parameter int unsigned MOD_K      = 32,
  parameter int unsigned MOD_N_BITS = 1,
  parameter int unsigned RC_D       = 3,
  parameter int unsigned RC_K       = 16,
  parameter int unsigned GEN_W      = 20,
  localparam int unsigned MOD_M     = rem_bits(MOD_D),
  localparam int unsigned MOD_QW    = num_blocks(MOD_K, MOD_N_BITS) * MOD_N_BITS,
  localparam int unsigned RC_M      = rem_bits(RC_D)
) (
  // divide-by-constant, modular look-up-table architecture
  input  logic [MOD_M-1:0]  mod_c_in,
  input  logic [MOD_K-1:0]  mod_x,
  output logic [MOD_QW-1:0] mod_q,
  output logic [MOD_M-1:0]  mod_r,
  // gate-level one-bit divide-by-3 block
  input  logic [1:0]        g3_c,
  input  logic              g3_x,
  output logic              g3_q,
  output logic [1:0]        g3_r,
  // restoring divider, constant divisor
  input  logic [RC_K-1:0]   rc_x,
  output logic [RC_K-1:0]   rc_q,
  output logic [RC_M-1:0]   rc_r,
  // restoring divider, divisor as input
  input  logic [GEN_W-1:0]  gen_x,
  input  logic [GEN_W-1:0]  gen_d,
  output logic [GEN_W-1:0]  gen_q,
  output logic [GEN_W-1:0]  gen_r
);

  divc_modular #(
    .D      (MOD_D),
    .K      (MOD_K),
    .N_BITS (MOD_N_BITS)
  ) u_mod (
    .c_in (mod_c_in),
    .x    (mod_x),
    .q    (mod_q),
    .r    (mod_r)
  );

  div3_gate_block u_g3 (
    .c1 (g3_c[1]),
    .c0 (g3_c[0]),
    .x0 (g3_x),
    .q0 (g3_q),
    .r1 (g3_r[1]),
    .r0 (g3_r[0])
  );

  restoring_const_divider #(
    .D (RC_D),
    .K (RC_K)
  ) u_rc (
    .x (rc_x),
    .q (rc_q),
    .r (rc_r)
  );

  restoring_generic_divider #(
    .W (GEN_W)
  ) u_gen (
    .x (gen_x),
    .d (gen_d),
    .q (gen_q),
    .r (gen_r)
  );

endmodule
