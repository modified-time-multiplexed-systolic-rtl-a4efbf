// GF(2^m) multipliers over an irreducible all-one polynomial, top level.
//
// Two multipliers for the same field stand side by side, each with its own
// ports:
//   * tm_*: the time-multiplexed systolic-like multiplier TM-N (default
//     TM-4): N PEs on a common operand, an adder tree and an output
//     reduction cell; valid/ready input, one product every ceil(s/N) cycles,
//     latency 1 + ceil(s/N) + ceil(log2 N) + 1 register stages (5 with the
//     defaults).
//   * ps_*: the bit-parallel systolic-like array of L PEs; one product per
//     cycle, latency L + ceil(log2 s) + 1 (10 with the defaults).
// Both take A and B in polynomial basis (bit i = coefficient of z^i) and
// return C = A * B mod (1 + z + ... + z^M). Defaults: m = 28, L = 7 bits of B
// per row (s = 4 rows), N = 4. Placing the two side by side with separate
// ports is this design's choice; the published design presents them as two
// alternative structures.
module aop_mult_top #(
  parameter int unsigned M = aop_pkg::AOP_M,
  parameter int unsigned L = aop_pkg::AOP_L,
  parameter int unsigned N = aop_pkg::AOP_N
) (
  input  logic         clk,
  input  logic         rst_n,
  // time-multiplexed multiplier
  input  logic         tm_in_valid,
  output logic         tm_in_ready,
  input  logic [M-1:0] tm_a,
  input  logic [M-1:0] tm_b,
  output logic         tm_out_valid,
  output logic [M-1:0] tm_c,
  // bit-parallel multiplier
  input  logic         ps_in_valid,
  input  logic [M-1:0] ps_a,
  input  logic [M-1:0] ps_b,
  output logic         ps_out_valid,
  output logic [M-1:0] ps_c
);

  tm_aop_multiplier #(.M(M), .L(L), .N(N)) u_tm (
    .clk, .rst_n,
    .in_valid  (tm_in_valid),
    .in_ready  (tm_in_ready),
    .a         (tm_a),
    .b         (tm_b),
    .out_valid (tm_out_valid),
    .c         (tm_c)
  );

  ps_aop_multiplier #(.M(M), .L(L)) u_ps (
    .clk, .rst_n,
    .in_valid  (ps_in_valid),
    .a         (ps_a),
    .b         (ps_b),
    .out_valid (ps_out_valid),
    .c         (ps_c)
  );

endmodule
