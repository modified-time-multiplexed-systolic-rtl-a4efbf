// Time-multiplexed systolic-like multiplier TM-n over GF(2^m), irreducible
// all-one polynomial Q(z) = 1 + z + ... + z^m.
//
// C = A * B mod Q. The product is formed as the sum over i of b_i * z^i * P,
// with P = A plus a zero coefficient for z^m, taken modulo z^(m+1) + 1, where
// multiplying by z is a cyclic left shift. The terms are arranged as a
// dependence graph of s = ceil(m/L) rows of L terms. N PEs (TM-N) each
// compute one row per cycle from a common operand; the ceil(s/N) sets of
// rows are run one after the next by the sequencer, each PE accumulating its
// rows. A pipelined adder tree sums the N PE results and the output
// reduction cell folds the z^m coefficient back to give m bits.
//
// The block structure (operand broadcast to all PEs, every PE feeding the
// adder tree, then the reduction cell), the row width L = 7, TM-4 for
// m = 28 and the TM-n generalisation follow the published design. The
// per-PE accumulator, the handshake and the reset are this design's own.
// The published text quotes 6 cycles for TM-4; this design has 5, following
// the published general rule of ceil(log2 n) tree stages and 1 + s + 1
// cycles for TM-1.
//
// Interface: valid/ready on the input (A and B together), out_valid with C.
// Timing, in register stages from the clock that takes A and B to the one
// that registers C, both counted: 1 (load) + K (row sets) + ceil(log2 N)
// (tree) + 1 (reduction), K = ceil(s/N). A new product is taken every K
// cycles. With the defaults (m = 28, L = 7, N = 4: s = 4, K = 1) that is one
// product per cycle and a latency of 5. For N = 1 it gives 1 + s + 1 with one
// product every s cycles, as stated for the time-multiplexed structure.
module tm_aop_multiplier #(
  parameter int unsigned M = aop_pkg::AOP_M,
  parameter int unsigned L = aop_pkg::AOP_L,
  parameter int unsigned N = aop_pkg::AOP_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         out_valid,
  output logic [M-1:0] c
);

  logic           en, first, last;
  logic [M:0]     op;
  logic [N*L-1:0] digits;
  logic [M:0]     acc [N];
  logic           acc_valid;
  logic           pat_valid;
  logic [M:0]     pat_sum;

  tm_sequencer #(.M(M), .L(L), .N(N)) u_seq (
    .clk, .rst_n, .in_valid, .in_ready, .a, .b,
    .en, .first, .last, .op, .digits
  );

  for (genvar j = 0; j < N; j++) begin : g_pe
    tm_pe #(.M(M), .L(L), .IDX(j)) u_pe (
      .clk, .rst_n, .en, .first, .op,
      .digit (digits[j*L +: L]),
      .acc   (acc[j])
    );
  end

  // The PE accumulators are complete on the clock after the last row set.
  always_ff @(posedge clk) begin
    if (!rst_n) acc_valid <= 1'b0;
    else        acc_valid <= last;
  end

  aop_pat #(.W(M + 1), .K(N)) u_pat (
    .clk, .rst_n,
    .in_valid  (acc_valid),
    .d         (acc),
    .out_valid (pat_valid),
    .sum       (pat_sum)
  );

  aop_orc #(.M(M)) u_orc (
    .clk, .rst_n,
    .in_valid  (pat_valid),
    .d         (pat_sum),
    .out_valid (out_valid),
    .c         (c)
  );

endmodule
