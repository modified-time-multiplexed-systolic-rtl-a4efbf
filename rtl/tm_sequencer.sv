// Operand sequencer of the time-multiplexed multiplier TM-n.
//
// The dependence graph of an m-bit product has s = ceil(m/L) rows of L bits
// of B (B is padded with zeros to L*s bits). TM-n has hardware for N rows
// and runs the K = ceil(s/N) sets of N rows one after the other. This block
// holds the state of that loop:
//   * on a handshake (in_valid and in_ready) it loads P = A with a zero
//     appended as the coefficient of z^m, and B;
//   * on every following cycle of the product it rotates P left by L*N bits
//     (the multi-reduction node S repeated N times, i.e. multiplication by
//     z^(LN)) and shifts B right by L*N bits, so that the N PEs see the next
//     row set;
//   * it counts the row sets and flags the first and the last one.
// in_ready is high when idle or during the last row set, so products follow
// each other back to back, one every K cycles (every cycle for K = 1).
// Outputs: `en` is high for the K cycles a product occupies the PEs; `op`
// and `digits` are the registered operand and the N*L bits of B for them.
// The iterated L-bit rotation of the operand and the zero padding of B
// follow the published design; the valid/ready handshake, the counter and
// the reset are this design's own.
module tm_sequencer #(
  parameter int unsigned M = aop_pkg::AOP_M,
  parameter int unsigned L = aop_pkg::AOP_L,
  parameter int unsigned N = aop_pkg::AOP_N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [M-1:0]     a,
  input  logic [M-1:0]     b,
  output logic             en,
  output logic             first,
  output logic             last,
  output logic [M:0]       op,
  output logic [N*L-1:0]   digits
);

  localparam int unsigned W   = M + 1;
  localparam int unsigned S   = aop_pkg::ceil_div(M, L);   // rows
  localparam int unsigned K   = aop_pkg::ceil_div(S, N);   // row sets
  localparam int unsigned BW  = K * N * L;                 // padded B width
  localparam int unsigned ROT = (L * N) % W;               // S-node shift per set
  localparam int unsigned CW  = (K > 1) ? $clog2(K) : 1;

  logic          busy;
  logic [CW-1:0] cnt;
  logic [M:0]    op_q;
  logic [BW-1:0] b_q;

  function automatic logic [M:0] rotl(logic [M:0] x, int unsigned k);
    return (k == 0) ? x : ((x << k) | (x >> (W - k)));
  endfunction

  assign last     = busy && (cnt == CW'(K - 1));
  assign first    = busy && (cnt == '0);
  assign en       = busy;
  assign in_ready = !busy || (cnt == CW'(K - 1));
  assign op       = op_q;
  assign digits   = b_q[N*L-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      op_q <= '0;
      b_q  <= '0;
    end else if (in_valid && in_ready) begin
      busy <= 1'b1;
      cnt  <= '0;
      op_q <= {1'b0, a};
      b_q  <= BW'(b);
    end else if (busy) begin
      if (cnt == CW'(K - 1)) begin
        busy <= 1'b0;
      end else begin
        cnt  <= cnt + 1'b1;
        op_q <= rotl(op_q, ROT);
        b_q  <= b_q >> (N * L);
      end
    end
  end

  // The row-set counter never passes the last set.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> (32'(cnt) < K));

endmodule
