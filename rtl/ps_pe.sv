// Processing element of the bit-parallel systolic-like multiplier.
//
// The dependence graph has S rows of L columns; PE number IDX (0-based,
// PE-1 of the design is IDX = 0) is column IDX. The operand arriving from
// the left is z^IDX * P (P = A with a zero z^m coefficient). For every row k
// the PE forms one partial product with an AND cell:
//     t1[k] = b_(kL+IDX) AND (z^(kL) * p_in),
// where z^(kL) is the multi-reduction node S of that row (wiring only).
// It forwards the operand multiplied by z (reduction node R, a one-bit
// cyclic shift) and the running row sums:
//   * PE-1 (IDX = 0) has only AND cells; its partial products go out on t1
//     and t2 is zero.
//   * PE-2 (IDX = 1) passes the row sums of PE-1 through: t2 = r1.
//   * The regular PEs add the two incoming vectors of each row with an XOR
//     cell: t2 = r1 XOR r2.
// The last PE (IDX = L-1) has no R node; its p_out is held at zero.
// Every output is registered: one PE is one pipeline stage. bdig[k] is the
// B bit of row k for this column, presented in the same cycle as p_in.
// The three PE forms and their register transfers follow the published
// design; the zero outputs of PE-1 (t2) and of the last PE (p_out), kept so
// that all PEs share one port list, are this design's own.
module ps_pe #(
  parameter int unsigned M   = aop_pkg::AOP_M,
  parameter int unsigned L   = aop_pkg::AOP_L,
  parameter int unsigned S   = aop_pkg::ceil_div(aop_pkg::AOP_M, aop_pkg::AOP_L),
  parameter int unsigned IDX = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M:0]   p_in,
  input  logic [S-1:0] bdig,
  input  logic [M:0]   r1 [S],
  input  logic [M:0]   r2 [S],
  output logic         out_valid,
  output logic [M:0]   p_out,
  output logic [M:0]   t1 [S],
  output logic [M:0]   t2 [S]
);

  localparam int unsigned W = M + 1;

  function automatic logic [M:0] rotl(logic [M:0] x, int unsigned k);
    int unsigned kk;
    kk = k % W;
    return (kk == 0) ? x : ((x << kk) | (x >> (W - kk)));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p_out     <= '0;
      for (int k = 0; k < S; k++) begin
        t1[k] <= '0;
        t2[k] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      p_out     <= (IDX + 1 < L) ? rotl(p_in, 1) : '0;
      for (int k = 0; k < S; k++) begin
        t1[k] <= rotl(p_in, k * L) & {W{bdig[k]}};
        if (IDX == 0)      t2[k] <= '0;
        else if (IDX == 1) t2[k] <= r1[k];
        else               t2[k] <= r1[k] ^ r2[k];
      end
    end
  end

endmodule
