// Bit-parallel systolic-like multiplier over GF(2^m), irreducible all-one
// polynomial Q(z) = 1 + z + ... + z^m.
//
// The m product terms b_i * z^i * P (P = A with a zero z^m coefficient,
// arithmetic modulo z^(m+1) + 1) are laid out as S = ceil(m/L) rows of L
// columns, B being padded with zeros to L*S bits (m = L*S - r). A chain of L
// PEs, one per column, walks the operand from left to right (each PE
// multiplies it by z) while every row keeps its own running sum. After the
// last PE, the adder tree adds, per row, the last column's partial product
// to the row sum, and then sums the S rows in ceil(log2 S) registered
// stages. The output reduction cell gives the m-bit product.
//
// PE number c needs the B bits of column c when the operand reaches it, c
// cycles after A enters; this block delays B internally by that amount, so
// A and B are presented together. No handshake: a product enters every
// cycle that in_valid is high and out_valid follows after
// L + ceil(log2 S) + 1 cycles (10 for m = 28, L = 7, S = 4).
// The chain of PEs, the adder tree, the reduction cell and the latency
// follow the published design; the internal delay line for B and the reset
// are this design's own.
module ps_aop_multiplier #(
  parameter int unsigned M = aop_pkg::AOP_M,
  parameter int unsigned L = aop_pkg::AOP_L
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         out_valid,
  output logic [M-1:0] c
);

  localparam int unsigned S  = aop_pkg::ceil_div(M, L);
  localparam int unsigned BW = L * S;

  // Stage c of the chain: inputs of PE c.
  logic         v_in  [L+1];
  logic [M:0]   p_in  [L+1];
  logic [M:0]   t1    [L+1][S];
  logic [M:0]   t2    [L+1][S];
  // B delayed by c cycles for column c.
  logic [BW-1:0] b_dly [L];

  assign v_in[0] = in_valid;
  assign p_in[0] = {1'b0, a};
  assign b_dly[0] = BW'(b);
  always_comb begin
    for (int k = 0; k < S; k++) begin
      t1[0][k] = '0;
      t2[0][k] = '0;
    end
  end

  for (genvar d = 1; d < L; d++) begin : g_bdelay
    always_ff @(posedge clk) begin
      if (!rst_n) b_dly[d] <= '0;
      else        b_dly[d] <= b_dly[d-1];
    end
  end

  for (genvar col = 0; col < L; col++) begin : g_pe
    logic [S-1:0] bdig;
    always_comb begin
      for (int k = 0; k < S; k++) bdig[k] = b_dly[col][k*L + col];
    end
    ps_pe #(.M(M), .L(L), .S(S), .IDX(col)) u_pe (
      .clk, .rst_n,
      .in_valid  (v_in[col]),
      .p_in      (p_in[col]),
      .bdig      (bdig),
      .r1        (t1[col]),
      .r2        (t2[col]),
      .out_valid (v_in[col+1]),
      .p_out     (p_in[col+1]),
      .t1        (t1[col+1]),
      .t2        (t2[col+1])
    );
  end

  // Adder tree: per row, the last column's product plus the row sum, then
  // the rows summed in ceil(log2 S) stages.
  logic [M:0] row_sum [S];
  logic       pat_valid;
  logic [M:0] pat_sum;

  always_comb begin
    for (int k = 0; k < S; k++) row_sum[k] = t1[L][k] ^ t2[L][k];
  end

  aop_pat #(.W(M + 1), .K(S)) u_pat (
    .clk, .rst_n,
    .in_valid  (v_in[L]),
    .d         (row_sum),
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
