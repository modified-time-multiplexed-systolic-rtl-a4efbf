// Output reduction cell (ORC).
//
// The multipliers accumulate their result as an (m+1)-bit vector D taken
// modulo z^(m+1) + 1. Because z^m = 1 + z + ... + z^(m-1) modulo the all-one
// polynomial, the top coefficient d_m folds back onto every lower bit:
// c_i = d_i XOR d_m for 0 <= i < m. This is the degree reduction by one that
// the design places after the adder tree. The cell is registered: C and
// out_valid appear one clock after D and in_valid (one pipeline stage, as
// the design counts it in its latency). The cell's function and its single
// cycle follow the published design; the fold-back formula is the direct
// consequence of the AOP. Reset clears the valid flag and the result
// register; the reset style (synchronous, active low) is this
// implementation's choice.
module aop_orc #(
  parameter int unsigned M = aop_pkg::AOP_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M:0]   d,          // redundant result, degree <= m
  output logic         out_valid,
  output logic [M-1:0] c           // reduced product, degree <= m-1
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      c         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) c <= d[M-1:0] ^ {M{d[M]}};
    end
  end

endmodule
