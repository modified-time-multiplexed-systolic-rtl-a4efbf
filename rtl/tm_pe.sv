// Processing element of the time-multiplexed multiplier TM-n.
//
// PE number IDX (0-based; PE-1 of the design is IDX = 0) handles one row of
// the dependence graph per clock. A row is L consecutive bits of B,
// b_(rL) ... b_(rL+L-1), multiplied with the operand rotated by the matching
// powers of z:
//     row = XOR over c < L of  b_(rL+c) AND (z^(rL+c) * P)   mod z^(m+1) + 1.
// The sequencer broadcasts z^(tLN) * P for row set t; this PE adds the fixed
// rotation IDX*L + c. For PE-1 those rotations are the one-bit reduction
// nodes R (z^0 ... z^(L-1)); for the other PEs they are the L-bit
// multi-reduction nodes S applied to PE-1's operands. Both are wiring only:
// the PE itself is L rows of AND cells and an XOR sum over them.
//
// Over the ceil(s/n) row sets of one product the PE accumulates its rows in
// the register acc: on a cycle with `first` set acc restarts at the row,
// otherwise the row is XORed into it. acc is valid from the clock after the
// row set marked `last`, and holds until the next `en` cycle.
// The row computation (R and S nodes as wiring, L AND cells, XOR cells)
// follows the published PE; the accumulator is this design's own, needed
// only when N is smaller than the number of rows.
module tm_pe #(
  parameter int unsigned M   = aop_pkg::AOP_M,
  parameter int unsigned L   = aop_pkg::AOP_L,
  parameter int unsigned IDX = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,      // a row set is present this cycle
  input  logic         first,   // first row set of a product
  input  logic [M:0]   op,      // z^(tLN) * P from the sequencer
  input  logic [L-1:0] digit,   // this PE's L bits of B for the row set
  output logic [M:0]   acc      // accumulated partial product
);

  localparam int unsigned W = M + 1;

  // Cyclic left shift by k positions (multiplication by z^k mod z^W + 1).
  function automatic logic [M:0] rotl(logic [M:0] x, int unsigned k);
    int unsigned kk;
    kk = k % W;
    return (kk == 0) ? x : ((x << kk) | (x >> (W - kk)));
  endfunction

  logic [M:0] row;

  always_comb begin
    row = '0;
    for (int unsigned c = 0; c < L; c++) begin
      // AND cell on the rotated operand, then XOR cell into the row sum.
      row ^= rotl(op, IDX * L + c) & {W{digit[c]}};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)   acc <= '0;
    else if (en)  acc <= first ? row : (acc ^ row);
  end

endmodule
