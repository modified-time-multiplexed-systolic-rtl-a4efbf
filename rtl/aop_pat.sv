// Pipelined adder tree (PAT).
//
// Adds K words of W bits in GF(2) (bitwise XOR). The words are summed in
// pairs, level by level, with a register after every level, so the tree has
// ceil(log2 K) stages and accepts a new set of words every clock. An odd word
// at a level is carried to the next level through a register. With K = 1
// there is nothing to add and the word passes through without a register.
// in_valid travels alongside the data and comes out as out_valid after the
// same number of stages. Reset clears the valid pipeline and the sums.
// The published design gives the tree ceil(log2 K) stages; the pairing
// order and the registered carry of an odd word are this design's choice.
module aop_pat #(
  parameter int unsigned W = aop_pkg::AOP_M + 1,
  parameter int unsigned K = aop_pkg::AOP_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] d [K],
  output logic         out_valid,
  output logic [W-1:0] sum
);

  localparam int unsigned STAGES = aop_pkg::tree_stages(K);

  // Number of words at level s of the tree.
  function automatic int unsigned words_at(int unsigned s);
    return (K + (1 << s) - 1) >> s;
  endfunction

  // lvl[s][i]: word i at level s; level 0 is the input.
  logic [W-1:0] lvl   [STAGES+1][K];
  logic         vld   [STAGES+1];

  always_comb begin
    for (int i = 0; i < K; i++) lvl[0][i] = d[i];
    vld[0] = in_valid;
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned NI = words_at(s);      // words entering level s+1
    localparam int unsigned NO = words_at(s + 1);  // words leaving it
    always_ff @(posedge clk) begin
      if (!rst_n) vld[s+1] <= 1'b0;
      else        vld[s+1] <= vld[s];
    end
    for (genvar i = 0; i < K; i++) begin : g_word
      if (i < NO && 2 * i + 1 < NI) begin : g_add
        always_ff @(posedge clk) begin
          if (!rst_n) lvl[s+1][i] <= '0;
          else        lvl[s+1][i] <= lvl[s][2*i] ^ lvl[s][2*i+1];
        end
      end else if (i < NO) begin : g_carry
        always_ff @(posedge clk) begin
          if (!rst_n) lvl[s+1][i] <= '0;
          else        lvl[s+1][i] <= lvl[s][2*i];
        end
      end else begin : g_unused
        assign lvl[s+1][i] = '0;
      end
    end
  end

  assign sum       = lvl[STAGES][0];
  assign out_valid = vld[STAGES];

endmodule
