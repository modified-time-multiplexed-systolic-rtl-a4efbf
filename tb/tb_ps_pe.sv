// Testbench of the bit-parallel array's PE, in its three forms: PE-1
// (IDX = 0), PE-2 (IDX = 1) and a regular PE (IDX = 3). Random operands,
// B bits and incoming row sums are applied every cycle; one cycle later each
// output is compared with bdig[k] * z^(kL) * p_in, z * p_in and the expected
// row-sum vector, computed bit by bit. The last PE (IDX = L-1) is checked
// for its missing reduction node.
module tb_ps_pe;
  import gf_ref_pkg::*;

  localparam int M = 28, L = 7, S = 4, W = M + 1;
  logic clk = 1'b0;
  logic rst_n, iv;
  logic [M:0] p_in;
  logic [S-1:0] bdig;
  logic [M:0] r1 [S], r2 [S];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       ov [4];
  logic [M:0] po [4];
  logic [M:0] t1 [4][S], t2 [4][S];
  localparam int IDXS [4] = '{0, 1, 3, L - 1};

  for (genvar g = 0; g < 4; g++) begin : g_dut
    ps_pe #(.M(M), .L(L), .S(S), .IDX(IDXS[g])) dut (
      .clk, .rst_n, .in_valid(iv), .p_in, .bdig, .r1, .r2,
      .out_valid(ov[g]), .p_out(po[g]), .t1(t1[g]), .t2(t2[g]));
  end

  initial begin
    vec_t x, e;
    logic [M:0] pr1 [S], pr2 [S];
    logic [S-1:0] pb;
    logic piv;
    rst_n = 1'b0; iv = 1'b0; p_in = '0; bdig = '0;
    for (int k = 0; k < S; k++) begin r1[k] = '0; r2[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      x = rand_vec(W);
      p_in = x[M:0]; bdig = S'($urandom()); iv = ($urandom_range(0, 1) == 1);
      for (int k = 0; k < S; k++) begin r1[k] = W'(rand_vec(W)); r2[k] = W'(rand_vec(W)); end
      pr1 = r1; pr2 = r2; pb = bdig; piv = iv;
      @(negedge clk);
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (ov[g] !== piv) begin failures++; $display("FAIL valid %0d", g); end
        e = (IDXS[g] == L - 1) ? '0 : cyc_mul(x, 1, W);
        checks++;
        if (po[g] !== e[M:0]) begin failures++; $display("FAIL p_out %0d", g); end
        for (int k = 0; k < S; k++) begin
          e = pb[k] ? cyc_mul(x, k * L, W) : '0;
          checks++;
          if (t1[g][k] !== e[M:0]) begin failures++; $display("FAIL t1 pe%0d row%0d", g, k); end
          e = '0;
          if (IDXS[g] == 1) e[M:0] = pr1[k];
          if (IDXS[g] >= 2) e[M:0] = pr1[k] ^ pr2[k];
          checks++;
          if (t2[g][k] !== e[M:0]) begin failures++; $display("FAIL t2 pe%0d row%0d", g, k); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
