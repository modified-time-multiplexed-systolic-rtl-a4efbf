// Testbench of the TM-n processing element: PEs with index 0 (reduction
// nodes R only) and 2 (multi-reduction nodes S) get random operands and
// digits over products of 1 to 4 row sets; the accumulator is compared with
// the sum of digit[c] * z^(IDX*L+c) * op computed bit by bit.
module tb_tm_pe;
  import gf_ref_pkg::*;

  localparam int M = 28, L = 7, W = M + 1;
  logic clk = 1'b0;
  logic rst_n, en, first;
  logic [M:0]   op;
  logic [L-1:0] digit;
  logic [M:0]   acc0, acc2;
  int checks = 0, failures = 0;

  tm_pe #(.M(M), .L(L), .IDX(0)) pe0 (.clk, .rst_n, .en, .first, .op, .digit, .acc(acc0));
  tm_pe #(.M(M), .L(L), .IDX(2)) pe2 (.clk, .rst_n, .en, .first, .op, .digit, .acc(acc2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec_t row_ref(vec_t x, logic [L-1:0] dg, int idx);
    vec_t r;
    r = '0;
    for (int c = 0; c < L; c++) if (dg[c]) r ^= cyc_mul(x, idx * L + c, W);
    return r;
  endfunction

  initial begin
    vec_t e0, e2, x;
    int nsets;
    rst_n = 1'b0; en = 1'b0; first = 1'b0; op = '0; digit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 300; p++) begin
      nsets = $urandom_range(1, 4);
      e0 = '0; e2 = '0;
      for (int t = 0; t < nsets; t++) begin
        x = rand_vec(W);
        @(negedge clk);
        en = 1'b1; first = (t == 0); op = x[M:0]; digit = L'($urandom());
        e0 ^= row_ref(x, digit, 0);
        e2 ^= row_ref(x, digit, 2);
      end
      @(negedge clk);
      en = 1'b0; op = ~op; digit = ~digit;    // idle inputs must not matter
      @(negedge clk);
      checks += 2;
      if (acc0 !== e0[M:0]) begin failures++; $display("FAIL pe0 %h %h", acc0, e0[M:0]); end
      if (acc2 !== e2[M:0]) begin failures++; $display("FAIL pe2 %h %h", acc2, e2[M:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
