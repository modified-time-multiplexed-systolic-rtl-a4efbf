// Testbench of the output reduction cell: random (m+1)-bit inputs are
// compared, one clock later, with their remainder modulo the all-one
// polynomial computed by long division. Checks the one-cycle latency of
// out_valid and that the register holds while in_valid is low.
module tb_aop_orc;
  import gf_ref_pkg::*;

  localparam int M = 28;
  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  logic [M:0]   d;
  logic         out_valid;
  logic [M-1:0] c;
  int checks = 0, failures = 0;

  aop_orc #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t dv, exp;
    logic [M-1:0] held;
    int folds = 0;
    rst_n = 1'b0; in_valid = 1'b0; d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      dv = rand_vec(M + 1);
      if (t % 3 == 0) dv[M] = 1'b1;
      @(negedge clk);
      d = dv[M:0]; in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      exp = aop_mod(dv, M);
      checks++;
      if (!out_valid || c !== exp[M-1:0]) begin
        failures++;
        $display("FAIL d=%h c=%h exp=%h v=%b", dv[M:0], c, exp[M-1:0], out_valid);
      end
      if (dv[M]) folds++;
      // hold while idle
      held = c;
      d = ~d;
      @(negedge clk);
      checks++;
      if (out_valid || c !== held) begin
        failures++;
        $display("FAIL hold");
      end
    end
    checks++;
    if (folds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
