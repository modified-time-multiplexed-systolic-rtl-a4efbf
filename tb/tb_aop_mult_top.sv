// End-to-end testbench of aop_mult_top at its default parameters (m = 28,
// L = 7, TM-4). Random operands, including zero, all-ones and one, go to
// both multipliers with random gaps and then in a burst of back-to-back
// cycles; every product, every latency (5 for TM-4, 10 for the parallel
// array) and the TM acceptance rate are checked. The run fails if a
// mechanism never occurred: back-to-back products, idle gaps and output
// reductions with the top coefficient set, for both multipliers. With the
// defaults TM-4 finishes a product in one row set, so it never stalls; the
// time-multiplexed loop is exercised by tb_aop_mult_top_tmn.
`include "top_check.svh"

module tb_aop_mult_top;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic burst, stop;
  int   burst_start = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `TOP_UNDER_TEST(dut, 28, 7, 4, )

  initial begin
    rst_n = 1'b0; burst = 1'b0; stop = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (1000) @(posedge clk);
    @(negedge clk) begin burst = 1'b1; burst_start = cyc + 2; end
    repeat (200) @(posedge clk);
    @(negedge clk) burst = 1'b0;
    repeat (500) @(posedge clk);
    @(negedge clk) stop = 1'b1;
    repeat (30) @(posedge clk);
    `TOP_FINAL_CHECK(dut, 0)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
