// End-to-end testbench of aop_mult_top with the time-multiplexed multiplier
// folded further than TM-4: TM-1 (four row sets per product, a product every
// 4 cycles, latency 1 + 4 + 1 = 6) and TM-2 (two row sets, latency
// 1 + 2 + 1 + 1 = 5), both for m = 28, L = 7. Same checks as the default
// testbench, and it also requires stalls on the input handshake and row-set
// iterations of the time-multiplexed loop.
`include "top_check.svh"

module tb_aop_mult_top_tmn;
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

  `TOP_UNDER_TEST(tm1, 28, 7, 1, #(.N(1)))
  `TOP_UNDER_TEST(tm2, 28, 7, 2, #(.N(2)))

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
    `TOP_FINAL_CHECK(tm1, 1)
    `TOP_FINAL_CHECK(tm2, 1)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
