// Both multipliers on the two larger fields discussed for the design:
// GF(2^100) with s = 10 rows (L = 10) and GF(2^148) with s = 4 rows
// (L = 37). Both AOPs are irreducible (101 and 149 are prime and 2 is
// primitive modulo each). The TM multiplier is built as TM-4 for both: for
// m = 100 it needs K = 3 row sets per product, for m = 148 a single one.
// Products, latencies and the TM acceptance rate are checked as in the
// block testbenches.
`include "top_check.svh"

module tb_aop_fields;
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

  `TOP_UNDER_TEST(f100, 100, 10, 4, #(.M(100), .L(10), .N(4)))
  `TOP_UNDER_TEST(f148, 148, 37, 4, #(.M(148), .L(37), .N(4)))

  initial begin
    rst_n = 1'b0; burst = 1'b0; stop = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (300) @(posedge clk);
    @(negedge clk) begin burst = 1'b1; burst_start = cyc + 2; end
    repeat (100) @(posedge clk);
    @(negedge clk) burst = 1'b0;
    repeat (100) @(posedge clk);
    @(negedge clk) stop = 1'b1;
    repeat (60) @(posedge clk);
    `TOP_FINAL_CHECK(f100, 1)
    `TOP_FINAL_CHECK(f148, 0)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
