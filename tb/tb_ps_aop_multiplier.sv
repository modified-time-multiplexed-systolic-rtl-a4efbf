// Testbench of the bit-parallel systolic multiplier, at m = 28, L = 7
// (s = 4, latency 10), at the alternative partition of the same field
// m = 28, L = 5 (s = 6, B padded with r = 2 zero bits, latency 5 + 3 + 1 = 9)
// and at m = 12, L = 5 (s = 3, r = 3, latency 5 + 2 + 1 = 8). Random operands enter on random cycles
// and in a burst of consecutive cycles; every product is compared with
// A*B mod (1 + z + ... + z^m) from a schoolbook multiply and long division,
// and must appear L + ceil(log2 s) + 1 cycles after its operands.
module tb_ps_aop_multiplier;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic burst, stop;
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

  `define PS_UNDER_TEST(NAME, MM, LL)                                            \
    localparam int NAME``_S = (MM + LL - 1) / LL;                                \
    localparam int NAME``_LAT = LL + ((NAME``_S > 1) ? $clog2(NAME``_S) : 0) + 1; \
    logic NAME``_iv = 1'b0, NAME``_ov;                                           \
    logic [MM-1:0] NAME``_a, NAME``_b, NAME``_c;                                 \
    ps_aop_multiplier #(.M(MM), .L(LL)) NAME (.clk, .rst_n,                      \
      .in_valid(NAME``_iv), .a(NAME``_a), .b(NAME``_b),                           \
      .out_valid(NAME``_ov), .c(NAME``_c));                                       \
    vec_t NAME``_q [$];                                                          \
    int NAME``_tq [$];                                                           \
    int NAME``_prods = 0, NAME``_run = 0, NAME``_maxrun = 0;                     \
    always @(posedge clk) if (rst_n) begin                                       \
      vec_t av, bv;                                                              \
      if (NAME``_ov) begin                                                       \
        checks++;                                                                \
        if (NAME``_q.size() == 0) begin failures++; $display("FAIL %s extra", `"NAME`"); end \
        else begin                                                               \
          vec_t e; int t0;                                                       \
          e = NAME``_q.pop_front(); t0 = NAME``_tq.pop_front();                  \
          if (NAME``_c !== e[MM-1:0]) begin                                      \
            failures++; $display("FAIL %s c=%h exp=%h", `"NAME`", NAME``_c, e[MM-1:0]); \
          end                                                                    \
          checks++;                                                              \
          if (cyc - t0 != NAME``_LAT) begin                                      \
            failures++; $display("FAIL %s latency %0d", `"NAME`", cyc - t0);    \
          end                                                                    \
        end                                                                      \
      end                                                                        \
      if (NAME``_iv) begin                                                       \
        av = '0; av[MM-1:0] = NAME``_a;                                          \
        bv = '0; bv[MM-1:0] = NAME``_b;                                          \
        NAME``_q.push_back(aop_mul(av, bv, MM));                                 \
        NAME``_tq.push_back(cyc);                                                \
        NAME``_prods++; NAME``_run++;                                            \
        if (NAME``_run > NAME``_maxrun) NAME``_maxrun = NAME``_run;              \
      end else NAME``_run = 0;                                                   \
    end                                                                          \
    always @(negedge clk) begin                                                  \
      NAME``_iv <= rst_n && !stop && (burst || $urandom_range(0, 2) != 0);       \
      NAME``_a  <= MM'(rand_vec(MM));                                            \
      NAME``_b  <= MM'(rand_vec(MM));                                            \
    end

  `PS_UNDER_TEST(ps28, 28, 7)
  `PS_UNDER_TEST(ps12, 12, 5)
  `PS_UNDER_TEST(ps28l5, 28, 5)

  initial begin
    rst_n = 1'b0; burst = 1'b0; stop = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (800) @(posedge clk);
    @(negedge clk) burst = 1'b1;
    repeat (100) @(posedge clk);
    @(negedge clk) burst = 1'b0;
    repeat (300) @(posedge clk);
    @(negedge clk) stop = 1'b1;
    repeat (20) @(posedge clk);
    checks++;
    if (ps28_prods < 300 || ps12_prods < 300 || ps28l5_prods < 300 || ps28_maxrun < 50 ||
        ps12_maxrun < 50 || ps28l5_maxrun < 50 ||
        ps28_q.size() != 0 || ps12_q.size() != 0 || ps28l5_q.size() != 0) begin
      failures++; $display("FAIL coverage %0d %0d", ps28_prods, ps12_prods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
