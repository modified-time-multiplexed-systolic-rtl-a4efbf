// Testbench of the time-multiplexed multiplier TM-N. Five configurations run
// side by side on random operands with random gaps in in_valid:
//   m = 28, L = 7, N = 4 (TM-4, the default: one row set per product),
//   m = 28, L = 7, N = 1 (TM-1: four row sets, one product every 4 cycles),
//   m = 28, L = 7, N = 3 (two row sets, the second only partly used),
//   m = 12, L = 5, N = 2 (B padded from 12 to 15 bits, two row sets),
//   m = 28, L = 5, N = 3 (s = 6 rows, B padded by r = 2 bits, two row sets).
// Every product is compared with A*B mod (1 + z + ... + z^m) from a
// schoolbook multiply and long division. The latency must be
// 1 + K + ceil(log2 N) + 1 cycles (K = ceil(s/N)), products must be accepted
// no faster than one per K cycles and, with in_valid held high, exactly one
// per K cycles. Stalls (in_valid while not ready) must occur for K > 1.
module tb_tm_aop_multiplier;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic burst;     // hold in_valid high
  logic stop;      // offer no more operands
  int   burst_start = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define TM_UNDER_TEST(NAME, MM, LL, NN)                                        \
    localparam int NAME``_S = (MM + LL - 1) / LL;                                \
    localparam int NAME``_K = (NAME``_S + NN - 1) / NN;                          \
    localparam int NAME``_LAT = 1 + NAME``_K + ((NN > 1) ? $clog2(NN) : 0) + 1;  \
    logic NAME``_iv, NAME``_ir, NAME``_ov;                                       \
    logic [MM-1:0] NAME``_a, NAME``_b, NAME``_c;                                 \
    tm_aop_multiplier #(.M(MM), .L(LL), .N(NN)) NAME (.clk, .rst_n,              \
      .in_valid(NAME``_iv), .in_ready(NAME``_ir), .a(NAME``_a), .b(NAME``_b),     \
      .out_valid(NAME``_ov), .c(NAME``_c));                                       \
    vec_t NAME``_q [$];                                                          \
    int NAME``_tq [$];                                                           \
    int NAME``_last = -100, NAME``_prods = 0, NAME``_stalls = 0, NAME``_b2b = 0; \
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
      if (NAME``_iv && !NAME``_ir) NAME``_stalls++;                              \
      if (NAME``_iv && NAME``_ir) begin                                          \
        checks++;                                                                \
        if (cyc - NAME``_last < NAME``_K) begin failures++; $display("FAIL %s rate", `"NAME`"); end \
        if (burst && NAME``_last > burst_start && cyc - NAME``_last > NAME``_K) begin     \
          failures++; $display("FAIL %s gap in burst", `"NAME`");               \
        end                                                                      \
        if (cyc - NAME``_last == NAME``_K) NAME``_b2b++;                         \
        NAME``_last = cyc;                                                       \
        av = '0; av[MM-1:0] = NAME``_a;                                          \
        bv = '0; bv[MM-1:0] = NAME``_b;                                          \
        NAME``_q.push_back(aop_mul(av, bv, MM));                                 \
        NAME``_tq.push_back(cyc);                                                \
        NAME``_prods++;                                                          \
      end                                                                        \
    end                                                                          \
    always @(negedge clk) begin                                                  \
      if (!(NAME``_iv && !NAME``_ir)) begin  /* keep offered operands stable */  \
        NAME``_iv <= rst_n && !stop && (burst || $urandom_range(0, 3) != 0);              \
        NAME``_a  <= MM'(rand_vec(MM));                                          \
        NAME``_b  <= MM'(rand_vec(MM));                                          \
      end                                                                        \
    end                                                                          \
    initial NAME``_iv = 1'b0;

  `TM_UNDER_TEST(tm4,  28, 7, 4)
  `TM_UNDER_TEST(tm1,  28, 7, 1)
  `TM_UNDER_TEST(tm3,  28, 7, 3)
  `TM_UNDER_TEST(tm2s, 12, 5, 2)
  `TM_UNDER_TEST(tm3l5, 28, 5, 3)

  initial begin
    rst_n = 1'b0; burst = 1'b0; stop = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (1500) @(posedge clk);
    @(negedge clk) begin burst = 1'b1; burst_start = cyc + 2; end
    repeat (200) @(posedge clk);
    @(negedge clk) burst = 1'b0;
    repeat (1000) @(posedge clk);
    @(negedge clk) stop = 1'b1;    // drain
    repeat (20) @(posedge clk);
    checks++;
    if (tm4_q.size() + tm1_q.size() + tm3_q.size() + tm2s_q.size() + tm3l5_q.size() != 0) begin
      failures++; $display("FAIL products missing");
    end
    checks++;
    if (tm4_prods < 200 || tm1_prods < 100 || tm3_prods < 100 || tm2s_prods < 100 ||
        tm3l5_prods < 100 || tm3l5_stalls == 0 ||
        tm1_stalls == 0 || tm3_stalls == 0 || tm2s_stalls == 0 ||
        tm4_b2b == 0 || tm1_b2b == 0) begin
      failures++;
      $display("FAIL coverage prods %0d %0d %0d %0d stalls %0d %0d %0d", tm4_prods, tm1_prods,
               tm3_prods, tm2s_prods, tm1_stalls, tm3_stalls, tm2s_stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
