// Testbench of the pipelined adder tree: trees of 1, 4 and 5 words are fed a
// new random set of words every cycle (with gaps); each output is compared
// with the XOR of its inputs and must appear ceil(log2 K) cycles later.
module tb_aop_pat;
  import gf_ref_pkg::*;

  localparam int W = 29;
  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One tree of K words and its scoreboard.
  `define PAT_UNDER_TEST(NAME, KW)                                          \
    logic         NAME``_iv, NAME``_ov;                                      \
    logic [W-1:0] NAME``_d [KW];                                             \
    logic [W-1:0] NAME``_sum;                                                \
    aop_pat #(.W(W), .K(KW)) NAME (.clk, .rst_n, .in_valid(NAME``_iv),       \
      .d(NAME``_d), .out_valid(NAME``_ov), .sum(NAME``_sum));                 \
    logic [W-1:0] NAME``_q [$];                                              \
    int           NAME``_t [$];                                              \
    int           NAME``_seen = 0;                                           \
    always @(posedge clk) if (rst_n) begin                                   \
      logic [W-1:0] x;                                                       \
      if (NAME``_iv) begin                                                   \
        x = '0;                                                              \
        for (int i = 0; i < KW; i++) x ^= NAME``_d[i];                       \
        NAME``_q.push_back(x); NAME``_t.push_back(cyc);                      \
      end                                                                    \
      if (NAME``_ov) begin                                                   \
        checks++;                                                            \
        if (NAME``_q.size() == 0) begin failures++; end                       \
        else begin                                                           \
          if (NAME``_sum !== NAME``_q.pop_front()) begin                     \
            failures++; $display("FAIL %s sum", `"NAME`");                   \
          end                                                                \
          if (cyc - NAME``_t.pop_front() != ((KW) > 1 ? $clog2(KW) : 0)) begin \
            failures++; $display("FAIL %s latency", `"NAME`");               \
          end                                                                \
          NAME``_seen++;                                                     \
        end                                                                  \
      end                                                                    \
    end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  `PAT_UNDER_TEST(p1, 1)
  `PAT_UNDER_TEST(p4, 4)
  `PAT_UNDER_TEST(p5, 5)

  initial begin
    rst_n = 1'b0;
    p1_iv = 0; p4_iv = 0; p5_iv = 0;
    p1_d[0] = '0;
    for (int i = 0; i < 4; i++) p4_d[i] = '0;
    for (int i = 0; i < 5; i++) p5_d[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      p1_iv = ($urandom_range(0, 3) != 0);
      p4_iv = ($urandom_range(0, 3) != 0);
      p5_iv = ($urandom_range(0, 3) != 0);
      p1_d[0] = W'($urandom());
      for (int i = 0; i < 4; i++) p4_d[i] = W'($urandom());
      for (int i = 0; i < 5; i++) p5_d[i] = W'($urandom());
    end
    @(negedge clk);
    p1_iv = 0; p4_iv = 0; p5_iv = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (p1_seen < 100 || p4_seen < 100 || p5_seen < 100 || p1_q.size() != 0 ||
        p4_q.size() != 0 || p5_q.size() != 0) begin
      failures++; $display("FAIL counts %0d %0d %0d", p1_seen, p4_seen, p5_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
