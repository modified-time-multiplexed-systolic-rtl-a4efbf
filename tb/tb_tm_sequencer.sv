// Testbench of the TM-n sequencer, for N = 4 (one row set per product) and
// N = 1 (four row sets, one every cycle). For every product it checks the
// operand of row set t (z^(tLN) * P), the B bits handed to the PEs, the
// first/last flags, that in_ready drops while a product still has row sets
// to run, and that a new product is taken every K cycles.
module tb_tm_sequencer;
  import gf_ref_pkg::*;

  localparam int M = 28, L = 7, W = M + 1, S = 4;
  logic clk = 1'b0;
  logic rst_n;
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

  `define SEQ_UNDER_TEST(NAME, NN)                                              \
    localparam int NAME``_K = (S + NN - 1) / NN;                                 \
    logic NAME``_iv, NAME``_ir, NAME``_en, NAME``_first, NAME``_last;            \
    logic [M-1:0] NAME``_a, NAME``_b;                                            \
    logic [M:0] NAME``_op;                                                       \
    logic [NN*L-1:0] NAME``_dg;                                                  \
    tm_sequencer #(.M(M), .L(L), .N(NN)) NAME (.clk, .rst_n,                     \
      .in_valid(NAME``_iv), .in_ready(NAME``_ir), .a(NAME``_a), .b(NAME``_b),     \
      .en(NAME``_en), .first(NAME``_first), .last(NAME``_last),                  \
      .op(NAME``_op), .digits(NAME``_dg));                                        \
    vec_t NAME``_pa, NAME``_pb;                                                  \
    int NAME``_t = -1, NAME``_acc_cyc = -1, NAME``_stalls = 0, NAME``_prods = 0; \
    always @(posedge clk) if (rst_n) begin                                       \
      vec_t eo;                                                                  \
      if (NAME``_t >= 0) begin                                                   \
        eo = cyc_mul(NAME``_pa, NAME``_t * L * NN, W);                           \
        checks++;                                                                \
        if (!NAME``_en || NAME``_op !== eo[M:0] ||                               \
            NAME``_dg !== NAME``_pb[NAME``_t*NN*L +: NN*L] ||                    \
            NAME``_first !== (NAME``_t == 0) ||                                  \
            NAME``_last !== (NAME``_t == NAME``_K - 1) ||                        \
            NAME``_ir !== (NAME``_t == NAME``_K - 1)) begin                      \
          failures++; $display("FAIL %s set %0d", `"NAME`", NAME``_t);           \
        end                                                                      \
        NAME``_t = (NAME``_t == NAME``_K - 1) ? -1 : NAME``_t + 1;               \
      end else begin                                                             \
        checks++;                                                                \
        if (NAME``_en || !NAME``_ir) begin failures++; $display("FAIL idle"); end \
      end                                                                        \
      if (NAME``_iv && !NAME``_ir) NAME``_stalls++;                              \
      if (NAME``_iv && NAME``_ir) begin                                          \
        if (NAME``_acc_cyc >= 0 && cyc - NAME``_acc_cyc < NAME``_K) begin        \
          failures++; $display("FAIL rate");                                     \
        end                                                                      \
        NAME``_acc_cyc = cyc;                                                    \
        NAME``_pa = '0; NAME``_pa[M-1:0] = NAME``_a;                             \
        NAME``_pb = '0; NAME``_pb[M-1:0] = NAME``_b;                             \
        NAME``_t = 0; NAME``_prods++;                                            \
      end                                                                        \
    end                                                                          \
    always @(negedge clk) begin                                                  \
      NAME``_iv <= rst_n && ($urandom_range(0, 4) != 0);                         \
      NAME``_a  <= M'(rand_vec(M));                                              \
      NAME``_b  <= M'(rand_vec(M));                                              \
    end

  `SEQ_UNDER_TEST(s4, 4)
  `SEQ_UNDER_TEST(s1, 1)

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (1500) @(posedge clk);
    checks++;
    if (s4_prods < 100 || s1_prods < 100 || s1_stalls == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d", s4_prods, s1_prods, s1_stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
