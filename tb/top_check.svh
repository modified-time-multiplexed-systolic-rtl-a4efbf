// Driver and scoreboard for one instance of aop_mult_top, shared by the
// top-level testbenches. TOP_UNDER_TEST(NAME, M, L, N, PARAMS) instantiates
// the top as NAME with the parameter override PARAMS (empty for the
// defaults; M, L, N must then be the defaults) and checks both multipliers:
// every product against A*B mod (1 + z + ... + z^M) from gf_ref_pkg, the
// latency of each (TM: 1 + K + ceil(log2 N) + 1, parallel:
// L + ceil(log2 s) + 1) and the TM acceptance rate (one per K cycles).
// It counts the mechanisms seen: products of each multiplier, back-to-back
// products, idle gaps, TM stalls (in_valid while not ready), TM row-set
// iterations (K > 1) and output reductions with the z^m coefficient set.
// The enclosing testbench supplies clk, rst_n, cyc, burst, stop, checks
// and failures.
`define TOP_UNDER_TEST(NAME, MM, LL, NN, PARAMS)                                 \
  localparam int NAME``_S = (MM + LL - 1) / LL;                                  \
  localparam int NAME``_K = (NAME``_S + NN - 1) / NN;                            \
  localparam int NAME``_TLAT = 1 + NAME``_K + ((NN > 1) ? $clog2(NN) : 0) + 1;   \
  localparam int NAME``_PLAT = LL + ((NAME``_S > 1) ? $clog2(NAME``_S) : 0) + 1; \
  logic NAME``_tiv = 1'b0, NAME``_tir, NAME``_tov;                               \
  logic NAME``_piv = 1'b0, NAME``_pov;                                           \
  logic [MM-1:0] NAME``_ta, NAME``_tb, NAME``_tc, NAME``_pa, NAME``_pb, NAME``_pc; \
  aop_mult_top PARAMS NAME (.clk, .rst_n,                                        \
    .tm_in_valid(NAME``_tiv), .tm_in_ready(NAME``_tir), .tm_a(NAME``_ta),        \
    .tm_b(NAME``_tb), .tm_out_valid(NAME``_tov), .tm_c(NAME``_tc),               \
    .ps_in_valid(NAME``_piv), .ps_a(NAME``_pa), .ps_b(NAME``_pb),                 \
    .ps_out_valid(NAME``_pov), .ps_c(NAME``_pc));                                 \
  vec_t NAME``_tq [$], NAME``_pq [$];                                            \
  int NAME``_ttq [$], NAME``_ptq [$];                                            \
  int NAME``_tlast = -100, NAME``_plast = -100;                                  \
  int NAME``_tprods = 0, NAME``_pprods = 0, NAME``_tb2b = 0, NAME``_pb2b = 0;    \
  int NAME``_tgaps = 0, NAME``_pgaps = 0, NAME``_stalls = 0, NAME``_iters = 0;   \
  int NAME``_tfold = 0, NAME``_pfold = 0;                                        \
  always @(posedge clk) if (rst_n) begin                                         \
    vec_t av, bv, e;                                                             \
    int t0;                                                                      \
    if (NAME``_tov) begin                                                        \
      checks += 2;                                                               \
      if (NAME``_tq.size() == 0) begin failures += 2; $display("FAIL %s tm extra", `"NAME`"); end \
      else begin                                                                 \
        e = NAME``_tq.pop_front(); t0 = NAME``_ttq.pop_front();                  \
        if (NAME``_tc !== e[MM-1:0]) begin                                       \
          failures++; $display("FAIL %s tm c=%h exp=%h", `"NAME`", NAME``_tc, e[MM-1:0]); \
        end                                                                      \
        if (cyc - t0 != NAME``_TLAT) begin                                       \
          failures++; $display("FAIL %s tm latency %0d", `"NAME`", cyc - t0);   \
        end                                                                      \
      end                                                                        \
    end                                                                          \
    if (NAME``_pov) begin                                                        \
      checks += 2;                                                               \
      if (NAME``_pq.size() == 0) begin failures += 2; $display("FAIL %s ps extra", `"NAME`"); end \
      else begin                                                                 \
        e = NAME``_pq.pop_front(); t0 = NAME``_ptq.pop_front();                  \
        if (NAME``_pc !== e[MM-1:0]) begin                                       \
          failures++; $display("FAIL %s ps c=%h exp=%h", `"NAME`", NAME``_pc, e[MM-1:0]); \
        end                                                                      \
        if (cyc - t0 != NAME``_PLAT) begin                                       \
          failures++; $display("FAIL %s ps latency %0d", `"NAME`", cyc - t0);   \
        end                                                                      \
      end                                                                        \
    end                                                                          \
    if (NAME``_tiv && !NAME``_tir) NAME``_stalls++;                              \
    if (NAME.u_tm.u_seq.busy && !NAME.u_tm.u_seq.first) NAME``_iters++;          \
    if (NAME.u_tm.u_orc.in_valid && NAME.u_tm.u_orc.d[MM]) NAME``_tfold++;       \
    if (NAME.u_ps.u_orc.in_valid && NAME.u_ps.u_orc.d[MM]) NAME``_pfold++;       \
    if (NAME``_tiv && NAME``_tir) begin                                          \
      checks++;                                                                  \
      if (cyc - NAME``_tlast < NAME``_K) begin failures++; $display("FAIL %s tm rate", `"NAME`"); end \
      if (burst && NAME``_tlast > burst_start && cyc - NAME``_tlast > NAME``_K) begin \
        failures++; $display("FAIL %s tm gap in burst", `"NAME`");              \
      end                                                                        \
      if (cyc - NAME``_tlast == NAME``_K) NAME``_tb2b++;                         \
      else NAME``_tgaps++;                                                       \
      NAME``_tlast = cyc;                                                        \
      av = '0; av[MM-1:0] = NAME``_ta; bv = '0; bv[MM-1:0] = NAME``_tb;          \
      NAME``_tq.push_back(aop_mul(av, bv, MM)); NAME``_ttq.push_back(cyc);       \
      NAME``_tprods++;                                                           \
    end                                                                          \
    if (NAME``_piv) begin                                                        \
      if (cyc - NAME``_plast == 1) NAME``_pb2b++; else NAME``_pgaps++;           \
      NAME``_plast = cyc;                                                        \
      av = '0; av[MM-1:0] = NAME``_pa; bv = '0; bv[MM-1:0] = NAME``_pb;          \
      NAME``_pq.push_back(aop_mul(av, bv, MM)); NAME``_ptq.push_back(cyc);       \
      NAME``_pprods++;                                                           \
    end                                                                          \
  end                                                                            \
  always @(negedge clk) begin                                                    \
    int kind;                                                                    \
    if (!(NAME``_tiv && !NAME``_tir)) begin                                      \
      kind = $urandom_range(0, 15);                                              \
      NAME``_tiv <= rst_n && !stop && (burst || $urandom_range(0, 3) != 0);      \
      NAME``_ta <= (kind == 0) ? '0 : (kind == 1) ? '1 : MM'(rand_vec(MM));      \
      NAME``_tb <= (kind == 2) ? '0 : (kind == 3) ? MM'(1) : MM'(rand_vec(MM));  \
    end                                                                          \
    kind = $urandom_range(0, 15);                                                \
    NAME``_piv <= rst_n && !stop && (burst || $urandom_range(0, 3) != 0);        \
    NAME``_pa <= (kind == 0) ? '0 : (kind == 1) ? '1 : MM'(rand_vec(MM));        \
    NAME``_pb <= (kind == 2) ? '0 : (kind == 3) ? MM'(1) : MM'(rand_vec(MM));    \
  end

// Coverage and drain check at the end of a run.
`define TOP_FINAL_CHECK(NAME, NEED_TM)                                           \
  begin                                                                          \
    $display("%s: tm products %0d back-to-back %0d gaps %0d stalls %0d row-set iterations %0d folds %0d; ps products %0d back-to-back %0d gaps %0d folds %0d", \
      `"NAME`", NAME``_tprods, NAME``_tb2b, NAME``_tgaps, NAME``_stalls, NAME``_iters, \
      NAME``_tfold, NAME``_pprods, NAME``_pb2b, NAME``_pgaps, NAME``_pfold);     \
    checks++;                                                                    \
    if (NAME``_tq.size() != 0 || NAME``_pq.size() != 0) begin                   \
      failures++; $display("FAIL %s products missing", `"NAME`");               \
    end                                                                          \
    checks += 8;                                                                 \
    if (NAME``_tprods == 0) failures++;                                          \
    if (NAME``_pprods == 0) failures++;                                          \
    if (NAME``_tb2b == 0)   failures++;                                          \
    if (NAME``_pb2b == 0)   failures++;                                          \
    if (NAME``_tgaps == 0)  failures++;                                          \
    if (NAME``_pgaps == 0)  failures++;                                          \
    if (NAME``_tfold == 0)  failures++;                                          \
    if (NAME``_pfold == 0)  failures++;                                          \
    if (NEED_TM) begin                                                           \
      checks += 2;                                                               \
      if (NAME``_stalls == 0) failures++;                                        \
      if (NAME``_iters == 0)  failures++;                                        \
    end                                                                          \
  end
