// tb_mtp_top: end-to-end queries through the full 64-engine coprocessor.
//
// The top runs at its default size (4 application engines x 16 selection
// engines, 512-entry queues, 512 threads per engine), each engine on its own
// memory channel model. The testbench dispatches the query workloads used to
// evaluate the design, on a few thousand rows each:
//   * conjunctive and disjunctive queries with k = 1..8 predicates at
//     selectivity 0 %, 100 % and in between, checking that the number of
//     predicates evaluated follows the short-circuit counts (N at 0 % and
//     k*N at 100 % for a conjunction, the mirror for a disjunction);
//   * the mixed DNF queries Q1..Q4 over eight predicates, whose evaluation
//     counts at 0 % selectivity are 2N, 4N, 3N and 2N;
//   * a TPC-H Q6-like conjunction of five predicates on a 16-column table;
//   * row-major and column-major layouts; a long-latency run that reaches the
//     per-engine thread limit; random channel stalls.
// Every written row id is checked against the reference evaluation, against
// the engine's slice of out[] and for duplicates; per-engine and total counts
// are compared. The run time of each query is checked against one job per
// cycle per engine plus the drain-out of the last threads. Each mechanism
// (early termination, recycling, write-back, layout switch, channel stall,
// queue back-pressure) must occur at least once.
`timescale 1ns/1ps
module tb_mtp_top;
  import mtp_pkg::*;
  import tb_pkg::*;

  localparam int NE  = 64;
  localparam int LAT = 120;
  localparam int JIT = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done;
  mtp_cfg_t cfg;
  logic [ROW_W-1:0]  qualified [NE];
  logic [ADDR_W-1:0] eng_out [NE];
  logic [ROW_W-1:0]  total_q;
  eng_stats_t        stats;
  logic              rqv [NE], rqs [NE], rsv [NE], wv [NE];
  mem_req_t          rq [NE];
  mem_rsp_t          rs [NE];
  logic [ADDR_W-1:0] wa [NE];
  logic [DATA_W-1:0] wd [NE];

  mtp_top dut (
    .clk, .rst_n, .start, .cfg, .done, .qualified, .eng_out, .total_qualified(total_q), .stats,
    .mem_req_valid(rqv), .mem_req(rq), .mem_req_stall(rqs), .mem_rsp_valid(rsv), .mem_rsp(rs));

  for (genvar j = 0; j < NE; j++) begin : g_mem
    mem_channel_model #(.LATENCY(LAT), .JITTER(JIT), .STALL_PCT(j % 4 == 0 ? 10 : 0),
                        .MAX_OUT(1024)) u_mem (
      .clk, .rst_n, .req_valid(rqv[j]), .req(rq[j]), .req_stall(rqs[j]),
      .rsp_valid(rsv[j]), .rsp(rs[j]), .wr_valid(wv[j]), .wr_addr(wa[j]), .wr_data(wd[j]));
  end

  // written row ids, per engine
  int unsigned n_wr [NE];
  bit          seen [int unsigned];
  int          bad_slot = 0, dup = 0;
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < NE; j++) if (wv[j]) begin
      if (wa[j] != eng_out[j] + ADDR_W'(n_wr[j]) * 8) bad_slot++;
      if (seen.exists(int'(wd[j]))) dup++;
      seen[int'(wd[j])] = 1;
      n_wr[j]++;
    end
  end

  // mechanism counters
  int m_early = 0, m_recycle = 0, m_write = 0, m_colmajor = 0, m_stall = 0, m_limit = 0, m_chstall = 0;

  // rows of engine j under the even split (4 AEs, then 16 engines each)
  function automatic void eng_range(int n, int j, output int first, output int cnt);
    int ca, a, e, fa, na, ce;
    a = j / 16; e = j % 16;
    ca = (n + 3) / 4;
    fa = a * ca;
    na = (fa >= n) ? 0 : ((n - fa < ca) ? n - fa : ca);
    ce = (na + 15) / 16;
    first = fa + e * ce;
    cnt = (e * ce >= na) ? 0 : ((na - e * ce < ce) ? na - e * ce : ce);
  endfunction

  // Runs the query held in tb_pkg on n rows; returns evaluations.
  task automatic run_query(string name, int n, int exp_evals_req, int exp_q_req);
    int exp_q, exp_evals, ev, cyc, bound, worst;
    int e_q [NE];
    int e_ev [NE];
    seen.delete();
    foreach (n_wr[j]) n_wr[j] = 0;
    bad_slot = 0; dup = 0;
    cfg.num_tuples = ROW_W'(n);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    repeat (2) @(negedge clk);
    exp_q = 0; exp_evals = 0;
    foreach (e_q[j]) begin e_q[j] = 0; e_ev[j] = 0; end
    for (int j = 0; j < NE; j++) begin
      int f, c;
      eng_range(n, j, f, c);
      for (int r = f; r < f + c; r++) begin
        bit q;
        q = ref_row(cfg, r, ev);
        e_ev[j] += ev; exp_evals += ev;
        if (q) begin e_q[j]++; exp_q++; end
        checks++;
        if (q != seen.exists(r)) begin
          failures++;
          if (failures < 10) $display("FAIL %s row %0d expected %0d", name, r, q);
        end
      end
      checks++;
      if (qualified[j] != ROW_W'(e_q[j]) || n_wr[j] != e_q[j]) begin
        failures++; $display("FAIL %s engine %0d count %0d/%0d exp %0d", name, j, qualified[j], n_wr[j], e_q[j]);
      end
    end
    checks += 5;
    if (bad_slot != 0 || dup != 0) begin failures++; $display("FAIL %s slots %0d dups %0d", name, bad_slot, dup); end
    if (total_q != ROW_W'(exp_q)) begin failures++; $display("FAIL %s total %0d exp %0d", name, total_q, exp_q); end
    if (stats.evals != 32'(exp_evals) || stats.reads != 32'(exp_evals)) begin
      failures++; $display("FAIL %s evals %0d reads %0d exp %0d", name, stats.evals, stats.reads, exp_evals);
    end
    if (exp_evals_req >= 0 && exp_evals != exp_evals_req) begin
      failures++; $display("FAIL %s evaluations %0d, short-circuit count %0d", name, exp_evals, exp_evals_req);
    end
    if (exp_q_req >= 0 && exp_q != exp_q_req) begin
      failures++; $display("FAIL %s qualified %0d expected %0d", name, exp_q, exp_q_req);
    end
    // rate: one job per cycle in each engine, plus drain-out
    worst = 0;
    for (int j = 0; j < NE; j++) if (e_ev[j] + e_q[j] > worst) worst = e_ev[j] + e_q[j];
    bound = worst + n_pred + n_pred * (LAT + extra_latency + JIT + 12) + 40;
    if (extra_latency == 0) begin
      checks++;
      if (cyc > bound) begin failures++; $display("FAIL %s: %0d cycles, bound %0d", name, cyc, bound); end
    end
    if (exp_evals > n) m_recycle++;
    if (exp_evals < n * n_pred) m_early++;
    if (exp_q > 0) m_write++;
    if (cfg.col_major) m_colmajor++;
    if (stats.stall_cycles > stats.thread_limit) m_stall++;
    if (stats.thread_limit > 0) m_limit++;
    $display("%-14s N=%0d k=%0d qualified=%0d evals=%0d cycles=%0d (bound %0d) stall=%0d limit=%0d",
             name, n, n_pred, exp_q, exp_evals, cyc, bound, stats.stall_cycles, stats.thread_limit);
  endtask

  task automatic conj(int k, int thr);
    clear_query();
    for (int i = 0; i < k; i++) add_pred(0, i, OP_LT, thr);
    build_query(cfg);
  endtask
  task automatic disj(int k, int thr);
    clear_query();
    for (int i = 0; i < k; i++) add_pred(i, i, OP_LT, thr);
    build_query(cfg);
  endtask
  // DNF over columns 0..7 with the given clause sizes
  task automatic dnf(int sizes[$], int thr);
    int col;
    clear_query();
    col = 0;
    foreach (sizes[c]) for (int i = 0; i < sizes[c]; i++) begin add_pred(c, col, OP_LT, thr); col++; end
    build_query(cfg);
  endtask

  localparam int N = 4096;

  initial begin
    int sz[$];
    start = 0;
    cfg = default_cfg(N);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // conjunctive queries: S = 0 % (1 evaluation per row) and 100 % (k per row)
    conj(8, 0);    run_query("conj8_S0",   N, N,     0);
    conj(8, 100);  run_query("conj8_S100", N, 8 * N, N);
    conj(1, 100);  run_query("conj1_S100", N, N,     N);
    for (int k = 2; k <= 8; k += 3) begin conj(k, 80); run_query($sformatf("conj%0d_p80", k), N, -1, -1); end
    // disjunctive queries: mirror image
    disj(8, 100);  run_query("disj8_S100", N, N,     N);
    disj(8, 0);    run_query("disj8_S0",   N, 8 * N, 0);
    disj(4, 15);   run_query("disj4_p15",  N, -1, -1);
    // mixed queries at S = 0: one evaluation per clause
    sz = '{1, 7};       dnf(sz, 0); run_query("Q1_S0", N, 2 * N, 0);
    sz = '{2, 2, 2, 2}; dnf(sz, 0); run_query("Q2_S0", N, 4 * N, 0);
    sz = '{3, 2, 3};    dnf(sz, 0); run_query("Q3_S0", N, 3 * N, 0);
    sz = '{4, 4};       dnf(sz, 0); run_query("Q4_S0", N, 2 * N, 0);
    sz = '{2, 2, 2, 2}; dnf(sz, 50); run_query("Q2_p50", N, -1, -1);
    // TPC-H Q6 shape: shipdate >= a, shipdate < b, discount between, quantity < 24
    cfg.row_size = 8'd16;
    clear_query();
    add_pred(0, 10, OP_GE, 30); add_pred(0, 10, OP_LT, 45);
    add_pred(0, 6, OP_GE, 40);  add_pred(0, 6, OP_LE, 60); add_pred(0, 4, OP_LT, 24);
    build_query(cfg);
    run_query("tpch_q6", N, -1, -1);
    cfg.row_size = 8'd8;
    // column-major layout
    cfg.col_major = 1'b1;
    sz = '{3, 2, 3}; dnf(sz, 60); run_query("Q3_colmajor", N, -1, -1);
    cfg.col_major = 1'b0;
    // long memory latency: more threads needed than an engine may hold
    extra_latency = 700;
    conj(4, 90); run_query("conj4_lat820", 16 * N, -1, -1);
    // slow channels: the request queues fill and stall job issue
    extra_stall = 70;
    conj(2, 90); run_query("conj2_stall70", 16 * N, -1, -1);
    extra_latency = 0; extra_stall = 0;

    m_chstall = int'(g_mem[0].u_mem.n_stall > 0);
    checks += 6;
    if (m_early == 0)    begin failures++; $display("FAIL no early termination"); end
    if (m_recycle == 0)  begin failures++; $display("FAIL no recycled jobs"); end
    if (m_write == 0)    begin failures++; $display("FAIL no write-back"); end
    if (m_colmajor == 0) begin failures++; $display("FAIL no column-major run"); end
    if (m_stall == 0)    begin failures++; $display("FAIL no back-pressure stall"); end
    if (m_chstall == 0)  begin failures++; $display("FAIL no channel stall"); end
    $display("mechanisms: early=%0d recycle=%0d write=%0d colmajor=%0d stall=%0d limit=%0d",
             m_early, m_recycle, m_write, m_colmajor, m_stall, m_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
