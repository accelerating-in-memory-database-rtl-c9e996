// tb_selection_engine: runs whole queries through one selection engine.
//
// The engine is attached to an in-order memory model. Each query is a DNF
// over hashed column values (tb_pkg); the testbench checks every written row
// id against a short-circuit reference evaluation of the DNF, that ids go to
// consecutive out[] slots, that each row is written at most once, and that
// the engine's counts of reads, evaluations and writes equal the reference's.
// Queries cover conjunctive, disjunctive and mixed forms, all six operators,
// row- and column-major layouts, random memory stalls and a small thread
// limit. One stall-free run checks the rate: one job per cycle once the
// pipeline is full, so the query takes no more cycles than its memory
// operations plus the drain-out of the last thread (one memory latency per
// dependent read) and a small constant.
`timescale 1ns/1ps
module tb_selection_engine;
  import mtp_pkg::*;
  import tb_pkg::*;

  localparam int LAT = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // two engines: one fast (default thread limit, no stalls), one throttled
  logic              start [2];
  mtp_cfg_t          cfg;
  logic [ROW_W-1:0]  first_row, row_count;
  logic [ADDR_W-1:0] out_base;
  logic              busy [2], done [2];
  logic [ROW_W-1:0]  qualified [2];
  eng_stats_t        stats [2];
  logic              rqv [2], rqs [2], rsv [2], wv [2];
  mem_req_t          rq [2];
  mem_rsp_t          rs [2];
  logic [ADDR_W-1:0] wa [2];
  logic [DATA_W-1:0] wd [2];

  selection_engine u_fast (
    .clk, .rst_n, .start(start[0]), .cfg, .first_row, .row_count, .out_base,
    .busy(busy[0]), .done(done[0]), .qualified(qualified[0]), .stats(stats[0]),
    .mem_req_valid(rqv[0]), .mem_req(rq[0]), .mem_req_stall(rqs[0]),
    .mem_rsp_valid(rsv[0]), .mem_rsp(rs[0]));
  mem_channel_model #(.LATENCY(LAT), .JITTER(0), .STALL_PCT(0), .MAX_OUT(1024)) u_mem0 (
    .clk, .rst_n, .req_valid(rqv[0]), .req(rq[0]), .req_stall(rqs[0]),
    .rsp_valid(rsv[0]), .rsp(rs[0]), .wr_valid(wv[0]), .wr_addr(wa[0]), .wr_data(wd[0]));

  selection_engine #(.QDEPTH(64), .MAX_THREADS(24)) u_slow (
    .clk, .rst_n, .start(start[1]), .cfg, .first_row, .row_count, .out_base,
    .busy(busy[1]), .done(done[1]), .qualified(qualified[1]), .stats(stats[1]),
    .mem_req_valid(rqv[1]), .mem_req(rq[1]), .mem_req_stall(rqs[1]),
    .mem_rsp_valid(rsv[1]), .mem_rsp(rs[1]));
  mem_channel_model #(.LATENCY(60), .JITTER(20), .STALL_PCT(25), .MAX_OUT(40)) u_mem1 (
    .clk, .rst_n, .req_valid(rqv[1]), .req(rq[1]), .req_stall(rqs[1]),
    .rsp_valid(rsv[1]), .rsp(rs[1]), .wr_valid(wv[1]), .wr_addr(wa[1]), .wr_data(wd[1]));

  // collect written row ids
  int unsigned got_idx [2];
  bit          seen [2][int unsigned];
  always @(posedge clk) begin
    for (int e = 0; e < 2; e++) if (rst_n && wv[e]) begin
      checks++;
      if (wa[e] != out_base + ADDR_W'(got_idx[e]) * 8) begin
        failures++;
        $display("FAIL eng%0d: write %0d to %h, expected slot %h", e, got_idx[e], wa[e],
                 out_base + ADDR_W'(got_idx[e]) * 8);
      end
      if (seen[e].exists(int'(wd[e]))) begin
        failures++; $display("FAIL eng%0d: row %0d written twice", e, wd[e]);
      end
      seen[e][int'(wd[e])] = 1;
      got_idx[e]++;
    end
  end

  task automatic run_query(int e, string name, int rows, int first, bit check_rate);
    int exp_q, exp_evals, ev, cyc;
    got_idx[e] = 0;
    seen[e].delete();
    first_row = ROW_W'(first);
    row_count = ROW_W'(rows);
    out_base  = 48'h0000_8000_0000 + ADDR_W'(e) * 48'h100_0000;
    @(negedge clk); start[e] = 1;
    @(negedge clk); start[e] = 0;
    cyc = 1;
    @(negedge clk);
    while (!done[e]) begin @(negedge clk); cyc++; end
    repeat (2) @(negedge clk);
    exp_q = 0; exp_evals = 0;
    for (int r = first; r < first + rows; r++) begin
      bit q;
      q = ref_row(cfg, r, ev);
      exp_evals += ev;
      if (q) exp_q++;
      checks++;
      if (q != seen[e].exists(r)) begin
        failures++;
        if (failures < 10) $display("FAIL %s eng%0d row %0d: expected %0d", name, e, r, q);
      end
    end
    checks += 4;
    if (qualified[e] != ROW_W'(exp_q)) begin failures++; $display("FAIL %s: qualified %0d exp %0d", name, qualified[e], exp_q); end
    if (got_idx[e] != exp_q)           begin failures++; $display("FAIL %s: writes seen %0d exp %0d", name, got_idx[e], exp_q); end
    if (stats[e].evals != 32'(exp_evals)) begin failures++; $display("FAIL %s: evals %0d exp %0d", name, stats[e].evals, exp_evals); end
    if (stats[e].reads != 32'(exp_evals)) begin failures++; $display("FAIL %s: reads %0d exp %0d", name, stats[e].reads, exp_evals); end
    if (check_rate) begin
      int bound;
      // one job per cycle, plus the drain-out of the last thread: up to
      // n_pred dependent reads, each one memory latency and the pipeline
      bound = exp_evals + exp_q + n_pred + n_pred * (LAT + 12) + 20;
      checks++;
      if (cyc > bound) begin failures++; $display("FAIL %s: %0d cycles, bound %0d", name, cyc, bound); end
    end
    $display("%s eng%0d: rows=%0d qualified=%0d evals=%0d cycles=%0d stall=%0d limit=%0d recycled=%0d",
             name, e, rows, exp_q, exp_evals, cyc, stats[e].stall_cycles, stats[e].thread_limit,
             stats[e].recycled);
  endtask

  int total_limit = 0, total_stall = 0;

  initial begin
    start[0] = 0; start[1] = 0;
    cfg = default_cfg(3000);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // conjunctive, k = 3: UnitPrice > 5 AND ... style chain
    clear_query();
    add_pred(0, 1, OP_LT, 60); add_pred(0, 3, OP_GE, 20); add_pred(0, 5, OP_NE, 7);
    build_query(cfg);
    for (int e = 0; e < 2; e++) run_query(e, "conj3", 1500, 100, e == 0);
    total_limit += stats[1].thread_limit; total_stall += stats[1].stall_cycles;

    // disjunctive, k = 3
    clear_query();
    add_pred(0, 2, OP_LE, 10); add_pred(1, 4, OP_GT, 85); add_pred(2, 6, OP_EQ, 42);
    build_query(cfg);
    for (int e = 0; e < 2; e++) run_query(e, "disj3", 1500, 7, e == 0);

    // the document's sample query: (c0 > 5 AND c1 > 10) OR (c2 > 100 -> here > 90)
    clear_query();
    add_pred(0, 0, OP_GT, 5); add_pred(0, 1, OP_GT, 10); add_pred(1, 2, OP_GT, 90);
    build_query(cfg);
    for (int e = 0; e < 2; e++) run_query(e, "sample", 1200, 0, 1'b0);

    // mixed query Q3 shape on a column-major table
    cfg.col_major = 1'b1;
    clear_query();
    for (int i = 0; i < 8; i++) add_pred(i < 3 ? 0 : (i < 5 ? 1 : 2), i, OP_LT, 70);
    build_query(cfg);
    for (int e = 0; e < 2; e++) run_query(e, "q3_colmajor", 1000, 2000, e == 0);
    total_limit += stats[1].thread_limit; total_stall += stats[1].stall_cycles;
    cfg.col_major = 1'b0;

    // empty range: engine must finish with nothing written
    for (int e = 0; e < 2; e++) run_query(e, "empty", 0, 0, 1'b0);

    checks += 2;
    if (total_limit == 0) begin failures++; $display("FAIL: thread limit never reached"); end
    if (total_stall == 0) begin failures++; $display("FAIL: back-pressure never seen"); end
    checks++;
    if (u_mem1.n_stall == 0) begin failures++; $display("FAIL: memory stall never seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
