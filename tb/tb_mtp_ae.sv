// tb_mtp_ae: one application engine with four selection engines.
//
// Runs two queries over row ranges that do not divide evenly by four (so the
// last engines get short or empty blocks), checks that each engine wrote its
// qualifying row ids into its own slice of out[] (out_base + 8 * its first
// row offset), that the per-engine counts and the summed statistics match
// the reference evaluation, and that `done` stays low while work remains.
`timescale 1ns/1ps
module tb_mtp_ae;
  import mtp_pkg::*;
  import tb_pkg::*;
  localparam int NE = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done;
  mtp_cfg_t cfg;
  logic [ROW_W-1:0] first_row, row_count;
  logic [ADDR_W-1:0] out_base;
  logic [ROW_W-1:0] qualified [NE];
  logic [ADDR_W-1:0] eng_out [NE];
  eng_stats_t stats;
  logic rqv [NE], rqs [NE], rsv [NE], wv [NE];
  mem_req_t rq [NE];
  mem_rsp_t rs [NE];
  logic [ADDR_W-1:0] wa [NE];
  logic [DATA_W-1:0] wd [NE];

  mtp_ae #(.NUM_ENGINES(NE), .QDEPTH(64), .MAX_THREADS(48)) dut (
    .clk, .rst_n, .start, .cfg, .first_row, .row_count, .out_base, .done, .qualified, .eng_out,
    .stats, .mem_req_valid(rqv), .mem_req(rq), .mem_req_stall(rqs), .mem_rsp_valid(rsv), .mem_rsp(rs));

  for (genvar j = 0; j < NE; j++) begin : g_mem
    mem_channel_model #(.LATENCY(40), .JITTER(6), .STALL_PCT(5 * j)) u_mem (
      .clk, .rst_n, .req_valid(rqv[j]), .req(rq[j]), .req_stall(rqs[j]),
      .rsp_valid(rsv[j]), .rsp(rs[j]), .wr_valid(wv[j]), .wr_addr(wa[j]), .wr_data(wd[j]));
  end

  int n_wr [NE];
  bit seen [int unsigned];
  int bad = 0;
  always @(posedge clk) if (rst_n)
    for (int j = 0; j < NE; j++) if (wv[j]) begin
      if (wa[j] != eng_out[j] + ADDR_W'(n_wr[j]) * 8 || seen.exists(int'(wd[j]))) bad++;
      seen[int'(wd[j])] = 1;
      n_wr[j]++;
    end

  task automatic run(int first, int n);
    int chunk, exp_ev, ev, total;
    seen.delete(); bad = 0;
    foreach (n_wr[j]) n_wr[j] = 0;
    first_row = ROW_W'(first); row_count = ROW_W'(n);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (done) begin failures++; $display("FAIL done during start"); end
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
    chunk = (n + NE - 1) / NE;
    exp_ev = 0; total = 0;
    for (int j = 0; j < NE; j++) begin
      int f, c, q;
      f = first + j * chunk;
      c = (j * chunk >= n) ? 0 : ((n - j * chunk < chunk) ? n - j * chunk : chunk);
      q = 0;
      checks++;
      if (eng_out[j] != out_base + ADDR_W'(j * chunk) * 8) begin failures++; $display("FAIL slice %0d", j); end
      for (int r = f; r < f + c; r++) begin
        bit e;
        e = ref_row(cfg, r, ev);
        exp_ev += ev;
        checks++;
        if (e != seen.exists(r)) begin failures++; $display("FAIL row %0d", r); end
        if (e) q++;
      end
      total += q;
      checks++;
      if (qualified[j] != ROW_W'(q) || n_wr[j] != q) begin failures++; $display("FAIL engine %0d count", j); end
    end
    checks += 2;
    if (bad != 0) begin failures++; $display("FAIL %0d misplaced writes", bad); end
    if (stats.evals != 32'(exp_ev) || stats.writes != 32'(total)) begin failures++; $display("FAIL stats"); end
    $display("run first=%0d n=%0d qualified=%0d evals=%0d", first, n, total, exp_ev);
  endtask

  initial begin
    int sz;
    start = 0;
    cfg = default_cfg(2000);
    out_base = 48'h0000_9000_0000;
    clear_query();
    add_pred(0, 2, OP_LT, 70); add_pred(0, 3, OP_GT, 25); add_pred(1, 7, OP_EQ, 3);
    build_query(cfg);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(10, 1001);
    run(500, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
