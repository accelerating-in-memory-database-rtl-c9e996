// selection_engine: one multithreaded selection engine on one memory channel.
//
// A thread manager and a processing unit joined in a loop: the manager issues
// reads for new and recycled jobs and offers returning column values, with
// the PCB offset that applies to each, to the processing unit; the unit
// evaluates the predicate and hands back a write job, a recycled job or a
// thread end. Hundreds of threads are in flight at once, so the long memory
// latency of one thread is covered by the work of the others.
//
// Operation: pulse `start` with `cfg`, the engine's row range and the base of
// its part of out[] stable. `busy` stays high until every row of the range
// has been decided and every qualifying row id has left for memory; then
// `done` is high and `qualified` holds the number of row ids written to
// out_base, out_base+8, ... `stats` counts reads, evaluations, writes,
// recycled jobs and stall cycles of the last query. The two-block structure
// is the document's; the control handshake is this design's.
module selection_engine
  import mtp_pkg::*;
#(
  parameter int unsigned QDEPTH      = 512,
  parameter int unsigned MAX_THREADS = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  mtp_cfg_t          cfg,
  input  logic [ROW_W-1:0]  first_row,
  input  logic [ROW_W-1:0]  row_count,
  input  logic [ADDR_W-1:0] out_base,
  output logic              busy,
  output logic              done,
  output logic [ROW_W-1:0]  qualified,
  output eng_stats_t        stats,
  output logic              mem_req_valid,
  output mem_req_t          mem_req,
  input  logic              mem_req_stall,
  input  logic              mem_rsp_valid,
  input  mem_rsp_t          mem_rsp
);
  logic             tm_idle;
  logic             wr_valid, rc_valid, term, eval, bad_op, pu_stall;
  logic [ROW_W-1:0] wr_row;
  rc_job_t          rc_job;
  logic             pu_valid, pu_ready;
  logic [ROW_W-1:0] pu_row;
  logic [DATA_W-1:0] pu_value;
  state_t           pu_state;
  logic [31:0]      c_reads, c_writes, c_recycled, c_stall, c_limit;

  thread_manager #(.QDEPTH(QDEPTH), .MAX_THREADS(MAX_THREADS)) u_tm (
    .clk, .rst_n, .start, .cfg, .first_row, .row_count, .out_base, .idle(tm_idle),
    .wr_push(wr_valid), .wr_row, .rc_push(rc_valid), .rc_job, .term, .pu_stall,
    .pu_valid, .pu_row, .pu_value, .pu_state, .pu_ready,
    .mem_req_valid, .mem_req, .mem_req_stall, .mem_rsp_valid, .mem_rsp,
    .cnt_reads(c_reads), .cnt_writes(c_writes), .cnt_recycled(c_recycled),
    .cnt_stall(c_stall), .cnt_thread_limit(c_limit));

  processing_unit u_pu (
    .clk, .rst_n, .in_valid(pu_valid), .in_row(pu_row), .in_value(pu_value),
    .in_state(pu_state), .in_ready(pu_ready), .stall(pu_stall),
    .wr_valid, .wr_row, .rc_valid, .rc_job, .term, .eval, .bad_op);

  logic [31:0] c_evals;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      c_evals <= '0;
    end else begin
      // the manager sees `start` in the same cycle, so it is idle only from
      // the cycle after; a query with nothing to do still takes two cycles
      if (start)                     busy <= 1'b1;
      else if (busy && tm_idle)      busy <= 1'b0;
      if (start)      c_evals <= '0;
      else if (eval)  c_evals <= c_evals + 1'b1;
    end
  end

  assign done      = !busy;
  assign qualified = c_writes;
  assign stats     = '{reads: c_reads, evals: c_evals, writes: c_writes,
                       recycled: c_recycled, stall_cycles: c_stall, thread_limit: c_limit};

  // an operator code outside the six is a malformed PCB
  a_op_known: assert property (@(posedge clk) disable iff (!rst_n) !bad_op);
endmodule
