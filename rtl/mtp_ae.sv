// mtp_ae: one application engine (FPGA) of the multithreaded selection design.
//
// Holds NUM_ENGINES selection engines, one per memory channel (16 on the
// document's platform: 8 memory controllers of two channels each). All
// engines run the same query; the AE's rows are split evenly into contiguous
// blocks, one per engine, each with its own slice of out[]. `start` is
// registered once, together with the split, so engines begin one cycle after
// it. `done` is high when every engine is idle; `qualified[i]` is the number
// of row ids engine i wrote, starting at `eng_out[i]`. `stats` adds up the
// engines' counters. The engine count is the document's; the split is this
// design's.
module mtp_ae
  import mtp_pkg::*;
#(
  parameter int unsigned NUM_ENGINES = 16,
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
  output logic              done,
  output logic [ROW_W-1:0]  qualified [NUM_ENGINES],
  output logic [ADDR_W-1:0] eng_out   [NUM_ENGINES],
  output eng_stats_t        stats,
  output logic              mem_req_valid [NUM_ENGINES],
  output mem_req_t          mem_req       [NUM_ENGINES],
  input  logic              mem_req_stall [NUM_ENGINES],
  input  logic              mem_rsp_valid [NUM_ENGINES],
  input  mem_rsp_t          mem_rsp       [NUM_ENGINES]
);
  logic [ROW_W-1:0]  sp_first [NUM_ENGINES];
  logic [ROW_W-1:0]  sp_count [NUM_ENGINES];
  logic [ADDR_W-1:0] sp_out   [NUM_ENGINES];
  logic [ROW_W-1:0]  r_first  [NUM_ENGINES];
  logic [ROW_W-1:0]  r_count  [NUM_ENGINES];
  logic              start_q;
  logic              eng_done [NUM_ENGINES];
  eng_stats_t        eng_st   [NUM_ENGINES];

  row_split #(.PARTS(NUM_ENGINES)) u_split (
    .first(first_row), .count(row_count), .out_base,
    .part_first(sp_first), .part_count(sp_count), .part_out(sp_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      for (int i = 0; i < NUM_ENGINES; i++) begin
        r_first[i] <= '0;
        r_count[i] <= '0;
        eng_out[i] <= '0;
      end
    end else begin
      start_q <= start;
      if (start) begin
        r_first <= sp_first;
        r_count <= sp_count;
        eng_out <= sp_out;
      end
    end
  end

  for (genvar e = 0; e < NUM_ENGINES; e++) begin : g_eng
    selection_engine #(.QDEPTH(QDEPTH), .MAX_THREADS(MAX_THREADS)) u_eng (
      .clk, .rst_n, .start(start_q), .cfg,
      .first_row(r_first[e]), .row_count(r_count[e]), .out_base(eng_out[e]),
      .busy(), .done(eng_done[e]), .qualified(qualified[e]), .stats(eng_st[e]),
      .mem_req_valid(mem_req_valid[e]), .mem_req(mem_req[e]), .mem_req_stall(mem_req_stall[e]),
      .mem_rsp_valid(mem_rsp_valid[e]), .mem_rsp(mem_rsp[e]));
  end

  always_comb begin
    // `start` and `start_q` cover the cycles before the engines raise busy
    done  = !start && !start_q;
    stats = '0;
    for (int i = 0; i < NUM_ENGINES; i++) begin
      done               = done && eng_done[i];
      stats.reads        = stats.reads        + eng_st[i].reads;
      stats.evals        = stats.evals        + eng_st[i].evals;
      stats.writes       = stats.writes       + eng_st[i].writes;
      stats.recycled     = stats.recycled     + eng_st[i].recycled;
      stats.stall_cycles = stats.stall_cycles + eng_st[i].stall_cycles;
      stats.thread_limit = stats.thread_limit + eng_st[i].thread_limit;
    end
  end
endmodule
