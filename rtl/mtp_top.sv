// mtp_top: the multithreaded selection coprocessor.
//
// NUM_AE application engines (FPGAs) of ENGINES_PER_AE selection engines
// each, 4 x 16 = 64 engines on the document's platform, every engine on its
// own 8-byte memory channel. The host programs `cfg` (relation, out[] and
// PCB pointers, number of rows, row size, first column, PCB length, layout)
// and pulses `start`. The rows are split evenly over the AEs, and inside each
// AE over its engines; every engine loads the PCB itself and then runs its
// rows as threads. `done` rises when all engines are idle. Engine j (AE
// j / ENGINES_PER_AE) wrote `qualified[j]` row ids from address
// `eng_out[j]` on; `total_qualified` and `stats` sum over all engines.
//
// Memory channels are brought out as arrays indexed by global engine number.
// A channel takes a request when `mem_req_valid` is high, must hold further
// requests off with `mem_req_stall` (seen in the same cycle), and returns
// each read, with its tag, in request order on `mem_rsp_valid`/`mem_rsp`.
// Writes return nothing. The engine and AE counts are the document's; the
// channel protocol is this design's stand-in for the platform's memory
// controllers.
module mtp_top
  import mtp_pkg::*;
#(
  parameter int unsigned NUM_AE         = 4,
  parameter int unsigned ENGINES_PER_AE = 16,
  parameter int unsigned QDEPTH         = 512,
  parameter int unsigned MAX_THREADS    = 512,
  localparam int unsigned NE            = NUM_AE * ENGINES_PER_AE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  mtp_cfg_t          cfg,
  output logic              done,
  output logic [ROW_W-1:0]  qualified [NE],
  output logic [ADDR_W-1:0] eng_out   [NE],
  output logic [ROW_W-1:0]  total_qualified,
  output eng_stats_t        stats,
  output logic              mem_req_valid [NE],
  output mem_req_t          mem_req       [NE],
  input  logic              mem_req_stall [NE],
  input  logic              mem_rsp_valid [NE],
  input  mem_rsp_t          mem_rsp       [NE]
);
  logic [ROW_W-1:0]  ae_first [NUM_AE];
  logic [ROW_W-1:0]  ae_count [NUM_AE];
  logic [ADDR_W-1:0] ae_outb  [NUM_AE];
  logic              ae_done  [NUM_AE];
  eng_stats_t        ae_st    [NUM_AE];

  row_split #(.PARTS(NUM_AE)) u_split (
    .first('0), .count(cfg.num_tuples), .out_base(cfg.out_base),
    .part_first(ae_first), .part_count(ae_count), .part_out(ae_outb));

  for (genvar a = 0; a < NUM_AE; a++) begin : g_ae
    logic [ROW_W-1:0]  q   [ENGINES_PER_AE];
    logic [ADDR_W-1:0] eo  [ENGINES_PER_AE];
    logic              rqv [ENGINES_PER_AE];
    mem_req_t          rq  [ENGINES_PER_AE];
    logic              rqs [ENGINES_PER_AE];
    logic              rsv [ENGINES_PER_AE];
    mem_rsp_t          rs  [ENGINES_PER_AE];

    for (genvar e = 0; e < ENGINES_PER_AE; e++) begin : g_ch
      assign qualified[a*ENGINES_PER_AE + e]     = q[e];
      assign eng_out[a*ENGINES_PER_AE + e]       = eo[e];
      assign mem_req_valid[a*ENGINES_PER_AE + e] = rqv[e];
      assign mem_req[a*ENGINES_PER_AE + e]       = rq[e];
      assign rqs[e] = mem_req_stall[a*ENGINES_PER_AE + e];
      assign rsv[e] = mem_rsp_valid[a*ENGINES_PER_AE + e];
      assign rs[e]  = mem_rsp[a*ENGINES_PER_AE + e];
    end

    mtp_ae #(.NUM_ENGINES(ENGINES_PER_AE), .QDEPTH(QDEPTH), .MAX_THREADS(MAX_THREADS)) u_ae (
      .clk, .rst_n, .start, .cfg,
      .first_row(ae_first[a]), .row_count(ae_count[a]), .out_base(ae_outb[a]),
      .done(ae_done[a]), .qualified(q), .eng_out(eo), .stats(ae_st[a]),
      .mem_req_valid(rqv), .mem_req(rq), .mem_req_stall(rqs),
      .mem_rsp_valid(rsv), .mem_rsp(rs));
  end

  always_comb begin
    done            = 1'b1;
    stats           = '0;
    total_qualified = '0;
    for (int a = 0; a < NUM_AE; a++) begin
      done               = done && ae_done[a];
      stats.reads        = stats.reads        + ae_st[a].reads;
      stats.evals        = stats.evals        + ae_st[a].evals;
      stats.writes       = stats.writes       + ae_st[a].writes;
      stats.recycled     = stats.recycled     + ae_st[a].recycled;
      stats.stall_cycles = stats.stall_cycles + ae_st[a].stall_cycles;
      stats.thread_limit = stats.thread_limit + ae_st[a].thread_limit;
    end
    for (int j = 0; j < NE; j++) total_qualified = total_qualified + qualified[j];
  end
endmodule
