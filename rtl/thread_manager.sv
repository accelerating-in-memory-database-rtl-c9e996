// thread_manager: creates threads, arbitrates jobs and talks to memory.
//
// A thread is one row; each column a thread reads is one job. After `start`
// the manager first requests the `num_pcb` PCB records (tags 0..num_pcb-1),
// then creates one new job per row of its range [first_row, first_row +
// row_count), fetching `start_col` and applying PCB offset 0. The processing
// unit hands back write jobs (qualified row ids) and recycled jobs (the next
// column of a live thread) into two queues here. Each cycle the priority
// encoder picks one job, write before recycled before new, and the manager
// turns it into a memory request:
//   write:    8-byte write of the row id to out_base + 8 * (writes so far)
//   read:     8-byte read of the column, tagged with the row id; the PCB
//             offset to apply goes into the state FIFO at the same time.
// Memory returns reads in request order, so the head of the response FIFO and
// the head of the state FIFO always belong to the same read; together they
// form the job offered to the processing unit (`pu_*`).
//
// Back-pressure: every queue raises a stall when nearly full; the request
// queue stalls all job issue, the state queue stalls reads, and a memory
// channel stall (`mem_req_stall`) holds the request queue. The state FIFO
// bounds the reads in flight, and because the response FIFO is as deep, a
// response always finds room. New threads are admitted only while fewer than
// MAX_THREADS threads are alive, which keeps the recycled and write queues
// from overflowing and so rules out a deadlock between them and the state
// queue. Queue size 512 and the priority order are the document's; the
// thread limit, the address formulas and the out[] layout are this design's.
module thread_manager
  import mtp_pkg::*;
#(
  parameter int unsigned QDEPTH      = 512,
  parameter int unsigned MAX_THREADS = 512,
  parameter int unsigned AF_MARGIN   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // control
  input  logic             start,
  input  mtp_cfg_t         cfg,
  input  logic [ROW_W-1:0] first_row,
  input  logic [ROW_W-1:0] row_count,
  input  logic [ADDR_W-1:0] out_base,
  output logic             idle,
  // jobs back from the processing unit
  input  logic             wr_push,
  input  logic [ROW_W-1:0] wr_row,
  input  logic             rc_push,
  input  rc_job_t          rc_job,
  input  logic             term,
  output logic             pu_stall,
  // jobs to the processing unit
  output logic             pu_valid,
  output logic [ROW_W-1:0] pu_row,
  output logic [DATA_W-1:0] pu_value,
  output state_t           pu_state,
  input  logic             pu_ready,
  // memory channel
  output logic             mem_req_valid,
  output mem_req_t         mem_req,
  input  logic             mem_req_stall,
  input  logic             mem_rsp_valid,
  input  mem_rsp_t         mem_rsp,
  // statistics
  output logic [31:0]      cnt_reads,
  output logic [31:0]      cnt_writes,
  output logic [31:0]      cnt_recycled,
  output logic [31:0]      cnt_stall,
  output logic [31:0]      cnt_thread_limit
);
  localparam int unsigned CW = $clog2(QDEPTH + 1);

  // ---------------- queues ----------------
  logic     req_push, req_pop, req_empty, req_full, req_af;
  mem_req_t req_din, req_dout;
  logic [CW-1:0] req_cnt;

  logic     st_push, st_pop, st_empty, st_full, st_af;
  state_t   st_din, st_dout;
  logic [CW-1:0] st_cnt;

  logic     rsp_pop, rsp_empty, rsp_full, rsp_af;
  mem_rsp_t rsp_dout;
  logic [CW-1:0] rsp_cnt;

  logic     rc_pop, rc_empty, rc_full, rc_af;
  rc_job_t  rc_dout;
  logic [CW-1:0] rc_cnt;

  logic     wq_pop, wq_empty, wq_full, wq_af;
  logic [ROW_W-1:0] wq_dout;
  logic [CW-1:0] wq_cnt;

  sync_fifo #(.WIDTH($bits(mem_req_t)), .DEPTH(QDEPTH), .AF_MARGIN(AF_MARGIN)) u_req_q (
    .clk, .rst_n, .push(req_push), .din(req_din), .pop(req_pop), .dout(req_dout),
    .empty(req_empty), .full(req_full), .almost_full(req_af), .count(req_cnt));

  sync_fifo #(.WIDTH($bits(state_t)), .DEPTH(QDEPTH), .AF_MARGIN(AF_MARGIN)) u_state_q (
    .clk, .rst_n, .push(st_push), .din(st_din), .pop(st_pop), .dout(st_dout),
    .empty(st_empty), .full(st_full), .almost_full(st_af), .count(st_cnt));

  sync_fifo #(.WIDTH($bits(mem_rsp_t)), .DEPTH(QDEPTH), .AF_MARGIN(AF_MARGIN)) u_rsp_q (
    .clk, .rst_n, .push(mem_rsp_valid), .din(mem_rsp), .pop(rsp_pop), .dout(rsp_dout),
    .empty(rsp_empty), .full(rsp_full), .almost_full(rsp_af), .count(rsp_cnt));

  sync_fifo #(.WIDTH($bits(rc_job_t)), .DEPTH(QDEPTH), .AF_MARGIN(AF_MARGIN)) u_recycle_q (
    .clk, .rst_n, .push(rc_push), .din(rc_job), .pop(rc_pop), .dout(rc_dout),
    .empty(rc_empty), .full(rc_full), .almost_full(rc_af), .count(rc_cnt));

  sync_fifo #(.WIDTH(ROW_W), .DEPTH(QDEPTH), .AF_MARGIN(AF_MARGIN)) u_write_q (
    .clk, .rst_n, .push(wr_push), .din(wr_row), .pop(wq_pop), .dout(wq_dout),
    .empty(wq_empty), .full(wq_full), .almost_full(wq_af), .count(wq_cnt));

  // ---------------- thread bookkeeping ----------------
  logic [7:0]       load_left;      // PCB records still to request
  logic [7:0]       load_idx;
  logic [ROW_W-1:0] next_row;       // next row to start as a thread
  logic [ROW_W-1:0] rows_left;
  logic [ROW_W-1:0] out_idx;        // row ids written so far
  logic [$clog2(MAX_THREADS+1)-1:0] alive;

  logic can_issue, can_read;
  logic req_w, req_r, req_n, gnt_w, gnt_r, gnt_n;
  logic issue_load;

  assign can_issue  = !req_af;
  assign can_read   = can_issue && !st_af;
  assign issue_load = can_read && (load_left != 0);

  assign req_w = !wq_empty && can_issue && (load_left == 0);
  assign req_r = !rc_empty && can_read && (load_left == 0);
  assign req_n = (rows_left != 0) && can_read && (load_left == 0) &&
                 (alive < ($clog2(MAX_THREADS+1))'(MAX_THREADS));

  priority_encoder u_prio (
    .req_write(req_w), .req_recycled(req_r), .req_new(req_n),
    .gnt_write(gnt_w), .gnt_recycled(gnt_r), .gnt_new(gnt_n));

  assign wq_pop = gnt_w;
  assign rc_pop = gnt_r;

  always_comb begin
    req_push = issue_load || gnt_w || gnt_r || gnt_n;
    st_push  = issue_load || gnt_r || gnt_n;
    req_din  = '0;
    st_din   = '0;
    if (issue_load) begin
      req_din.addr = cfg.pcb_base + (ADDR_W'(load_idx) << 3);
      req_din.tag  = TAG_W'(load_idx);
      st_din       = '{is_load: 1'b1, pcb: load_idx[PCB_AW-1:0]};
    end else if (gnt_w) begin
      req_din.write = 1'b1;
      req_din.addr  = out_base + (ADDR_W'(out_idx) << 3);
      req_din.wdata = DATA_W'(wq_dout);
      req_din.tag   = TAG_W'(wq_dout);
    end else if (gnt_r) begin
      req_din.addr = col_addr(cfg, rc_dout.row, rc_dout.col);
      req_din.tag  = TAG_W'(rc_dout.row);
      st_din       = '{is_load: 1'b0, pcb: rc_dout.pcb};
    end else begin
      req_din.addr = col_addr(cfg, next_row, cfg.start_col);
      req_din.tag  = TAG_W'(next_row);
      st_din       = '{is_load: 1'b0, pcb: '0};
    end
  end

  // memory side of the request queue
  assign mem_req_valid = !req_empty && !mem_req_stall;
  assign mem_req       = req_dout;
  assign req_pop       = mem_req_valid;

  // processing-unit side: head response paired with head state
  assign pu_valid = !rsp_empty && !st_empty;
  assign pu_row   = ROW_W'(rsp_dout.tag);
  assign pu_value = rsp_dout.data;
  assign pu_state = st_dout;
  assign rsp_pop  = pu_valid && pu_ready;
  assign st_pop   = rsp_pop;
  assign pu_stall = rc_af || wq_af;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_left        <= '0;
      load_idx         <= '0;
      next_row         <= '0;
      rows_left        <= '0;
      out_idx          <= '0;
      alive            <= '0;
      cnt_reads        <= '0;
      cnt_writes       <= '0;
      cnt_recycled     <= '0;
      cnt_stall        <= '0;
      cnt_thread_limit <= '0;
    end else if (start) begin
      load_left        <= cfg.num_pcb;
      load_idx         <= '0;
      next_row         <= first_row;
      rows_left        <= row_count;
      out_idx          <= '0;
      alive            <= '0;
      cnt_reads        <= '0;
      cnt_writes       <= '0;
      cnt_recycled     <= '0;
      cnt_stall        <= '0;
      cnt_thread_limit <= '0;
    end else begin
      if (issue_load) begin
        load_left <= load_left - 1'b1;
        load_idx  <= load_idx + 1'b1;
      end
      if (gnt_n) begin
        next_row  <= next_row + 1'b1;
        rows_left <= rows_left - 1'b1;
      end
      if (gnt_w) out_idx <= out_idx + 1'b1;
      // a thread is alive from its new job until it is written back or ends
      alive <= alive + ($bits(alive))'(gnt_n) - ($bits(alive))'(gnt_w) - ($bits(alive))'(term);
      if (gnt_r || gnt_n) cnt_reads <= cnt_reads + 1'b1;
      if (gnt_w)          cnt_writes <= cnt_writes + 1'b1;
      if (gnt_r)          cnt_recycled <= cnt_recycled + 1'b1;
      // a job was waiting but back-pressure held it
      if ((!wq_empty || !rc_empty || rows_left != 0 || load_left != 0) && !req_push)
        cnt_stall <= cnt_stall + 1'b1;
      if (rows_left != 0 && can_read && load_left == 0 && wq_empty && rc_empty && !req_n)
        cnt_thread_limit <= cnt_thread_limit + 1'b1;
    end
  end

  assign idle = (load_left == 0) && (rows_left == 0) && (alive == 0) &&
                wq_empty && rc_empty && req_empty && st_empty && rsp_empty;

  // Responses can never outnumber the reads recorded in the state queue.
  a_rsp_room:   assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid |-> !rsp_full);
  a_rc_room:    assert property (@(posedge clk) disable iff (!rst_n) rc_push |-> !rc_full);
  a_wr_room:    assert property (@(posedge clk) disable iff (!rst_n) wr_push |-> !wq_full);
  a_rsp_le_st:  assert property (@(posedge clk) disable iff (!rst_n) rsp_cnt <= st_cnt);

endmodule
