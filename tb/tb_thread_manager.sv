// tb_thread_manager: the thread manager against a memory model and a
// scripted processing unit.
//
// The testbench plays the processing unit: for each job offered it checks
// that the value is the one stored at the address of the row and column the
// job stands for, then decides by the value: write the row back, end the
// thread, or recycle it to the next column (the column travels in the PCB
// offset field, so the check knows which column each read was for). It
// checks that PCB loads come first with the right addresses and tags, that
// every read address follows the row-major or column-major formula, that
// write jobs always win over recycled and new jobs, that write-backs go to
// consecutive out[] slots, that every row ends exactly once and that the
// manager reports idle at the end. A small thread limit and random stalls
// from the processing unit exercise the back-pressure paths.
`timescale 1ns/1ps
module tb_thread_manager;
  import mtp_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, idle;
  mtp_cfg_t cfg;
  logic [ROW_W-1:0] first_row, row_count;
  logic [ADDR_W-1:0] out_base;
  logic wr_push, rc_push, term, pu_stall, pu_valid, pu_ready;
  logic [ROW_W-1:0] wr_row, pu_row;
  rc_job_t rc_job;
  logic [DATA_W-1:0] pu_value;
  state_t pu_state;
  logic mrv, mrs, msv, wv;
  mem_req_t mr;
  mem_rsp_t ms;
  logic [ADDR_W-1:0] wa;
  logic [DATA_W-1:0] wd;
  logic [31:0] c_reads, c_writes, c_rec, c_stall, c_lim;
  logic tb_stall;

  thread_manager #(.QDEPTH(32), .MAX_THREADS(20), .AF_MARGIN(6)) dut (
    .clk, .rst_n, .start, .cfg, .first_row, .row_count, .out_base, .idle,
    .wr_push, .wr_row, .rc_push, .rc_job, .term, .pu_stall,
    .pu_valid, .pu_row, .pu_value, .pu_state, .pu_ready,
    .mem_req_valid(mrv), .mem_req(mr), .mem_req_stall(mrs), .mem_rsp_valid(msv), .mem_rsp(ms),
    .cnt_reads(c_reads), .cnt_writes(c_writes), .cnt_recycled(c_rec), .cnt_stall(c_stall),
    .cnt_thread_limit(c_lim));

  mem_channel_model #(.LATENCY(30), .JITTER(10), .STALL_PCT(15), .MAX_OUT(64)) u_mem (
    .clk, .rst_n, .req_valid(mrv), .req(mr), .req_stall(mrs), .rsp_valid(msv), .rsp(ms),
    .wr_valid(wv), .wr_addr(wa), .wr_data(wd));

  assign pu_ready = !pu_stall && !tb_stall;

  // scripted processing unit: decision registered one cycle after the pop
  int ended [int];
  int n_loads = 0, n_out = 0, n_prio = 0;
  always @(posedge clk) begin
    wr_push <= 0; rc_push <= 0; term <= 0;
    tb_stall <= ($urandom % 100) < 10;
    if (rst_n && pu_valid && pu_ready) begin
      checks++;
      if (pu_state.is_load) begin
        if (pu_value != pcb_mem[pu_state.pcb] || pu_row != ROW_W'(pu_state.pcb)) begin
          failures++; $display("FAIL load response %0d", pu_state.pcb);
        end
        n_loads++;
      end else begin
        int col, r;
        col = int'(pu_state.pcb);            // the column this read was for
        r   = int'(pu_row);
        if (col == 0) col = int'(cfg.start_col);
        if (pu_value != hash_val(ref_addr(cfg, r, col))) begin
          failures++; $display("FAIL value row %0d col %0d", r, col);
        end
        if (pu_value % 3 == 0 || col >= 6) begin
          wr_push <= 1; wr_row <= pu_row;
        end else if (pu_value % 3 == 1) begin
          term <= 1; ended[r] = ended.exists(r) ? ended[r] + 1 : 1;
        end else begin
          rc_push <= 1; rc_job <= '{row: pu_row, col: 7'(col + 1), pcb: 7'(col + 1)};
        end
      end
    end
    // a queued write job must win the slot over recycled and new jobs
    if (rst_n && !dut.wq_empty && !dut.req_af && dut.load_left == 0) begin
      checks++; n_prio++;
      if (!(dut.req_push && dut.req_din.write)) begin failures++; $display("FAIL write priority"); end
    end
    // every read address follows the layout formula
    if (rst_n && mrv && !mr.write && mr.addr >= cfg.table_base && mr.addr < cfg.out_base) begin
      int r, col;
      r = int'(mr.tag);
      checks++;
      col = -1;
      for (int c = 0; c < 8; c++) if (ref_addr(cfg, r, c) == mr.addr) col = c;
      if (col < 0) begin failures++; $display("FAIL address %h for row %0d", mr.addr, r); end
    end
    if (rst_n && wv) begin
      checks++;
      if (wa != out_base + ADDR_W'(n_out) * 8) begin failures++; $display("FAIL out slot"); end
      ended[int'(wd)] = ended.exists(int'(wd)) ? ended[int'(wd)] + 1 : 1;
      n_out++;
    end
  end

  task automatic run(int rows, int first, bit colmaj);
    ended.delete(); n_out = 0; n_loads = 0;
    cfg.col_major = colmaj;
    first_row = ROW_W'(first); row_count = ROW_W'(rows);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    @(negedge clk);
    while (!idle) @(negedge clk);
    repeat (3) @(negedge clk);
    checks += 2;
    if (n_loads != n_pred) begin failures++; $display("FAIL %0d loads", n_loads); end
    if (c_writes != 32'(n_out)) begin failures++; $display("FAIL write count"); end
    for (int r = first; r < first + rows; r++) begin
      checks++;
      if (!ended.exists(r) || ended[r] != 1) begin failures++; $display("FAIL row %0d ended %0d times", r, ended.exists(r) ? ended[r] : 0); end
    end
    $display("run rows=%0d colmajor=%0d writes=%0d reads=%0d recycled=%0d stall=%0d limit=%0d",
             rows, colmaj, c_writes, c_reads, c_rec, c_stall, c_lim);
  endtask

  initial begin
    start = 0; tb_stall = 0; wr_push = 0; rc_push = 0; term = 0; wr_row = 0; rc_job = '0;
    cfg = default_cfg(600);
    out_base = cfg.out_base;
    clear_query();
    add_pred(0, 0, OP_LT, 50); add_pred(0, 1, OP_LT, 50); add_pred(0, 2, OP_LT, 50);
    build_query(cfg);
    cfg.start_col = 7'd0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(400, 50, 0);
    checks++;
    if (c_lim == 0 || c_stall == 0) begin failures++; $display("FAIL limit/stall not exercised"); end
    run(300, 0, 1);
    checks++;
    if (n_prio == 0) begin failures++; $display("FAIL priority never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
