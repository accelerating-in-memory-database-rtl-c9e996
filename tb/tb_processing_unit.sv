// tb_processing_unit: PCB loading and predicate evaluation.
//
// Loads a mixed DNF query (ten predicates in four clauses, all six
// operators) into the unit through PCB-load jobs, then feeds random rows,
// values and PCB offsets, one per cycle, with random back-pressure. The
// expected outcome is derived from the DNF itself: on true continue the
// clause or write the row, on false jump to the next clause or end the
// thread. Each outcome must appear exactly three cycles after the job was
// taken, in order, and `eval` must pulse once per evaluation.
`timescale 1ns/1ps
module tb_processing_unit;
  import mtp_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, stall, wr_valid, rc_valid, term, eval, bad_op;
  logic [ROW_W-1:0] in_row, wr_row;
  logic [DATA_W-1:0] in_value;
  state_t in_state;
  rc_job_t rc_job;

  processing_unit dut (.clk, .rst_n, .in_valid, .in_row, .in_value, .in_state, .in_ready,
                       .stall, .wr_valid, .wr_row, .rc_valid, .rc_job, .term, .eval, .bad_op);

  typedef struct { int kind; int row; int col; int pcb; longint due; } exp_t;  // 0 write 1 rc 2 term
  exp_t expq[$];
  longint cyc = 0;
  int n_kind[3] = '{0, 0, 0};
  int n_eval = 0, n_taken = 0;

  function automatic exp_t expect_for(int row, logic [63:0] v, int i);
    exp_t e;
    e.row = row; e.col = 0; e.pcb = 0;
    if (ref_cmp(p_op[i], v, p_const[i])) begin
      if (i + 1 < n_pred && clause_of[i+1] == clause_of[i]) begin
        e.kind = 1; e.col = p_col[i+1]; e.pcb = i + 1;
      end else e.kind = 0;
    end else begin
      int j;
      j = i + 1;
      while (j < n_pred && clause_of[j] == clause_of[i]) j++;
      if (j < n_pred) begin e.kind = 1; e.col = p_col[j]; e.pcb = j; end
      else e.kind = 2;
    end
    return e;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (eval) n_eval++;
      if (wr_valid || rc_valid || term) begin
        exp_t e;
        checks++;
        if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
        else begin
          e = expq.pop_front();
          if (e.due != cyc ||
              (e.kind == 0 && !(wr_valid && wr_row == ROW_W'(e.row))) ||
              (e.kind == 1 && !(rc_valid && rc_job.row == ROW_W'(e.row) && rc_job.col == 7'(e.col) && rc_job.pcb == 7'(e.pcb))) ||
              (e.kind == 2 && !term)) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d kind %0d due %0d at %0d", e.row, e.kind, e.due, cyc);
          end
          n_kind[e.kind]++;
        end
      end
      if (bad_op) begin failures++; $display("FAIL bad op"); end
    end
  end

  initial begin
    mtp_cfg_t c;
    in_valid = 0; in_row = 0; in_value = 0; in_state = '0; stall = 0;
    c = default_cfg(10);
    clear_query();
    add_pred(0, 3, OP_GT, 20);  add_pred(0, 4, OP_LE, 70);  add_pred(0, 1, OP_NE, 50);
    add_pred(1, 0, OP_EQ, 33);
    add_pred(2, 5, OP_LT, 40);  add_pred(2, 6, OP_GE, 10);
    add_pred(3, 7, OP_GT, -5);  add_pred(3, 2, OP_LT, 90); add_pred(3, 1, OP_GE, 15); add_pred(3, 0, OP_NE, 99);
    build_query(c);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load the PCB
    for (int i = 0; i < n_pred; i++) begin
      in_valid = 1; in_state = '{is_load: 1'b1, pcb: 7'(i)}; in_value = pcb_mem[i]; in_row = ROW_W'(i);
      @(negedge clk);
    end
    // random evaluations
    for (int n = 0; n < 3000; n++) begin
      int i, row;
      logic [63:0] v;
      i = $urandom % n_pred;
      row = $urandom;
      v = ($urandom % 4 == 0) ? 64'(p_const[i]) : 64'($urandom % 120) - 64'd10;
      in_valid = ($urandom % 5) != 0;
      stall    = ($urandom % 6) == 0;
      in_state = '{is_load: 1'b0, pcb: 7'(i)};
      in_value = v; in_row = ROW_W'(row);
      @(posedge clk);
      if (in_valid && in_ready) begin
        exp_t e;
        e = expect_for(row, v, i);
        e.due = cyc + 3;   // cyc here is the cycle the job was taken
        expq.push_back(e);
        n_taken++;
      end
      @(negedge clk);
    end
    in_valid = 0; stall = 0;
    repeat (6) @(negedge clk);
    checks += 3;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    if (n_eval != n_taken) begin failures++; $display("FAIL eval %0d taken %0d", n_eval, n_taken); end
    if (n_kind[0] == 0 || n_kind[1] == 0 || n_kind[2] == 0) begin failures++; $display("FAIL outcome missing"); end
    $display("writes=%0d recycled=%0d ends=%0d", n_kind[0], n_kind[1], n_kind[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
