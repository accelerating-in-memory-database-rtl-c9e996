// tb_job_generator: random outcomes through the job generator.
//
// Drives random rows, ALU results and PCB records whose next offsets are
// sometimes the TRUE or FALSE codes, and checks one cycle later that exactly
// the expected one of write job, recycled job (with the right column and
// offset) or thread end appears, and nothing when the input was not valid.
`timescale 1ns/1ps
module tb_job_generator;
  import mtp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_result, wr_valid, rc_valid, term;
  logic [31:0] in_row, wr_row;
  pcb_rec_t in_rec;
  rc_job_t rc_job;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rc = 0, n_term = 0;

  job_generator dut (.clk, .rst_n, .in_valid, .in_row, .in_result, .in_rec,
                     .wr_valid, .wr_row, .rc_valid, .rc_job, .term);

  function automatic logic [6:0] rand_pcb();
    case ($urandom % 4)
      0: return PCB_TRUE;
      1: return PCB_FALSE;
      default: return 7'($urandom % 126);
    endcase
  endfunction

  initial begin
    in_valid = 0; in_result = 0; in_row = 0; in_rec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      logic [6:0] np, nc;
      in_valid  = ($urandom % 4) != 0;
      in_result = 1'($urandom);
      in_row    = $urandom;
      in_rec    = '{op: 4'($urandom % 6), constant: $urandom, col_true: 7'($urandom),
                    col_false: 7'($urandom), pcb_true: rand_pcb(), pcb_false: rand_pcb()};
      np = in_result ? in_rec.pcb_true : in_rec.pcb_false;
      nc = in_result ? in_rec.col_true : in_rec.col_false;
      @(negedge clk);
      checks++;
      if (!in_valid) begin
        if (wr_valid || rc_valid || term) begin failures++; $display("FAIL output without input"); end
      end else if (np == PCB_TRUE) begin
        n_wr++;
        if (!wr_valid || rc_valid || term || wr_row != in_row) begin failures++; $display("FAIL write job"); end
      end else if (np == PCB_FALSE) begin
        n_term++;
        if (wr_valid || rc_valid || !term) begin failures++; $display("FAIL termination"); end
      end else begin
        n_rc++;
        if (wr_valid || !rc_valid || term || rc_job.row != in_row || rc_job.col != nc || rc_job.pcb != np) begin
          failures++; $display("FAIL recycled job");
        end
      end
    end
    checks++;
    if (n_wr == 0 || n_rc == 0 || n_term == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
