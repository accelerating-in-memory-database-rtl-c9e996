// job_generator: decides what a thread does after one predicate.
//
// Given the ALU outcome and the PCB record that was applied, it picks the
// true or false branch of the record: the next PCB offset and the next
// column. A next offset of PCB_TRUE makes a write job (the row qualifies and
// its id is written back), PCB_FALSE ends the thread, and any other offset
// makes a recycled job <row, column, offset> for the thread manager. The
// three outcomes are the document's; their coding as offsets is this
// design's. Outputs are registered: one cycle from `in_valid` to the job.
// `term` pulses when a thread ends without qualifying.
module job_generator
  import mtp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [ROW_W-1:0] in_row,
  input  logic             in_result,
  input  pcb_rec_t         in_rec,
  output logic             wr_valid,
  output logic [ROW_W-1:0] wr_row,
  output logic             rc_valid,
  output rc_job_t          rc_job,
  output logic             term
);
  logic [PCB_AW-1:0] next_pcb;
  logic [COL_W-1:0]  next_col;

  always_comb begin
    next_pcb = in_result ? in_rec.pcb_true : in_rec.pcb_false;
    next_col = in_result ? in_rec.col_true : in_rec.col_false;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_valid <= 1'b0;
      rc_valid <= 1'b0;
      term     <= 1'b0;
      wr_row   <= '0;
      rc_job   <= '0;
    end else begin
      wr_valid <= in_valid && (next_pcb == PCB_TRUE);
      term     <= in_valid && (next_pcb == PCB_FALSE);
      rc_valid <= in_valid && (next_pcb != PCB_TRUE) && (next_pcb != PCB_FALSE);
      wr_row   <= in_row;
      rc_job   <= '{row: in_row, col: next_col, pcb: next_pcb};
    end
  end

  a_one_outcome: assert property (@(posedge clk) disable iff (!rst_n)
                                  $onehot0({wr_valid, rc_valid, term}));
endmodule
