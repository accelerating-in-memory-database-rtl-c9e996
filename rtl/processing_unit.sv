// processing_unit: evaluates one predicate per cycle for whichever thread is
// at the head of the thread manager's response queue.
//
// Pipeline (one job may enter every cycle):
//   stage 0  take <row, value, state> from the thread manager
//   stage 1  a PCB-load response is written into the PCB BRAM at slot
//            state.pcb; a column value reads PCB record state.pcb
//   stage 2  the ALU compares the value with the record's constant under its
//            operator; the job generator registers the outcome
//   out      write job, recycled job or thread end, three cycles after entry
// Loads and evaluations pass through stage 1 in order, so a record written by
// a load is visible to every later evaluation. Jobs are taken only while the
// thread manager's recycled and write queues are not nearly full (`stall`);
// their almost-full margin covers the three jobs that may be in the
// pipeline. `eval` pulses once per predicate evaluated. The stages follow the
// blocks of the document's processing unit; the cycle split is this design's.
module processing_unit
  import mtp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [ROW_W-1:0]  in_row,
  input  logic [DATA_W-1:0] in_value,
  input  state_t            in_state,
  output logic              in_ready,
  input  logic              stall,
  output logic              wr_valid,
  output logic [ROW_W-1:0]  wr_row,
  output logic              rc_valid,
  output rc_job_t           rc_job,
  output logic              term,
  output logic              eval,
  output logic              bad_op
);
  // stage 1 registers
  logic              s1_valid;
  logic [ROW_W-1:0]  s1_row;
  logic [DATA_W-1:0] s1_value;
  state_t            s1_state;
  // stage 2 registers
  logic              s2_valid;
  logic [ROW_W-1:0]  s2_row;
  logic [DATA_W-1:0] s2_value;
  pcb_rec_t          s2_rec;

  logic alu_result, alu_op_ok;

  assign in_ready = !stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      s1_row   <= '0;
      s1_value <= '0;
      s1_state <= '0;
      s2_row   <= '0;
      s2_value <= '0;
    end else begin
      s1_valid <= in_valid && in_ready;
      s1_row   <= in_row;
      s1_value <= in_value;
      s1_state <= in_state;
      s2_valid <= s1_valid && !s1_state.is_load;
      s2_row   <= s1_row;
      s2_value <= s1_value;
    end
  end

  pcb_bram #(.DEPTH(1 << PCB_AW)) u_pcb (
    .clk,
    .we   (s1_valid && s1_state.is_load),
    .waddr(s1_state.pcb),
    .wdata(pcb_rec_t'(s1_value)),
    .re   (s1_valid && !s1_state.is_load),
    .raddr(s1_state.pcb),
    .rdata(s2_rec));

  pred_alu u_alu (
    .op(s2_rec.op), .constant(s2_rec.constant), .value(s2_value),
    .result(alu_result), .op_valid(alu_op_ok));

  job_generator u_jobgen (
    .clk, .rst_n,
    .in_valid(s2_valid), .in_row(s2_row), .in_result(alu_result), .in_rec(s2_rec),
    .wr_valid, .wr_row, .rc_valid, .rc_job, .term);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eval   <= 1'b0;
      bad_op <= 1'b0;
    end else begin
      eval   <= s2_valid;
      bad_op <= s2_valid && !alu_op_ok;
    end
  end
endmodule
