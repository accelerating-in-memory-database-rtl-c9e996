// mem_channel_model: behavioural model of one in-order memory channel.
//
// Stands in for a memory controller, crossbar port and DRAM: a read accepted
// at cycle t returns its tag and data (tb_pkg::mem_read) no earlier than
// cycle t + LATENCY + tb_pkg::extra_latency + a random jitter of at most
// JITTER cycles, and never before an
// earlier read. At most MAX_OUT reads are in flight; past that, and at
// random on STALL_PCT + tb_pkg::extra_stall percent of cycles, `req_stall` is high. Writes are
// reported on the wr_* outputs in the cycle they are accepted and return no
// response. Not synthesizable.
module mem_channel_model
  import mtp_pkg::*;
#(
  parameter int unsigned LATENCY   = 100,
  parameter int unsigned JITTER    = 8,
  parameter int unsigned STALL_PCT = 0,
  parameter int unsigned MAX_OUT   = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  mem_req_t          req,
  output logic              req_stall,
  output logic              rsp_valid,
  output mem_rsp_t          rsp,
  output logic              wr_valid,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data
);
  typedef struct {
    longint   due;
    mem_rsp_t r;
  } pend_t;

  pend_t  q[$];
  longint now;
  longint last_due;
  int unsigned n_stall;

  assign wr_valid = req_valid && req.write;
  assign wr_addr  = req.addr;
  assign wr_data  = req.wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now       <= 0;
      last_due  <= 0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      req_stall <= 1'b0;
      n_stall   <= 0;
      q.delete();
    end else begin
      automatic longint due;
      now <= now + 1;
      if (req_valid && !req.write) begin
        due = now + longint'(LATENCY) + longint'(tb_pkg::extra_latency) +
              longint'($urandom % (JITTER + 1));
        if (due <= last_due) due = last_due + 1;
        last_due <= due;
        q.push_back('{due: due, r: '{tag: req.tag, data: tb_pkg::mem_read(req.addr)}});
      end
      rsp_valid <= 1'b0;
      if (q.size() > 0 && q[0].due <= now) begin
        rsp_valid <= 1'b1;
        rsp       <= q[0].r;
        void'(q.pop_front());
      end
      req_stall <= (q.size() + 1 >= MAX_OUT) || (($urandom % 100) < STALL_PCT + tb_pkg::extra_stall);
      if (req_stall) n_stall <= n_stall + 1;
    end
  end

  a_no_req_in_stall: assert property (@(posedge clk) disable iff (!rst_n) req_stall |-> !req_valid);
endmodule
