// sync_fifo: single-clock first-in first-out queue with an almost-full flag.
//
// Every queue of a selection engine (memory requests, thread state, memory
// responses, recycled jobs, write jobs) is one of these. The head entry is
// visible on `dout` whenever `empty` is low (show-ahead); `pop` removes it.
// `almost_full` rises when fewer than AF_MARGIN free slots remain: it is the
// stall signal that producers with a pipeline behind them obey, so that the
// entries already in flight still find room. The 512-entry default depth is
// the document's queue size; the margin and the show-ahead read are this
// design's choices. Push and pop may happen in the same cycle.
module sync_fifo #(
  parameter int unsigned WIDTH     = 64,
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned AF_MARGIN = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      push,
  input  logic [WIDTH-1:0]          din,
  input  logic                      pop,
  output logic [WIDTH-1:0]          dout,
  output logic                      empty,
  output logic                      full,
  output logic                      almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  function automatic logic [AW-1:0] ptr_inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty       = (count == 0);
  assign full        = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign almost_full = (count >= ($clog2(DEPTH+1))'(DEPTH - AF_MARGIN));
  assign dout        = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full)  wr_ptr <= ptr_inc(wr_ptr);
      if (pop && !empty)  rd_ptr <= ptr_inc(rd_ptr);
      count <= count + (($clog2(DEPTH+1))'(push && !full)) - (($clog2(DEPTH+1))'(pop && !empty));
    end
  end

  // A push into a full queue or a pop from an empty one loses or invents data.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
