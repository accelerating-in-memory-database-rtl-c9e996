// pcb_bram: on-chip store of the Predicate Control Block.
//
// Holds one 64-bit record per predicate, addressed by PCB offset. Records are
// written one per cycle as they return from memory at the start of a query;
// the processing unit reads one record per cycle. The read is synchronous:
// `rdata` shows the record addressed on the previous rising edge, as a block
// RAM does. A write and a read of the same offset in one cycle return the
// old record. The document keeps the PCB in BRAM; the depth follows from the
// 7-bit offsets of its record format, and the port timing is this design's.
module pcb_bram
  import mtp_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  pcb_rec_t                 wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output pcb_rec_t                 rdata
);
  pcb_rec_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
