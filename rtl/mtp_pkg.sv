// mtp_pkg: types and constants shared by the multithreaded selection engine.
//
// A query is held as a Predicate Control Block (PCB): one 64-bit record per
// predicate. The record carries a 4-bit comparison operator, a 32-bit
// constant, the column to fetch next when the predicate is true and when it
// is false (7 bits each, 128 columns), and 14 bits of metadata holding the
// PCB offsets (BRAM addresses) of the next predicate on true and on false.
// The field widths and their order are the document's; placing the operator
// in the top bits, splitting the metadata into two 7-bit offsets and coding
// the "TRUE" and "FALSE" outcomes as the offsets 127 and 126 are this
// design's choices. A query may therefore have up to 126 predicates.
//
// Memory traffic uses one request and one response record per channel. A
// request is an 8-byte read or write with a 32-bit tag; a read returns its
// tag with the data, in request order.
package mtp_pkg;

  localparam int unsigned ADDR_W  = 48;   // virtual address width of a channel
  localparam int unsigned DATA_W  = 64;   // one column value / one memory word
  localparam int unsigned ROW_W   = 32;   // row (thread) identifier
  localparam int unsigned COL_W   = 7;    // column index: 128 columns
  localparam int unsigned PCB_AW  = 7;    // PCB offset: 128 records
  localparam int unsigned CONST_W = 32;   // predicate constant
  localparam int unsigned OP_W    = 4;    // operator code
  localparam int unsigned TAG_W   = 32;   // memory request tag

  // Terminal PCB offsets: the thread ends instead of fetching another column.
  localparam logic [PCB_AW-1:0] PCB_TRUE  = 7'h7F;  // row qualifies: write its id
  localparam logic [PCB_AW-1:0] PCB_FALSE = 7'h7E;  // row fails: thread ends

  typedef enum logic [OP_W-1:0] {
    OP_EQ = 4'd0,   // =
    OP_NE = 4'd1,   // <>
    OP_LT = 4'd2,   // <
    OP_GT = 4'd3,   // >
    OP_LE = 4'd4,   // <=
    OP_GE = 4'd5    // >=
  } pred_op_e;

  // One 64-bit PCB record. Bits 63:60 op, 59:28 constant, 27:21 col_true,
  // 20:14 col_false, 13:7 pcb_true, 6:0 pcb_false.
  typedef struct packed {
    logic [OP_W-1:0]    op;
    logic [CONST_W-1:0] constant;
    logic [COL_W-1:0]   col_true;
    logic [COL_W-1:0]   col_false;
    logic [PCB_AW-1:0]  pcb_true;
    logic [PCB_AW-1:0]  pcb_false;
  } pcb_rec_t;

  // A recycled job: the row, the column to fetch and the predicate to apply.
  typedef struct packed {
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic [PCB_AW-1:0] pcb;
  } rc_job_t;

  // Per-read thread state kept in the state FIFO while the read is in flight.
  typedef struct packed {
    logic              is_load;   // response is a PCB record, not a column value
    logic [PCB_AW-1:0] pcb;       // PCB offset to apply, or PCB slot to fill
  } state_t;

  typedef struct packed {
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic [TAG_W-1:0]  tag;
  } mem_req_t;

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [DATA_W-1:0] data;
  } mem_rsp_t;

  // Registers programmed by the host when a query is dispatched.
  typedef struct packed {
    logic [ADDR_W-1:0] table_base;   // start of the relation
    logic [ADDR_W-1:0] out_base;     // start of the out[] array of row ids
    logic [ADDR_W-1:0] pcb_base;     // start of the PCB
    logic [ROW_W-1:0]  num_tuples;   // rows in the relation
    logic [7:0]        row_size;     // columns per row (row-major stride)
    logic [COL_W-1:0]  start_col;    // column of the first predicate
    logic [7:0]        num_pcb;      // PCB records to load (1..126)
    logic              col_major;    // 0: row-major layout, 1: column-major
  } mtp_cfg_t;

  // Per-engine event counters.
  typedef struct packed {
    logic [31:0] reads;          // memory fetches of column values
    logic [31:0] evals;          // predicates evaluated
    logic [31:0] writes;         // row ids written back
    logic [31:0] recycled;       // recycled jobs issued
    logic [31:0] stall_cycles;   // cycles a ready job waited on back-pressure
    logic [31:0] thread_limit;   // cycles a new job waited on the thread limit
  } eng_stats_t;

  // Word address of column `col` of row `row`.
  function automatic logic [ADDR_W-1:0] col_addr(mtp_cfg_t cfg, logic [ROW_W-1:0] row,
                                                 logic [COL_W-1:0] col);
    logic [ADDR_W-1:0] idx;
    if (cfg.col_major)
      idx = ADDR_W'(col) * ADDR_W'(cfg.num_tuples) + ADDR_W'(row);
    else
      idx = ADDR_W'(row) * ADDR_W'(cfg.row_size) + ADDR_W'(col);
    return cfg.table_base + (idx << 3);
  endfunction

endpackage
