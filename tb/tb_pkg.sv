// tb_pkg: shared testbench helpers for the selection engine.
//
// Provides the simulated contents of coprocessor memory and a reference
// model of query evaluation that does not use the design's PCB walk:
//  * Column values are a hash of the 8-byte word address, reduced to
//    0..99, so any relation size costs no storage: value(a) =
//    ((a/8) * 0x9E3779B97F4A7C15 >> 32) mod 100.
//  * The PCB region (pcb_base, 128 records) is an array filled by
//    build_query().
//  * A query is a DNF: clauses of predicates "column OP constant". The
//    reference decides a row by short-circuit evaluation of the DNF itself
//    and counts the predicates that evaluation touches.
package tb_pkg;
  import mtp_pkg::*;

  logic [63:0]       pcb_mem [128];
  logic [ADDR_W-1:0] pcb_base_g = 48'h0000_0010_0000;
  int                extra_latency = 0;   // added to every channel's latency
  int                extra_stall   = 0;   // percent added to every channel's stall rate

  // query description
  int          n_pred;
  int          clause_of [128];   // clause index of predicate i
  logic [6:0]  p_col     [128];
  pred_op_e    p_op      [128];
  logic [31:0] p_const   [128];

  function automatic logic [63:0] hash_val(logic [ADDR_W-1:0] addr);
    logic [63:0] x;
    x = 64'(addr >> 3) * 64'h9E3779B97F4A7C15;
    return 64'((x >> 32) % 100);
  endfunction

  function automatic logic [63:0] mem_read(logic [ADDR_W-1:0] addr);
    if (addr >= pcb_base_g && addr < pcb_base_g + 48'd1024)
      return pcb_mem[(addr - pcb_base_g) >> 3];
    return hash_val(addr);
  endfunction

  function automatic logic [ADDR_W-1:0] ref_addr(mtp_cfg_t c, int unsigned row, int unsigned col);
    longint unsigned idx;
    if (c.col_major) idx = longint'(col) * longint'(c.num_tuples) + longint'(row);
    else             idx = longint'(row) * longint'(c.row_size) + longint'(col);
    return c.table_base + ADDR_W'(idx * 8);
  endfunction

  function automatic bit ref_cmp(pred_op_e op, logic [63:0] v, logic [31:0] k);
    longint a, b;
    a = longint'(v);
    b = longint'(int'(k));
    case (op)
      OP_EQ: return a == b;
      OP_NE: return a != b;
      OP_LT: return a <  b;
      OP_GT: return a >  b;
      OP_LE: return a <= b;
      default: return a >= b;
    endcase
  endfunction

  // Clear the query; then add predicates with add_pred(), clause by clause.
  function automatic void clear_query();
    n_pred = 0;
  endfunction

  function automatic void add_pred(int clause, int col, pred_op_e op, int k);
    clause_of[n_pred] = clause;
    p_col[n_pred]     = 7'(col);
    p_op[n_pred]      = op;
    p_const[n_pred]   = 32'(k);
    n_pred++;
  endfunction

  // Translate the DNF into PCB records: on true continue the clause (or
  // qualify after its last predicate); on false jump to the next clause's
  // first predicate (or fail after the last clause).
  function automatic void build_query(ref mtp_cfg_t c);
    for (int i = 0; i < n_pred; i++) begin
      int nxt_clause;
      logic [6:0] ct, cf, pt, pf;
      nxt_clause = -1;
      for (int j = i + 1; j < n_pred; j++)
        if (clause_of[j] != clause_of[i]) begin nxt_clause = j; break; end
      if (i + 1 < n_pred && clause_of[i+1] == clause_of[i]) begin
        pt = 7'(i + 1); ct = p_col[i+1];
      end else begin
        pt = PCB_TRUE; ct = '0;
      end
      if (nxt_clause >= 0) begin
        pf = 7'(nxt_clause); cf = p_col[nxt_clause];
      end else begin
        pf = PCB_FALSE; cf = '0;
      end
      pcb_mem[i] = {4'(p_op[i]), p_const[i], ct, cf, pt, pf};
    end
    c.pcb_base  = pcb_base_g;
    c.num_pcb   = 8'(n_pred);
    c.start_col = p_col[0];
  endfunction

  // Reference decision for one row; `evals` returns predicates touched.
  function automatic bit ref_row(mtp_cfg_t c, int unsigned row, output int evals);
    int i;
    evals = 0;
    i = 0;
    while (i < n_pred) begin
      bit r;
      r = ref_cmp(p_op[i], hash_val(ref_addr(c, row, p_col[i])), p_const[i]);
      evals++;
      if (r) begin
        if (i + 1 < n_pred && clause_of[i+1] == clause_of[i]) i++;
        else return 1'b1;
      end else begin
        int cl;
        cl = clause_of[i];
        while (i < n_pred && clause_of[i] == cl) i++;
      end
    end
    return 1'b0;
  endfunction

  // Default configuration: row-major, 8 columns of 8 bytes per row.
  function automatic mtp_cfg_t default_cfg(int unsigned rows);
    mtp_cfg_t c;
    c            = '0;
    c.table_base = 48'h0000_1000_0000;
    c.out_base   = 48'h0000_8000_0000;
    c.num_tuples = 32'(rows);
    c.row_size   = 8'd8;
    return c;
  endfunction
endpackage
