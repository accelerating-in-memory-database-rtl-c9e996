// row_split: divides a range of rows evenly over PARTS workers.
//
// Worker i gets the rows [first + i*chunk, first + i*chunk + count_i), where
// chunk = ceil(count / PARTS) and count_i is chunk, or whatever is left for
// the last busy workers (possibly 0). The output base of worker i is
// out_base + 8 * (i*chunk) so each worker owns a slice of out[] large enough
// for all of its rows. Combinational. Giving each engine a contiguous block
// of rows and its own slice of out[] is this design's choice: the document
// only says each engine applies the query to a different set of rows.
module row_split
  import mtp_pkg::*;
#(
  parameter int unsigned PARTS = 16
) (
  input  logic [ROW_W-1:0]  first,
  input  logic [ROW_W-1:0]  count,
  input  logic [ADDR_W-1:0] out_base,
  output logic [ROW_W-1:0]  part_first [PARTS],
  output logic [ROW_W-1:0]  part_count [PARTS],
  output logic [ADDR_W-1:0] part_out   [PARTS]
);
  logic [ROW_W:0] chunk;

  always_comb begin
    chunk = ({1'b0, count} + (ROW_W+1)'(PARTS - 1)) / (ROW_W+1)'(PARTS);
    for (int unsigned i = 0; i < PARTS; i++) begin
      logic [ROW_W+8:0] off;
      off           = (ROW_W+9)'(i) * (ROW_W+9)'(chunk);
      part_first[i] = first + ROW_W'(off);
      part_out[i]   = out_base + (ADDR_W'(off) << 3);
      if (off >= (ROW_W+9)'(count))
        part_count[i] = '0;
      else if ((ROW_W+9)'(count) - off < (ROW_W+9)'(chunk))
        part_count[i] = ROW_W'((ROW_W+9)'(count) - off);
      else
        part_count[i] = ROW_W'(chunk);
    end
  end
endmodule
