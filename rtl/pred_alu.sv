// pred_alu: the predicate comparator of the processing unit.
//
// Compares a 64-bit column value with the 32-bit constant of a PCB record
// under one of the six operators the document lists (=, <>, <, >, <=, >=).
// Purely combinational; the processing unit registers its result. The
// document fixes the operators and the 4-byte constant. Comparing as signed
// two's-complement numbers, with the constant sign-extended to 64 bits, is
// this design's choice; an operator code outside the six gives false.
module pred_alu
  import mtp_pkg::*;
(
  input  logic [OP_W-1:0]    op,
  input  logic [CONST_W-1:0] constant,
  input  logic [DATA_W-1:0]  value,
  output logic               result,
  output logic               op_valid
);
  logic signed [DATA_W-1:0] a, b;

  always_comb begin
    a        = signed'(value);
    b        = DATA_W'(signed'(constant));
    op_valid = 1'b1;
    unique case (op)
      OP_EQ:   result = (a == b);
      OP_NE:   result = (a != b);
      OP_LT:   result = (a <  b);
      OP_GT:   result = (a >  b);
      OP_LE:   result = (a <= b);
      OP_GE:   result = (a >= b);
      default: begin result = 1'b0; op_valid = 1'b0; end
    endcase
  end
endmodule
