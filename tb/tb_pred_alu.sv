// tb_pred_alu: exhaustive operator check of the predicate comparator.
//
// For every operator code 0..15 and a set of values around the constant
// (equal, one above, one below, negative, large), compares the result with
// a reference written with SystemVerilog's own signed comparisons. Codes 6..15
// must give false with op_valid low.
`timescale 1ns/1ps
module tb_pred_alu;
  import mtp_pkg::*;
  logic [3:0]  op;
  logic [31:0] k;
  logic [63:0] v;
  logic        result, op_valid;
  int checks = 0, failures = 0;

  pred_alu dut (.op, .constant(k), .value(v), .result, .op_valid);

  function automatic bit expect_r(int o, longint a, longint b);
    case (o)
      0: return a == b;
      1: return a != b;
      2: return a < b;
      3: return a > b;
      4: return a <= b;
      5: return a >= b;
      default: return 0;
    endcase
  endfunction

  initial begin
    longint consts[5] = '{0, 5, 100, -7, 2147483647};
    longint deltas[6] = '{0, 1, -1, 1000, -1000, 64'h1_0000_0000};
    for (int o = 0; o < 16; o++)
      foreach (consts[c]) foreach (deltas[d]) begin
        op = 4'(o);
        k  = 32'(consts[c]);
        v  = 64'(consts[c] + deltas[d]);
        #1;
        checks++;
        if (result != expect_r(o, consts[c] + deltas[d], consts[c]) || op_valid != (o < 6)) begin
          failures++;
          $display("FAIL op=%0d k=%0d v=%0d result=%0d valid=%0d", o, consts[c], longint'(v), result, op_valid);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
