// tb_pcb_bram: write/read check of the PCB store.
//
// Fills all 128 records with random values, reads them back in random order
// checking the one-cycle read latency, and checks that a same-cycle write and
// read of one offset returns the old record.
`timescale 1ns/1ps
module tb_pcb_bram;
  import mtp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [6:0] waddr, raddr;
  pcb_rec_t wdata, rdata;
  logic [63:0] model [128];
  int checks = 0, failures = 0;

  pcb_bram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < 128; i++) begin
      we = 1; waddr = 7'(i); wdata = pcb_rec_t'({$urandom, $urandom});
      model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 400; i++) begin
      int a;
      a = $urandom % 128;
      re = 1; raddr = 7'(a);
      @(negedge clk);
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL read %0d", a); end
    end
    // read-during-write returns the old record, the new one a cycle later
    we = 1; re = 1; waddr = 7'd9; raddr = 7'd9; wdata = pcb_rec_t'(64'hDEAD_BEEF_0123_4567);
    @(negedge clk);
    checks++;
    if (rdata != model[9]) begin failures++; $display("FAIL read-during-write"); end
    we = 0;
    @(negedge clk);
    checks++;
    if (rdata != 64'hDEAD_BEEF_0123_4567) begin failures++; $display("FAIL read after write"); end
    // read enable low holds the output
    re = 0; raddr = 7'd3;
    @(negedge clk);
    checks++;
    if (rdata != 64'hDEAD_BEEF_0123_4567) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
