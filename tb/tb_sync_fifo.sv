// tb_sync_fifo: random push/pop traffic against a queue model.
//
// A 16-entry FIFO with a margin of 3 is driven with random pushes and pops
// (never pushing when full or popping when empty). Each cycle the head
// entry, empty, full, almost-full and count are compared with a SystemVerilog
// queue that mirrors the expected contents. A second phase fills the FIFO to
// the top to check full and almost-full at their exact thresholds.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 16, D = 16, M = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full, af;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D), .AF_MARGIN(M)) dut (
    .clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .almost_full(af), .count);

  task automatic check_state();
    checks++;
    if (empty != (model.size() == 0) || full != (model.size() == D) ||
        af != (model.size() >= D - M) || int'(count) != model.size() ||
        (model.size() > 0 && dout != model[0])) begin
      failures++;
      if (failures < 10)
        $display("FAIL size=%0d empty=%0d full=%0d af=%0d count=%0d dout=%h exp=%h",
                 model.size(), empty, full, af, count, dout, model.size() ? model[0] : '0);
    end
  endtask

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      check_state();
      push = ($urandom % 100) < (i < 1500 ? 60 : 40) && model.size() < D;
      pop  = ($urandom % 100) < 50 && model.size() > 0;
      din  = W'($urandom);
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
      @(negedge clk);
    end
    pop = 0;
    while (model.size() < D) begin
      push = 1; din = W'($urandom);
      @(posedge clk); model.push_back(din); @(negedge clk);
      check_state();
    end
    push = 0;
    while (model.size() > 0) begin
      pop = 1;
      @(posedge clk); void'(model.pop_front()); @(negedge clk);
      check_state();
    end
    pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
