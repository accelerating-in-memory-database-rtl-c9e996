// tb_priority_encoder: exhaustive check of the job priority.
//
// All eight request combinations: the grant must be one-hot or empty, follow
// write > recycled > new, and be given only to a requesting source.
`timescale 1ns/1ps
module tb_priority_encoder;
  logic rw, rr, rn, gw, gr, gn;
  int checks = 0, failures = 0;

  priority_encoder dut (.req_write(rw), .req_recycled(rr), .req_new(rn),
                        .gnt_write(gw), .gnt_recycled(gr), .gnt_new(gn));

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic ew, er, en;
      {rw, rr, rn} = 3'(i);
      ew = rw;
      er = rr & ~rw;
      en = rn & ~rw & ~rr;
      #1;
      checks++;
      if ({gw, gr, gn} != {ew, er, en}) begin
        failures++;
        $display("FAIL req=%b grant=%b expected=%b", {rw, rr, rn}, {gw, gr, gn}, {ew, er, en});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
