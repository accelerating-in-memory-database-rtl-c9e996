// priority_encoder: job arbiter of the thread manager.
//
// Grants the single memory-request slot of a cycle to one of three job
// sources in the document's fixed priority: write jobs first, then recycled
// jobs, then new jobs. Serving finishing and continuing threads before new
// ones keeps threads draining, so the design cannot fill up with new threads
// and deadlock. A source requests only when it can actually issue (the
// thread manager folds the stall conditions into the request). Combinational.
module priority_encoder (
  input  logic       req_write,
  input  logic       req_recycled,
  input  logic       req_new,
  output logic       gnt_write,
  output logic       gnt_recycled,
  output logic       gnt_new
);
  always_comb begin
    gnt_write    = req_write;
    gnt_recycled = req_recycled && !req_write;
    gnt_new      = req_new && !req_write && !req_recycled;
  end
endmodule
