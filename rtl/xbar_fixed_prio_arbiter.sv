// Fixed-priority arbiter.
//
// One of these sits in front of every slave. Each master carries an
// identification number that is also its priority; here the master index
// is that number and the lowest index wins (the direction of the priority
// order is this design's choice). The arbiter is purely combinational: the
// grant is one-hot and is all zeros when nothing is requested. The slave
// port registers the winner, so the arbitration decision is taken in the
// same cycle the request appears.
//
// Ports: req_i[m] = master m requests, gnt_o[m] = master m wins.
module xbar_fixed_prio_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] req_i,
  output logic [N-1:0] gnt_o
);

  // Isolate the lowest set bit: req & ~(req - 1).
  assign gnt_o = req_i & ~(req_i - N'(1));

endmodule
