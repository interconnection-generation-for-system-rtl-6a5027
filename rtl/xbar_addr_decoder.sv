// Address decoder of one master.
//
// The network decodes every master address to exactly one slave. The
// address space is cut into equal regions of 2**REGION_BITS bytes; region s
// belongs to slave s. An address is routed to slave s only if region s
// exists (s < NS) and the connection matrix CONNECT says that this master
// is wired to slave s (bit s of CONNECT). Anything else is routed to the
// internal error responder, which is output bit NS. The region layout and
// the error route are this design's choice; the connection matrix follows
// the generator parameter that says which masters are connected to which
// slaves.
//
// Combinational. sel_o is one-hot over NS+1 targets.
module xbar_addr_decoder #(
  parameter int unsigned NS          = 5,
  parameter int unsigned AW          = 32,
  parameter int unsigned REGION_BITS = 16,
  parameter logic [NS-1:0] CONNECT   = '1
) (
  input  logic [AW-1:0] addr_i,
  output logic [NS:0]   sel_o,
  output logic          hit_o
);

  logic [AW-1:0] region;

  assign region = addr_i >> REGION_BITS;

  always_comb begin
    sel_o = '0;
    hit_o = 1'b0;
    for (int unsigned s = 0; s < NS; s++) begin
      if (region == AW'(s) && CONNECT[s]) begin
        sel_o[s] = 1'b1;
        hit_o    = 1'b1;
      end
    end
    sel_o[NS] = ~hit_o;
  end

endmodule
