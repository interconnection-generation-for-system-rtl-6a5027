// Exhaustive test of the fixed-priority arbiter for 4 and 10 requesters:
// the grant must be exactly the lowest-indexed request, or nothing.
module tb_xbar_fixed_prio_arbiter;
  int checks = 0, failures = 0;

  logic [3:0] req4, gnt4;
  logic [9:0] req10, gnt10;

  xbar_fixed_prio_arbiter #(.N(4))  u_a4  (.req_i (req4),  .gnt_o (gnt4));
  xbar_fixed_prio_arbiter #(.N(10)) u_a10 (.req_i (req10), .gnt_o (gnt10));

  function automatic logic [9:0] ref_gnt(input logic [9:0] r, input int n);
    for (int i = 0; i < n; i++) if (r[i]) return 10'(1) << i;
    return '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      req4 = 4'(r); #1;
      checks++;
      if (gnt4 != ref_gnt(10'(r), 4)[3:0]) begin
        failures++; $display("FAIL N=4 req=%b gnt=%b", req4, gnt4);
      end
    end
    for (int r = 0; r < 1024; r++) begin
      req10 = 10'(r); #1;
      checks++;
      if (gnt10 != ref_gnt(10'(r), 10)) begin
        failures++; $display("FAIL N=10 req=%b gnt=%b", req10, gnt10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
