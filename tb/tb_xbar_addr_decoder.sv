// Test of the address decoder: 5 slaves with 64 KiB regions, slave 3 not
// wired to this master. Every address in a wired region must select that
// slave only; any other address must select the error target (bit 5).
module tb_xbar_addr_decoder;
  localparam int unsigned NS = 5, AW = 32, RB = 16;
  localparam logic [NS-1:0] CONN = 5'b10111;

  int checks = 0, failures = 0;
  logic [AW-1:0] addr;
  logic [NS:0]   sel;
  logic          hit;

  xbar_addr_decoder #(.NS(NS), .AW(AW), .REGION_BITS(RB), .CONNECT(CONN)) u_dut (
    .addr_i (addr), .sel_o (sel), .hit_o (hit)
  );

  task automatic try(input logic [AW-1:0] a);
    logic [NS:0] e;
    int unsigned region;
    addr = a; #1;
    region = a >> RB;
    e = '0;
    if (region < NS && CONN[region]) e[region] = 1'b1;
    else e[NS] = 1'b1;
    checks++;
    if (sel != e || hit != !e[NS]) begin
      failures++;
      $display("FAIL addr=%h sel=%b hit=%b expected %b", a, sel, hit, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      try(AW'(s) << RB);
      try((AW'(s) << RB) | 32'hffff);
    end
    try(32'hffff_ffff);
    try(32'h0100_0000);
    for (int i = 0; i < 2000; i++) try({$urandom_range(2, 0) == 0 ? 16'($urandom) : 16'($urandom_range(6, 0)), 16'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
