// Directed test of one slave port with 3 masters.
//  1 masters 1 and 2 request together: master 1 wins, its address ack and
//    the slave's address strobe come one cycle later with master 1's
//    address, mode and burst length.
//  2 during master 1's write burst only its data strobes and data reach the
//    slave, though master 2 drives its own; master 2 is not granted.
//  3 the write acknowledge releases the slave; after one idle cycle master
//    2 is granted.
//  4 master 2's read of 2 words stays connected until the second
//    acknowledge strobe.
//  5 master 0 beats masters 1 and 2 when all three ask.
module tb_xbar_slave_port;
  import xbar_pkg::*;
  localparam int unsigned NM = 3, AW = 32, DW = 32, BLW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NM-1:0]           req, m_mode, m_dstb, ack, conn;
  logic [NM-1:0][BLW-1:0]  m_burst;
  logic [NM-1:0][DW/8-1:0] m_bsel;
  logic [NM-1:0][AW-1:0]   m_addr;
  logic [NM-1:0][DW-1:0]   m_wdata;
  logic                    s_mode, s_astb, s_dstb, s_ack_stb, busy;
  logic [BLW-1:0]          s_burst;
  logic [DW/8-1:0]         s_bsel;
  logic [AW-1:0]           s_addr;
  logic [DW-1:0]           s_wdata;

  xbar_slave_port #(.NM(NM), .AW(AW), .DW(DW), .BLW(BLW)) u_dut (
    .clk_i (clk), .rst_ni (rst_n), .req_i (req), .m_mode_i (m_mode), .m_burst_i (m_burst),
    .m_byte_sel_i (m_bsel), .m_addr_i (m_addr), .m_data_strobe_i (m_dstb), .m_wdata_i (m_wdata),
    .addr_ack_o (ack), .conn_o (conn), .s_mode_o (s_mode), .s_burst_o (s_burst),
    .s_byte_sel_o (s_bsel), .s_addr_strobe_o (s_astb), .s_addr_o (s_addr),
    .s_data_strobe_o (s_dstb), .s_wdata_o (s_wdata), .s_rw_ack_strobe_i (s_ack_stb),
    .busy_o (busy)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; m_mode = '0; m_dstb = '0; m_burst = '0; m_bsel = '0; m_addr = '0;
    m_wdata = '0; s_ack_stb = 1'b0;
    for (int m = 0; m < NM; m++) m_addr[m] = 32'h1000 * (m + 1) + 4;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && ack == '0 && !s_astb, "idle after reset");

    // 1
    req = 3'b110;
    m_mode[1] = MODE_WRITE; m_burst[1] = 4'd2; m_bsel[1] = 4'b0011;
    m_mode[2] = MODE_READ;  m_burst[2] = 4'd1; m_bsel[2] = 4'b1111;
    check(ack == '0, "no acknowledge in the request cycle");
    @(negedge clk);
    check(ack == 3'b010 && conn == 3'b010, "master 1 granted one cycle after request");
    check(s_astb && s_addr == m_addr[1] && s_mode == MODE_WRITE && s_burst == 4'd2 &&
          s_bsel == 4'b0011, "address phase forwarded to the slave");
    check(!s_dstb, "no data strobe in the address cycle");
    req = 3'b100;
    // 2
    for (int b = 0; b < 3; b++) begin
      @(negedge clk);
      m_dstb = 3'b110; m_wdata[1] = 32'hA000 + b; m_wdata[2] = 32'hBAD0 + b;
      check(ack == '0 && !s_astb, "single address acknowledge");
      #1;
      check(s_dstb && s_wdata == 32'hA000 + b && s_bsel == 4'b0011, "owner's data reaches the slave");
    end
    @(negedge clk);
    m_dstb = 3'b100;
    #1;
    check(!s_dstb, "non-owner data strobe is blocked");
    m_dstb = '0;
    @(negedge clk);
    check(ack == '0 && busy && conn == 3'b010, "held until the write acknowledge");
    // 3
    s_ack_stb = 1'b1;
    @(negedge clk);
    s_ack_stb = 1'b0;
    check(!busy && conn == '0 && ack == '0, "released after the write acknowledge");
    @(negedge clk);
    check(ack == 3'b100 && conn == 3'b100 && s_astb && s_addr == m_addr[2] &&
          s_mode == MODE_READ && s_burst == 4'd1, "master 2 granted after the idle cycle");
    req = 3'b000;
    // 4
    @(negedge clk);
    s_ack_stb = 1'b1;
    @(negedge clk);
    check(busy && conn == 3'b100, "still connected after the first read word");
    @(negedge clk);
    s_ack_stb = 1'b0;
    check(!busy && conn == '0, "released after the second read word");
    // 5
    req = 3'b111; m_mode = '0; m_burst = '0;
    @(negedge clk);
    check(ack == 3'b001 && s_addr == m_addr[0], "master 0 has the highest priority");
    req = 3'b110;
    @(negedge clk);
    s_ack_stb = 1'b1;
    @(negedge clk);
    s_ack_stb = 1'b0;
    @(negedge clk);
    check(ack == 3'b010, "then master 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
