// Randomised test of the master port (decoder, request gating and response
// multiplexer) with 5 slaves plus the error target, slave 1 not wired to
// this master. Each vector is compared with a reference model written out
// in the testbench.
module tb_xbar_master_port;
  localparam int unsigned NS = 5, AW = 32, DW = 32, RB = 16, NT = NS + 1;
  localparam logic [NS-1:0] CONN = 5'b11101;

  int checks = 0, failures = 0;

  logic                astb;
  logic [AW-1:0]       addr;
  logic [NT-1:0]       req, ack, conn, t_ack, t_stb;
  logic [NT-1:0][DW-1:0] t_rdata;
  logic                m_ack, m_rw_ack, m_stb, busy;
  logic [DW-1:0]       m_rdata;

  xbar_master_port #(.NS(NS), .AW(AW), .DW(DW), .REGION_BITS(RB), .CONNECT(CONN)) u_dut (
    .m_addr_strobe_i (astb), .m_addr_i (addr), .req_o (req), .addr_ack_i (ack),
    .conn_i (conn), .t_rdata_i (t_rdata), .t_rw_ack_i (t_ack), .t_rw_ack_strobe_i (t_stb),
    .m_addr_ack_o (m_ack), .m_rdata_o (m_rdata), .m_rw_ack_o (m_rw_ack),
    .m_rw_ack_strobe_o (m_stb), .busy_o (busy)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int n_req = 0, n_gated = 0, n_err = 0;
    for (int i = 0; i < 5000; i++) begin
      logic [NT-1:0] e_req;
      logic [DW-1:0] e_rdata;
      logic e_ack, e_stb;
      int unsigned region, c;
      astb = 1'($urandom);
      region = $urandom_range(7, 0);
      addr = {16'(region), 16'($urandom)};
      c = $urandom_range(NT + 2, 0);   // >= NT: not connected
      conn = (c < NT) ? NT'(1) << c : '0;
      ack = ($urandom_range(3, 0) == 0) ? NT'(1) << $urandom_range(NT - 1, 0) : '0;
      t_ack = NT'($urandom); t_stb = NT'($urandom);
      for (int t = 0; t < NT; t++) t_rdata[t] = $urandom;
      #1;
      e_req = '0;
      if (astb && conn == '0) begin
        if (region < NS && CONN[region]) e_req[region] = 1'b1; else e_req[NS] = 1'b1;
      end
      e_rdata = '0; e_ack = 1'b0; e_stb = 1'b0;
      if (c < NT) begin e_rdata = t_rdata[c]; e_ack = t_ack[c]; e_stb = t_stb[c]; end
      if (e_req != '0) n_req++;
      if (e_req[NS]) n_err++;
      if (astb && conn != '0) n_gated++;
      checks++;
      if (req != e_req || m_ack != (ack != '0) || m_rdata != e_rdata || m_rw_ack != e_ack ||
          m_stb != e_stb || busy != (conn != '0)) begin
        failures++;
        $display("FAIL addr=%h conn=%b req=%b/%b rdata=%h/%h", addr, conn, req, e_req, m_rdata, e_rdata);
      end
    end
    checks++;
    if (n_req == 0 || n_gated == 0 || n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
