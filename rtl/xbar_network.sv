// Circuit-switched crossbar network between NM masters and NS slaves.
//
// This is the network logic of a star topology for a globally synchronous
// system-on-chip: every master and every slave attaches to this one block,
// which decodes addresses, arbitrates per slave with a fixed priority, and
// multiplexes the signals of each granted master to its slave and the
// slave's responses back. Transfers to different slaves proceed in parallel,
// so up to min(NM, NS) bursts move at once, which gives a peak throughput of
// min(NM, NS) * f * DW bits per second.
//
// A transfer: the master raises its address strobe with address, mode,
// burst length (number of words minus one) and byte select, and holds them
// until the address acknowledge. The slave's port grants the highest-
// priority requester (lowest index) and one cycle later acknowledges the
// master and passes the address to the slave with a one-cycle address
// strobe. A write then sends burst_length+1 words, each with a data strobe,
// and the slave ends the transfer with one read/write-acknowledge strobe
// whose ack bit says whether all data arrived. A read is answered with
// burst_length+1 acknowledge strobes, each carrying one read-data word. The
// connection is released after the last strobe.
//
// Per-master structures: xbar_master_port (decoder and response
// multiplexer). Per-slave: xbar_slave_port (arbiter, owner register and
// request multiplexer). Target NS is an internal error responder for
// addresses that match no slave or a slave the master is not connected to.
//
// The protocol signals, fixed-priority arbitration, slave-side arbitration,
// burst transfers, the connection matrix and the configuration of 4 masters,
// 5 slaves and 32-bit data follow the document this design is built from.
// Address width, maximum burst length, address map, signal encodings, cycle
// timing and the error responder are this design's choices.
module xbar_network
  import xbar_pkg::*;
#(
  parameter int unsigned NM          = 4,
  parameter int unsigned NS          = 5,
  parameter int unsigned AW          = 32,
  parameter int unsigned DW          = 32,
  parameter int unsigned MAX_BURST   = 16,
  parameter int unsigned REGION_BITS = 16,
  // CONNECT[m][s] = 1: master m is wired to slave s
  parameter logic [NM-1:0][NS-1:0] CONNECT = '1,
  localparam int unsigned BLW        = idx_width(MAX_BURST)
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  // master request interfaces
  input  logic [NM-1:0]            m_mode_i,
  input  logic [NM-1:0][BLW-1:0]   m_burst_i,
  input  logic [NM-1:0][DW/8-1:0]  m_byte_sel_i,
  input  logic [NM-1:0]            m_addr_strobe_i,
  input  logic [NM-1:0][AW-1:0]    m_addr_i,
  input  logic [NM-1:0]            m_data_strobe_i,
  input  logic [NM-1:0][DW-1:0]    m_wdata_i,
  // master response interfaces
  output logic [NM-1:0]            m_addr_ack_o,
  output logic [NM-1:0][DW-1:0]    m_rdata_o,
  output logic [NM-1:0]            m_rw_ack_o,
  output logic [NM-1:0]            m_rw_ack_strobe_o,
  // slave request interfaces
  output logic [NS-1:0]            s_mode_o,
  output logic [NS-1:0][BLW-1:0]   s_burst_o,
  output logic [NS-1:0][DW/8-1:0]  s_byte_sel_o,
  output logic [NS-1:0]            s_addr_strobe_o,
  output logic [NS-1:0][AW-1:0]    s_addr_o,
  output logic [NS-1:0]            s_data_strobe_o,
  output logic [NS-1:0][DW-1:0]    s_wdata_o,
  // slave response interfaces
  input  logic [NS-1:0][DW-1:0]    s_rdata_i,
  input  logic [NS-1:0]            s_rw_ack_i,
  input  logic [NS-1:0]            s_rw_ack_strobe_i
);

  localparam int unsigned NT = NS + 1;  // slaves plus the error responder

  // master-major and target-major views of the request/grant matrices
  logic [NM-1:0][NT-1:0] req_mt, ack_mt, conn_mt;
  logic [NT-1:0][NM-1:0] req_tm, ack_tm, conn_tm;

  // all targets' request and response signals, error responder at index NS
  logic [NT-1:0]            t_mode;
  logic [NT-1:0][BLW-1:0]   t_burst;
  logic [NT-1:0][DW/8-1:0]  t_byte_sel;
  logic [NT-1:0]            t_addr_strobe;
  logic [NT-1:0][AW-1:0]    t_addr;
  logic [NT-1:0]            t_data_strobe;
  logic [NT-1:0][DW-1:0]    t_wdata;
  logic [NT-1:0][DW-1:0]    t_rdata;
  logic [NT-1:0]            t_rw_ack;
  logic [NT-1:0]            t_rw_ack_strobe;
  logic [NT-1:0]            t_busy;

  always_comb begin
    for (int unsigned m = 0; m < NM; m++) begin
      for (int unsigned t = 0; t < NT; t++) begin
        req_tm[t][m]  = req_mt[m][t];
        ack_mt[m][t]  = ack_tm[t][m];
        conn_mt[m][t] = conn_tm[t][m];
      end
    end
  end

  for (genvar m = 0; m < NM; m++) begin : g_master
    xbar_master_port #(
      .NS(NS), .AW(AW), .DW(DW), .REGION_BITS(REGION_BITS), .CONNECT(CONNECT[m])
    ) u_mport (
      .m_addr_strobe_i   (m_addr_strobe_i[m]),
      .m_addr_i          (m_addr_i[m]),
      .req_o             (req_mt[m]),
      .addr_ack_i        (ack_mt[m]),
      .conn_i            (conn_mt[m]),
      .t_rdata_i         (t_rdata),
      .t_rw_ack_i        (t_rw_ack),
      .t_rw_ack_strobe_i (t_rw_ack_strobe),
      .m_addr_ack_o      (m_addr_ack_o[m]),
      .m_rdata_o         (m_rdata_o[m]),
      .m_rw_ack_o        (m_rw_ack_o[m]),
      .m_rw_ack_strobe_o (m_rw_ack_strobe_o[m]),
      .busy_o            ()
    );
  end

  for (genvar t = 0; t < NT; t++) begin : g_target
    xbar_slave_port #(
      .NM(NM), .AW(AW), .DW(DW), .BLW(BLW)
    ) u_sport (
      .clk_i             (clk_i),
      .rst_ni            (rst_ni),
      .req_i             (req_tm[t]),
      .m_mode_i          (m_mode_i),
      .m_burst_i         (m_burst_i),
      .m_byte_sel_i      (m_byte_sel_i),
      .m_addr_i          (m_addr_i),
      .m_data_strobe_i   (m_data_strobe_i),
      .m_wdata_i         (m_wdata_i),
      .addr_ack_o        (ack_tm[t]),
      .conn_o            (conn_tm[t]),
      .s_mode_o          (t_mode[t]),
      .s_burst_o         (t_burst[t]),
      .s_byte_sel_o      (t_byte_sel[t]),
      .s_addr_strobe_o   (t_addr_strobe[t]),
      .s_addr_o          (t_addr[t]),
      .s_data_strobe_o   (t_data_strobe[t]),
      .s_wdata_o         (t_wdata[t]),
      .s_rw_ack_strobe_i (t_rw_ack_strobe[t]),
      .busy_o            (t_busy[t])
    );
  end

  xbar_err_slave #(.DW(DW), .BLW(BLW)) u_err (
    .clk_i             (clk_i),
    .rst_ni            (rst_ni),
    .s_mode_i          (t_mode[NS]),
    .s_burst_i         (t_burst[NS]),
    .s_addr_strobe_i   (t_addr_strobe[NS]),
    .s_data_strobe_i   (t_data_strobe[NS]),
    .s_rdata_o         (t_rdata[NS]),
    .s_rw_ack_o        (t_rw_ack[NS]),
    .s_rw_ack_strobe_o (t_rw_ack_strobe[NS])
  );

  assign s_mode_o        = t_mode[NS-1:0];
  assign s_burst_o       = t_burst[NS-1:0];
  assign s_byte_sel_o    = t_byte_sel[NS-1:0];
  assign s_addr_strobe_o = t_addr_strobe[NS-1:0];
  assign s_addr_o        = t_addr[NS-1:0];
  assign s_data_strobe_o = t_data_strobe[NS-1:0];
  assign s_wdata_o       = t_wdata[NS-1:0];
  assign t_rdata[NS-1:0]         = s_rdata_i;
  assign t_rw_ack[NS-1:0]        = s_rw_ack_i;
  assign t_rw_ack_strobe[NS-1:0] = s_rw_ack_strobe_i;

  // A slave may only answer while it is connected to a master. (The reset
  // is asynchronous in the flip-flops and also disables this check.)
  a_slave_ack_connected: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (s_rw_ack_strobe_i & ~t_busy[NS-1:0]) == '0);
endmodule
