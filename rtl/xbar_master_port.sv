// Master-side routing and response multiplexing for one master.
//
// The master's address goes through the address decoder, and its address
// strobe becomes a request to exactly one target: one of the NS slave ports,
// or the internal error responder at index NS. The request is held off
// while the master is already connected to a target, so a master owns at
// most one connection at a time. Back towards the master, the address
// acknowledge is the OR of the acknowledges of all targets (only the one it
// asked can give one), and read data, read/write acknowledge and its strobe
// are taken from the target this master is connected to. Adding a slave
// only widens these multiplexers.
//
// Purely combinational; the connection state lives in the slave ports.
module xbar_master_port #(
  parameter int unsigned     NS          = 5,
  parameter int unsigned     AW          = 32,
  parameter int unsigned     DW          = 32,
  parameter int unsigned     REGION_BITS = 16,
  parameter logic [NS-1:0]   CONNECT     = '1
) (
  // from the master
  input  logic                 m_addr_strobe_i,
  input  logic [AW-1:0]        m_addr_i,
  // to / from the targets (index NS is the error responder)
  output logic [NS:0]          req_o,
  input  logic [NS:0]          addr_ack_i,
  input  logic [NS:0]          conn_i,
  input  logic [NS:0][DW-1:0]  t_rdata_i,
  input  logic [NS:0]          t_rw_ack_i,
  input  logic [NS:0]          t_rw_ack_strobe_i,
  // to the master
  output logic                 m_addr_ack_o,
  output logic [DW-1:0]        m_rdata_o,
  output logic                 m_rw_ack_o,
  output logic                 m_rw_ack_strobe_o,
  output logic                 busy_o
);

  logic [NS:0] sel;

  xbar_addr_decoder #(
    .NS(NS), .AW(AW), .REGION_BITS(REGION_BITS), .CONNECT(CONNECT)
  ) u_dec (
    .addr_i (m_addr_i),
    .sel_o  (sel),
    .hit_o  ()
  );

  assign busy_o = |conn_i;
  assign req_o  = (m_addr_strobe_i && !busy_o) ? sel : '0;

  always_comb begin
    m_addr_ack_o      = |addr_ack_i;
    m_rdata_o         = '0;
    m_rw_ack_o        = 1'b0;
    m_rw_ack_strobe_o = 1'b0;
    for (int unsigned t = 0; t <= NS; t++) begin
      if (conn_i[t]) begin
        m_rdata_o         |= t_rdata_i[t];
        m_rw_ack_o        |= t_rw_ack_i[t];
        m_rw_ack_strobe_o |= t_rw_ack_strobe_i[t];
      end
    end
  end

endmodule
