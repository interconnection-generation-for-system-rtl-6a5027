// Slave-side arbitration and multiplexing for one slave.
//
// Arbitration is done per slave and independently of every other slave, so
// a slave can be added without touching the logic of the others. While the
// slave is free, the highest-priority requesting master (lowest index) wins
// and is registered as the owner: the slave is now circuit-switched to that
// master until the transfer ends. In the cycle after the win the port sends
// a one-cycle address acknowledge to the master and, in the same cycle, a
// one-cycle address strobe with the registered address, mode and burst
// length to the slave. From then on the owner's data strobe, write data and
// byte select pass through to the slave without a register.
//
// The connection is released at the end of the transfer: for a write on
// the slave's single read/write-acknowledge strobe, for a read on the
// strobe that carries the last of the burst_length+1 data words. The slave
// is idle for one cycle before the next grant.
//
// The address acknowledge coming from the network rather than the slave, the
// one-cycle grant latency, the per-beat byte select and the release rule are
// this design's choices where the protocol only names the signals.
//
// Ports: req_i[m] is master m's decoded request for this slave; addr_ack_o
// and conn_o (master m is connected) go back to the master side; the s_*
// signals form the slave's request interface.
module xbar_slave_port
  import xbar_pkg::*;
#(
  parameter int unsigned NM  = 4,
  parameter int unsigned AW  = 32,
  parameter int unsigned DW  = 32,
  parameter int unsigned BLW = 4
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  // from the masters
  input  logic [NM-1:0]            req_i,
  input  logic [NM-1:0]            m_mode_i,
  input  logic [NM-1:0][BLW-1:0]   m_burst_i,
  input  logic [NM-1:0][DW/8-1:0]  m_byte_sel_i,
  input  logic [NM-1:0][AW-1:0]    m_addr_i,
  input  logic [NM-1:0]            m_data_strobe_i,
  input  logic [NM-1:0][DW-1:0]    m_wdata_i,
  // to the masters
  output logic [NM-1:0]            addr_ack_o,
  output logic [NM-1:0]            conn_o,
  // to the slave
  output logic                     s_mode_o,
  output logic [BLW-1:0]           s_burst_o,
  output logic [DW/8-1:0]          s_byte_sel_o,
  output logic                     s_addr_strobe_o,
  output logic [AW-1:0]            s_addr_o,
  output logic                     s_data_strobe_o,
  output logic [DW-1:0]            s_wdata_o,
  // from the slave
  input  logic                     s_rw_ack_strobe_i,
  output logic                     busy_o
);

  logic [NM-1:0]   gnt;
  logic [NM-1:0]   owner_q;
  logic            busy_q;
  logic            astb_q;
  logic [NM-1:0]   ack_q;
  logic            mode_q;
  logic [BLW-1:0]  burst_q;
  logic [AW-1:0]   addr_q;
  logic [DW/8-1:0] bsel_q;
  logic [BLW-1:0]  remain_q;

  // multiplexer outputs, selected by the one-hot grant (address phase)
  logic            win_mode;
  logic [BLW-1:0]  win_burst;
  logic [AW-1:0]   win_addr;
  logic [DW/8-1:0] win_bsel;
  // multiplexer outputs, selected by the registered owner (data phase)
  logic            own_dstb;
  logic [DW-1:0]   own_wdata;
  logic [DW/8-1:0] own_bsel;

  logic            last_ack;

  xbar_fixed_prio_arbiter #(.N(NM)) u_arb (
    .req_i (busy_q ? '0 : req_i),
    .gnt_o (gnt)
  );

  always_comb begin
    win_mode  = 1'b0;
    win_burst = '0;
    win_addr  = '0;
    win_bsel  = '0;
    own_dstb  = 1'b0;
    own_wdata = '0;
    own_bsel  = '0;
    for (int unsigned m = 0; m < NM; m++) begin
      if (gnt[m]) begin
        win_mode  |= m_mode_i[m];
        win_burst |= m_burst_i[m];
        win_addr  |= m_addr_i[m];
        win_bsel  |= m_byte_sel_i[m];
      end
      if (owner_q[m]) begin
        own_dstb  |= m_data_strobe_i[m];
        own_wdata |= m_wdata_i[m];
        own_bsel  |= m_byte_sel_i[m];
      end
    end
  end

  assign last_ack = busy_q && s_rw_ack_strobe_i && (remain_q == '0);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q   <= 1'b0;
      owner_q  <= '0;
      astb_q   <= 1'b0;
      ack_q    <= '0;
      mode_q   <= MODE_READ;
      burst_q  <= '0;
      addr_q   <= '0;
      bsel_q   <= '0;
      remain_q <= '0;
    end else begin
      astb_q <= |gnt;
      ack_q  <= gnt;
      if (|gnt) begin
        busy_q   <= 1'b1;
        owner_q  <= gnt;
        mode_q   <= win_mode;
        burst_q  <= win_burst;
        addr_q   <= win_addr;
        bsel_q   <= win_bsel;
        // a write ends on one acknowledge, a read on burst_length+1 of them
        remain_q <= (win_mode == MODE_WRITE) ? '0 : win_burst;
      end else if (last_ack) begin
        busy_q  <= 1'b0;
        owner_q <= '0;
      end else if (busy_q && s_rw_ack_strobe_i) begin
        remain_q <= remain_q - BLW'(1);
      end
    end
  end

  assign addr_ack_o      = ack_q;
  assign conn_o          = owner_q;
  assign busy_o          = busy_q;
  assign s_addr_strobe_o = astb_q;
  assign s_addr_o        = addr_q;
  assign s_mode_o        = mode_q;
  assign s_burst_o       = burst_q;
  assign s_byte_sel_o    = astb_q ? bsel_q : own_bsel;
  assign s_data_strobe_o = busy_q & ~astb_q & own_dstb;
  assign s_wdata_o       = own_wdata;

  // Protocol rules.
  a_owner_onehot: assert property (@(posedge clk_i) disable iff (!rst_ni)
    busy_q |-> $onehot(owner_q));
  a_ack_when_busy: assert property (@(posedge clk_i) disable iff (!rst_ni)
    s_rw_ack_strobe_i |-> busy_q && !astb_q);
  a_no_write_on_read: assert property (@(posedge clk_i) disable iff (!rst_ni)
    s_data_strobe_o |-> mode_q == MODE_WRITE);

endmodule
