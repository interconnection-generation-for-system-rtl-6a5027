// Behavioural model of a master on the crossbar (testbench only).
//
// Takes one command at a time (cmd_valid while cmd_ready): mode, address,
// burst length, byte select and whether the network is expected to refuse
// it. It raises the address strobe, holds it until the address acknowledge,
// then either sends burst_length+1 random words with data strobes and waits
// for the write acknowledge, or collects burst_length+1 read words. It keeps
// a shadow copy of every word it wrote and checks each read word and each
// acknowledge against it, so as long as masters use disjoint addresses the
// checks need nothing from the network itself. It also records the address
// acknowledge latency, how often it had to wait more than one cycle for
// it, and the cycle of the last address acknowledge.
module xbar_master_model #(
  parameter int unsigned AW  = 32,
  parameter int unsigned DW  = 32,
  parameter int unsigned BLW = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd_valid,
  input  logic            cmd_write,
  input  logic [AW-1:0]   cmd_addr,
  input  logic [BLW-1:0]  cmd_burst,
  input  logic [DW/8-1:0] cmd_byte_sel,
  input  logic            cmd_expect_err,
  output logic            cmd_ready,
  // network master interface
  output logic            m_mode,
  output logic [BLW-1:0]  m_burst,
  output logic [DW/8-1:0] m_byte_sel,
  output logic            m_addr_strobe,
  output logic [AW-1:0]   m_addr,
  output logic            m_data_strobe,
  output logic [DW-1:0]   m_wdata,
  input  logic            m_addr_ack,
  input  logic [DW-1:0]   m_rdata,
  input  logic            m_rw_ack,
  input  logic            m_rw_ack_strobe,
  // statistics
  input  longint          cycle,
  output int              checks,
  output int              failures,
  output int              n_xfers,
  output int              n_err_xfers,
  output int              n_beats,
  output int              ack_latency,
  output int              n_stalled,
  output longint          ack_cycle
);

  typedef enum logic [2:0] {IDLE, ADDR, WDATA, WACK, RDATA} st_e;
  localparam int unsigned BPW = DW / 8;

  st_e            st;
  logic [BLW-1:0] beat;
  logic           exp_err;
  int             lat;
  logic [DW-1:0]  shadow [logic [AW-1:0]];

  function automatic logic [DW-1:0] shadow_rd(input logic [AW-1:0] a);
    return shadow.exists(a) ? shadow[a] : '0;
  endfunction

  function automatic logic [AW-1:0] beat_addr(input logic [BLW-1:0] b);
    return m_addr + AW'(b) * AW'(BPW);
  endfunction

  assign cmd_ready = (st == IDLE);

  always @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; m_addr_strobe <= 1'b0; m_data_strobe <= 1'b0;
      m_mode <= 1'b0; m_burst <= '0; m_byte_sel <= '0; m_addr <= '0; m_wdata <= '0;
      checks <= 0; failures <= 0; n_xfers <= 0; n_err_xfers <= 0; n_beats <= 0;
      ack_latency <= 0; n_stalled <= 0; ack_cycle <= 0; beat <= '0; exp_err <= 1'b0; lat <= 0;
    end else begin
      m_data_strobe <= 1'b0;
      if (m_rw_ack_strobe && !(st == WACK || st == RDATA)) begin
        failures <= failures + 1;
        $display("master: unexpected acknowledge strobe at cycle %0d", cycle);
      end
      case (st)
        IDLE: if (cmd_valid) begin
          m_mode <= cmd_write; m_addr <= cmd_addr; m_burst <= cmd_burst;
          m_byte_sel <= cmd_byte_sel; m_addr_strobe <= 1'b1;
          exp_err <= cmd_expect_err; lat <= 0; beat <= '0;
          st <= ADDR;
        end
        ADDR: begin
          lat <= lat + 1;
          if (m_addr_ack) begin
            m_addr_strobe <= 1'b0;
            ack_latency <= lat; ack_cycle <= cycle;
            if (lat > 1) n_stalled <= n_stalled + 1;
            st <= m_mode ? WDATA : RDATA;
          end
        end
        WDATA: begin
          logic [DW-1:0] w, old;
          for (int b = 0; b < BPW; b++) w[8*b +: 8] = 8'($urandom_range(255, 0));
          m_data_strobe <= 1'b1; m_wdata <= w;
          n_beats <= n_beats + 1;
          if (!exp_err) begin
            old = shadow_rd(beat_addr(beat));
            for (int b = 0; b < BPW; b++) if (m_byte_sel[b]) old[8*b +: 8] = w[8*b +: 8];
            shadow[beat_addr(beat)] = old;
          end
          if (beat == m_burst) st <= WACK;
          beat <= beat + 1'b1;
        end
        WACK: if (m_rw_ack_strobe) begin
          checks <= checks + 1;
          if (m_rw_ack != !exp_err) begin
            failures <= failures + 1;
            $display("master: write ack %0b, expected %0b (addr %h)", m_rw_ack, !exp_err, m_addr);
          end
          n_xfers <= n_xfers + 1; if (exp_err) n_err_xfers <= n_err_xfers + 1;
          st <= IDLE;
        end
        RDATA: if (m_rw_ack_strobe) begin
          logic [DW-1:0] e;
          e = exp_err ? '0 : shadow_rd(beat_addr(beat));
          checks <= checks + 1;
          n_beats <= n_beats + 1;
          if (m_rw_ack != !exp_err || m_rdata != e) begin
            failures <= failures + 1;
            $display("master: read %h ack %0b, expected %h ack %0b (addr %h)",
                     m_rdata, m_rw_ack, e, !exp_err, beat_addr(beat));
          end
          if (beat == m_burst) begin
            st <= IDLE; n_xfers <= n_xfers + 1; if (exp_err) n_err_xfers <= n_err_xfers + 1;
          end
          beat <= beat + 1'b1;
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
