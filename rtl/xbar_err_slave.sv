// Error responder for addresses that reach no slave.
//
// An address outside every slave region, or one belonging to a slave the
// requesting master is not connected to, is routed here. The responder
// behaves like a slave that refuses everything: a read of burst_length+1
// words is answered with as many acknowledge strobes, one per cycle, each
// carrying a negative acknowledge and zero data; a write is answered, after
// its burst_length+1 data strobes, with one negative acknowledge strobe. The
// existence of this responder is this design's choice; it keeps a master from
// waiting forever on a bad address.
//
// It has the slave side of the network's request/response interface. The
// first read strobe comes two cycles after the address strobe, the rest
// follow on consecutive cycles; the write acknowledge comes one cycle after
// the last data strobe.
module xbar_err_slave
  import xbar_pkg::*;
#(
  parameter int unsigned DW  = 32,
  parameter int unsigned BLW = 4
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           s_mode_i,
  input  logic [BLW-1:0] s_burst_i,
  input  logic           s_addr_strobe_i,
  input  logic           s_data_strobe_i,
  output logic [DW-1:0]  s_rdata_o,
  output logic           s_rw_ack_o,
  output logic           s_rw_ack_strobe_o
);

  typedef enum logic [1:0] {IDLE, READ, WRITE} state_e;

  state_e         state_q;
  logic [BLW-1:0] cnt_q;
  logic           stb_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= IDLE;
      cnt_q   <= '0;
      stb_q   <= 1'b0;
    end else begin
      stb_q <= 1'b0;
      unique case (state_q)
        IDLE: if (s_addr_strobe_i) begin
          cnt_q   <= s_burst_i;
          state_q <= (s_mode_i == MODE_WRITE) ? WRITE : READ;
        end
        READ: begin
          stb_q <= 1'b1;
          if (cnt_q == '0) state_q <= IDLE;
          else             cnt_q   <= cnt_q - BLW'(1);
        end
        WRITE: if (s_data_strobe_i) begin
          if (cnt_q == '0) begin
            stb_q   <= 1'b1;
            state_q <= IDLE;
          end else begin
            cnt_q <= cnt_q - BLW'(1);
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign s_rdata_o         = '0;
  assign s_rw_ack_o        = ACK_ERR;
  assign s_rw_ack_strobe_o = stb_q;

endmodule
