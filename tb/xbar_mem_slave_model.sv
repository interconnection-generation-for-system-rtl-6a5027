// Behavioural model of a memory slave on the crossbar (testbench only).
//
// Holds 2**WORDS_LOG2 words, all zero at start. On an address strobe it
// latches the word address, mode and burst length. A read returns
// burst_length+1 consecutive words, one acknowledge strobe per word, with a
// random gap of 0..MAX_WAIT cycles before each word. A write stores every
// word that arrives with a data strobe, under its byte select, and after the
// last word answers with one positive acknowledge strobe after 0..MAX_WAIT
// cycles. Counts completed transfers and flags protocol errors it sees.
module xbar_mem_slave_model #(
  parameter int unsigned AW         = 32,
  parameter int unsigned DW         = 32,
  parameter int unsigned BLW        = 4,
  parameter int unsigned WORDS_LOG2 = 10,
  parameter int unsigned MAX_WAIT   = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            s_mode,
  input  logic [BLW-1:0]  s_burst,
  input  logic [DW/8-1:0] s_byte_sel,
  input  logic            s_addr_strobe,
  input  logic [AW-1:0]   s_addr,
  input  logic            s_data_strobe,
  input  logic [DW-1:0]   s_wdata,
  output logic [DW-1:0]   s_rdata,
  output logic            s_rw_ack,
  output logic            s_rw_ack_strobe,
  output int              n_xfers,
  output int              n_proto_err
);

  typedef enum logic [1:0] {IDLE, READ, WRITE, WACK} st_e;

  localparam int unsigned WORDS = 1 << WORDS_LOG2;
  localparam int unsigned BPW   = DW / 8;

  logic [DW-1:0]         mem [WORDS];
  st_e                   st;
  logic [WORDS_LOG2-1:0] idx;
  logic [BLW-1:0]        cnt;
  int unsigned           wait_c;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; s_rw_ack_strobe <= 1'b0; s_rw_ack <= 1'b0; s_rdata <= '0;
      n_xfers <= 0; n_proto_err <= 0; cnt <= '0; idx <= '0; wait_c <= 0;
    end else begin
      s_rw_ack_strobe <= 1'b0;
      if (s_addr_strobe && st != IDLE) n_proto_err <= n_proto_err + 1;
      if (s_data_strobe && st != WRITE) n_proto_err <= n_proto_err + 1;
      case (st)
        IDLE: if (s_addr_strobe) begin
          idx    <= WORDS_LOG2'(s_addr / BPW);
          cnt    <= s_burst;
          wait_c <= (MAX_WAIT == 0) ? 0 : $urandom_range(MAX_WAIT, 0);
          st     <= s_mode ? WRITE : READ;
        end
        READ: begin
          if (wait_c != 0) wait_c <= wait_c - 1;
          else begin
            s_rdata <= mem[idx]; s_rw_ack <= 1'b1; s_rw_ack_strobe <= 1'b1;
            idx <= idx + 1'b1;
            wait_c <= (MAX_WAIT == 0) ? 0 : $urandom_range(MAX_WAIT, 0);
            if (cnt == '0) begin st <= IDLE; n_xfers <= n_xfers + 1; end
            else cnt <= cnt - 1'b1;
          end
        end
        WRITE: if (s_data_strobe) begin
          for (int b = 0; b < BPW; b++)
            if (s_byte_sel[b]) mem[idx][8*b +: 8] <= s_wdata[8*b +: 8];
          idx <= idx + 1'b1;
          if (cnt == '0) st <= WACK;
          else cnt <= cnt - 1'b1;
        end
        WACK: begin
          if (wait_c != 0) wait_c <= wait_c - 1;
          else begin
            s_rw_ack <= 1'b1; s_rw_ack_strobe <= 1'b1; st <= IDLE;
            n_xfers <= n_xfers + 1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
