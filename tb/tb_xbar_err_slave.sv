// Test of the error responder: reads of 1, 3 and 16 words and writes of 1
// and 5 words. A read must produce exactly burst_length+1 negative
// acknowledge strobes with zero data, the first two cycles after the
// address strobe and then one per cycle; a write exactly one negative
// acknowledge, one cycle after its last data strobe.
module tb_xbar_err_slave;
  import xbar_pkg::*;
  localparam int unsigned DW = 32, BLW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           mode, astb, dstb;
  logic [BLW-1:0] burst;
  logic [DW-1:0]  rdata;
  logic           ack, ack_stb;

  xbar_err_slave #(.DW(DW), .BLW(BLW)) u_dut (
    .clk_i (clk), .rst_ni (rst_n), .s_mode_i (mode), .s_burst_i (burst),
    .s_addr_strobe_i (astb), .s_data_strobe_i (dstb),
    .s_rdata_o (rdata), .s_rw_ack_o (ack), .s_rw_ack_strobe_o (ack_stb)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic do_read(input int b);
    int n;
    @(negedge clk); mode = MODE_READ; burst = BLW'(b); astb = 1'b1;
    @(negedge clk); astb = 1'b0;
    check(!ack_stb, "no strobe one cycle after the address");
    n = 0;
    repeat (b + 1) begin
      @(negedge clk);
      check(ack_stb && ack == ACK_ERR && rdata == '0, "read beat with negative acknowledge");
    end
    repeat (4) begin @(negedge clk); check(!ack_stb, "no strobe after the last read word"); end
  endtask

  task automatic do_write(input int b);
    @(negedge clk); mode = MODE_WRITE; burst = BLW'(b); astb = 1'b1;
    @(negedge clk); astb = 1'b0;
    for (int i = 0; i <= b; i++) begin
      dstb = 1'b1; @(negedge clk);
      if (i != b) check(!ack_stb, "no acknowledge before the last word");
      dstb = 1'b0;
      if (i % 2 == 0 && i != b) begin @(negedge clk); check(!ack_stb, "no acknowledge in a gap"); end
    end
    check(ack_stb && ack == ACK_ERR, "write ends with one negative acknowledge");
    repeat (3) begin @(negedge clk); check(!ack_stb, "single write acknowledge"); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = 1'b0; astb = 1'b0; dstb = 1'b0; burst = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    do_read(0);
    do_read(2);
    do_read(15);
    do_write(0);
    do_write(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
