// Crossbar of NM masters and NS slaves with behavioural masters and memory
// slaves and a traffic generator (testbench only).
//
// After start it runs two phases:
//   1 every master m writes a maximum-length burst to slave m mod NS, all in
//     the same cycle; the peak number of slaves taking a word in one cycle
//     must reach min(NM, NS), the parallelism that sets peak throughput;
//   2 N_XFERS random transfers per master (random slave or unmapped region,
//     mode, burst length and byte select), all masters at once.
// Each master uses its own 256-byte slice of every slave, so the masters'
// own read-back checks stay valid. done rises when all is finished.
module xbar_traffic_harness #(
  parameter int unsigned NM        = 4,
  parameter int unsigned NS        = 5,
  parameter int unsigned DW        = 32,
  parameter int unsigned MAX_BURST = 16,
  parameter int unsigned N_XFERS   = 20
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  longint cycle,
  output logic   done,
  output int     checks,
  output int     failures,
  output int     peak_parallel,
  output int     n_xfers,
  output int     n_stalls
);
  import xbar_pkg::*;

  localparam int unsigned AW = 32, RB = 16, BPW = DW / 8;
  localparam int unsigned BLW = idx_width(MAX_BURST);
  localparam int unsigned SLICE_WORDS = 64;
  localparam int unsigned WL = $clog2(NM * SLICE_WORDS);
  localparam int unsigned PMAX = (NM < NS) ? NM : NS;

  logic [NM-1:0]           m_mode, m_addr_strobe, m_data_strobe, m_addr_ack, m_rw_ack, m_rw_ack_strobe;
  logic [NM-1:0][BLW-1:0]  m_burst;
  logic [NM-1:0][BPW-1:0]  m_byte_sel;
  logic [NM-1:0][AW-1:0]   m_addr;
  logic [NM-1:0][DW-1:0]   m_wdata, m_rdata;
  logic [NS-1:0]           s_mode, s_addr_strobe, s_data_strobe, s_rw_ack, s_rw_ack_strobe;
  logic [NS-1:0][BLW-1:0]  s_burst;
  logic [NS-1:0][BPW-1:0]  s_byte_sel;
  logic [NS-1:0][AW-1:0]   s_addr;
  logic [NS-1:0][DW-1:0]   s_wdata, s_rdata;

  logic [NM-1:0]           cmd_valid, cmd_write, cmd_expect_err, cmd_ready;
  logic [NM-1:0][AW-1:0]   cmd_addr;
  logic [NM-1:0][BLW-1:0]  cmd_burst;
  logic [NM-1:0][BPW-1:0]  cmd_byte_sel;
  int     mc_checks [NM], mc_fail [NM], mc_xfers [NM], mc_err [NM], mc_beats [NM];
  int     mc_lat [NM], mc_stall [NM];
  longint mc_ack_cycle [NM];
  int     sl_xfers [NS], sl_perr [NS];
  int     tb_checks, tb_fail;

  xbar_network #(.NM(NM), .NS(NS), .AW(AW), .DW(DW), .MAX_BURST(MAX_BURST), .REGION_BITS(RB)) u_net (
    .clk_i (clk), .rst_ni (rst_n),
    .m_mode_i (m_mode), .m_burst_i (m_burst), .m_byte_sel_i (m_byte_sel),
    .m_addr_strobe_i (m_addr_strobe), .m_addr_i (m_addr), .m_data_strobe_i (m_data_strobe),
    .m_wdata_i (m_wdata), .m_addr_ack_o (m_addr_ack), .m_rdata_o (m_rdata),
    .m_rw_ack_o (m_rw_ack), .m_rw_ack_strobe_o (m_rw_ack_strobe),
    .s_mode_o (s_mode), .s_burst_o (s_burst), .s_byte_sel_o (s_byte_sel),
    .s_addr_strobe_o (s_addr_strobe), .s_addr_o (s_addr), .s_data_strobe_o (s_data_strobe),
    .s_wdata_o (s_wdata), .s_rdata_i (s_rdata), .s_rw_ack_i (s_rw_ack),
    .s_rw_ack_strobe_i (s_rw_ack_strobe)
  );

  for (genvar m = 0; m < NM; m++) begin : g_m
    xbar_master_model #(.AW(AW), .DW(DW), .BLW(BLW)) u_m (
      .clk (clk), .rst_n (rst_n),
      .cmd_valid (cmd_valid[m]), .cmd_write (cmd_write[m]), .cmd_addr (cmd_addr[m]),
      .cmd_burst (cmd_burst[m]), .cmd_byte_sel (cmd_byte_sel[m]),
      .cmd_expect_err (cmd_expect_err[m]), .cmd_ready (cmd_ready[m]),
      .m_mode (m_mode[m]), .m_burst (m_burst[m]), .m_byte_sel (m_byte_sel[m]),
      .m_addr_strobe (m_addr_strobe[m]), .m_addr (m_addr[m]), .m_data_strobe (m_data_strobe[m]),
      .m_wdata (m_wdata[m]), .m_addr_ack (m_addr_ack[m]), .m_rdata (m_rdata[m]),
      .m_rw_ack (m_rw_ack[m]), .m_rw_ack_strobe (m_rw_ack_strobe[m]),
      .cycle (cycle), .checks (mc_checks[m]), .failures (mc_fail[m]), .n_xfers (mc_xfers[m]),
      .n_err_xfers (mc_err[m]), .n_beats (mc_beats[m]), .ack_latency (mc_lat[m]),
      .n_stalled (mc_stall[m]), .ack_cycle (mc_ack_cycle[m])
    );
  end

  for (genvar s = 0; s < NS; s++) begin : g_s
    xbar_mem_slave_model #(.AW(AW), .DW(DW), .BLW(BLW), .WORDS_LOG2(WL), .MAX_WAIT(1)) u_s (
      .clk (clk), .rst_n (rst_n),
      .s_mode (s_mode[s]), .s_burst (s_burst[s]), .s_byte_sel (s_byte_sel[s]),
      .s_addr_strobe (s_addr_strobe[s]), .s_addr (s_addr[s]), .s_data_strobe (s_data_strobe[s]),
      .s_wdata (s_wdata[s]), .s_rdata (s_rdata[s]), .s_rw_ack (s_rw_ack[s]),
      .s_rw_ack_strobe (s_rw_ack_strobe[s]), .n_xfers (sl_xfers[s]), .n_proto_err (sl_perr[s])
    );
  end

  always @(posedge clk)
    if (!rst_n) peak_parallel <= 0;
    else if ($countones(s_data_strobe) > peak_parallel) peak_parallel <= $countones(s_data_strobe);

  always_comb begin
    checks = tb_checks; failures = tb_fail; n_xfers = 0; n_stalls = 0;
    for (int m = 0; m < NM; m++) begin
      checks += mc_checks[m]; failures += mc_fail[m];
      n_xfers += mc_xfers[m]; n_stalls += mc_stall[m];
    end
    for (int s = 0; s < NS; s++) failures += sl_perr[s];
  end

  function automatic logic [AW-1:0] addr_of(int s, int m, int word);
    return AW'(s) << RB | AW'(m) << 8 | AW'(word * BPW);
  endfunction

  task automatic issue(int m, bit wr, logic [AW-1:0] a, int burst, logic [BPW-1:0] bsel, bit experr);
    while (!cmd_ready[m]) @(posedge clk);
    cmd_valid[m] <= 1'b1; cmd_write[m] <= wr; cmd_addr[m] <= a;
    cmd_burst[m] <= BLW'(burst); cmd_byte_sel[m] <= bsel; cmd_expect_err[m] <= experr;
    @(posedge clk);
    cmd_valid[m] <= 1'b0;
    @(posedge clk);
  endtask

  task automatic wait_all_idle();
    do @(posedge clk); while (cmd_ready != '1);
    repeat (4) @(posedge clk);
  endtask

  logic          go_random = 1'b0;
  logic [NM-1:0] rand_done = '0;

  for (genvar m = 0; m < NM; m++) begin : g_gen
    initial begin
      wait (go_random);
      for (int i = 0; i < N_XFERS; i++) begin
        int s, w, b;
        s = $urandom_range(NS, 0);   // NS is an unmapped region
        b = $urandom_range(MAX_BURST - 1, 0);
        w = $urandom_range(SLICE_WORDS - MAX_BURST, 0);
        issue(m, 1'($urandom), addr_of(s, m, w), b,
              ($urandom_range(3, 0) == 0) ? BPW'($urandom) : '1, s >= NS);
      end
      rand_done[m] = 1'b1;
    end
  end

  initial begin
    done = 1'b0; tb_checks = 0; tb_fail = 0;
    cmd_valid = '0; cmd_write = '0; cmd_addr = '0; cmd_burst = '0;
    cmd_byte_sel = '0; cmd_expect_err = '0;
    wait (start);
    @(posedge clk);
    // 1: all masters burst at once
    for (int m = 0; m < NM; m++) begin
      cmd_valid[m] <= 1'b1; cmd_write[m] <= 1'b1; cmd_addr[m] <= addr_of(m % NS, m, 0);
      cmd_burst[m] <= BLW'(MAX_BURST - 1); cmd_byte_sel[m] <= '1; cmd_expect_err[m] <= 1'b0;
    end
    @(posedge clk); cmd_valid <= '0;
    wait_all_idle();
    tb_checks++;
    if (peak_parallel != PMAX) begin
      tb_fail++;
      $display("FAIL %0dx%0d: peak parallel %0d, expected %0d", NM, NS, peak_parallel, PMAX);
    end
    // 2: random traffic, one generator per master (below)
    go_random = 1'b1;
    wait (rand_done == '1);
    wait_all_idle();
    $display("%0dx%0d done at cycle %0d", NM, NS, cycle);
    done = 1'b1;
  end

endmodule
