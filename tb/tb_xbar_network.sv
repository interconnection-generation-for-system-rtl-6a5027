// End-to-end test of the crossbar at its default size: 4 masters, 5 slaves,
// 32-bit data, bursts of up to 16 words.
//
// Behavioural masters and memory slaves surround the network. The masters
// check every read word and every acknowledge against their own shadow of
// what they wrote; each master uses its own 1 KiB slice of every slave so
// the shadows never overlap. Directed phases make each mechanism happen:
//   A  single write and read: address acknowledge one cycle after the strobe
//   B  four masters request one slave at once: grants in priority order,
//      the slave handed from master to master
//   C  four masters burst to four different slaves: four words per cycle,
//      min(NM, NS) parallel connections
//   D  addresses outside every slave region: negative acknowledges
//   E  partial writes under byte select, read back
//   F  random traffic from all masters at once
// Each mechanism is counted, and one that never happened counts as a failure.
module tb_xbar_network;
  import xbar_pkg::*;

  localparam int unsigned NM = 4, NS = 5, AW = 32, DW = 32, MAX_BURST = 16;
  localparam int unsigned REGION_BITS = 16, BLW = 4, BPW = DW / 8;
  localparam int unsigned SLICE_BITS = 10;  // 1 KiB per master in each slave
  localparam longint WATCHDOG = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  longint cycle = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // network signals
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

  // command ports of the master models
  logic [NM-1:0]           cmd_valid, cmd_write, cmd_expect_err, cmd_ready;
  logic [NM-1:0][AW-1:0]   cmd_addr;
  logic [NM-1:0][BLW-1:0]  cmd_burst;
  logic [NM-1:0][BPW-1:0]  cmd_byte_sel;
  int     mc_checks [NM], mc_fail [NM], mc_xfers [NM], mc_err [NM], mc_beats [NM];
  int     mc_lat [NM], mc_stall [NM];
  longint mc_ack_cycle [NM];
  int     sl_xfers [NS], sl_perr [NS];

  xbar_network u_dut (
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
    xbar_mem_slave_model #(.AW(AW), .DW(DW), .BLW(BLW), .WORDS_LOG2(SLICE_BITS), .MAX_WAIT(2)) u_s (
      .clk (clk), .rst_n (rst_n),
      .s_mode (s_mode[s]), .s_burst (s_burst[s]), .s_byte_sel (s_byte_sel[s]),
      .s_addr_strobe (s_addr_strobe[s]), .s_addr (s_addr[s]), .s_data_strobe (s_data_strobe[s]),
      .s_wdata (s_wdata[s]), .s_rdata (s_rdata[s]), .s_rw_ack (s_rw_ack[s]),
      .s_rw_ack_strobe (s_rw_ack_strobe[s]), .n_xfers (sl_xfers[s]), .n_proto_err (sl_perr[s])
    );
  end

  // ---------------------------------------------------------------- mechanisms
  int n_reads = 0, n_writes = 0, n_bursts = 0, n_bytesel = 0, n_handover = 0;
  int peak_parallel = 0;

  always @(posedge clk) if (rst_n) begin
    if ($countones(s_data_strobe) > peak_parallel) peak_parallel <= $countones(s_data_strobe);
    for (int s = 0; s < NS; s++) begin
      if (s_addr_strobe[s]) begin
        if (s_mode[s]) n_writes <= n_writes + 1; else n_reads <= n_reads + 1;
        if (s_burst[s] != '0) n_bursts <= n_bursts + 1;
        if (s_mode[s] && s_byte_sel[s] != '1) n_bytesel <= n_bytesel + 1;
      end
    end
  end

  // ---------------------------------------------------------------- helpers
  function automatic logic [AW-1:0] addr_of(int s, int m, int word);
    return AW'(s) << REGION_BITS | AW'(m) << (SLICE_BITS - 2) | AW'(word * BPW);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cycle); end
  endtask

  task automatic issue(int m, bit wr, logic [AW-1:0] a, int burst,
                       logic [BPW-1:0] bsel = '1, bit experr = 1'b0);
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

  // ---------------------------------------------------------------- watchdog
  initial begin
    while (cycle < WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  logic          go_random = 1'b0;
  logic [NM-1:0] rand_done = '0;
  int            n_issued = 0;

  for (genvar m = 0; m < NM; m++) begin : g_gen
    initial begin
      wait (go_random);
      for (int i = 0; i < 60; i++) begin
        int s, w, b;
        s = $urandom_range(NS + 1, 0);   // NS and NS+1 are unmapped
        b = $urandom_range(MAX_BURST - 1, 0);
        w = $urandom_range((1 << (SLICE_BITS - 2)) / NM - MAX_BURST, 0);
        issue(m, 1'($urandom), addr_of(s, m, w), b,
              ($urandom_range(3, 0) == 0) ? BPW'($urandom) : '1, s >= NS);
        n_issued++;
      end
      rand_done[m] = 1'b1;
    end
  end

  initial begin
    int sum_checks, sum_fail, sum_err, sum_stall;
    int active;
    cmd_valid = '0; cmd_write = '0; cmd_addr = '0; cmd_burst = '0;
    cmd_byte_sel = '0; cmd_expect_err = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // A: latency of an uncontended address phase
    issue(0, 1'b1, addr_of(0, 0, 0), 0);
    wait_all_idle();
    check(mc_lat[0] == 1, "uncontended write: address ack one cycle after strobe");
    issue(0, 1'b0, addr_of(0, 0, 0), 0);
    wait_all_idle();
    check(mc_lat[0] == 1, "uncontended read: address ack one cycle after strobe");

    // B: all masters ask slave 2 in the same cycle
    for (int m = 0; m < NM; m++) begin
      cmd_valid[m] <= 1'b1; cmd_write[m] <= 1'b1; cmd_addr[m] <= addr_of(2, m, 8);
      cmd_burst[m] <= 3; cmd_byte_sel[m] <= '1; cmd_expect_err[m] <= 1'b0;
    end
    @(posedge clk); cmd_valid <= '0;
    wait_all_idle();
    for (int m = 1; m < NM; m++) begin
      check(mc_ack_cycle[m] > mc_ack_cycle[m-1], $sformatf("priority: master %0d after %0d", m, m-1));
      if (mc_ack_cycle[m] > mc_ack_cycle[m-1]) n_handover++;
    end
    check(mc_lat[0] == 1, "highest priority master wins at once");
    for (int m = 0; m < NM; m++) issue(m, 1'b0, addr_of(2, m, 8), 3);
    wait_all_idle();

    // C: parallel bursts to different slaves
    for (int m = 0; m < NM; m++) begin
      cmd_valid[m] <= 1'b1; cmd_write[m] <= 1'b1; cmd_addr[m] <= addr_of(m + 1, m, 32);
      cmd_burst[m] <= BLW'(MAX_BURST - 1); cmd_byte_sel[m] <= '1; cmd_expect_err[m] <= 1'b0;
    end
    @(posedge clk); cmd_valid <= '0;
    active = 0;
    do begin
      @(posedge clk);
      if (s_data_strobe != '0) begin
        active++;
        check($countones(s_data_strobe) == NM, "parallel phase: every slave takes a word each cycle");
      end
    end while (cmd_ready != '1);
    check(active == MAX_BURST, $sformatf("parallel phase: %0d words each in %0d cycles", MAX_BURST, active));
    check(peak_parallel == ((NM < NS) ? NM : NS), "peak parallel connections = min(NM, NS)");
    for (int m = 0; m < NM; m++) issue(m, 1'b0, addr_of(m + 1, m, 32), MAX_BURST - 1);
    wait_all_idle();

    // D: unmapped regions get negative acknowledges
    issue(1, 1'b0, AW'(7) << REGION_BITS, 2, '1, 1'b1);
    issue(1, 1'b1, AW'(NS) << REGION_BITS, 1, '1, 1'b1);
    wait_all_idle();

    // E: byte select
    issue(3, 1'b1, addr_of(4, 3, 100), 1, '1);
    wait_all_idle();
    issue(3, 1'b1, addr_of(4, 3, 100), 1, 4'b0101);
    wait_all_idle();
    issue(3, 1'b0, addr_of(4, 3, 100), 1);
    wait_all_idle();

    // F: random traffic, one generator per master (below)
    go_random = 1'b1;
    wait (rand_done == '1);
    wait_all_idle();

    // totals and mechanism counts
    sum_checks = 0; sum_fail = 0; sum_err = 0; sum_stall = 0;
    for (int m = 0; m < NM; m++) begin
      sum_checks += mc_checks[m]; sum_fail += mc_fail[m];
      sum_err += mc_err[m]; sum_stall += mc_stall[m];
    end
    for (int s = 0; s < NS; s++) check(sl_perr[s] == 0, $sformatf("slave %0d saw a protocol error", s));
    checks += sum_checks; failures += sum_fail;
    $display("mechanisms: reads=%0d writes=%0d bursts=%0d byte_select=%0d stalls=%0d handovers=%0d errors=%0d peak_parallel=%0d",
             n_reads, n_writes, n_bursts, n_bytesel, sum_stall, n_handover, sum_err, peak_parallel);
    check(n_reads > 0, "a read happened");
    check(n_writes > 0, "a write happened");
    check(n_bursts > 0, "a burst happened");
    check(n_bytesel > 0, "a byte-select write happened");
    check(sum_stall > 0, "a master was stalled by arbitration");
    check(n_handover > 0, "a slave was handed from one master to another");
    check(sum_err > 0, "an unmapped address was refused");
    check(peak_parallel > 1, "parallel connections happened");
    begin
      int tot;
      tot = 0;
      for (int m = 0; m < NM; m++) tot += mc_xfers[m];
      check(n_issued == NM * 60 && tot == 2 + 2 * NM + 2 * NM + 2 + 3 + NM * 60,
            $sformatf("every issued transfer completed (%0d)", tot));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
