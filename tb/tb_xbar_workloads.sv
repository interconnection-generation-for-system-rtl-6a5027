// Runs the crossbar in the master/slave configurations whose cost the
// design was evaluated at: the 4-master, 5-slave example system, a square
// 10x10 and 12x12 network, and the lopsided 1-master/20-slave and
// 20-master/1-slave cases. Each configuration gets the same traffic (see
// xbar_traffic_harness): a phase that must reach min(NM, NS) parallel
// connections and a random phase checked word by word.
module tb_xbar_workloads;
  localparam int NCFG = 5;
  localparam longint WATCHDOG = 400000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  longint cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic done   [NCFG];
  int   chk    [NCFG], fail [NCFG], peak [NCFG], xfers [NCFG], stalls [NCFG];
  int   checks = 0, failures = 0;

  xbar_traffic_harness #(.NM(4),  .NS(5),  .N_XFERS(20)) u_4x5 (
    .clk, .rst_n, .start, .cycle, .done (done[0]), .checks (chk[0]), .failures (fail[0]),
    .peak_parallel (peak[0]), .n_xfers (xfers[0]), .n_stalls (stalls[0]));
  xbar_traffic_harness #(.NM(10), .NS(10), .N_XFERS(10)) u_10x10 (
    .clk, .rst_n, .start, .cycle, .done (done[1]), .checks (chk[1]), .failures (fail[1]),
    .peak_parallel (peak[1]), .n_xfers (xfers[1]), .n_stalls (stalls[1]));
  xbar_traffic_harness #(.NM(12), .NS(12), .N_XFERS(8)) u_12x12 (
    .clk, .rst_n, .start, .cycle, .done (done[2]), .checks (chk[2]), .failures (fail[2]),
    .peak_parallel (peak[2]), .n_xfers (xfers[2]), .n_stalls (stalls[2]));
  xbar_traffic_harness #(.NM(1),  .NS(20), .N_XFERS(40)) u_1x20 (
    .clk, .rst_n, .start, .cycle, .done (done[3]), .checks (chk[3]), .failures (fail[3]),
    .peak_parallel (peak[3]), .n_xfers (xfers[3]), .n_stalls (stalls[3]));
  xbar_traffic_harness #(.NM(20), .NS(1),  .N_XFERS(4)) u_20x1 (
    .clk, .rst_n, .start, .cycle, .done (done[4]), .checks (chk[4]), .failures (fail[4]),
    .peak_parallel (peak[4]), .n_xfers (xfers[4]), .n_stalls (stalls[4]));

  initial begin
    while (cycle < WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static string names [NCFG] = '{"4x5", "10x10", "12x12", "1x20", "20x1"};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    start <= 1'b1;
    for (int i = 0; i < NCFG; i++) wait (done[i]);
    for (int i = 0; i < NCFG; i++) begin
      $display("%s: transfers=%0d stalls=%0d peak_parallel=%0d checks=%0d failures=%0d",
               names[i], xfers[i], stalls[i], peak[i], chk[i], fail[i]);
      checks += chk[i] + 1; failures += fail[i];
      if (xfers[i] == 0) failures++;
    end
    // contention must appear wherever masters outnumber slaves
    checks++;
    if (stalls[4] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
