// tb_bus_utilization: bus utilization and request cycles of six masters under
// fixed-priority, round-robin and hybrid grouping.
//
// Three copies of the same bus system (six random-traffic masters, four SDRAM
// slaves, one shared bus) run side by side, differing only in the arbiter's
// group layout:
//   fixed priority  {M0} > {M1} > {M2} > {M3} > {M4} > {M5}
//   round-robin     {M0..M5}
//   hybrid          {M0} > {M1,M2} > {M3,M4,M5}
// Each master idles 0..40 cycles between transactions, so together they ask
// for more than the bus can carry. After CYCLES cycles the testbench prints each
// master's share of bus cycles and its average request-to-grant wait, and
// checks the properties the hybrid scheme is meant to have:
//   - fixed priority: shares fall with priority and the last master is starved
//     (under a tenth of the first one's share);
//   - round-robin: all six shares within 2 percentage points of each other;
//   - hybrid: the top master keeps about its fixed-priority share (within 3
//     points), masters of one group get equal shares (within 2 points), each
//     group gets less than the one above it, the lowest group is not starved
//     (over 2 percent each) and its longest wait is far below that of the last
//     fixed-priority master;
//   - request cycles: under fixed priority the wait grows with each step
//     down in priority; under round-robin all wait alike; under hybrid masters
//     of one group wait alike, M0 waits as under fixed priority, and the lowest
//     group waits far less than the last fixed-priority master;
//   - all three keep the bus owned over 90 percent of the time (the rest is
//     the one arbitration cycle between two transactions).
module tb_bus_utilization;
  localparam int     CYCLES = 10_000_000;
  localparam int     N = 6;
  localparam int     FP = 0, RR = 1, HY = 2;

  logic   clk = 1'b0;
  logic   rst_n;
  longint cycles   [3];
  longint busy     [3][6];
  longint wait_sum [3][6];
  longint txn      [3][6];
  longint max_wait [3][6];
  logic [5:0] req  [3];
  logic [5:0] grant[3];
  int     checks = 0;
  int     failures = 0;
  real    util [3][6];
  real    avgw [3][6];

  bus_system_model #(.GROUP_START(6'b111111)) u_fp (
    .clk, .rst_n, .cycles(cycles[FP]), .busy(busy[FP]), .wait_sum(wait_sum[FP]),
    .txn(txn[FP]), .max_wait(max_wait[FP]), .req(req[FP]), .grant(grant[FP]));
  bus_system_model #(.GROUP_START(6'b000001)) u_rr (
    .clk, .rst_n, .cycles(cycles[RR]), .busy(busy[RR]), .wait_sum(wait_sum[RR]),
    .txn(txn[RR]), .max_wait(max_wait[RR]), .req(req[RR]), .grant(grant[RR]));
  bus_system_model #(.GROUP_START(6'b001011)) u_hy (
    .clk, .rst_n, .cycles(cycles[HY]), .busy(busy[HY]), .wait_sum(wait_sum[HY]),
    .txn(txn[HY]), .max_wait(max_wait[HY]), .req(req[HY]), .grant(grant[HY]));

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    string names [3];
    real   total;
    names = '{"fixed priority", "round-robin", "hybrid"};
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (CYCLES) @(negedge clk);

    for (int p = 0; p < 3; p++) begin
      total = 0.0;
      $display("%s: %0d cycles", names[p], cycles[p]);
      $display("  master  util%%  txns    avg wait  max wait");
      for (int m = 0; m < N; m++) begin
        util[p][m] = 100.0 * real'(busy[p][m]) / real'(cycles[p]);
        avgw[p][m] = (txn[p][m] > 0) ? real'(wait_sum[p][m]) / real'(txn[p][m]) : 1.0e9;
        total += util[p][m];
        $display("  M%0d    %6.2f  %7d  %8.1f  %8d", m, util[p][m], txn[p][m], avgw[p][m], max_wait[p][m]);
      end
      $display("  bus busy %6.2f%%", total);
      check($sformatf("%s keeps the bus busy", names[p]), total > 90.0);
    end

    // Fixed priority.
    for (int m = 1; m < N; m++)
      check($sformatf("fixed priority: M%0d below M%0d", m, m - 1), util[FP][m] < util[FP][m-1]);
    check("fixed priority: M5 starved", util[FP][5] * 10.0 < util[FP][0]);

    // Round-robin.
    for (int m = 1; m < N; m++)
      check($sformatf("round-robin: M%0d equal to M0", m), absr(util[RR][m] - util[RR][0]) < 2.0);

    // Hybrid.
    check("hybrid: M0 keeps its top share", absr(util[HY][0] - util[FP][0]) < 3.0);
    check("hybrid: M1 = M2", absr(util[HY][1] - util[HY][2]) < 2.0);
    check("hybrid: M3 = M4", absr(util[HY][3] - util[HY][4]) < 2.0);
    check("hybrid: M4 = M5", absr(util[HY][4] - util[HY][5]) < 2.0);
    check("hybrid: M0 above group 1", util[HY][0] > util[HY][1] && util[HY][0] > util[HY][2]);
    check("hybrid: group 1 above group 2", util[HY][2] > util[HY][3] && util[HY][1] > util[HY][5]);
    for (int m = 3; m < N; m++)
      check($sformatf("hybrid: M%0d not starved", m), util[HY][m] > 2.0);
    check("hybrid: lowest group waits far less than fixed-priority M5",
          max_wait[HY][5] * 2 < max_wait[FP][5]);
    check("hybrid: M0 waits no longer than in round-robin", avgw[HY][0] < avgw[RR][0]);

    // Request cycles (average wait from request to grant).
    for (int m = 1; m < N; m++)
      check($sformatf("fixed priority: M%0d waits longer than M%0d", m, m - 1), avgw[FP][m] > avgw[FP][m-1]);
    for (int m = 1; m < N; m++)
      check($sformatf("round-robin: M%0d waits as long as M0", m),
            absr(avgw[RR][m] - avgw[RR][0]) < 0.1 * avgw[RR][0]);
    check("hybrid: M1 and M2 wait alike", absr(avgw[HY][1] - avgw[HY][2]) < 0.1 * avgw[HY][1]);
    check("hybrid: M3..M5 wait alike", absr(avgw[HY][3] - avgw[HY][5]) < 0.1 * avgw[HY][3]
                                    && absr(avgw[HY][4] - avgw[HY][5]) < 0.1 * avgw[HY][3]);
    check("hybrid: M0 waits like fixed-priority M0", absr(avgw[HY][0] - avgw[FP][0]) < 0.2 * avgw[FP][0]);
    check("hybrid: longest average wait far below fixed-priority M5", avgw[HY][5] * 10.0 < avgw[FP][5]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
