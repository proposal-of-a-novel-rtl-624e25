// tb_hybrid_arbiter: end-to-end test of the hybrid arbiter at its default
// configuration (six masters, groups {M0} > {M1,M2} > {M3,M4,M5}, one
// arbitration cycle).
//
// Six random-traffic masters and four SDRAM slaves share the bus; the load is
// set near the bus capacity so that both contention and idle periods occur.
// On every clock the testbench checks, from the signals of the previous cycle:
//   - timing: a cycle with no owner and a pending request is followed by a
//     grant (one arbitration cycle), and a grant only appears after such a
//     cycle;
//   - decision: the new owner was requesting, no master of a higher group was,
//     and inside its group it is the first requester after the group's previous
//     winner (round-robin, tracked by the testbench);
//   - ownership: the grant is one-hot, stays put until xfer_done, and is gone
//     in the cycle after xfer_done; grant_idx and bus_state agree with it.
// It also counts how often each mechanism came into play and fails if one
// never did: fixed priority deciding between groups, round-robin passing over
// a lower-index requester, a transfer held while a higher group waits,
// back-to-back arbitration, return to idle, and every master being served.
module tb_hybrid_arbiter;
  import arb_pkg::*;
  localparam int N = 6;
  localparam int S = 4;
  localparam int CYCLES = 50_000;
  localparam int GRP [N] = '{0, 1, 1, 2, 2, 2};
  localparam int OFF [3] = '{0, 1, 3};
  localparam int SZ  [3] = '{1, 2, 3};

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] req;
  logic         xfer_done;
  logic [N-1:0] grant;
  logic [2:0]   grant_idx;
  logic [1:0]   bus_state;
  int           checks = 0;
  int           failures = 0;

  hybrid_arbiter dut (.*);

  logic [4:0]   burst_len [N];
  logic [1:0]   slave_sel [N];
  logic [7:0]   row       [N];
  logic [S-1:0] s_start, s_done;
  logic         start;
  logic [N-1:0] grant_q;

  for (genvar m = 0; m < N; m++) begin : g_m
    bus_master_model #(.IDLE_MAX(150)) u_m (
      .clk, .rst_n, .grant(grant[m]), .xfer_done, .req(req[m]),
      .burst_len(burst_len[m]), .slave_sel(slave_sel[m]), .row(row[m]));
  end

  always_ff @(posedge clk) grant_q <= grant;
  assign start = (grant != '0) && (grant_q == '0);

  for (genvar s = 0; s < S; s++) begin : g_s
    assign s_start[s] = start && (slave_sel[grant_idx] == 2'(s));
    sdram_slave_model u_s (
      .clk, .rst_n, .start(s_start[s]), .burst_len(burst_len[grant_idx]),
      .row(row[grant_idx]), .done(s_done[s]));
  end
  assign xfer_done = |s_done;

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at cycle %0t: req=%b grant=%b state=%0d", what, $time / 10, req, grant, bus_state);
    end
  endtask

  int unsigned  last [3];
  int           n_group_prio = 0, n_rr_skip = 0, n_hold = 0, n_b2b = 0, n_idle = 0;
  int           served [N];

  initial begin
    logic [N-1:0] p_req, p_grant;
    logic         p_done;
    int           w;
    for (int g = 0; g < 3; g++) last[g] = SZ[g] - 1;
    for (int m = 0; m < N; m++) served[m] = 0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    p_req = req; p_grant = grant; p_done = xfer_done;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      check("grant one-hot", $onehot0(grant));
      check("state matches grant", (grant != '0) == (bus_state == 2'(BUS_EXEC)));
      if (grant != '0) check("grant_idx", grant[grant_idx]);

      if (p_grant != '0) begin
        // A transfer was running in the previous cycle.
        if (p_done) begin
          check("grant released after xfer_done", grant == '0);
          if ((p_req & ~p_grant) != '0) begin
            check("back-to-back arbitration", bus_state == 2'(BUS_ARB));
            n_b2b++;
          end else begin
            check("idle after last transfer", bus_state == 2'(BUS_IDLE));
            n_idle++;
          end
        end else begin
          check("grant held during transfer", grant == p_grant);
          for (int m = 0; m < N; m++)
            if (p_req[m] && GRP[m] < GRP[grant_idx]) begin n_hold++; break; end
        end
      end else if (p_req != '0) begin
        // Previous cycle was an arbitration cycle: a grant must follow.
        check("grant after one arbitration cycle", grant != '0);
        w = int'(grant_idx);
        check("winner was requesting", p_req[w]);
        for (int m = 0; m < N; m++)
          if (GRP[m] < GRP[w]) check("no higher group requesting", !p_req[m]);
        for (int m = 0; m < N; m++)
          if (GRP[m] > GRP[w] && p_req[m]) begin n_group_prio++; break; end
        // Round-robin inside the winner's group.
        begin
          int g, exp_w;
          g = GRP[w];
          exp_w = -1;
          for (int k = 1; k <= SZ[g]; k++) begin
            int i;
            i = OFF[g] + (int'(last[g]) + k) % SZ[g];
            if (exp_w < 0 && p_req[i]) exp_w = i;
          end
          check("round-robin order inside group", w == exp_w);
          for (int i = OFF[g]; i < w; i++) if (p_req[i]) begin n_rr_skip++; break; end
          last[g] = w - OFF[g];
        end
        served[w]++;
      end else begin
        check("no grant without request", grant == '0);
      end
      p_req = req; p_grant = grant; p_done = xfer_done;
    end

    $display("transactions per master: %0d %0d %0d %0d %0d %0d",
             served[0], served[1], served[2], served[3], served[4], served[5]);
    $display("group priority decided %0d, round-robin skipped a lower index %0d, transfer held against higher group %0d, back-to-back %0d, idle %0d",
             n_group_prio, n_rr_skip, n_hold, n_b2b, n_idle);
    check("mechanism: fixed priority between groups", n_group_prio > 0);
    check("mechanism: round-robin rotation", n_rr_skip > 0);
    check("mechanism: no pre-emption", n_hold > 0);
    check("mechanism: back-to-back arbitration", n_b2b > 0);
    check("mechanism: return to idle", n_idle > 0);
    for (int m = 0; m < N; m++) check($sformatf("M%0d served", m), served[m] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
