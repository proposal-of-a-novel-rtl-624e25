// tb_arb_bus_ctrl: self-checking test of the bus ownership sequencer.
//
// Runs with ARB_CYCLES = 3 so the arbitration counter is exercised. The
// testbench plays the arbitration core (winner = lowest requesting index) and
// the masters and bus: a master keeps its request until granted, its transfer
// lasts a random 1..8 cycles, xfer_done marks the last one and the request is
// dropped with it. Inputs change on the falling edge; on the next falling edge
// the registered outputs are compared with expectations from the previous
// cycle's inputs:
//   - the grant appears exactly after ARB_CYCLES consecutive cycles with a
//     pending request and no owner, and equals the winner seen in the last one;
//   - advance pulses exactly in that last arbitration cycle;
//   - the grant does not change while the transfer runs, whatever is requested;
//   - it drops right after xfer_done and the state shows BUS_ARB or BUS_IDLE.
module tb_arb_bus_ctrl;
  import arb_pkg::*;
  localparam int unsigned N = 6;
  localparam int unsigned A = 3;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] req;
  logic         xfer_done;
  logic [N-1:0] win_grant;
  logic         win_valid;
  logic         advance;
  logic [N-1:0] grant;
  bus_state_e   state;
  int           checks = 0;
  int           failures = 0;

  arb_bus_ctrl #(.N_MASTERS(N), .ARB_CYCLES(A)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    win_grant = req & (~req + 1'b1);  // lowest set bit
    win_valid = |req;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: req=%b grant=%b state=%s", what, $time, req, grant, state.name());
    end
  endtask

  int           pend;        // consecutive arbitration cycles with a request
  int           remain;      // cycles left in the current transfer
  logic [N-1:0] exp_grant;
  logic         exp_adv;
  int           grants = 0;
  int           preempt_tries = 0;

  initial begin
    rst_n = 1'b0; req = '0; xfer_done = 1'b0;
    pend = 0; remain = 0; exp_grant = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < 20000; cyc++) begin
      // ---- drive this cycle's inputs
      logic [N-1:0] owner;
      owner = grant;
      if (owner != '0) begin
        if (remain == 0) remain = $urandom_range(1, 8);
        xfer_done = (remain == 1);
        remain--;
      end else begin
        xfer_done = 1'b0;
      end
      // New requests from masters that neither own the bus nor already ask.
      for (int m = 0; m < N; m++)
        if (!owner[m] && !req[m] && $urandom_range(0, 15) == 0) req[m] = 1'b1;
      if (owner != '0 && (req & ~owner) != '0) preempt_tries++;

      // ---- expectation for the next edge, from this cycle's inputs
      #1;
      exp_adv = 1'b0;
      if (owner != '0) begin
        exp_grant = xfer_done ? '0 : owner;
        pend = 0;
      end else if (req != '0) begin
        pend++;
        if (pend == A) begin
          exp_grant = win_grant;
          exp_adv   = 1'b1;
          pend      = 0;
        end else exp_grant = '0;
      end else begin
        pend = 0;
        exp_grant = '0;
      end
      check("advance", advance == exp_adv);

      @(negedge clk);
      // The owner drops its request with the end of its transfer.
      if (xfer_done) req = req & ~owner;
      if (owner == '0 && grant != '0) begin
        grants++;
      end
      check("grant", grant == exp_grant);
      check("state", (grant != '0) == (state == BUS_EXEC));
      if (owner != '0 && grant == '0)
        check("state after done", state == (((req & ~owner) != '0) ? BUS_ARB : BUS_IDLE)
                                  || (req == '0 && state == BUS_IDLE));
    end

    checks++;
    if (grants < 500 || preempt_tries < 500) begin
      failures++;
      $display("FAIL coverage: grants=%0d preempt_tries=%0d", grants, preempt_tries);
    end
    $display("grants=%0d pre-emption attempts=%0d", grants, preempt_tries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
