// tb_rr_group_arbiter: self-checking test of the round-robin group arbiter.
//
// A three-master group is driven with random requests and random `advance`
// pulses. The expected grant is computed in the testbench from its own copy of
// the last-winner pointer: starting one past the last winner, the first
// requesting master wins. Also checks that after reset master 0 goes first,
// that a full rotation 0,1,2,0 happens with all three requesting, and that
// without `advance` the decision does not move.
module tb_rr_group_arbiter;
  localparam int unsigned SIZE = 3;

  logic            clk = 1'b0;
  logic            rst_n;
  logic [SIZE-1:0] req;
  logic            advance;
  logic [SIZE-1:0] grant;
  logic            valid;
  int              checks = 0;
  int              failures = 0;
  int unsigned     last;

  rr_group_arbiter #(.SIZE(SIZE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [SIZE-1:0] expected(logic [SIZE-1:0] r, int unsigned l);
    logic [SIZE-1:0] g = '0;
    for (int unsigned k = 1; k <= SIZE; k++) begin
      int unsigned i = (l + k) % SIZE;
      if (g == '0 && r[i]) g[i] = 1'b1;
    end
    return g;
  endfunction

  task automatic check(string what, logic [SIZE-1:0] exp_g);
    checks++;
    if (grant !== exp_g || valid !== (exp_g != '0)) begin
      failures++;
      $display("FAIL %s: req=%b grant=%b valid=%b expected %b", what, req, grant, valid, exp_g);
    end
  endtask

  initial begin
    rst_n = 1'b0; req = '0; advance = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    last = SIZE - 1;

    // After reset master 0 has the turn.
    req = 3'b111; #1 check("reset order", 3'b001);

    // Full rotation with all requesting and advance every cycle.
    advance = 1'b1;
    for (int n = 0; n < 6; n++) begin
      @(negedge clk);
      last = (last + 1) % SIZE;
      #1 check("rotation", expected(3'b111, last));
    end
    last = (last + 1) % SIZE;  // the advance of the final negedge window
    // No advance: the decision must stay where it is.
    @(negedge clk); advance = 1'b0;
    for (int n = 0; n < 4; n++) begin
      @(negedge clk);
      #1 check("hold", expected(3'b111, last));
    end

    // Random traffic.
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req     = SIZE'($urandom);
      advance = ($urandom_range(0, 2) != 0);
      #1 check("random", expected(req, last));
      if (advance && req != '0)
        for (int unsigned i = 0; i < SIZE; i++) if (grant[i]) last = i;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
