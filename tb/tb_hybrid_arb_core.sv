// tb_hybrid_arb_core: self-checking test of the hybrid arbitration decision.
//
// Default grouping {M0} > {M1,M2} > {M3,M4,M5}. The testbench keeps its own
// round-robin pointer per group and computes the expected winner: the highest
// group that has any request, and inside it the first requester after that
// group's last winner. Directed parts check that M0 always wins, that group
// {M1,M2} beats group {M3..M5}, that the groups rotate independently (a group
// that loses keeps its order) and then random requests and advances follow.
module tb_hybrid_arb_core;
  localparam int unsigned N = 6;
  localparam int unsigned G = 3;
  localparam int unsigned SZ  [G] = '{1, 2, 3};
  localparam int unsigned OFF [G] = '{0, 1, 3};

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] req;
  logic         advance;
  logic [N-1:0] grant;
  logic         valid;
  int           checks = 0;
  int           failures = 0;
  int unsigned  last [G];

  hybrid_arb_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] expected(logic [N-1:0] r);
    for (int unsigned g = 0; g < G; g++)
      for (int unsigned k = 1; k <= SZ[g]; k++) begin
        int unsigned i = OFF[g] + (last[g] + k) % SZ[g];
        if (r[i]) return N'(1) << i;
      end
    return '0;
  endfunction

  function automatic int unsigned group_of(int unsigned m);
    return (m == 0) ? 0 : (m < 3) ? 1 : 2;
  endfunction

  task automatic check(string what, logic [N-1:0] exp_g);
    checks++;
    if (grant !== exp_g || valid !== (exp_g != '0)) begin
      failures++;
      $display("FAIL %s: req=%b grant=%b valid=%b expected %b", what, req, grant, valid, exp_g);
    end
  endtask

  // Apply one cycle with the given request and advance, check, update model.
  task automatic step(string what, logic [N-1:0] r, logic adv, logic [N-1:0] exp_g);
    @(negedge clk);
    req = r; advance = adv;
    #1 check(what, exp_g);
    check({what, " (model)"}, expected(r));
    if (adv) for (int unsigned m = 0; m < N; m++)
      if (grant[m]) last[group_of(m)] = m - OFF[group_of(m)];
  endtask

  initial begin
    rst_n = 1'b0; req = '0; advance = 1'b0;
    for (int g = 0; g < G; g++) last[g] = SZ[g] - 1;
    @(negedge clk); rst_n = 1'b1;

    step("M0 top",        6'b111111, 1'b1, 6'b000001);
    step("M0 again",      6'b111111, 1'b1, 6'b000001);
    step("group1 M1",     6'b111110, 1'b1, 6'b000010);
    step("group1 M2",     6'b111110, 1'b1, 6'b000100);
    step("group1 M1 2nd", 6'b111110, 1'b1, 6'b000010);
    step("group2 first",  6'b111000, 1'b1, 6'b001000);
    // Group 2 loses to group 1 for a while: its order must not move.
    step("group1 wins",   6'b111100, 1'b1, 6'b000100);
    step("group2 M4",     6'b111000, 1'b1, 6'b010000);
    step("group2 M5",     6'b111000, 1'b1, 6'b100000);
    step("group2 wrap",   6'b111000, 1'b1, 6'b001000);
    step("no advance",    6'b111000, 1'b0, 6'b010000);
    step("still M4",      6'b111000, 1'b1, 6'b010000);
    step("skip idle M5",  6'b001000, 1'b1, 6'b001000);
    step("none",          6'b000000, 1'b1, 6'b000000);

    for (int n = 0; n < 5000; n++) begin
      logic [N-1:0] r;
      r = N'($urandom);
      @(negedge clk);
      req = r; advance = ($urandom_range(0, 3) != 0);
      #1 check("random", expected(r));
      if (advance) for (int unsigned m = 0; m < N; m++)
        if (grant[m]) last[group_of(m)] = m - OFF[group_of(m)];
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
