// hybrid_arb_core: the hybrid arbitration decision.
//
// Masters are split into priority groups of consecutive indices. Bit m of
// GROUP_START is set when master m opens a new group (bit 0 must be set); the
// default 6'b001011 gives {M0}, {M1,M2}, {M3,M4,M5}. Inside a group the
// masters are served round-robin (one rr_group_arbiter per group); between the
// groups a fixed priority applies, group 0 highest. So a master of a higher group
// always beats a master of a lower group, and masters of the same group get equal
// shares. Changing GROUP_START regroups the masters: all bits set gives a plain
// fixed-priority arbiter, only bit 0 set a plain round-robin one.
//
// Interface: req[N_MASTERS] in; grant[N_MASTERS] one-hot and valid out,
// all combinational from req and the groups' round-robin pointers. advance (from
// the bus controller, on the clock edge that hands the bus to the current winner)
// moves the round-robin pointer of the winning group only.
//
// Grouping, fixed priority between groups and round-robin inside them follow the
// design; the consecutive-index group layout is this implementation's choice.
module hybrid_arb_core #(
  parameter int unsigned         N_MASTERS   = 6,
  parameter logic [N_MASTERS-1:0] GROUP_START = 6'b001011
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_MASTERS-1:0]         req,
  input  logic                         advance,
  output logic [N_MASTERS-1:0]         grant,
  output logic                         valid
);

  // First master index of group g (N_MASTERS for g = number of groups).
  function automatic int unsigned group_offset(int unsigned g);
    int unsigned n = 0;
    for (int unsigned m = 0; m < N_MASTERS; m++)
      if (GROUP_START[m]) begin
        if (n == g) return m;
        n++;
      end
    return N_MASTERS;
  endfunction

  localparam int unsigned N_GROUPS = $countones(GROUP_START);
  localparam int unsigned GW       = (N_GROUPS > 1) ? $clog2(N_GROUPS) : 1;

  if (!GROUP_START[0]) begin : g_bad_cfg
    $error("hybrid_arb_core: GROUP_START[0] must be set");
  end

  logic [N_GROUPS-1:0]  grp_valid;
  logic [N_MASTERS-1:0] grp_grant [N_GROUPS];
  logic [GW-1:0]        win_grp;

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_grp
    localparam int unsigned OFF = group_offset(g);
    localparam int unsigned SZ  = group_offset(g + 1) - OFF;
    logic [SZ-1:0] sub_grant;

    rr_group_arbiter #(.SIZE(SZ)) u_rr (
      .clk    (clk),
      .rst_n  (rst_n),
      .req    (req[OFF +: SZ]),
      .advance(advance && (win_grp == GW'(g))),
      .grant  (sub_grant),
      .valid  (grp_valid[g])
    );

    always_comb begin
      grp_grant[g] = '0;
      grp_grant[g][OFF +: SZ] = sub_grant;
    end
  end

  // Fixed priority between the groups: lowest group index with a request wins.
  always_comb begin
    grant   = '0;
    valid   = 1'b0;
    win_grp = '0;
    for (int unsigned g = 0; g < N_GROUPS; g++) begin
      if (!valid && grp_valid[g]) begin
        valid   = 1'b1;
        win_grp = GW'(g);
        grant   = grp_grant[g];
      end
    end
  end

endmodule
