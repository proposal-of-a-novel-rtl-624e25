// hybrid_arbiter: hybrid fixed-priority / round-robin bus arbiter (top level).
//
// Masters that behave alike or matter equally are put in one group. Groups are
// ranked by fixed priority, and the masters inside a group are served
// round-robin. A top-priority master thus keeps the large bus share that fixed
// priority would give it, masters of one group get equal shares, and the
// low-priority masters of a group can no longer be starved by one another the way
// the last master of a pure fixed-priority chain is. The default configuration
// has six masters in three groups: {M0} > {M1,M2} > {M3,M4,M5}.
//
// Structure: hybrid_arb_core makes the decision (one round-robin arbiter per
// group, fixed priority between groups); arb_bus_ctrl spends ARB_CYCLES cycles
// arbitrating, registers the decision as the grant and holds it until the
// transfer on the bus ends.
//
// Interface:
//   req[m]       master m requests the bus; hold it until granted, drop it no
//                later than the cycle after its transfer ends.
//   xfer_done    one-cycle pulse from the bus/slave side: the current owner's
//                transfer (burst data plus slave latency) has finished.
//   grant[m]     registered, one-hot; master m owns the bus.
//   grant_idx    index of the owner (valid while bus_state == BUS_EXEC).
//   bus_state    BUS_IDLE / BUS_ARB / BUS_EXEC (see arb_pkg).
// Timing: on an idle bus, a request in cycle t is granted from cycle
// t+ARB_CYCLES; after xfer_done in cycle t the next owner holds the grant from
// cycle t+1+ARB_CYCLES.
//
// Groups are runs of consecutive master indices, highest priority first: bit m
// of GROUP_START is set when master m opens a new group. The default 6'b001011
// is {M0},{M1,M2},{M3,M4,M5}; 6'b111111 makes a fixed-priority arbiter and
// 6'b000001 a round-robin one.
// The grouping policy and the default grouping follow the design; the one-cycle
// arbitration default, the handshake and the port encoding are this
// implementation's choices.
module hybrid_arbiter
  import arb_pkg::*;
#(
  parameter int unsigned          N_MASTERS   = 6,
  parameter logic [N_MASTERS-1:0] GROUP_START = 6'b001011,
  parameter int unsigned          ARB_CYCLES  = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_MASTERS-1:0]         req,
  input  logic                         xfer_done,
  output logic [N_MASTERS-1:0]         grant,
  output logic [$clog2(N_MASTERS)-1:0] grant_idx,
  output logic [1:0]                   bus_state
);

  localparam int unsigned IW = $clog2(N_MASTERS);

  logic [N_MASTERS-1:0] win_grant;
  logic                 win_valid;
  logic                 advance;
  bus_state_e           state;

  hybrid_arb_core #(
    .N_MASTERS  (N_MASTERS),
    .GROUP_START(GROUP_START)
  ) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (req),
    .advance  (advance),
    .grant    (win_grant),
    .valid    (win_valid)
  );

  arb_bus_ctrl #(
    .N_MASTERS (N_MASTERS),
    .ARB_CYCLES(ARB_CYCLES)
  ) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (req),
    .xfer_done(xfer_done),
    .win_grant(win_grant),
    .win_valid(win_valid),
    .advance  (advance),
    .grant    (grant),
    .state    (state)
  );

  // Owner index, encoded from the registered grant.
  always_comb begin
    grant_idx = '0;
    for (int unsigned m = 0; m < N_MASTERS; m++)
      if (grant[m]) grant_idx = IW'(m);
  end

  assign bus_state = state;

endmodule
