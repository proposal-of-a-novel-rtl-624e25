// bus_system_model: one shared bus with six traffic-generating masters, four
// SDRAM-controller slaves and the hybrid arbiter, plus bus-usage statistics.
// Testbench infrastructure for the utilization measurements.
//
// The group layout of the arbiter is passed through, so the same system can be
// run as hybrid, fixed-priority (six groups of one) or round-robin (one group of
// six). A transaction starts on the first cycle of a new grant: the owner's
// burst length and row go to the slave it selected, whose done pulse is returned
// to the arbiter as xfer_done.
//
// Statistics, counted from the end of reset:
//   cycles         total cycles
//   busy[m]        cycles in which master m held the grant (bus utilization)
//   wait_sum[m]    sum over master m's transactions of the cycles from raising
//                  req to receiving grant (request cycles)
//   txn[m]         completed transactions of master m
//   max_wait[m]    longest single wait of master m
module bus_system_model #(
  parameter logic [5:0]  GROUP_START = 6'b001011,
  parameter int unsigned IDLE_MAX    = 40
) (
  input  logic    clk,
  input  logic    rst_n,
  output longint  cycles,
  output longint  busy     [6],
  output longint  wait_sum [6],
  output longint  txn      [6],
  output longint  max_wait [6],
  output logic [5:0] req,
  output logic [5:0] grant
);

  localparam int unsigned N = 6;
  localparam int unsigned S = 4;

  logic [2:0] grant_idx;
  logic [1:0] bus_state;
  logic       xfer_done;
  logic [4:0] burst_len [N];
  logic [1:0] slave_sel [N];
  logic [7:0] row       [N];
  logic [S-1:0] s_start, s_done;
  logic       start;
  logic       owned_q;

  hybrid_arbiter #(
    .N_MASTERS  (N),
    .GROUP_START(GROUP_START)
  ) u_arb (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (req),
    .xfer_done(xfer_done),
    .grant    (grant),
    .grant_idx(grant_idx),
    .bus_state(bus_state)
  );

  for (genvar m = 0; m < N; m++) begin : g_m
    bus_master_model #(.IDLE_MAX(IDLE_MAX)) u_m (
      .clk      (clk),
      .rst_n    (rst_n),
      .grant    (grant[m]),
      .xfer_done(xfer_done),
      .req      (req[m]),
      .burst_len(burst_len[m]),
      .slave_sel(slave_sel[m]),
      .row      (row[m])
    );
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) owned_q <= 1'b0;
    else        owned_q <= (grant != '0) && !xfer_done;

  assign start = (grant != '0) && !owned_q;

  for (genvar s = 0; s < S; s++) begin : g_s
    assign s_start[s] = start && (slave_sel[grant_idx] == 2'(s));
    sdram_slave_model u_s (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (s_start[s]),
      .burst_len(burst_len[grant_idx]),
      .row      (row[grant_idx]),
      .done     (s_done[s])
    );
  end

  assign xfer_done = |s_done;

  longint waiting [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycles <= 0;
      for (int m = 0; m < N; m++) begin
        busy[m] <= 0; wait_sum[m] <= 0; txn[m] <= 0; max_wait[m] <= 0; waiting[m] <= 0;
      end
    end else begin
      cycles <= cycles + 1;
      for (int m = 0; m < N; m++) begin
        if (grant[m]) busy[m] <= busy[m] + 1;
        if (req[m] && !grant[m]) waiting[m] <= waiting[m] + 1;
        if (req[m] && grant[m] && start) begin
          wait_sum[m] <= wait_sum[m] + waiting[m];
          if (waiting[m] > max_wait[m]) max_wait[m] <= waiting[m];
          waiting[m] <= 0;
        end
        if (grant[m] && xfer_done) txn[m] <= txn[m] + 1;
      end
    end
  end

endmodule
