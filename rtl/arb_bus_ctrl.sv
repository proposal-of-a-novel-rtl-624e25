// arb_bus_ctrl: bus ownership sequencing around the arbitration decision.
//
// The bus alternates between arbitration and transfer execution. While no
// master owns the bus and requests are pending, the controller spends
// ARB_CYCLES clock cycles arbitrating; on the last of them it registers the
// decision of the arbitration core (win_grant) as the bus grant and pulses
// `advance` so the core updates its round-robin state. The grant is then held,
// whatever the requests do, until the bus reports the end of the transfer with
// xfer_done. After that the grant is dropped; if any other master is requesting
// a new arbitration starts in the next cycle, otherwise the bus goes idle.
// Transfers are never pre-empted.
//
// Timing: a request seen on an idle bus in cycle t is granted from cycle
// t+ARB_CYCLES; a transfer ending (xfer_done) in cycle t is followed by the next
// grant from cycle t+1+ARB_CYCLES. The owner must drop its request no later than
// the cycle after xfer_done, or it takes part in the next arbitration again.
//
// The phase sequence and the arbitration-cycle count come from the design's bus
// model; the done handshake, the non-pre-emption rule and the reset values are
// this implementation's choices. The assertions use the asynchronous reset in
// `disable iff`, which lint reports as a net used both asynchronously and
// synchronously; that use is in the checks only, not in the logic.
module arb_bus_ctrl
  import arb_pkg::*;
#(
  parameter int unsigned N_MASTERS  = 6,
  parameter int unsigned ARB_CYCLES = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_MASTERS-1:0] req,
  input  logic                 xfer_done,
  input  logic [N_MASTERS-1:0] win_grant,
  input  logic                 win_valid,
  output logic                 advance,
  output logic [N_MASTERS-1:0] grant,
  output bus_state_e           state
);

  localparam int unsigned CW = (ARB_CYCLES > 1) ? $clog2(ARB_CYCLES) : 1;

  bus_state_e           state_q, state_d;
  logic [N_MASTERS-1:0] grant_q, grant_d;
  logic [CW-1:0]        cnt_q, cnt_d;

  always_comb begin
    state_d = state_q;
    grant_d = grant_q;
    cnt_d   = cnt_q;
    advance = 1'b0;
    unique case (state_q)
      BUS_IDLE, BUS_ARB: begin
        if (|req && win_valid) begin
          if (cnt_q == CW'(ARB_CYCLES - 1)) begin
            grant_d = win_grant;
            advance = 1'b1;
            cnt_d   = '0;
            state_d = BUS_EXEC;
          end else begin
            cnt_d   = cnt_q + 1'b1;
            state_d = BUS_ARB;
          end
        end else begin
          cnt_d   = '0;
          state_d = BUS_IDLE;
        end
      end
      BUS_EXEC: begin
        if (xfer_done) begin
          grant_d = '0;
          cnt_d   = '0;
          state_d = |(req & ~grant_q) ? BUS_ARB : BUS_IDLE;
        end
      end
      default: begin
        grant_d = '0;
        cnt_d   = '0;
        state_d = BUS_IDLE;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= BUS_IDLE;
      grant_q <= '0;
      cnt_q   <= '0;
    end else begin
      state_q <= state_d;
      grant_q <= grant_d;
      cnt_q   <= cnt_d;
    end
  end

  assign grant = grant_q;
  assign state = state_q;

  // At most one owner; an owner exists exactly in the transfer phase.
  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant_q));
  a_grant_exec:   assert property (@(posedge clk) disable iff (!rst_n)
                                   (state_q == BUS_EXEC) == (grant_q != '0));
  // The owner keeps the bus until the transfer ends.
  a_grant_held:   assert property (@(posedge clk) disable iff (!rst_n)
                                   (state_q == BUS_EXEC && !xfer_done) |=> grant_q == $past(grant_q));

endmodule
