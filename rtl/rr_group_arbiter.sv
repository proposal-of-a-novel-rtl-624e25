// rr_group_arbiter: round-robin arbiter for the masters of one priority group.
//
// The masters of a group share one priority level and take turns: the master
// that won last has the lowest priority next time, the one after it (in index
// order, wrapping) the highest. The decision is combinational from `req` and a
// registered "last winner" index. The index moves only when `advance` is high
// while a request is present, i.e. when the surrounding arbiter actually hands
// the bus to this group's winner; a group that lost to a higher-priority group
// keeps its turn order.
//
// Interface: req[SIZE] in, grant[SIZE] one-hot out (combinational), valid = some
// request present. advance is sampled on the rising clock edge. Asynchronous
// active-low reset puts the pointer on the last master, so master 0 of the group
// is served first.
//
// Round-robin inside a group is the design's idea; the ascending rotation order
// and the reset value are this implementation's choices. SIZE = 1 degenerates to
// a plain pass-through of the one request.
module rr_group_arbiter #(
  parameter int unsigned SIZE = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [SIZE-1:0] req,
  input  logic            advance,
  output logic [SIZE-1:0] grant,
  output logic            valid
);

  localparam int unsigned PW = (SIZE > 1) ? $clog2(SIZE) : 1;

  logic [PW-1:0] last_q;
  logic [PW-1:0] win_idx;

  // Search starting one past the last winner; SIZE steps cover every master.
  always_comb begin
    int unsigned idx;
    grant   = '0;
    valid   = 1'b0;
    win_idx = last_q;
    for (int unsigned k = 1; k <= SIZE; k++) begin
      idx = int'(last_q) + k;
      if (idx >= SIZE) idx = idx - SIZE;
      if (!valid && req[idx]) begin
        valid   = 1'b1;
        win_idx = PW'(idx);
      end
    end
    if (valid) grant[win_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last_q <= PW'(SIZE - 1);
    else if (advance && valid) last_q <= win_idx;
  end

endmodule
