// sdram_slave_model: behavioural timing model of an SDRAM-controller slave.
// Not synthesizable design content; used by testbenches.
//
// It only models how long the bus stays occupied by one transaction. A
// transaction starts with a one-cycle `start` pulse (the first cycle of the new
// grant) and occupies the bus for latency + burst_len cycles; `done` is high in
// the last of them. The latency is CAS latency CL, plus precharge and activate
// (T_RP + T_RCD) when the row differs from the open one, plus T_RFC when a
// refresh has come due (every REFRESH_INTERVAL cycles). The numbers are typical
// SDR SDRAM values, not taken from any particular device.
module sdram_slave_model #(
  parameter int unsigned CL               = 3,
  parameter int unsigned T_RCD            = 3,
  parameter int unsigned T_RP             = 3,
  parameter int unsigned T_RFC            = 8,
  parameter int unsigned REFRESH_INTERVAL = 780
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [4:0] burst_len,
  input  logic [7:0] row,
  output logic       done
);

  logic [7:0]  open_row;
  logic        row_valid;
  int unsigned remain;
  int unsigned refresh_timer;
  logic        refresh_due;

  function automatic int unsigned occupancy(logic [7:0] r, logic [4:0] len);
    int unsigned lat = CL;
    if (!row_valid || r != open_row) lat += T_RP + T_RCD;
    if (refresh_due)                 lat += T_RFC;
    return lat + int'(len);
  endfunction

  assign done = (remain == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remain        <= 0;
      open_row      <= '0;
      row_valid     <= 1'b0;
      refresh_timer <= 0;
      refresh_due   <= 1'b0;
    end else begin
      if (refresh_timer == REFRESH_INTERVAL - 1) begin
        refresh_timer <= 0;
        refresh_due   <= 1'b1;
      end else begin
        refresh_timer <= refresh_timer + 1;
      end
      if (start) begin
        remain      <= occupancy(row, burst_len) - 1;
        open_row    <= row;
        row_valid   <= !refresh_due;
        if (refresh_due) refresh_due <= 1'b0;
      end else if (remain != 0) begin
        remain <= remain - 1;
      end
    end
  end

endmodule
