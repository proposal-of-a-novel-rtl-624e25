// bus_master_model: behavioural traffic source standing in for one bus master
// (CPU, DMA, DSP, ...). Not synthesizable design content; used by testbenches.
//
// The master alternates between an idle period and one transaction. The idle
// period is drawn uniformly from 0..IDLE_MAX cycles. Then it raises `req`
// together with the transaction's parameters: a burst of 1, 4, 8 or 16 beats
// (equally likely), a target slave out of N_SLAVES and a row address out of
// N_ROWS. `req` stays high until the bus reports the end of the transaction
// (grant high and xfer_done), drops on the next clock edge and a new idle
// period starts.
module bus_master_model #(
  parameter int unsigned IDLE_MAX = 40,
  parameter int unsigned N_SLAVES = 4,
  parameter int unsigned N_ROWS   = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       grant,
  input  logic       xfer_done,
  output logic       req,
  output logic [4:0] burst_len,
  output logic [1:0] slave_sel,
  output logic [7:0] row
);

  int unsigned idle_cnt;

  function automatic logic [4:0] pick_burst();
    case ($urandom_range(0, 3))
      0:       return 5'd1;
      1:       return 5'd4;
      2:       return 5'd8;
      default: return 5'd16;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req       <= 1'b0;
      idle_cnt  <= $urandom_range(0, IDLE_MAX);
      burst_len <= 5'd1;
      slave_sel <= '0;
      row       <= '0;
    end else if (req) begin
      if (grant && xfer_done) begin
        req      <= 1'b0;
        idle_cnt <= $urandom_range(0, IDLE_MAX);
      end
    end else if (idle_cnt != 0) begin
      idle_cnt <= idle_cnt - 1;
    end else begin
      req       <= 1'b1;
      burst_len <= pick_burst();
      slave_sel <= 2'($urandom_range(0, N_SLAVES - 1));
      row       <= 8'($urandom_range(0, N_ROWS - 1));
    end
  end

endmodule
