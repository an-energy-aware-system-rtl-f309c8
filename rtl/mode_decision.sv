// mode_decision: keeps the intra mode with the smallest prediction cost.
//
// The cost of a mode is the sum of absolute differences (SAD) between its
// predicted samples and the original samples of the PU. LANES pairs arrive
// per clock together with the mode number; in_last marks the final group of
// a mode. One clock after in_last the mode is closed: mode_done pulses, and
// new_best pulses with it when the mode's cost is strictly below the best so
// far (so on a tie the mode evaluated first is kept). clear, pulsed at the
// start of a PU, forgets the previous best. The published architecture only says that the
// mode with the smallest cost is chosen; SAD as the cost is this design's
// choice.
module mode_decision #(
  parameter int unsigned NMAX      = 32,
  parameter int unsigned BIT_DEPTH = 8,
  parameter int unsigned LANES     = 4,
  localparam int unsigned COST_W   = BIT_DEPTH + 2 * $clog2(NMAX) + 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clear,
  input  logic                              in_valid,
  input  logic                              in_last,
  input  logic [intra_pkg::MODE_W-1:0]      in_mode,
  input  logic [LANES-1:0][BIT_DEPTH-1:0]   pred,
  input  logic [LANES-1:0][BIT_DEPTH-1:0]   orig,
  output logic                              mode_done,
  output logic                              new_best,
  output logic [COST_W-1:0]                 mode_cost,
  output logic [intra_pkg::MODE_W-1:0]      best_mode,
  output logic [COST_W-1:0]                 best_cost
);

  logic [COST_W-1:0] acc_q, group_sad, total;

  always_comb begin
    group_sad = '0;
    for (int i = 0; i < LANES; i++) begin
      if (pred[i] > orig[i]) group_sad = group_sad + COST_W'(pred[i] - orig[i]);
      else                   group_sad = group_sad + COST_W'(orig[i] - pred[i]);
    end
    total = acc_q + group_sad;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      mode_done <= 1'b0;
      new_best  <= 1'b0;
      mode_cost <= '0;
      best_mode <= '0;
      best_cost <= '1;
    end else begin
      mode_done <= 1'b0;
      new_best  <= 1'b0;
      if (clear) begin
        acc_q     <= '0;
        best_cost <= '1;
        best_mode <= '0;
      end else if (in_valid) begin
        if (in_last) begin
          acc_q     <= '0;
          mode_done <= 1'b1;
          mode_cost <= total;
          if (total < best_cost) begin
            new_best  <= 1'b1;
            best_cost <= total;
            best_mode <= in_mode;
          end
        end else begin
          acc_q <= total;
        end
      end
    end
  end

endmodule
