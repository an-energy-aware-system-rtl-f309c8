// dc_unit: DC-mode prediction.
//
// The neighbours are gathered into a buffer of 2*NMAX samples (the above row
// in the first half, the left column in the second), LANES of each per
// clock as they arrive from the reference memory. An adder tree over the
// whole buffer (64 inputs for NMAX = 32) gives the sum of the N above and N
// left samples; unused entries are cleared to zero so the same tree serves
// every PU size. dcVal = (sum + N) >> (log2(N)+1) is registered once the
// gathering is complete.
//
// Each of the LANES output lanes then produces one sample per clock: dcVal
// itself, or, when filtering is enabled, the smoothed first row and column
//   (0,0): (L[0] + 2*dcVal + T[0] + 2) >> 2
//   (x,0): (T[x] + 3*dcVal + 2) >> 2
//   (0,y): (L[y] + 3*dcVal + 2) >> 2
// using only shifts and adds. lane_left / lane_top are L[y] and T[x] of the
// lane's sample. Lane outputs appear two clocks after their inputs, the same
// latency as intra_pe, so both can share one output multiplexer.
//
// Timing: load_* at cycle t enters the buffer at t+1; dc_val is valid from
// two clocks after the last load. The adder tree and the filter equations
// follow the published architecture; the gathering buffer is this design's choice.
module dc_unit #(
  parameter int unsigned NMAX      = 32,
  parameter int unsigned BIT_DEPTH = 8,
  parameter int unsigned LANES     = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [2:0]                        log2n,
  // gathering of the neighbours
  input  logic                              clear,
  input  logic                              load_valid,
  input  logic [$clog2(NMAX/LANES)-1:0]     load_idx,
  input  logic [LANES-1:0][BIT_DEPTH-1:0]   load_top,
  input  logic [LANES-1:0][BIT_DEPTH-1:0]   load_left,
  output logic [BIT_DEPTH-1:0]              dc_val,
  // per-lane sample generation
  input  logic                              filter_en,
  input  logic                              lane_valid,
  input  logic [LANES-1:0][4:0]             lane_x,
  input  logic [4:0]                        lane_y,
  input  logic [LANES-1:0][BIT_DEPTH-1:0]   lane_left,
  input  logic [LANES-1:0][BIT_DEPTH-1:0]   lane_top,
  output logic                              out_valid,
  output logic [LANES-1:0][BIT_DEPTH-1:0]   out_pred
);

  localparam int unsigned NIN = 2 * NMAX;
  localparam int unsigned SW  = BIT_DEPTH + $clog2(NIN) + 1;

  logic [NIN-1:0][BIT_DEPTH-1:0] buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
    end else if (clear) begin
      buf_q <= '0;
    end else if (load_valid) begin
      for (int i = 0; i < LANES; i++) begin
        buf_q[32'(load_idx) * LANES + i]        <= load_top[i];
        buf_q[NMAX + 32'(load_idx) * LANES + i] <= load_left[i];
      end
    end
  end

  // adder tree over all buffer entries
  logic [SW-1:0] tree_sum;
  always_comb begin
    tree_sum = '0;
    for (int i = 0; i < NIN; i++) tree_sum = tree_sum + SW'(buf_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dc_val <= '0;
    else        dc_val <= BIT_DEPTH'((tree_sum + (SW'(1) << log2n)) >> (log2n + 3'd1));
  end

  // lane filters: stage 1 computes, stage 2 delays to match intra_pe latency
  logic [LANES-1:0][BIT_DEPTH-1:0] stage1;
  logic                            valid1;
  localparam int unsigned FW = BIT_DEPTH + 3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1    <= '0;
      valid1    <= 1'b0;
      out_pred  <= '0;
      out_valid <= 1'b0;
    end else begin
      for (int i = 0; i < LANES; i++) begin
        logic [FW-1:0] dc2, dc3, v;
        dc2 = FW'(dc_val) << 1;
        dc3 = dc2 + FW'(dc_val);
        if (filter_en && lane_x[i] == 5'd0 && lane_y == 5'd0)
          v = (FW'(lane_left[i]) + dc2 + FW'(lane_top[i]) + FW'(2)) >> 2;
        else if (filter_en && lane_y == 5'd0)
          v = (FW'(lane_top[i]) + dc3 + FW'(2)) >> 2;
        else if (filter_en && lane_x[i] == 5'd0)
          v = (FW'(lane_left[i]) + dc3 + FW'(2)) >> 2;
        else
          v = FW'(dc_val);
        stage1[i] <= BIT_DEPTH'(v);
      end
      valid1    <= lane_valid;
      out_pred  <= stage1;
      out_valid <= valid1;
    end
  end

endmodule
