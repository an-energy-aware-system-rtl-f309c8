// intra_pred_top: HEVC intra prediction accelerator.
//
// Predicts a square prediction unit (PU) of 4x4 up to NMAX x NMAX samples from
// its already-decoded neighbours, in one of the 35 HEVC intra modes or in all
// of them, LANES samples per clock, and picks the mode whose prediction is
// closest to the original block.
//
// Structure (data flows top to bottom):
//   ref_ram      neighbours of the PU in one array, two banks (load /
//                process), loaded by the host
//   intra_ctrl   sequencing and per-lane reference addresses
//   dc_unit      DC mode: adder tree, shift and edge filter for LANES lanes
//   intra_pe x LANES  planar and angular samples, one per lane
//   output mux   DC lanes or PE lanes, by mode
//   sample_ram   output memory with two PU-sized banks (current / best)
//                and a second instance holding the original samples
//                (two banks, load / process)
//   mode_decision SAD per mode and the best mode so far
//
// Host protocol: write the 4*NMAX+1 neighbours through ref_wr_* (layout in
// ref_ram) and the original PU, row-major, LANES samples per word, through
// org_wr_*; pulse start with log2n (2..log2(NMAX)), mode, all_modes and
// luma. The reference and original memories are double-buffered: host
// writes go to the load bank, and start hands that bank to the prediction
// and switches host writes to the other bank, so the next PU can be loaded
// while the current one is predicted. busy is high until done pulses; then
// best_mode / best_cost hold the decision and pred_rd_addr / pred_rd_data
// (one clock read latency) read the best mode's prediction in the same word
// order. The next start may follow as soon as busy is low; a start while
// busy is ignored. Every predicted group is
// also streamed on out_*.
//
// Timing: a PU takes N/LANES+1 setup clocks, then N*N/LANES clocks per mode
// plus DRAIN_CYC clocks between modes; an output group appears 3 clocks
// after its issue. The block split, the four parallel PEs, DC adder tree and
// block-RAM storage and loading while processing follow the published
// architecture; the bank organisation of the memories, SAD cost and the host
// protocol are this design's choices.
module intra_pred_top
  import intra_pkg::*;
#(
  parameter int unsigned NMAX      = 32,
  parameter int unsigned LANES     = 4,
  parameter int unsigned BIT_DEPTH = 8,
  parameter int unsigned DRAIN_CYC = 2,
  localparam int unsigned RAW      = $clog2(4 * NMAX + 1),
  localparam int unsigned WAW      = $clog2(NMAX * NMAX / LANES),
  localparam int unsigned COST_W   = BIT_DEPTH + 2 * $clog2(NMAX) + 1,
  localparam int unsigned WW       = LANES * BIT_DEPTH
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // reference sample load
  input  logic                             ref_wr_en,
  input  logic [RAW-1:0]                   ref_wr_addr,
  input  logic [BIT_DEPTH-1:0]             ref_wr_data,
  // original sample load
  input  logic                             org_wr_en,
  input  logic [WAW-1:0]                   org_wr_addr,
  input  logic [WW-1:0]                    org_wr_data,
  // command / status
  input  logic                             start,
  input  logic [2:0]                       log2n,
  input  logic [MODE_W-1:0]                mode,
  input  logic                             all_modes,
  input  logic                             luma,
  output logic                             busy,
  output logic                             done,
  output logic [MODE_W-1:0]                best_mode,
  output logic [COST_W-1:0]                best_cost,
  // best prediction read-back
  input  logic [WAW-1:0]                   pred_rd_addr,
  output logic [WW-1:0]                    pred_rd_data,
  // prediction stream
  output logic                             out_valid,
  output logic                             out_last,
  output logic [MODE_W-1:0]                out_mode,
  output logic [WAW-1:0]                   out_word,
  output logic [LANES-1:0][BIT_DEPTH-1:0]  out_pred
);

  localparam int unsigned NRD = 2 * LANES;

  // ------------------------------------------------------------ control
  logic                              blk_start, filter_en, dc_clear;
  logic [2:0]                        cur_log2n;
  logic [NRD-1:0][RAW-1:0]           rd_addr;
  logic [NRD-1:0][BIT_DEPTH-1:0]     rd_data;
  logic [WAW-1:0]                    orig_rd_addr;
  logic                              s1_dc_load, s1_corner_load;
  logic [$clog2(NMAX/LANES)-1:0]     s1_dc_idx;
  logic                              s1_valid, s1_last;
  mode_kind_e                        s1_kind;
  logic [MODE_W-1:0]                 s1_mode;
  logic [LANES-1:0][4:0]             s1_x, s1_fact;
  logic [4:0]                        s1_y;
  logic [WAW-1:0]                    s1_word;

  intra_ctrl #(.NMAX(NMAX), .LANES(LANES), .DRAIN_CYC(DRAIN_CYC)) u_ctrl (
    .clk, .rst_n,
    .start, .log2n, .mode, .all_modes, .luma,
    .busy, .done, .blk_start, .cur_log2n, .filter_en,
    .rd_addr, .orig_rd_addr,
    .dc_clear, .s1_dc_load, .s1_dc_idx, .s1_corner_load,
    .s1_valid, .s1_last, .s1_kind, .s1_mode, .s1_x, .s1_y, .s1_fact, .s1_word
  );

  // ------------------------------------------------- reference memory
  // load/process bank pointers of the double-buffered input memories
  logic load_bank_q, proc_bank_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_bank_q <= 1'b0;
      proc_bank_q <= 1'b0;
    end else if (blk_start) begin
      proc_bank_q <= load_bank_q;
      load_bank_q <= ~load_bank_q;
    end
  end

  logic rd_bank;
  assign rd_bank = blk_start ? load_bank_q : proc_bank_q;

  ref_ram #(.NMAX(NMAX), .BIT_DEPTH(BIT_DEPTH), .NRD(NRD)) u_ref (
    .clk,
    .wr_en(ref_wr_en), .wr_bank(load_bank_q), .wr_addr(ref_wr_addr), .wr_data(ref_wr_data),
    .rd_bank, .rd_addr, .rd_data
  );

  // planar corner samples T[N] and L[N]
  logic [BIT_DEPTH-1:0] top_n_q, left_n_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_n_q  <= '0;
      left_n_q <= '0;
    end else if (s1_corner_load) begin
      top_n_q  <= rd_data[0];
      left_n_q <= rd_data[1];
    end
  end

  // lane operands: even port = L[y] / first angular sample, odd = T[x] / second
  logic [LANES-1:0][BIT_DEPTH-1:0] lane_a, lane_b, load_top, load_left;
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      lane_a[i]    = rd_data[2*i];
      lane_b[i]    = rd_data[2*i+1];
      load_top[i]  = rd_data[i];
      load_left[i] = rd_data[LANES+i];
    end
  end

  // ------------------------------------------------------------ DC unit
  logic                            dc_out_valid;
  logic [LANES-1:0][BIT_DEPTH-1:0] dc_pred;
  logic [BIT_DEPTH-1:0]            dc_val;

  dc_unit #(.NMAX(NMAX), .BIT_DEPTH(BIT_DEPTH), .LANES(LANES)) u_dc (
    .clk, .rst_n, .log2n(cur_log2n),
    .clear(dc_clear), .load_valid(s1_dc_load), .load_idx(s1_dc_idx),
    .load_top, .load_left, .dc_val,
    .filter_en, .lane_valid(s1_valid && s1_kind == KIND_DC),
    .lane_x(s1_x), .lane_y(s1_y), .lane_left(lane_a), .lane_top(lane_b),
    .out_valid(dc_out_valid), .out_pred(dc_pred)
  );

  // ------------------------------------------------ planar/angular PEs
  logic [LANES-1:0]                pe_valid;
  logic [LANES-1:0][BIT_DEPTH-1:0] pe_pred, pe_s1, pe_s2;

  for (genvar i = 0; i < LANES; i++) begin : g_pe
    intra_pe #(.BIT_DEPTH(BIT_DEPTH)) u_pe (
      .clk, .rst_n,
      .in_valid(s1_valid && s1_kind != KIND_DC),
      .planar(s1_kind == KIND_PLANAR),
      .x(s1_x[i]), .y(s1_y), .log2n(cur_log2n), .fact(s1_fact[i]),
      .ref_a(lane_a[i]), .ref_b(lane_b[i]), .top_n(top_n_q), .left_n(left_n_q),
      .out_valid(pe_valid[i]), .s1(pe_s1[i]), .s2(pe_s2[i]), .pred(pe_pred[i])
    );
  end

  // ------------------------------- side-band delay to the output stage
  logic [1:0]              dly_last;
  logic [1:0]              dly_dc;
  logic [1:0][MODE_W-1:0]  dly_mode;
  logic [1:0][WAW-1:0]     dly_word;
  logic [WW-1:0]           org_rd_data;
  logic [WW-1:0]           org_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly_last <= '0;
      dly_dc   <= '0;
      dly_mode <= '0;
      dly_word <= '0;
      org_q    <= '0;
    end else begin
      dly_last <= {dly_last[0], s1_last};
      dly_dc   <= {dly_dc[0], s1_kind == KIND_DC};
      dly_mode <= {dly_mode[0], s1_mode};
      dly_word <= {dly_word[0], s1_word};
      org_q    <= org_rd_data;
    end
  end

  assign out_valid = dc_out_valid | pe_valid[0];
  assign out_last  = dly_last[1];
  assign out_mode  = dly_mode[1];
  assign out_word  = dly_word[1];
  assign out_pred  = dly_dc[1] ? dc_pred : pe_pred;

  // original samples aligned with the output stage (one more register
  // after the block-RAM read to cover the PE's second stage)
  logic [WW-1:0] org_aligned;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) org_aligned <= '0;
    else        org_aligned <= org_q;
  end

  sample_ram #(.DEPTH(2 * NMAX * NMAX / LANES), .WIDTH(WW)) u_org (
    .clk,
    .wr_en(org_wr_en), .wr_addr({load_bank_q, org_wr_addr}), .wr_data(org_wr_data),
    .rd_addr({rd_bank, orig_rd_addr}), .rd_data(org_rd_data)
  );

  // ------------------------------------------------------ mode decision
  logic                 md_done, md_new_best;
  logic [COST_W-1:0]    md_cost;

  mode_decision #(.NMAX(NMAX), .BIT_DEPTH(BIT_DEPTH), .LANES(LANES)) u_md (
    .clk, .rst_n, .clear(blk_start),
    .in_valid(out_valid), .in_last(out_last), .in_mode(out_mode),
    .pred(out_pred), .orig(org_aligned),
    .mode_done(md_done), .new_best(md_new_best), .mode_cost(md_cost),
    .best_mode, .best_cost
  );

  // ------------------------------------------ double-banked output memory
  logic best_bank_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           best_bank_q <= 1'b0;
    else if (blk_start)   best_bank_q <= 1'b0;
    else if (md_new_best) best_bank_q <= ~best_bank_q;
  end

  sample_ram #(.DEPTH(2 * NMAX * NMAX / LANES), .WIDTH(WW)) u_pred (
    .clk,
    .wr_en(out_valid), .wr_addr({~best_bank_q, out_word}), .wr_data(out_pred),
    .rd_addr({best_bank_q, pred_rd_addr}), .rd_data(pred_rd_data)
  );

  // a new mode may only start writing once the previous one is decided
  property p_no_overlap;
    @(posedge clk) disable iff (!rst_n) md_done |-> !out_valid;
  endproperty
  a_no_overlap: assert property (p_no_overlap);

endmodule
