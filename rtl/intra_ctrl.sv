// intra_ctrl: control unit of the intra prediction accelerator.
//
// After `start` the unit works through one PU of size N = 2^log2n in three
// phases:
//   SETUP  N/LANES+1 clocks. The first N/LANES clocks read LANES above and
//          LANES left neighbours per clock for the DC adder tree; the last
//          one reads the planar corner samples T[N] and L[N].
//   RUN    N*N/LANES clocks per mode. A column/row counter walks the PU in
//          raster order, LANES horizontally adjacent samples per clock, and
//          for every lane computes the two reference-memory addresses its
//          prediction needs (planar/DC: L[y] and T[x]; angular: the two
//          samples around the projected position, including the projection
//          of the other neighbour side for negative angles) and, for angular
//          modes, the fraction iFact.
//   DRAIN  DRAIN_CYC clocks so the pipeline empties and the cost of the mode
//          is settled before the next mode starts; DRAIN_CYC+3 clocks after
//          the last mode, so that done comes with the final decision.
// With all_modes set, RUN/DRAIN repeat for modes 0..34; otherwise only
// `mode` is predicted. `done` pulses for one clock at the end.
//
// Timing: rd_addr and orig_rd_addr are issued combinationally in the issue
// clock; everything prefixed s1_ is registered and so lines up with the
// data the block RAMs return one clock later. The sequencing by a counter
// over all PU sizes follows the published architecture; the phase split, address equations
// of the one-array reference layout and DRAIN length are this design's own.
module intra_ctrl
  import intra_pkg::*;
#(
  parameter int unsigned NMAX      = 32,
  parameter int unsigned LANES     = 4,
  parameter int unsigned DRAIN_CYC = 2,
  localparam int unsigned RAW      = $clog2(4 * NMAX + 1),
  localparam int unsigned WAW      = $clog2(NMAX * NMAX / LANES),
  localparam int unsigned NRD      = 2 * LANES
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // command
  input  logic                              start,
  input  logic [2:0]                        log2n,
  input  logic [MODE_W-1:0]                 mode,
  input  logic                              all_modes,
  input  logic                              luma,
  output logic                              busy,
  output logic                              done,
  output logic                              blk_start,   // pulses when a PU begins
  output logic [2:0]                        cur_log2n,
  output logic                              filter_en,   // DC edge filter active
  // reference memory read ports (issue clock)
  output logic [NRD-1:0][RAW-1:0]           rd_addr,
  // original-sample buffer read (issue clock)
  output logic [WAW-1:0]                    orig_rd_addr,
  // DC gathering, aligned with reference data
  output logic                              dc_clear,
  output logic                              s1_dc_load,
  output logic [$clog2(NMAX/LANES)-1:0]     s1_dc_idx,
  output logic                              s1_corner_load,
  // sample generation, aligned with reference data
  output logic                              s1_valid,
  output logic                              s1_last,
  output mode_kind_e                        s1_kind,
  output logic [MODE_W-1:0]                 s1_mode,
  output logic [LANES-1:0][4:0]             s1_x,
  output logic [4:0]                        s1_y,
  output logic [LANES-1:0][4:0]             s1_fact,
  output logic [WAW-1:0]                    s1_word
);

  localparam int unsigned CORNER = 2 * NMAX;
  localparam int unsigned DEPTH  = 4 * NMAX + 1;
  // after the last mode, wait until its cost is decided and the best bank
  // of the output memory has settled before reporting done
  localparam int unsigned FINAL_EXTRA = 3;

  ctrl_state_e       state_q;
  logic [2:0]        log2n_q;
  logic              all_q, luma_q;
  logic [MODE_W-1:0] mode_q;
  logic [5:0]        x0_q, y_q;
  logic [3:0]        cnt_q;
  logic [5:0]        n;

  assign n         = 6'd1 << log2n_q;
  assign busy      = (state_q != ST_IDLE);
  assign cur_log2n = log2n_q;
  assign filter_en = luma_q && (log2n_q < 3'd5);

  // ---------------------------------------------------------------- FSM
  logic run_last, more_modes;
  assign more_modes = all_q && (mode_q != MODE_W'(MODE_LAST));
  assign run_last = (x0_q == n - 6'(LANES)) && (y_q == n - 6'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      log2n_q <= 3'd2;
      all_q   <= 1'b0;
      luma_q  <= 1'b0;
      mode_q  <= '0;
      x0_q    <= '0;
      y_q     <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        ST_IDLE: if (start) begin
          log2n_q <= (log2n < 3'd2) ? 3'd2 : ((log2n > 3'($clog2(NMAX))) ? 3'($clog2(NMAX)) : log2n);
          all_q   <= all_modes;
          luma_q  <= luma;
          mode_q  <= all_modes ? MODE_W'(0) : ((mode > MODE_W'(MODE_LAST)) ? MODE_W'(MODE_LAST) : mode);
          cnt_q   <= '0;
          state_q <= ST_SETUP;
        end
        ST_SETUP: begin
          if (cnt_q == 4'((n / 6'(LANES)))) begin
            cnt_q   <= '0;
            x0_q    <= '0;
            y_q     <= '0;
            state_q <= ST_RUN;
          end else begin
            cnt_q <= cnt_q + 4'd1;
          end
        end
        ST_RUN: begin
          if (x0_q == n - 6'(LANES)) begin
            x0_q <= '0;
            y_q  <= y_q + 6'd1;
          end else begin
            x0_q <= x0_q + 6'(LANES);
          end
          if (run_last) begin
            cnt_q   <= '0;
            state_q <= ST_DRAIN;
          end
        end
        ST_DRAIN: begin
          if (more_modes && cnt_q == 4'(DRAIN_CYC - 1)) begin
            cnt_q   <= '0;
            x0_q    <= '0;
            y_q     <= '0;
            mode_q  <= mode_q + MODE_W'(1);
            state_q <= ST_RUN;
          end else if (!more_modes && cnt_q == 4'(DRAIN_CYC + FINAL_EXTRA - 1)) begin
            cnt_q   <= '0;
            state_q <= ST_DONE;
          end else begin
            cnt_q <= cnt_q + 4'd1;
          end
        end
        ST_DONE:  state_q <= ST_IDLE;
        default:  state_q <= ST_IDLE;
      endcase
    end
  end

  assign done      = (state_q == ST_DONE);
  assign blk_start = (state_q == ST_IDLE) && start;
  assign dc_clear  = blk_start;

  // ------------------------------------------------- address generation
  mode_kind_e        kind;
  logic signed [6:0]  angle;
  logic signed [13:0] inv;
  logic               vert;
  logic               setup_dc, setup_corner, run_issue;

  assign kind  = mode_kind(mode_q);
  assign angle = pred_angle(mode_q);
  assign inv   = inv_angle(angle);
  assign vert  = (mode_q >= MODE_W'(18));
  assign setup_dc     = (state_q == ST_SETUP) && (cnt_q != 4'((n / 6'(LANES))));
  assign setup_corner = (state_q == ST_SETUP) && (cnt_q == 4'((n / 6'(LANES))));
  assign run_issue    = (state_q == ST_RUN);

  // address of HEVC reference index k of the main side (vertical: above row)
  function automatic logic [RAW-1:0] ref_addr(input logic signed [8:0] k,
                                              input logic is_vert,
                                              input logic signed [13:0] inv_a);
    logic signed [23:0] proj;
    logic signed [9:0]  s;
    int                 a;
    if (k >= 0) begin
      a = is_vert ? (int'(CORNER) + int'(k)) : (int'(CORNER) - int'(k));
    end else begin
      proj = (24'(k) * 24'(inv_a) + 24'sd128) >>> 8;
      s    = 10'(proj) - 10'sd1;
      a    = is_vert ? (int'(CORNER) - 1 - int'(s)) : (int'(CORNER) + 1 + int'(s));
    end
    if (a < 0) a = 0;
    if (a > int'(DEPTH) - 1) a = int'(DEPTH) - 1;
    return RAW'(a);
  endfunction

  logic [LANES-1:0][4:0] lane_fact;

  always_comb begin
    logic [5:0]         x;
    logic signed [11:0] pos;
    logic signed [8:0]  iidx, k1;
    rd_addr   = '0;
    lane_fact = '0;
    x         = '0;
    pos       = '0;
    iidx      = '0;
    k1        = '0;
    if (setup_dc) begin
      for (int i = 0; i < LANES; i++) begin
        rd_addr[i]         = RAW'(CORNER + 1 + 32'(cnt_q) * LANES + i);
        rd_addr[LANES + i] = RAW'(CORNER - 1 - 32'(cnt_q) * LANES - i);
      end
    end else if (setup_corner) begin
      rd_addr[0] = RAW'(CORNER + 1 + 32'(n));
      rd_addr[1] = RAW'(CORNER - 1 - 32'(n));
    end else if (run_issue) begin
      for (int i = 0; i < LANES; i++) begin
        x    = x0_q + 6'(i);
        if (kind == KIND_ANGULAR) begin
          pos  = (vert ? 12'(signed'({1'b0, y_q + 6'd1})) : 12'(signed'({1'b0, x + 6'd1}))) * 12'(angle);
          iidx = 9'(pos >>> 5);
          lane_fact[i] = 5'(pos & 12'sd31);
          k1   = (vert ? 9'(signed'({1'b0, x})) : 9'(signed'({1'b0, y_q}))) + iidx + 9'sd1;
          rd_addr[2*i]   = ref_addr(k1, vert, inv);
          rd_addr[2*i+1] = ref_addr(k1 + 9'sd1, vert, inv);
        end else begin
          rd_addr[2*i]   = RAW'(CORNER - 1 - 32'(y_q));   // L[y]
          rd_addr[2*i+1] = RAW'(CORNER + 1 + 32'(x));     // T[x]
        end
      end
    end
  end

  assign orig_rd_addr = WAW'((32'(y_q) << (log2n_q - 3'd2)) + 32'(x0_q) / LANES);

  // ----------------------------------------------- stage-1 registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_dc_load     <= 1'b0;
      s1_dc_idx      <= '0;
      s1_corner_load <= 1'b0;
      s1_valid       <= 1'b0;
      s1_last        <= 1'b0;
      s1_kind        <= KIND_PLANAR;
      s1_mode        <= '0;
      s1_x           <= '0;
      s1_y           <= '0;
      s1_fact        <= '0;
      s1_word        <= '0;
    end else begin
      s1_dc_load     <= setup_dc;
      s1_dc_idx      <= $bits(s1_dc_idx)'(cnt_q);
      s1_corner_load <= setup_corner;
      s1_valid       <= run_issue;
      s1_last        <= run_issue && run_last;
      s1_kind        <= kind;
      s1_mode        <= mode_q;
      for (int i = 0; i < LANES; i++) s1_x[i] <= 5'(x0_q + 6'(i));
      s1_y           <= 5'(y_q);
      s1_fact        <= lane_fact;
      s1_word        <= orig_rd_addr;
    end
  end

endmodule
