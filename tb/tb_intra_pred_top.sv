// tb_intra_pred_top: end-to-end test of the intra prediction accelerator at
// its default size (NMAX = 32, four lanes).
//
// For every PU size 4..32 it loads neighbours and an original block, sweeps
// all 35 modes and checks every streamed group against the reference model,
// the chosen mode and its SAD against a full search in the model, the
// read-back of the best prediction, and the clock count of the run (setup,
// N*N/4 clocks per mode, drain). Expected results are computed before each
// start, so the next PU's neighbours and original samples can be written
// while the current PU is being predicted (double-buffered input memories);
// most PUs are loaded that way, and a start pulsed during the run must be
// ignored. Single-mode runs cover DC without the edge filter (chroma, and
// 32x32 luma). Each mechanism is counted and a mechanism
// that never occurred is a failure.
module tb_intra_pred_top;
  import intra_pkg::*;
  import intra_model_pkg::*;

  localparam int NMAX = 32, LANES = 4, BD = 8, DRAIN = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             ref_wr_en = 0;
  logic [7:0]       ref_wr_addr = 0;
  logic [7:0]       ref_wr_data = 0;
  logic             org_wr_en = 0;
  logic [7:0]       org_wr_addr = 0;
  logic [31:0]      org_wr_data = 0;
  logic             start = 0;
  logic [2:0]       log2n = 2;
  logic [5:0]       mode = 0;
  logic             all_modes = 0, luma = 0;
  logic             busy, done;
  logic [5:0]       best_mode;
  logic [18:0]      best_cost;
  logic [7:0]       pred_rd_addr = 0;
  logic [31:0]      pred_rd_data;
  logic             out_valid, out_last;
  logic [5:0]       out_mode;
  logic [7:0]       out_word;
  logic [3:0][7:0]  out_pred;

  intra_pred_top dut (.*);

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // done is a one-clock pulse and may arrive while the next PU is being
  // written, so its time is captured here
  bit seen_done = 0;
  int done_cycle = 0;
  always @(posedge clk)
    if (done) begin
      seen_done  <= 1;
      done_cycle <= cycles;
    end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PU being generated / loaded
  int unsigned orig[32][32];
  // expectations of the PU being predicted
  int unsigned exp_m[35][32][32];
  int          exp_best, exp_cost;
  int          cur_n;

  // mechanism counters
  int m_dc_filt = 0, m_dc_plain = 0, m_planar = 0, m_ang_pos = 0, m_ang_neg_proj = 0,
      m_pure_hv = 0, m_sweep = 0, m_new_best = 0, m_kept_best = 0, m_overlap = 0,
      m_start_ignored = 0;
  int m_size[6];

  // stream checker
  int run_len = 0;
  always @(posedge clk) begin
    if (out_valid) begin
      int y, x0;
      y  = int'(out_word) / (cur_n / 4);
      x0 = (int'(out_word) % (cur_n / 4)) * 4;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (out_pred[i] != BD'(exp_m[out_mode][y][x0+i])) begin
          failures++;
          if (failures < 10)
            $display("mismatch N=%0d mode=%0d x=%0d y=%0d got %0d exp %0d",
                     cur_n, out_mode, x0+i, y, out_pred[i], exp_m[out_mode][y][x0+i]);
        end
      end
      run_len++;
      if (out_last) begin
        checks++;
        if (run_len != cur_n * cur_n / 4) begin
          failures++;
          $display("mode %0d: %0d consecutive groups, expected %0d", out_mode, run_len, cur_n*cur_n/4);
        end
      end
    end else begin
      run_len = 0;
    end
    if (dut.md_done) begin
      if (dut.md_new_best) m_new_best++;
      else                 m_kept_best++;
    end
  end

  // new neighbours and original block into the model arrays
  task automatic gen_pu(int n, int style, bit lu);
    int src;
    for (int i = 0; i < 64; i++) begin
      if (style == 0) begin
        L[i] = $urandom_range(0, 255);
        T[i] = $urandom_range(0, 255);
      end else begin
        L[i] = (40 + 3*i + $urandom_range(0, 6)) % 256;
        T[i] = (200 - 2*i + $urandom_range(0, 6)) % 256;
      end
    end
    C = $urandom_range(0, 255);
    // original block: a prediction mode plus noise, so one mode wins clearly
    src = $urandom_range(0, 34);
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        int v;
        v = int'(pred_sample(n, src, lu, x, y)) + $urandom_range(0, 8) - 4;
        orig[y][x] = (v < 0) ? 0 : ((v > 255) ? 255 : v);
      end
  endtask

  // write the generated PU into the accelerator's load bank
  task automatic write_pu(int n);
    @(negedge clk);
    ref_wr_en = 1;
    ref_wr_addr = 64; ref_wr_data = 8'(C);
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      ref_wr_addr = 8'(63 - i); ref_wr_data = 8'(L[i]); @(negedge clk);
      ref_wr_addr = 8'(65 + i); ref_wr_data = 8'(T[i]); @(negedge clk);
    end
    ref_wr_en = 0;
    org_wr_en = 1;
    for (int w = 0; w < n*n/4; w++) begin
      int y, x0;
      y = w / (n/4); x0 = (w % (n/4)) * 4;
      org_wr_addr = 8'(w);
      org_wr_data = {8'(orig[y][x0+3]), 8'(orig[y][x0+2]), 8'(orig[y][x0+1]), 8'(orig[y][x0])};
      @(negedge clk);
    end
    org_wr_en = 0;
  endtask

  // expectations from the generated PU (before it is started)
  task automatic expect_pu(int n, bit all, int md, bit lu);
    int first, last;
    first = all ? 0 : md;
    last  = all ? 34 : md;
    exp_best = -1;
    exp_cost = 0;
    for (int m = first; m <= last; m++) begin
      int s;
      s = 0;
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++) begin
          exp_m[m][y][x] = pred_sample(n, m, lu, x, y);
          s += (exp_m[m][y][x] > orig[y][x]) ? exp_m[m][y][x] - orig[y][x] : orig[y][x] - exp_m[m][y][x];
        end
      if (exp_best < 0 || s < exp_cost) begin
        exp_best = m;
        exp_cost = s;
      end
    end
  endtask

  // predict the PU last written; optionally generate and write the next PU
  // (size next_n, style next_style, luma next_lu) while it runs
  task automatic run(int n, bit all, int md, bit lu, bit overlap, int next_n, int next_style, bit next_lu);
    int t0, t1, nmodes, exp_cycles, lg;
    lg = log2i(n);
    expect_pu(n, all, md, lu);
    cur_n = n;
    @(negedge clk);
    log2n = 3'(lg); all_modes = all; mode = 6'(md); luma = lu; start = 1;
    seen_done = 0;
    @(negedge clk);
    start = 0;
    t0 = cycles;
    if (overlap) begin
      gen_pu(next_n, next_style, next_lu);
      write_pu(next_n);
      if (busy) begin
        m_overlap++;
        // a start while busy must change nothing (no bank swap, no restart)
        start = 1;
        @(negedge clk);
        start = 0;
        m_start_ignored++;
      end
    end
    while (!seen_done) @(negedge clk);
    t1 = done_cycle;
    nmodes = all ? 35 : 1;
    exp_cycles = (n/4 + 1) + nmodes * (n*n/4 + DRAIN) + 3;
    checks++;
    if (t1 - t0 != exp_cycles) begin
      failures++;
      $display("N=%0d all=%0d: run took %0d clocks, expected %0d", n, all, t1 - t0, exp_cycles);
    end
    checks++;
    if (int'(best_mode) != exp_best || int'(best_cost) != exp_cost) begin
      failures++;
      $display("N=%0d: best mode %0d cost %0d, expected %0d cost %0d", n, best_mode, best_cost, exp_best, exp_cost);
    end
    // read back the best prediction
    for (int w = 0; w < n*n/4; w++) begin
      int y, x0;
      y = w / (n/4); x0 = (w % (n/4)) * 4;
      pred_rd_addr = 8'(w);
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (pred_rd_data[8*i +: 8] != 8'(exp_m[exp_best][y][x0+i])) failures++;
      end
    end
    // mechanism bookkeeping
    m_size[lg]++;
    if (all) m_sweep++;
    for (int m = (all ? 0 : md); m <= (all ? 34 : md); m++) begin
      int a;
      a = angle_of(m);
      if (m == 0) m_planar++;
      else if (m == 1) begin
        if (lu && n < 32) m_dc_filt++; else m_dc_plain++;
      end else if (a == 0) m_pure_hv++;
      else if (a > 0) m_ang_pos++;
      else if (((n*a) >>> 5) < -1) m_ang_neg_proj++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // first PU loaded while idle, the rest while the previous one runs
    gen_pu(4, 0, 1);
    write_pu(4);
    run(4,  1, 0, 1, 1, 8, 1, 1);
    run(8,  1, 0, 1, 1, 16, 0, 1);
    run(16, 1, 0, 1, 1, 32, 1, 1);
    run(32, 1, 0, 1, 1, 8, 0, 0);
    // single modes: DC chroma (no filter), DC 32x32, one angular
    run(8,  0, 1, 0, 1, 32, 1, 1);
    run(32, 0, 1, 1, 1, 16, 0, 1);
    run(16, 0, 23, 1, 0, 0, 0, 0);
    // a PU loaded while idle after a run
    gen_pu(32, 0, 1);
    write_pu(32);
    run(32, 0, 30, 1, 0, 0, 0, 0);

    begin
      string names[12];
      int cnt[12];
      names = '{"dc_filtered", "dc_unfiltered", "planar", "angular_positive",
                "angular_negative_projected", "pure_h_v", "all_mode_sweep",
                "best_bank_swap", "best_kept", "all_sizes", "load_while_busy",
                "start_while_busy"};
      cnt = '{m_dc_filt, m_dc_plain, m_planar, m_ang_pos, m_ang_neg_proj, m_pure_hv,
              m_sweep, m_new_best, m_kept_best,
              (m_size[2] > 0 && m_size[3] > 0 && m_size[4] > 0 && m_size[5] > 0) ? 1 : 0,
              m_overlap, m_start_ignored};
      foreach (cnt[i]) begin
        $display("mechanism %-28s %0d", names[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
