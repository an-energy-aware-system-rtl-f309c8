// tb_workload_4k30: throughput of the accelerator on the 3840x2160 4:2:0
// 30 fps workload, one prediction mode per sample.
//
// A 64x64 region of a synthetic picture (a gradient plus a diagonal edge,
// plus noise) is predicted PU by PU for each PU size, with the neighbours
// taken from the picture at the PU's position and a different mode for each
// PU. The host side streams: while one PU is predicted, the next PU's
// neighbours (4N+1 writes, one sample per clock) and original samples (N*N/4
// words) are written into the load banks, on the two write ports at once.
// A PU is started once its data is written and the previous PU is done, so
// the measured period is whichever is longer, loading or predicting.
// Every sample is checked against the reference model and every PU's
// start-to-done clock count against the schedule. Elapsed clocks give
// samples per clock; at a 143.65 MHz clock the testbench then checks which
// PU sizes sustain the 3840*2160*1.5*30 = 373,248,000 samples/s this video
// needs: 16x16 and larger do; 8x8 PUs alone fall short (neighbour loading
// takes longer than predicting) and 4x4 PUs alone well short.
module tb_workload_4k30;
  import intra_model_pkg::*;

  localparam longint NEED_SPS = 64'd3840 * 2160 * 3 / 2 * 30;
  localparam longint CLK_KHZ  = 143650;

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
  logic             all_modes = 0, luma = 1;
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
  int cur_n = 4;
  always @(posedge clk) cycles <= cycles + 1;

  // done is a one-clock pulse and may arrive while the next PU is still
  // being written, so it is captured here
  bit seen_done = 0;
  int done_cycle = 0;
  always @(posedge clk)
    if (done) begin
      seen_done  <= 1;
      done_cycle <= cycles;
    end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // synthetic picture, 128x128 so every PU of the 64x64 region has
  // 2N neighbours in both directions
  int unsigned pic[128][128];

  always @(posedge clk) begin
    if (out_valid) begin
      int y, x0;
      y  = int'(out_word) / (cur_n / 4);
      x0 = (int'(out_word) % (cur_n / 4)) * 4;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (out_pred[i] != 8'(pred_sample(cur_n, int'(out_mode), 1'b1, x0 + i, y))) failures++;
      end
    end
  end

  // neighbours of the PU at (px, py) into the load bank
  task automatic write_ref(int n, int px, int py);
    @(negedge clk);
    ref_wr_en = 1;
    ref_wr_addr = 8'd64; ref_wr_data = 8'(pic[py - 1][px - 1]); @(negedge clk);
    for (int i = 0; i < 2*n; i++) begin
      ref_wr_addr = 8'(63 - i); ref_wr_data = 8'(pic[py + i][px - 1]); @(negedge clk);
      ref_wr_addr = 8'(65 + i); ref_wr_data = 8'(pic[py - 1][px + i]); @(negedge clk);
    end
    ref_wr_en = 0;
  endtask

  // original samples of the PU at (px, py) into the load bank
  task automatic write_org(int n, int px, int py);
    @(negedge clk);
    org_wr_en = 1;
    for (int w = 0; w < n*n/4; w++) begin
      int y, x0;
      y = w / (n/4); x0 = (w % (n/4)) * 4;
      org_wr_addr = 8'(w);
      org_wr_data = {8'(pic[py+y][px+x0+3]), 8'(pic[py+y][px+x0+2]),
                     8'(pic[py+y][px+x0+1]), 8'(pic[py+y][px+x0])};
      @(negedge clk);
    end
    org_wr_en = 0;
  endtask

  // the model's view of the PU being predicted
  task automatic model_pu(int n, int px, int py);
    for (int i = 0; i < 2*n; i++) begin
      L[i] = pic[py + i][px - 1];
      T[i] = pic[py - 1][px + i];
    end
    C = pic[py - 1][px - 1];
  endtask

  // start the PU in the load bank; write the next one (if any) meanwhile
  task automatic predict_pu(int n, int px, int py, int md, bit more, int nx, int ny);
    int t0;
    model_pu(n, px, py);
    @(negedge clk);
    log2n = 3'(log2i(n)); mode = 6'(md); start = 1;
    seen_done = 0;
    @(negedge clk);
    start = 0;
    t0 = cycles;
    if (more)
      fork
        write_ref(n, nx, ny);
        write_org(n, nx, ny);
      join
    while (!seen_done) @(negedge clk);
    checks++;
    if (done_cycle - t0 != (n/4 + 1) + (n*n/4 + 2) + 3) failures++;
  endtask

  initial begin
    longint sps[6];
    for (int y = 0; y < 128; y++)
      for (int x = 0; x < 128; x++)
        pic[y][x] = ((x + 2*y) / 2 + ((x > y) ? 60 : 0) + $urandom_range(0, 7)) % 256;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int lg = 2; lg <= 5; lg++) begin
      int n, c0, cyc, k, npu;
      longint samples;
      n = 1 << lg;
      cur_n = n;
      npu = (64 / n) * (64 / n);
      samples = 0;
      // first PU written while idle, outside the measured time
      fork
        write_ref(n, 32, 32);
        write_org(n, 32, 32);
      join
      c0 = cycles;
      for (k = 0; k < npu; k++) begin
        int bx, by, nbx, nby;
        bx  = (k % (64 / n)) * n;
        by  = (k / (64 / n)) * n;
        nbx = ((k + 1) % (64 / n)) * n;
        nby = ((k + 1) / (64 / n)) * n;
        predict_pu(n, 32 + bx, 32 + by, (bx / n + 3 * (by / n)) % 35,
                   k + 1 < npu, 32 + nbx, 32 + nby);
        samples += n * n;
      end
      cyc = cycles - c0;
      // samples per second at the clock rate, from samples per clock
      sps[lg] = samples * CLK_KHZ * 1000 / cyc;
      $display("PU %0dx%0d: %0d samples in %0d clocks (%0d per PU), %0d Msample/s at 143.65 MHz, need %0d: %s",
               n, n, samples, cyc, cyc / npu, sps[lg] / 1000000, NEED_SPS / 1000000,
               (sps[lg] >= NEED_SPS) ? "sustains 4K30" : "below 4K30");
      checks++;
      if ((sps[lg] >= NEED_SPS) != (n >= 16)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
