// tb_intra_ctrl: runs the control unit against a behavioural reference
// memory laid out as in the accelerator (corner at 64, left column below,
// above row after it). For every PU size it sweeps all modes and checks:
// the DC gathering reads the right above/left samples, the corner step reads
// T[N] and L[N], every planar/DC lane addresses L[y] and T[x], and every
// angular lane's two addresses and fraction give the model's sample when
// interpolated. Clock counts of the setup, each mode and the whole run are
// checked too.
module tb_intra_ctrl;
  import intra_pkg::*;
  import intra_model_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            start = 0;
  logic [2:0]      log2n = 2;
  logic [5:0]      mode = 0;
  logic            all_modes = 0, luma = 0;
  logic            busy, done, blk_start, filter_en, dc_clear;
  logic [2:0]      cur_log2n;
  logic [7:0][7:0] rd_addr;
  logic [7:0]      orig_rd_addr;
  logic            s1_dc_load, s1_corner_load;
  logic [2:0]      s1_dc_idx;
  logic            s1_valid, s1_last;
  mode_kind_e      s1_kind;
  logic [5:0]      s1_mode;
  logic [3:0][4:0] s1_x, s1_fact;
  logic [4:0]      s1_y;
  logic [7:0]      s1_word;

  intra_ctrl dut (.*);

  int unsigned R[129];
  logic [7:0][7:0] rdat;
  always @(posedge clk) for (int p = 0; p < 8; p++) rdat[p] <= 8'(R[rd_addr[p]]);

  int cur_n;
  int setup_cycles = 0, groups = 0, words_bad = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && s1_dc_load) begin
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (int'(rdat[i]) != T[4*s1_dc_idx+i]) failures++;
        if (int'(rdat[4+i]) != L[4*s1_dc_idx+i]) failures++;
      end
    end
    if (rst_n && s1_corner_load) begin
      checks++;
      if (int'(rdat[0]) != T[cur_n] || int'(rdat[1]) != L[cur_n]) failures++;
    end
    if (rst_n && s1_valid) begin
      groups++;
      checks++;
      if (int'(s1_word) != int'(s1_y) * (cur_n/4) + int'(s1_x[0]) / 4) failures++;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (s1_kind == KIND_ANGULAR) begin
          int unsigned v;
          v = ((32 - s1_fact[i]) * rdat[2*i] + s1_fact[i] * rdat[2*i+1] + 16) >> 5;
          if (v != pred_sample(cur_n, int'(s1_mode), 1'b0, int'(s1_x[i]), int'(s1_y))) begin
            failures++;
            if (failures < 10) $display("N=%0d mode %0d x=%0d y=%0d", cur_n, s1_mode, s1_x[i], s1_y);
          end
        end else begin
          if (int'(rdat[2*i]) != L[s1_y] || int'(rdat[2*i+1]) != T[s1_x[i]]) failures++;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      L[i] = $urandom_range(0, 255);
      T[i] = $urandom_range(0, 255);
      R[63 - i] = L[i];
      R[65 + i] = T[i];
    end
    C = $urandom_range(0, 255);
    R[64] = C;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int lg = 2; lg <= 5; lg++) begin
      int t0;
      cur_n = 1 << lg;
      groups = 0;
      @(negedge clk);
      start = 1; log2n = 3'(lg); all_modes = 1; luma = 1;
      @(negedge clk);
      start = 0;
      t0 = 0;
      while (!done) begin @(negedge clk); t0++; end
      checks++;
      if (t0 != (cur_n/4 + 1) + 35 * (cur_n*cur_n/4 + 2) + 3) begin
        failures++;
        $display("N=%0d run took %0d clocks", cur_n, t0);
      end
      checks++;
      if (groups != 35 * cur_n * cur_n / 4) failures++;
      checks++;
      if (filter_en != (lg < 5)) failures++;
    end
    // single mode, chroma
    @(negedge clk);
    start = 1; log2n = 3'd3; all_modes = 0; mode = 6'd18; luma = 0; cur_n = 8; groups = 0;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (groups != 16 || filter_en) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
