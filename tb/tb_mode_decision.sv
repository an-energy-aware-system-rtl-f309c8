// tb_mode_decision: streams random predicted/original groups for a series
// of modes and checks the per-mode SAD, the new-best pulse and the best mode
// and cost against sums formed in the testbench; then clears and repeats.
module tb_mode_decision;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            clear = 0, in_valid = 0, in_last = 0;
  logic [5:0]      in_mode = 0;
  logic [3:0][7:0] pred = '0, orig = '0;
  logic            mode_done, new_best;
  logic [18:0]     mode_cost, best_cost;
  logic [5:0]      best_mode;

  mode_decision dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bestc, bestm, ties;
    ties = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      int groups;
      groups = (blk == 2) ? 256 : 16;
      clear = 1; @(negedge clk); clear = 0;
      bestc = 32'h7fffffff; bestm = 0;
      for (int m = 0; m < 35; m++) begin
        int s;
        s = 0;
        for (int g = 0; g < groups; g++) begin
          in_valid = 1; in_mode = 6'(m); in_last = (g == groups - 1);
          for (int i = 0; i < 4; i++) begin
            pred[i] = 8'($urandom); orig[i] = 8'($urandom);
            s += (pred[i] > orig[i]) ? pred[i] - orig[i] : orig[i] - pred[i];
          end
          @(negedge clk);
        end
        in_valid = 0; in_last = 0;
        checks++;
        if (!mode_done || int'(mode_cost) != s) failures++;
        checks++;
        if (new_best != (s < bestc)) failures++;
        if (s < bestc) begin bestc = s; bestm = m; end
        else if (s == bestc) ties++;
        @(negedge clk);
        checks++;
        if (mode_done) failures++;     // single pulse
      end
      checks++;
      if (int'(best_mode) != bestm || int'(best_cost) != bestc) begin
        failures++;
        $display("best %0d/%0d expected %0d/%0d", best_mode, best_cost, bestm, bestc);
      end
    end
    // explicit tie: identical data for two modes, the first must stay best
    clear = 1; @(negedge clk); clear = 0;
    for (int m = 0; m < 2; m++) begin
      in_valid = 1; in_last = 1; in_mode = 6'(m + 7);
      pred = {8'd10, 8'd20, 8'd30, 8'd40}; orig = '0;
      @(negedge clk);
      in_valid = 0; in_last = 0;
      @(negedge clk);
    end
    checks++;
    if (best_mode != 6'd7 || best_cost != 19'd100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
