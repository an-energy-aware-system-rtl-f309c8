// tb_dc_unit: for each PU size, gathers random neighbours into the DC unit,
// checks dcVal = (sum + N) >> (log2 N + 1), then drives lane groups across the
// whole block with the edge filter on and off and checks every lane two
// clocks later against the first row/column filter.
module tb_dc_unit;
  import intra_model_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]      log2n = 2;
  logic            clear = 0, load_valid = 0;
  logic [2:0]      load_idx = 0;
  logic [3:0][7:0] load_top = '0, load_left = '0;
  logic [7:0]      dc_val;
  logic            filter_en = 0, lane_valid = 0;
  logic [3:0][4:0] lane_x = '0;
  logic [4:0]      lane_y = 0;
  logic [3:0][7:0] lane_left = '0, lane_top = '0;
  logic            out_valid;
  logic [3:0][7:0] out_pred;

  dc_unit dut (.*);

  typedef struct { int unsigned v[4]; int t; } exp_t;
  exp_t exp_q[$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (cyc - e.t != 2) failures++;          // two-clock latency
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (out_pred[i] != 8'(e.v[i])) failures++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 8; rep++)
    for (int lg = 2; lg <= 5; lg++) begin
      int n;
      n = 1 << lg;
      for (int i = 0; i < 64; i++) begin
        L[i] = (rep == 0) ? 255 : $urandom_range(0, 255);
        T[i] = (rep == 0) ? 255 : $urandom_range(0, 255);
      end
      log2n = 3'(lg);
      clear = 1; @(negedge clk); clear = 0;
      for (int k = 0; k < n / 4; k++) begin
        load_valid = 1; load_idx = 3'(k);
        for (int i = 0; i < 4; i++) begin
          load_top[i]  = 8'(T[4*k+i]);
          load_left[i] = 8'(L[4*k+i]);
        end
        @(negedge clk);
      end
      load_valid = 0;
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (dc_val != 8'(dc_value(n))) begin
        failures++;
        $display("N=%0d dcVal %0d expected %0d", n, dc_val, dc_value(n));
      end
      for (int y = 0; y < n; y++)
        for (int x0 = 0; x0 < n; x0 += 4) begin
          exp_t e;
          filter_en = (rep % 2 == 0);
          lane_valid = 1; lane_y = 5'(y);
          for (int i = 0; i < 4; i++) begin
            lane_x[i] = 5'(x0 + i);
            lane_left[i] = 8'(L[y]);
            lane_top[i]  = 8'(T[x0+i]);
            // 32x32 is never filtered in this model; drive the filter
            // explicitly and compute the equations here
            if (filter_en && x0+i == 0 && y == 0) e.v[i] = (L[0] + 2*dc_value(n) + T[0] + 2) >> 2;
            else if (filter_en && y == 0)         e.v[i] = (T[x0+i] + 3*dc_value(n) + 2) >> 2;
            else if (filter_en && x0+i == 0)      e.v[i] = (L[y] + 3*dc_value(n) + 2) >> 2;
            else                                  e.v[i] = dc_value(n);
          end
          e.t = cyc;
          exp_q.push_back(e);
          @(negedge clk);
        end
      lane_valid = 0;
      repeat (3) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
