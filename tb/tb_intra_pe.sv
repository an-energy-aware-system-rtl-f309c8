// tb_intra_pe: drives the processing element with a random planar or
// angular operation every clock and checks each result two clocks later
// against the planar and angular equations evaluated in the testbench.
module tb_intra_pe;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, planar = 0;
  logic [4:0] x = 0, y = 0, fact = 0;
  logic [2:0] log2n = 2;
  logic [7:0] ref_a = 0, ref_b = 0, top_n = 0, left_n = 0;
  logic       out_valid;
  logic [7:0] s1, s2, pred;

  intra_pe dut (.*);

  int unsigned exp_q[$];
  int planar_seen = 0, angular_seen = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check outputs as they emerge
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int unsigned e;
      e = exp_q.pop_front();
      checks++;
      if (pred != 8'(e)) begin
        failures++;
        if (failures < 10) $display("PE mismatch: got %0d expected %0d", pred, e);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int n, lg, xi, yi, f;
      int unsigned a, b, tn, ln, e;
      lg = $urandom_range(2, 5);
      n  = 1 << lg;
      xi = $urandom_range(0, n - 1);
      yi = $urandom_range(0, n - 1);
      f  = $urandom_range(0, 31);
      a  = $urandom_range(0, 255); b = $urandom_range(0, 255);
      tn = $urandom_range(0, 255); ln = $urandom_range(0, 255);
      if (t % 50 == 0) begin a = 255; b = 255; tn = 255; ln = 255; end
      planar = t[0];
      in_valid = 1;
      x = 5'(xi); y = 5'(yi); log2n = 3'(lg); fact = 5'(f);
      ref_a = 8'(a); ref_b = 8'(b); top_n = 8'(tn); left_n = 8'(ln);
      if (planar) begin
        e = ((n-1-xi)*a + (xi+1)*tn + (n-1-yi)*b + (yi+1)*ln + n) >> (lg + 1);
        planar_seen++;
      end else begin
        e = ((32-f)*a + f*b + 16) >> 5;
        angular_seen++;
      end
      exp_q.push_back(e);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || planar_seen == 0 || angular_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
