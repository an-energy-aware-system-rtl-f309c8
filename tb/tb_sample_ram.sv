// tb_sample_ram: writes random words to the output memory at its default
// size and reads them back in random order, checking the one-clock read
// latency, while new writes go on in parallel.
module tb_sample_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        wr_en = 0;
  logic [8:0]  wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [31:0] shadow [512];

  sample_ram dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    wr_en = 1;
    for (int i = 0; i < 512; i++) begin
      wr_addr = 9'(i); wr_data = $urandom; shadow[i] = wr_data;
      @(negedge clk);
    end
    for (int t = 0; t < 1000; t++) begin
      logic [8:0] ra;
      ra = 9'($urandom);
      rd_addr = ra;
      // write somewhere else at the same time
      wr_addr = ra + 9'd1; wr_data = $urandom;
      @(negedge clk);
      shadow[ra + 9'd1] = wr_data;
      checks++;
      if (rd_data != shadow[ra]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
