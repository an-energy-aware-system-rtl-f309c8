// tb_ref_ram: fills both banks of the reference memory with random samples
// and reads all eight ports at random addresses of a random bank, checking
// the data one clock after the address (block-RAM read latency) and that
// out-of-range addresses read 0. Writes into one bank go on while the other
// is read.
module tb_ref_ram;
  localparam int DEPTH = 129;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic            wr_en = 0, wr_bank = 0, rd_bank = 0;
  logic [7:0]      wr_addr = 0, wr_data = 0;
  logic [7:0][7:0] rd_addr = '0;
  logic [7:0][7:0] rd_data;
  logic [7:0]      shadow [2][DEPTH];

  ref_ram dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    wr_en = 1;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < DEPTH; i++) begin
        wr_bank = b[0]; wr_addr = 8'(i); wr_data = 8'($urandom); shadow[b][i] = wr_data;
        @(negedge clk);
      end
    for (int t = 0; t < 300; t++) begin
      logic [7:0][7:0] a;
      for (int p = 0; p < 8; p++) a[p] = 8'($urandom_range(0, (t % 10 == 0) ? 140 : DEPTH - 1));
      rd_addr = a;
      rd_bank = 1'($urandom);
      // keep writing the other bank
      wr_bank = ~rd_bank; wr_addr = 8'($urandom_range(0, DEPTH - 1)); wr_data = 8'($urandom);
      @(negedge clk);
      shadow[wr_bank][wr_addr] = wr_data;
      for (int p = 0; p < 8; p++) begin
        checks++;
        if (rd_data[p] != ((a[p] < DEPTH) ? shadow[rd_bank][a[p]] : 8'd0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
