// tb_csa_mult: checks the carry-save multiplier at its default 32x32 width
// and at the 8x6 width the processing elements use, against the `*`
// operator on random and corner-case operands.
module tb_csa_mult;
  int checks = 0, failures = 0;

  logic [31:0] a32, b32;
  logic [63:0] p32;
  logic [7:0]  a8;
  logic [5:0]  b6;
  logic [13:0] p8;

  csa_mult dut32 (.a(a32), .b(b32), .p(p32));
  csa_mult #(.WA(8), .WB(6)) dut8 (.a(a8), .b(b6), .p(p8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(logic [31:0] x, logic [31:0] y);
    a32 = x; b32 = y; #1;
    checks++;
    if (p32 != 64'(x) * 64'(y)) begin
      failures++;
      $display("32x32: %h * %h = %h, got %h", x, y, 64'(x) * 64'(y), p32);
    end
  endtask

  initial begin
    check32(0, 0);
    check32(32'hffff_ffff, 32'hffff_ffff);
    check32(32'hffff_ffff, 1);
    check32(32'h8000_0000, 2);
    for (int i = 0; i < 2000; i++) check32($urandom, $urandom);
    for (int x = 0; x < 256; x++)
      for (int y = 0; y <= 32; y++) begin
        a8 = 8'(x); b6 = 6'(y); #1;
        checks++;
        if (p8 != 14'(x * y)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
