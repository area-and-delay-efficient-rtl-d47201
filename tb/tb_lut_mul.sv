// tb_lut_mul: checks the LUT multiplier against the * operator: the default
// 4x4 and an 8x8 exhaustively, a 5x5 (odd width, padded) exhaustively and a
// 16x16 on random operands.
module tb_lut_mul;
  logic [3:0]  a4, b4;   logic [7:0]  p4;
  logic [4:0]  a5, b5;   logic [9:0]  p5;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [15:0] a16, b16; logic [31:0] p16;
  int checks = 0, failures = 0;

  lut_mul            dut4  (.a(a4),  .b(b4),  .p(p4));
  lut_mul #(.W(5))   dut5  (.a(a5),  .b(b5),  .p(p5));
  lut_mul #(.W(8))   dut8  (.a(a8),  .b(b8),  .p(p8));
  lut_mul #(.W(16))  dut16 (.a(a16), .b(b16), .p(p16));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic report(input string tag, input int x, input int y, input longint got);
    failures++;
    if (failures < 10) $display("FAIL%s %0d * %0d -> %0d", tag, x, y, got);
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1; checks++;
        if (p4 != 8'(i * j)) report("4", i, j, p4);
      end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j); #1; checks++;
        if (p5 != 10'(i * j)) report("5", i, j, p5);
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1; checks++;
        if (p8 != 16'(i * j)) report("8", i, j, p8);
      end
    for (int k = 0; k < 5000; k++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); #1; checks++;
      if (p16 != 32'(a16) * 32'(b16)) report("16", a16, b16, p16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
