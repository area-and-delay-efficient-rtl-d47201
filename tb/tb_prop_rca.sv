// tb_prop_rca: checks the ripple-carry adder at its default width (8 bits,
// exhaustively over a and b with both carry-in values) and at 32 bits
// (corner cases and random operands) against the + operator.
module tb_prop_rca;
  logic [7:0]  a8, b8, s8;
  logic        cin8, cout8;
  logic [31:0] a32, b32, s32;
  logic        cin32, cout32;
  int checks = 0, failures = 0;

  prop_rca              dut8  (.a(a8),  .b(b8),  .cin(cin8),  .sum(s8),  .cout(cout8));
  prop_rca #(.W(32))    dut32 (.a(a32), .b(b32), .cin(cin32), .sum(s32), .cout(cout32));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] ref_s;
    a32 = x; b32 = y; cin32 = c;
    #1;
    ref_s = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({cout32, s32} != ref_s) begin
      failures++;
      $display("FAIL32 %h + %h + %0d -> %0d:%h", x, y, c, cout32, s32);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); cin8 = 1'(c);
          #1;
          checks++;
          if ({cout8, s8} != 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL8 %0d + %0d + %0d -> %0d:%0d", i, j, c, cout8, s8);
          end
        end
      end
    end
    check32(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int k = 0; k < 2000; k++) check32($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
