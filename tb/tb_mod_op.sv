// tb_mod_op: checks the modulus operator against the % operator: the
// default (8-bit input, modulus 7) exhaustively, moduli 8 and 9 on 8-bit
// inputs exhaustively and modulus 504 on random 16-bit inputs.
module tb_mod_op;
  logic [7:0]  a;
  logic [3:0]  r7, r8, r9;
  logic [15:0] aw;
  logic [8:0]  r504;
  int checks = 0, failures = 0;

  mod_op                                     dut7   (.a(a),  .r(r7));
  mod_op #(.IN_W(8),  .MOD(8),   .OUT_W(4))  dut8   (.a(a),  .r(r8));
  mod_op #(.IN_W(8),  .MOD(9),   .OUT_W(4))  dut9   (.a(a),  .r(r9));
  mod_op #(.IN_W(16), .MOD(504), .OUT_W(9))  dut504 (.a(aw), .r(r504));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks += 3;
      if (r7 != 4'(i % 7)) begin failures++; $display("FAIL %0d mod 7 -> %0d", i, r7); end
      if (r8 != 4'(i % 8)) begin failures++; $display("FAIL %0d mod 8 -> %0d", i, r8); end
      if (r9 != 4'(i % 9)) begin failures++; $display("FAIL %0d mod 9 -> %0d", i, r9); end
    end
    for (int k = 0; k < 3000; k++) begin
      aw = 16'($urandom);
      #1;
      checks++;
      if (r504 != 9'(int'(aw) % 504)) begin failures++; $display("FAIL %0d mod 504 -> %0d", aw, r504); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
