// tb_rns_encoder: checks the forward converter. The default (n = 3, 8-bit
// input) is checked exhaustively against residues modulo 7, 8 and 9,
// including the worked example 100 -> (2, 4, 1). A 16-bit, n = 4 instance
// (moduli 15, 16, 17) is checked on random inputs.
module tb_rns_encoder;
  logic [7:0]       x;
  logic [2:0][3:0]  r;
  logic [15:0]      xw;
  logic [2:0][4:0]  rw;
  int checks = 0, failures = 0;

  rns_encoder                         dut  (.x(x),  .r(r));
  rns_encoder #(.N(4), .IN_W(16))     dutw (.x(xw), .r(rw));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 8'b0110_0100;
    #1;
    checks++;
    if (r[0] != 4'd2 || r[1] != 4'd4 || r[2] != 4'd1) begin
      failures++;
      $display("FAIL example: 100 -> (%0d, %0d, %0d), expected (2, 4, 1)", r[0], r[1], r[2]);
    end
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      checks++;
      if (r[0] != 4'(i % 7) || r[1] != 4'(i % 8) || r[2] != 4'(i % 9)) begin
        failures++;
        $display("FAIL %0d -> (%0d, %0d, %0d)", i, r[0], r[1], r[2]);
      end
    end
    for (int k = 0; k < 2000; k++) begin
      xw = 16'($urandom);
      #1;
      checks++;
      if (rw[0] != 5'(int'(xw) % 15) || rw[1] != 5'(int'(xw) % 16) || rw[2] != 5'(int'(xw) % 17)) begin
        failures++;
        $display("FAIL n=4 %0d -> (%0d, %0d, %0d)", xw, rw[0], rw[1], rw[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
