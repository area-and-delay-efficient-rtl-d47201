// tb_rns_decoder: checks the reverse converter. For n = 3 (M = 504) every
// value 0..503 is turned into its residues by the testbench and must come
// back unchanged. For n = 4 (moduli 15, 16, 17, M = 4080) the worked CRT
// example with unreduced residues 200, 80, 300 must give 2000, and random
// values must round-trip.
module tb_rns_decoder;
  logic [2:0][3:0] r;
  logic [8:0]      y;
  logic [2:0][8:0] r4;
  logic [11:0]     y4;
  int checks = 0, failures = 0;

  rns_decoder                       dut  (.r(r),  .y(y));
  rns_decoder #(.N(4), .RIN_W(9))   dut4 (.r(r4), .y(y4));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 504; v++) begin
      r[0] = 4'(v % 7); r[1] = 4'(v % 8); r[2] = 4'(v % 9);
      #1;
      checks++;
      if (y != 9'(v)) begin
        failures++;
        $display("FAIL n=3 residues of %0d -> %0d", v, y);
      end
    end
    r4[0] = 9'd200; r4[1] = 9'd80; r4[2] = 9'd300;
    #1;
    checks++;
    if (y4 != 12'd2000) begin
      failures++;
      $display("FAIL example (200, 80, 300) -> %0d, expected 2000", y4);
    end
    for (int k = 0; k < 2000; k++) begin
      int v;
      v = int'($urandom % 4080);
      r4[0] = 9'(v % 15); r4[1] = 9'(v % 16); r4[2] = 9'(v % 17);
      #1;
      checks++;
      if (y4 != 12'(v)) begin
        failures++;
        $display("FAIL n=4 residues of %0d -> %0d", v, y4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
