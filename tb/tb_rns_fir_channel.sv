// tb_rns_fir_channel: checks one residue channel filter against a reference
// computed in the testbench, (sum_k d[k] * x[n-k]) mod m.
// The default channel (4 taps, modulus 7) first runs the worked 4-tap
// example (coefficients 2, 4, 6, 8, constant input 2; true outputs 4, 12,
// 24, 40, here seen modulo 7), then random residues with random gaps in en.
// An 8-tap channel with modulus 9 runs random data too. Each output must
// appear exactly one clock after its sample, and must hold while en is low.
module tb_rns_fir_channel;
  localparam int T0 = 4, M0 = 7;
  localparam int T1 = 8, M1 = 9;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [3:0]          x0, x1, y0, y1;
  logic [T0-1:0][3:0]  c0;
  logic [T1-1:0][3:0]  c1;
  int checks = 0, failures = 0;
  int hist0 [T0];
  int hist1 [T1];

  rns_fir_channel                               dut0 (.clk(clk), .rst_n(rst_n), .en(en), .x(x0), .coef(c0), .y(y0));
  rns_fir_channel #(.TAPS(T1), .R(4), .MOD(M1)) dut1 (.clk(clk), .rst_n(rst_n), .en(en), .x(x1), .coef(c1), .y(y1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref0();
    int s = 0;
    for (int k = 0; k < T0; k++) s += hist0[k] * int'(c0[k]);
    return s % M0;
  endfunction

  function automatic int ref1();
    int s = 0;
    for (int k = 0; k < T1; k++) s += hist1[k] * int'(c1[k]);
    return s % M1;
  endfunction

  // Present one sample (or an idle cycle when v = 0) and check the outputs
  // right after the clock edge that takes it.
  task automatic step(input bit v, input int a, input int b);
    int e0, e1;
    en = v; x0 = 4'(a); x1 = 4'(b);
    if (v) begin
      for (int k = T0-1; k > 0; k--) hist0[k] = hist0[k-1];
      for (int k = T1-1; k > 0; k--) hist1[k] = hist1[k-1];
      hist0[0] = a; hist1[0] = b;
    end
    e0 = ref0(); e1 = ref1();
    @(posedge clk); #1;
    checks += 2;
    if (int'(y0) != e0) begin failures++; $display("FAIL ch0 y=%0d expected %0d", y0, e0); end
    if (int'(y1) != e1) begin failures++; $display("FAIL ch1 y=%0d expected %0d", y1, e1); end
  endtask

  initial begin
    int expect_ex [4] = '{4 % M0, 12 % M0, 24 % M0, 40 % M0};
    foreach (hist0[k]) hist0[k] = 0;
    foreach (hist1[k]) hist1[k] = 0;
    x0 = '0; x1 = '0;
    c0 = '{4'(8 % M0), 4'(6 % M0), 4'(4 % M0), 4'(2 % M0)};   // d0 = 2 ... d3 = 8 (mod 7)
    for (int k = 0; k < T1; k++) c1[k] = 4'($urandom % M1);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Worked example: constant input 2.
    for (int i = 0; i < 4; i++) begin
      en = 1'b1; x0 = 4'd2; x1 = 4'd0;
      for (int k = T0-1; k > 0; k--) hist0[k] = hist0[k-1];
      for (int k = T1-1; k > 0; k--) hist1[k] = hist1[k-1];
      hist0[0] = 2; hist1[0] = 0;
      @(posedge clk); #1;
      checks++;
      if (int'(y0) != expect_ex[i]) begin
        failures++;
        $display("FAIL example cycle %0d: y=%0d expected %0d", i + 1, y0, expect_ex[i]);
      end
    end

    // Random residues, random coefficients, random idle cycles.
    for (int k = 0; k < T0; k++) c0[k] = 4'($urandom % M0);
    for (int i = 0; i < 3000; i++) begin
      step(($urandom % 4) != 0, int'($urandom % M0), int'($urandom % M1));
    end

    // Synchronous reset clears the delay line.
    en = 1'b0; rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    checks++;
    if (y0 != '0 || y1 != '0) begin failures++; $display("FAIL reset did not clear y"); end
    foreach (hist0[k]) hist0[k] = 0;
    foreach (hist1[k]) hist1[k] = 0;
    for (int i = 0; i < 50; i++) step(1'b1, int'($urandom % M0), int'($urandom % M1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
