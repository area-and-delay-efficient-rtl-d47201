// tb_rns_fir_top: end-to-end test of the RNS FIR filter at its default
// parameters (n = 3, moduli 7/8/9, M = 504, 4 taps, 8-bit data and
// coefficients).
//
// The reference is the plain binary FIR, y = sum_k coef[k] * x[n-k], taken
// modulo M, computed in the testbench without residues.
// Phases:
//  1. the worked example: coefficients 2, 4, 6, 8 and a constant input 2
//     must give 4, 12, 24, 40 on four successive outputs;
//  2. small random data whose true output stays below M, so y_out must be
//     the exact FIR output;
//  3. full-range random data with random idle cycles, where the true output
//     exceeds M and y_out is its value modulo M;
//  4. a reset in mid-stream, after which earlier samples must count as zero.
// Every output is checked one clock after its sample together with the
// y_valid pulse, and y_out must hold through idle cycles. The test counts
// how often each mechanism occurred (sample accepted, idle hold, a channel
// sum reduced by its modulus, an output reduced modulo M, a reset) and
// counts a failure for any that never occurred.
module tb_rns_fir_top;
  localparam int TAPS = 4;
  localparam int M    = 504;
  localparam int MODS [3] = '{7, 8, 9};

  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic [7:0]            x_in = '0;
  logic [TAPS-1:0][7:0]  coef;
  logic                  y_valid;
  logic [8:0]            y_out;
  logic [2:0][3:0]       y_res;

  int checks = 0, failures = 0;
  int hist [TAPS];
  int n_samples = 0, n_idle = 0, n_ch_wrap = 0, n_out_wrap = 0, n_reset = 0, n_exact = 0;

  rns_fir_top dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in), .coef(coef),
    .y_valid(y_valid), .y_out(y_out), .y_res(y_res)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint true_fir();
    longint s = 0;
    for (int k = 0; k < TAPS; k++) s += longint'(hist[k]) * longint'(coef[k]);
    return s;
  endfunction

  // True if some residue channel's sum of residue products reaches its modulus.
  function automatic bit channel_wraps();
    for (int ch = 0; ch < 3; ch++) begin
      int s = 0;
      for (int k = 0; k < TAPS; k++) s += (hist[k] % MODS[ch]) * (int'(coef[k]) % MODS[ch]);
      if (s >= MODS[ch]) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic check_out(input int exp_y, input bit exp_v, input string tag);
    checks++;
    if (int'(y_out) != exp_y || y_valid != exp_v) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: y_out=%0d y_valid=%0d expected %0d/%0d", tag, y_out, y_valid, exp_y, exp_v);
    end
  endtask

  // One clock: a sample when v, otherwise an idle cycle.
  task automatic step(input bit v, input int x);
    longint t;
    int prev;
    prev    = int'(y_out);
    x_valid = v;
    x_in    = 8'(x);
    if (v) begin
      for (int k = TAPS-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
    end
    t = true_fir();
    @(posedge clk); #1;
    if (v) begin
      n_samples++;
      if (channel_wraps()) n_ch_wrap++;
      if (t >= M) n_out_wrap++; else n_exact++;
      check_out(int'(t % M), 1'b1, "sample");
    end else begin
      n_idle++;
      check_out(prev, 1'b0, "idle hold");
    end
  endtask

  task automatic do_reset();
    x_valid = 1'b0;
    rst_n   = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    n_reset++;
    foreach (hist[k]) hist[k] = 0;
    check_out(0, 1'b0, "after reset");
  endtask

  task automatic mechanism(input string name, input int count);
    checks++;
    $display("mechanism %-28s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never occurred", name);
    end
  endtask

  initial begin
    int ex [4] = '{4, 12, 24, 40};
    coef = '{8'd8, 8'd6, 8'd4, 8'd2};            // d0 = 2, d1 = 4, d2 = 6, d3 = 8
    foreach (hist[k]) hist[k] = 0;
    repeat (2) @(posedge clk);
    #1;
    do_reset();

    // 1. Worked example.
    for (int i = 0; i < 4; i++) begin
      step(1'b1, 2);
      checks++;
      if (int'(y_out) != ex[i]) begin
        failures++;
        $display("FAIL example cycle %0d: %0d expected %0d", i + 1, y_out, ex[i]);
      end
    end
    step(1'b0, 0);

    // 2. Exact range: 4 * 15 * 7 < 504.
    do_reset();
    for (int k = 0; k < TAPS; k++) coef[k] = 8'($urandom % 8);
    for (int i = 0; i < 500; i++) step(1'b1, int'($urandom % 16));

    // 3. Full range with idle cycles and new coefficient sets.
    for (int blk = 0; blk < 10; blk++) begin
      for (int k = 0; k < TAPS; k++) coef[k] = 8'($urandom);
      do_reset();
      for (int i = 0; i < 500; i++) step(($urandom % 3) != 0, int'($urandom % 256));
    end

    // 4. Reset in mid-stream.
    for (int i = 0; i < 10; i++) step(1'b1, int'($urandom % 256));
    do_reset();
    for (int i = 0; i < 10; i++) step(1'b1, int'($urandom % 256));

    mechanism("sample accepted", n_samples);
    mechanism("idle cycle, output held", n_idle);
    mechanism("channel sum reduced mod m", n_ch_wrap);
    mechanism("exact output (below M)", n_exact);
    mechanism("output reduced mod M", n_out_wrap);
    mechanism("reset", n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
