// tb_rns_fir_sizes: runs the RNS FIR filter at the filter sizes the design
// is evaluated at, with the default moduli 7, 8, 9 (M = 504): 8 taps with
// 8-bit words, 16 taps with 16-bit words, 32 taps with 16-bit words and 64
// taps with 32-bit words. Data and coefficients are full-range random
// unsigned values; every output must equal the true FIR output modulo 504
// and arrive, flagged by y_valid, one clock after its sample.
module tb_rns_fir_sizes;

  logic clk = 1'b0, rst_n = 1'b0, v = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- Part A: evaluated sizes, moduli 7/8/9 ----------------
  logic [7:0]          xa8;   logic [7:0][7:0]    ca8;   logic [8:0] ya8;   logic va8;
  logic [15:0]         xa16;  logic [15:0][15:0]  ca16;  logic [8:0] ya16;  logic va16;
  logic [31:0][15:0]   ca32;  logic [8:0] ya32;  logic va32;
  logic [31:0]         xa64;  logic [63:0][31:0]  ca64;  logic [8:0] ya64;  logic va64;

  rns_fir_top #(.TAPS(8),  .DATA_W(8),  .COEF_W(8))  u_a8  (.clk(clk), .rst_n(rst_n), .x_valid(v), .x_in(xa8),  .coef(ca8),  .y_valid(va8),  .y_out(ya8),  .y_res());
  rns_fir_top #(.TAPS(16), .DATA_W(16), .COEF_W(16)) u_a16 (.clk(clk), .rst_n(rst_n), .x_valid(v), .x_in(xa16), .coef(ca16), .y_valid(va16), .y_out(ya16), .y_res());
  rns_fir_top #(.TAPS(32), .DATA_W(16), .COEF_W(16)) u_a32 (.clk(clk), .rst_n(rst_n), .x_valid(v), .x_in(xa16), .coef(ca32), .y_valid(va32), .y_out(ya32), .y_res());
  rns_fir_top #(.TAPS(64), .DATA_W(32), .COEF_W(32)) u_a64 (.clk(clk), .rst_n(rst_n), .x_valid(v), .x_in(xa64), .coef(ca64), .y_valid(va64), .y_out(ya64), .y_res());

  longint ha [64];   // sample history, ha[0] newest

  task automatic check_a(input string tag, input longint got, input longint exp_y, input logic vld);
    checks++;
    if (got != exp_y || !vld) begin
      failures++;
      if (failures < 20) $display("FAIL %s: y=%0d expected %0d valid=%0d", tag, got, exp_y, vld);
    end
  endtask

  initial begin
    xa8 = '0; xa16 = '0; xa64 = '0;
    foreach (ha[k]) ha[k] = 0;
    for (int k = 0; k < 8;  k++) ca8[k]  = 8'($urandom);
    for (int k = 0; k < 16; k++) ca16[k] = 16'($urandom);
    for (int k = 0; k < 32; k++) ca32[k] = 16'($urandom);
    for (int k = 0; k < 64; k++) ca64[k] = $urandom;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int i = 0; i < 600; i++) begin
      longint e8, e16, e32, e64;
      v = 1'b1;
      xa8 = 8'($urandom); xa16 = 16'($urandom); xa64 = $urandom;
      // all four use one shared history; the narrower ones see its low bits
      for (int k = 63; k > 0; k--) ha[k] = ha[k-1];
      ha[0] = longint'(xa64);
      begin
        longint s8, s16, s32, s64;
        s8 = 0; s16 = 0; s32 = 0; s64 = 0;
        for (int k = 0; k < 8;  k++) s8  = (s8  + ((ha[k] & 64'hFF)   % 504) * (longint'(ca8[k])  % 504)) % 504;
        for (int k = 0; k < 16; k++) s16 = (s16 + ((ha[k] & 64'hFFFF) % 504) * (longint'(ca16[k]) % 504)) % 504;
        for (int k = 0; k < 32; k++) s32 = (s32 + ((ha[k] & 64'hFFFF) % 504) * (longint'(ca32[k]) % 504)) % 504;
        for (int k = 0; k < 64; k++) s64 = (s64 + (ha[k] % 504) * (longint'(ca64[k]) % 504)) % 504;
        e8 = s8; e16 = s16; e32 = s32; e64 = s64;
      end
      xa8 = 8'(xa64); xa16 = 16'(xa64);
      @(posedge clk); #1;
      check_a("8x8",   longint'(ya8),  e8,  va8);
      check_a("16x16", longint'(ya16), e16, va16);
      check_a("32x16", longint'(ya32), e32, va32);
      check_a("64x32", longint'(ya64), e64, va64);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
