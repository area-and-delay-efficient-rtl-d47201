// tb_rns_fir_ecg: ECG denoising with 16-tap and 32-tap low-pass RNS FIR
// filters.
//
// The filters are low-pass, cutoff 50 Hz at a 1 kHz sample rate, designed
// here as Kaiser-windowed sinc filters (beta = 3) with Q15 coefficients.
// The input is a synthetic ECG (a slow 1 Hz baseline plus one sharp beat
// every 0.8 s) with additive tones at 80, 100, 150 and 250 Hz, as signed
// 16-bit samples. The moduli are 2047, 2048, 2049 (n = 11), so M is about
// 8.6e9 and covers the whole signed output range: signed samples and
// coefficients are handed to the filter modulo M, and the output is read
// back as signed (values at or above M/2 are negative).
// Every output must equal the signed FIR output exactly, one clock after
// its sample. Then the noise left at the output (output minus the filtered
// clean ECG, rescaled from Q15) must have under half the RMS of the noise
// at the input, and the 32-tap filter must leave less than the 16-tap one.
module tb_rns_fir_ecg;
  localparam int     NB = 11;
  localparam longint MB = 64'd2047 * 64'd2048 * 64'd2049;
  localparam int     BW = 33;            // width of a value modulo MB
  localparam real    PI = 3.141592653589793;

  logic clk = 1'b0, rst_n = 1'b0, v = 1'b0;
  int checks = 0, failures = 0;

  logic [BW-1:0]        xb;
  logic [15:0][BW-1:0]  cb16;
  logic [31:0][BW-1:0]  cb32;
  logic [BW-1:0]        yb16, yb32;
  logic                 vb16, vb32;

  rns_fir_top #(.N(NB), .TAPS(16), .DATA_W(BW), .COEF_W(BW)) u_f16 (
    .clk(clk), .rst_n(rst_n), .x_valid(v), .x_in(xb), .coef(cb16),
    .y_valid(vb16), .y_out(yb16), .y_res());
  rns_fir_top #(.N(NB), .TAPS(32), .DATA_W(BW), .COEF_W(BW)) u_f32 (
    .clk(clk), .rst_n(rst_n), .x_valid(v), .x_in(xb), .coef(cb32),
    .y_valid(vb32), .y_out(yb32), .y_res());

  longint cq16 [16];
  longint cq32 [32];
  longint hn [32];   // noisy sample history, hn[0] newest
  longint hc [32];   // clean sample history

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real bessel_i0(input real x);
    real sum, term;
    sum = 1.0; term = 1.0;
    for (int k = 1; k < 30; k++) begin
      term = term * (x / (2.0 * k)) * (x / (2.0 * k));
      sum += term;
    end
    return sum;
  endfunction

  // Q15 Kaiser-windowed sinc low-pass, cutoff fc (as a fraction of fs),
  // scaled to unity gain at DC.
  task automatic design_lp(input int taps, input real fc, input real beta, output longint q [32]);
    real h [32];
    real sum, alpha, t, wv;
    sum = 0.0;
    alpha = (taps - 1) / 2.0;
    for (int k = 0; k < taps; k++) begin
      t = k - alpha;
      h[k] = $sin(2.0 * PI * fc * t) / (PI * t);
      wv = bessel_i0(beta * $sqrt(1.0 - (t / alpha) * (t / alpha))) / bessel_i0(beta);
      h[k] = h[k] * wv;
      sum += h[k];
    end
    for (int k = 0; k < 32; k++)
      q[k] = (k < taps) ? longint'($rtoi(h[k] / sum * 32768.0 + ((h[k] >= 0.0) ? 0.5 : -0.5))) : 0;
  endtask

  function automatic logic [BW-1:0] to_mod(input longint s);
    longint r;
    r = s % MB;
    if (r < 0) r += MB;
    return BW'(r);
  endfunction

  function automatic longint from_mod(input logic [BW-1:0] y);
    longint u;
    u = longint'(y);
    return (u >= MB / 2) ? u - MB : u;
  endfunction

  initial begin
    longint q [32];
    real    noise_in, noise16, noise32;
    int     nb;
    noise_in = 0.0; noise16 = 0.0; noise32 = 0.0; nb = 0;

    xb = '0;
    design_lp(16, 0.05, 3.0, q);
    for (int k = 0; k < 16; k++) begin cq16[k] = q[k]; cb16[k] = to_mod(q[k]); end
    design_lp(32, 0.05, 3.0, q);
    for (int k = 0; k < 32; k++) begin cq32[k] = q[k]; cb32[k] = to_mod(q[k]); end
    foreach (hn[k]) begin hn[k] = 0; hc[k] = 0; end

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int i = 0; i < 3000; i++) begin
      real    tsec, clean_r, noise_r, ph, d16, d32;
      longint clean, noisy, s16, s32, c16, c32, got16, got32;
      s16 = 0; s32 = 0; c16 = 0; c32 = 0;
      tsec = i / 1000.0;
      ph = tsec - 0.8 * $floor(tsec / 0.8) - 0.4;
      clean_r = 1500.0 * $sin(2.0 * PI * tsec)
              + 12000.0 * $exp(-(ph * ph) / (2.0 * 0.012 * 0.012))
              - 2500.0 * $exp(-((ph - 0.05) * (ph - 0.05)) / (2.0 * 0.01 * 0.01));
      noise_r = 1200.0 * $sin(2.0 * PI * 80.0 * tsec)
              + 1000.0 * $sin(2.0 * PI * 100.0 * tsec + 1.0)
              +  900.0 * $sin(2.0 * PI * 150.0 * tsec + 2.0)
              +  800.0 * $sin(2.0 * PI * 250.0 * tsec + 0.5);
      clean = longint'($rtoi(clean_r));
      noisy = longint'($rtoi(clean_r + noise_r));
      for (int k = 31; k > 0; k--) begin hn[k] = hn[k-1]; hc[k] = hc[k-1]; end
      hn[0] = noisy; hc[0] = clean;
      for (int k = 0; k < 16; k++) begin s16 += cq16[k] * hn[k]; c16 += cq16[k] * hc[k]; end
      for (int k = 0; k < 32; k++) begin s32 += cq32[k] * hn[k]; c32 += cq32[k] * hc[k]; end
      v  = 1'b1;
      xb = to_mod(noisy);
      @(posedge clk); #1;
      got16 = from_mod(yb16);
      got32 = from_mod(yb32);
      checks += 2;
      if (got16 != s16 || !vb16) begin
        failures++;
        if (failures < 20) $display("FAIL 16-tap sample %0d: %0d expected %0d", i, got16, s16);
      end
      if (got32 != s32 || !vb32) begin
        failures++;
        if (failures < 20) $display("FAIL 32-tap sample %0d: %0d expected %0d", i, got32, s32);
      end
      if (i >= 32) begin
        d16 = real'(got16 - c16) / 32768.0;
        d32 = real'(got32 - c32) / 32768.0;
        noise_in += real'(noisy - clean) * real'(noisy - clean);
        noise16  += d16 * d16;
        noise32  += d32 * d32;
        nb++;
      end
    end
    noise_in = $sqrt(noise_in / nb);
    noise16  = $sqrt(noise16 / nb);
    noise32  = $sqrt(noise32 / nb);
    $display("ECG noise RMS: input %0.1f, after 16 taps %0.1f, after 32 taps %0.1f", noise_in, noise16, noise32);
    checks += 3;
    if (noise16 >= 0.5 * noise_in) begin failures++; $display("FAIL 16-tap filter removed too little noise"); end
    if (noise32 >= 0.5 * noise_in) begin failures++; $display("FAIL 32-tap filter removed too little noise"); end
    if (noise32 >= noise16)        begin failures++; $display("FAIL 32 taps not better than 16 taps"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
