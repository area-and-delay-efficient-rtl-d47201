// rns_fir_top: FIR filter computed in a residue number system (RNS).
//
// The input sample and the TAPS coefficients are each converted by a
// forward converter (rns_encoder) into residues modulo 2^n-1, 2^n and 2^n+1.
// Three independent channel filters (rns_fir_channel), one per modulus, run
// the same direct-form FIR on their residues, using LUT multipliers and
// ripple-carry adders of the proposed full adders. A reverse converter
// (rns_decoder) joins the three output residues into one binary value by
// the Chinese remainder theorem:
//   y_out = (sum_k coef[k] * x[n-k]) mod M,  M = (2^n-1) * 2^n * (2^n+1).
// With the default n = 3 the moduli are 7, 8, 9 and M = 504: y_out equals
// the true FIR output only while that output stays below M. Inputs and
// coefficients are unsigned.
//
// Interface and timing: present a sample on x_in with x_valid high for one
// clock; y_out carries the filter output for it from the next cycle on,
// flagged by a one-cycle y_valid pulse, and holds until the next output.
// The coefficients are read continuously and should be held constant.
// rst_n is synchronous, active low, and clears the delay lines, so earlier
// samples count as zero. Samples may arrive on every clock.
module rns_fir_top
  import rns_pkg::*;
#(
  parameter int unsigned N      = 3,    // moduli 2^N-1, 2^N, 2^N+1
  parameter int unsigned TAPS   = 4,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned YW     = $clog2(range_m(N))
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          x_valid,
  input  logic [DATA_W-1:0]             x_in,
  input  logic [TAPS-1:0][COEF_W-1:0]   coef,
  output logic                          y_valid,
  output logic [YW-1:0]                 y_out,
  output logic [NUM_CH-1:0][N:0]        y_res     // output residues, for observation
);
  localparam int unsigned R = res_width(N);

  logic [NUM_CH-1:0][R-1:0] x_res;
  logic [NUM_CH-1:0][R-1:0] c_res [TAPS];   // c_res[k][ch]: residue of coef[k]

  rns_encoder #(.N(N), .IN_W(DATA_W)) u_enc_x (.x(x_in), .r(x_res));

  for (genvar k = 0; k < TAPS; k++) begin : g_coef
    rns_encoder #(.N(N), .IN_W(COEF_W)) u_enc_c (.x(coef[k]), .r(c_res[k]));
  end

  for (genvar ch = 0; ch < NUM_CH; ch++) begin : g_ch
    logic [TAPS-1:0][R-1:0] ch_coef;
    always_comb begin
      for (int k = 0; k < TAPS; k++) ch_coef[k] = c_res[k][ch];
    end
    rns_fir_channel #(.TAPS(TAPS), .R(R), .MOD(modulus(N, ch))) u_fir (
      .clk(clk), .rst_n(rst_n), .en(x_valid),
      .x(x_res[ch]), .coef(ch_coef), .y(y_res[ch])
    );
  end

  rns_decoder #(.N(N), .RIN_W(R), .YW(YW)) u_dec (.r(y_res), .y(y_out));

  always_ff @(posedge clk) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= x_valid;
  end
endmodule
