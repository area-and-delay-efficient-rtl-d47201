// rns_fir_channel: direct-form FIR filter working on one residue channel.
//
// The channel holds the last TAPS-1 input residues in a delay line. Tap 0 is
// the residue arriving now, tap k the one from k samples ago. Every tap is
// multiplied by its coefficient residue in a LUT multiplier. The products
// are summed in binary by a chain of ripple-carry adders, and the sum is
// reduced modulo MOD:
//   y = (sum_k d[k] * x[n-k]) mod MOD.
// Reducing once after the sum, not after every product, is this design's
// own choice; the sum is kept wide enough that it never overflows.
//
// Timing: when en is high at a rising clock edge, the residue on x is taken
// as the new sample. At that edge y is loaded with the output for that
// sample and the delay line shifts. y is therefore valid one cycle after the
// sample is presented and holds until the next accepted sample.
// Reset (rst_n low, synchronous) clears the delay line and y, so the filter
// starts as if all earlier samples were zero.
module rns_fir_channel #(
  parameter int unsigned TAPS = 4,
  parameter int unsigned R    = 4,   // residue width
  parameter longint unsigned MOD = 64'd7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [R-1:0]            x,
  input  logic [TAPS-1:0][R-1:0]  coef,
  output logic [R-1:0]            y
);
  localparam int unsigned SW = 2 * R + $clog2(TAPS) + 1;   // sum width, never overflows

  logic [R-1:0]    tap  [TAPS];     // tap[0] = x[n], tap[k] = x[n-k]
  logic [R-1:0]    dly  [TAPS];     // delay registers, dly[k] = x[n-k] for k >= 1
  logic [2*R-1:0]  prod [TAPS];
  logic [SW-1:0]   acc  [TAPS];
  logic [TAPS-1:0] carry_out;       // always 0: SW leaves headroom
  logic [R-1:0]    y_next;

  always_comb begin
    tap[0] = x;
    for (int k = 1; k < TAPS; k++) tap[k] = dly[k];
  end

  // Delay line. dly[0] is not used.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) dly[k] <= '0;
    end else if (en) begin
      dly[0] <= '0;
      for (int k = 1; k < TAPS; k++) dly[k] <= tap[k-1];
    end
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    lut_mul #(.W(R)) u_mul (.a(tap[k]), .b(coef[k]), .p(prod[k]));
  end

  assign acc[0]       = SW'(prod[0]);
  assign carry_out[0] = 1'b0;
  for (genvar k = 1; k < TAPS; k++) begin : g_add
    prop_rca #(.W(SW)) u_add (
      .a(acc[k-1]), .b(SW'(prod[k])), .cin(1'b0), .sum(acc[k]), .cout(carry_out[k])
    );
  end

  // SW has headroom for TAPS full-scale products, so no adder may carry out.
  always_comb assert (carry_out == '0) else $error("rns_fir_channel: sum overflow");

  mod_op #(.IN_W(SW), .MOD(MOD), .OUT_W(R)) u_mod (.a(acc[TAPS-1]), .r(y_next));

  always_ff @(posedge clk) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= y_next;
  end
endmodule
