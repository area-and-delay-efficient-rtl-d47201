// lut_mul: unsigned W x W multiplier built from 2x2 LUT multipliers.
//
// Both operands are cut into 2-bit digits (an odd width is padded with a
// zero bit). Every pair of digits (a digit i, b digit j) is multiplied by a
// lut_mul_2x2, and its 4-bit product is weighted by 2^(2(i+j)). The weighted
// partial products are then summed by a chain of ripple-carry adders made of
// the proposed full adders. With the default W = 4 this is exactly the
// design's 4x4 multiplier: four 2x2 LUT multipliers feeding the adders.
// Wider operands use the same scheme with (W/2)^2 small multipliers, which
// is this design's own generalisation. Purely combinational:
// a, b (W bits) -> p (2W bits).
module lut_mul #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned WE = W + (W % 2);   // operand width padded to even
  localparam int unsigned D  = WE / 2;        // 2-bit digits per operand
  localparam int unsigned NP = D * D;         // number of partial products
  localparam int unsigned PW = 2 * WE;        // width of the product

  logic [WE-1:0] ae, be;
  logic [PW-1:0] pp  [NP];                    // weighted partial products
  logic [PW-1:0] acc [NP];                    // running sums
  logic [NP-1:0] carry_out;                   // always 0: a partial sum never exceeds the product

  assign ae = WE'(a);
  assign be = WE'(b);

  for (genvar i = 0; i < D; i++) begin : g_a
    for (genvar j = 0; j < D; j++) begin : g_b
      logic [3:0] p4;
      lut_mul_2x2 u_m (.a(ae[2*i +: 2]), .b(be[2*j +: 2]), .p(p4));
      assign pp[i*D + j] = PW'(p4) << (2 * (i + j));
    end
  end

  assign acc[0]       = pp[0];
  assign carry_out[0] = 1'b0;
  for (genvar k = 1; k < NP; k++) begin : g_sum
    prop_rca #(.W(PW)) u_add (
      .a(acc[k-1]), .b(pp[k]), .cin(1'b0), .sum(acc[k]), .cout(carry_out[k])
    );
  end

  assign p = acc[NP-1][2*W-1:0];

  // No partial sum can exceed the final product, so no adder may carry out.
  always_comb assert (carry_out == '0) else $error("lut_mul: adder overflow");
endmodule
