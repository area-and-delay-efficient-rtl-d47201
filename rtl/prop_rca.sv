// prop_rca: W-bit ripple-carry adder built from the proposed full adders.
//
// Bit i of the sum comes from full adder i, whose carry in is the carry out
// of bit i-1; bit 0 takes cin and bit W-1 drives cout. This is the adder the
// filter uses wherever it adds. Purely combinational; the delay grows
// linearly with W. Interface: a, b (W bits), cin -> sum (W bits), cout.
module prop_rca #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    prop_full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[W];
endmodule
