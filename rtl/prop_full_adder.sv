// prop_full_adder: full adder made of two half adders and an OR gate.
//
// The first half adder adds a and b; the second adds that partial sum and
// the carry in. The carry out is the OR of the two half-adder carries (both
// can never be 1 together). This structure follows the design's full-adder
// schematic. Purely combinational: inputs a, b, cin; outputs sum, cout.
module prop_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic s1, c1, c2;

  prop_half_adder u_ha0 (.a(a),  .b(b),   .sum(s1),  .carry(c1));
  prop_half_adder u_ha1 (.a(s1), .b(cin), .sum(sum), .carry(c2));

  always_comb cout = c1 | c2;
endmodule
