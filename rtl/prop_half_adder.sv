// prop_half_adder: the half adder used throughout the filter's adders.
//
// The carry is the AND of the two inputs. The sum is formed without an XOR
// gate: the OR of the inputs is masked by the inverted carry, which is 1
// exactly when one input is 1. This gate arrangement follows the design's
// half-adder schematic; it is logically the ordinary half adder.
// Purely combinational: inputs a, b; outputs sum, carry.
module prop_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  logic a_or_b;

  always_comb begin
    a_or_b = a | b;
    carry  = a & b;
    sum    = a_or_b & ~carry;
  end
endmodule
