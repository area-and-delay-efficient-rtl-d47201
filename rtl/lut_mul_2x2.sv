// lut_mul_2x2: 2-bit by 2-bit multiplier made of two multiplexers.
//
// The first multiplexer, steered by b, picks one of the precomputed values
// 0, 3, 6, 9 (that is 3*b). The second, steered by a, picks 0 (a = 0),
// b zero-extended (a = 1), b shifted left by one (a = 2) or the first
// multiplexer's output (a = 3). No adder is needed. This follows the
// design's 2x2 LUT multiplier. Purely combinational: a, b (2 bits) -> p (4 bits).
module lut_mul_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic [3:0] times3;

  // Multiplexer 1: precomputed 3*b.
  always_comb begin
    unique case (b)
      2'd0: times3 = 4'd0;
      2'd1: times3 = 4'd3;
      2'd2: times3 = 4'd6;
      2'd3: times3 = 4'd9;
    endcase
  end

  // Multiplexer 2: select by a.
  always_comb begin
    unique case (a)
      2'd0: p = 4'd0;
      2'd1: p = {2'b00, b};
      2'd2: p = {1'b0, b, 1'b0};
      2'd3: p = times3;
    endcase
  end
endmodule
