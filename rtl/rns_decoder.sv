// rns_decoder: reverse converter from residues to binary by the Chinese
// remainder theorem.
//
// With M = m1*m2*m3, M_i = M/m_i and K_i the inverse of M_i modulo m_i, the
// binary value is y = (sum_i M_i*K_i*r_i) mod M. The weights (M_i*K_i) mod M
// are constants computed at elaboration (rns_pkg::crt_weight). Each residue
// is multiplied by its constant weight, the three terms are added and the
// sum is reduced modulo M. For n = 3 the weights are 288, 441 and 280 and
// M = 504. The result is the unique value in [0, M) with the given residues.
// The residue inputs may be wider than n+1 bits (RIN_W); the formula still
// holds for unreduced residues. Purely combinational:
// r[0..2] (RIN_W bits each) -> y (YW bits).
module rns_decoder
  import rns_pkg::*;
#(
  parameter int unsigned N     = 3,
  parameter int unsigned RIN_W = N + 1,
  parameter int unsigned YW    = $clog2(range_m(N))
) (
  input  logic [NUM_CH-1:0][RIN_W-1:0] r,
  output logic [YW-1:0]                y
);
  localparam int unsigned MW   = $clog2(range_m(N)) + 1;   // width of a weight
  localparam int unsigned TW   = RIN_W + MW;               // width of one term
  localparam int unsigned SW   = TW + 2;                   // width of the sum of three terms
  localparam logic [MW-1:0] W0 = MW'(crt_weight(N, 0));
  localparam logic [MW-1:0] W1 = MW'(crt_weight(N, 1));
  localparam logic [MW-1:0] W2 = MW'(crt_weight(N, 2));

  logic [SW-1:0] total;

  always_comb begin
    total = SW'(TW'(r[0]) * TW'(W0))
          + SW'(TW'(r[1]) * TW'(W1))
          + SW'(TW'(r[2]) * TW'(W2));
  end

  mod_op #(.IN_W(SW), .MOD(range_m(N)), .OUT_W(YW)) u_mod (.a(total), .r(y));
endmodule
