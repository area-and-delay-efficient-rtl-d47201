// mod_op: modulus operator, r = a mod MOD, for a constant modulus.
//
// One of these sits in each residue path of the forward converter and at
// the end of each channel filter. The reduction is written as a remainder by
// a constant, which synthesis turns into fixed logic; the design names the
// operator but leaves its insides open. For a power-of-two modulus it is
// just the low bits of a. Purely combinational:
// a (IN_W bits) -> r (OUT_W bits).
module mod_op #(
  parameter int unsigned IN_W  = 8,
  parameter longint unsigned MOD = 64'd7,
  parameter int unsigned OUT_W = 4
) (
  input  logic [IN_W-1:0]  a,
  output logic [OUT_W-1:0] r
);
  localparam int unsigned CW = (IN_W > 64) ? IN_W : 64;

  always_comb r = OUT_W'(CW'(a) % CW'(MOD));

  initial begin
    assert (MOD >= 2) else $error("mod_op: MOD must be at least 2");
    assert (OUT_W >= 64 || (64'd1 << OUT_W) >= MOD) else $error("mod_op: OUT_W too narrow for MOD");
  end
endmodule
