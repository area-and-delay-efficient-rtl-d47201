// rns_encoder: forward converter from binary to the residue number system.
//
// Three modulus operators work in parallel on the same input word and give
// its residues modulo 2^n - 1, 2^n and 2^n + 1 (7, 8 and 9 for the default
// n = 3). Each residue is n + 1 bits wide so that all three channels share
// one width. Example: x = 100 gives (2, 4, 1). Purely combinational:
// x (IN_W bits) -> r[0..2] (n+1 bits each), r[0] for 2^n-1, r[2] for 2^n+1.
module rns_encoder
  import rns_pkg::*;
#(
  parameter int unsigned N    = 3,
  parameter int unsigned IN_W = 8
) (
  input  logic [IN_W-1:0]          x,
  output logic [NUM_CH-1:0][N:0]   r
);
  for (genvar ch = 0; ch < NUM_CH; ch++) begin : g_ch
    mod_op #(.IN_W(IN_W), .MOD(modulus(N, ch)), .OUT_W(N + 1)) u_mod (
      .a(x), .r(r[ch])
    );
  end
endmodule
