// bin_to_rns -- input converter from a W-bit two's complement number to its
// residues in the RNS base of rns_pkg.
//
// A signed input v = -b(W-1)*2^(W-1) + sum_{k<W-1} b(k)*2^k is converted one
// modulus at a time: every bit contributes the constant residue of its weight
// (the sign bit the residue of -2^(W-1)), the selected constants are added in
// binary, and the small sum is reduced modulo m. Negative numbers therefore
// come out as M - |v| in every channel, which is the usual signed RNS
// encoding. Unused bits of each 5-bit field of res are zero. Combinational.
module bin_to_rns #(
  parameter int W = 18
) (
  input  logic signed [W-1:0] v,
  output rns_pkg::rns_t       res
);
  localparam int SW = rns_pkg::cwi(W * 32) + 1;   // room for W residues below 32

  for (genvar i = 0; i < rns_pkg::P; i++) begin : g_mod
    localparam int unsigned M = rns_pkg::MODULI[i];

    logic [SW-1:0] wres [W];
    logic [SW-1:0] acc;

    for (genvar k = 0; k < W; k++) begin : g_w
      localparam int unsigned PW = rns_pkg::pow_mod(2, k, M);
      assign wres[k] = (k == W - 1) ? SW'((M - PW) % M) : SW'(PW);
    end

    always_comb begin
      acc = '0;
      for (int k = 0; k < W; k++) if (v[k]) acc = acc + wres[k];
      res[i] = rns_pkg::RW'(acc % SW'(M));
    end
  end
endmodule
