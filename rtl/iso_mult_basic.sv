// iso_mult_basic -- basic isomorphic modular multiplier, p = <a * b>_M for a
// prime modulus M.
//
// With r a primitive root of M, every non-zero residue a is <r^ka>_M for a
// unique index ka in 0 .. M-2. The product is then r^<ka+kb>_(M-1): two Direct
// Isomorphic Transformation tables (DIT) give the indices, a modulo (M-1)
// adder adds them and the Inverse Isomorphic Transformation table (IIT) maps
// the sum back to a residue. Zero has no index, so a zero detector on either
// operand forces the product to zero. This is the structure of the classic
// isomorphic multiplier; the root r is the smallest primitive root of M (for
// M = 11 it is 2, the first column of the usual isomorphism table).
// The tables are filled at elaboration from the functions of rns_pkg.
// Combinational; operands must be below M.
module iso_mult_basic #(
  parameter int unsigned M = 11,
  localparam int W  = rns_pkg::cwi(M),
  localparam int KW = rns_pkg::cwi(M - 1)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p
);
  localparam int unsigned R = rns_pkg::prim_root(M);

  logic [KW-1:0] dit_rom [2**W];
  logic [W-1:0]  iit_rom [2**KW];

  for (genvar v = 0; v < 2**W; v++) begin : g_dit
    assign dit_rom[v] = (v > 0 && v < M) ? KW'(rns_pkg::dlog(v, R, M)) : '0;
  end
  for (genvar k = 0; k < 2**KW; k++) begin : g_iit
    assign iit_rom[k] = (k < M - 1) ? W'(rns_pkg::pow_mod(R, k, M)) : '0;
  end

  logic [KW-1:0] ka, kb, k;
  logic          zero;

  assign ka   = dit_rom[a];
  assign kb   = dit_rom[b];
  assign zero = (a == '0) || (b == '0);

  mod_add #(.M(64'(M - 1))) u_idx_add (.a(ka), .b(kb), .sum(k));

  assign p = zero ? '0 : iit_rom[k];
endmodule
