// rns_mod_mult -- modular multiplier of one RNS channel, p = <a * b>_M.
//
// For a prime modulus the product is formed by an isomorphic multiplier whose
// architecture is chosen by ARCH (basic, modified with doubled inverse table,
// or split over the factors of M-1). The isomorphism needs a prime modulus,
// so the power-of-two modulus of the base (32) uses the low bits of an
// ordinary binary product instead; any other composite modulus falls back to
// a binary product reduced modulo M. Which architecture each prime modulus
// uses is a free choice; by default all use the modified multiplier.
// Combinational; operands must be below M.
module rns_mod_mult #(
  parameter int unsigned         M    = 11,
  parameter rns_pkg::mult_arch_e ARCH = rns_pkg::ISO_MOD,
  localparam int W = rns_pkg::cwi(M)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p
);
  if (rns_pkg::is_prime(M) && M > 2) begin : g_iso
    if (ARCH == rns_pkg::ISO_BASIC) begin : g_basic
      iso_mult_basic #(.M(M)) u_mult (.a(a), .b(b), .p(p));
    end else if (ARCH == rns_pkg::ISO_SUB) begin : g_sub
      iso_mult_sub #(.M(M)) u_mult (.a(a), .b(b), .p(p));
    end else begin : g_mod
      iso_mult_mod #(.M(M)) u_mult (.a(a), .b(b), .p(p));
    end
  end else if (rns_pkg::is_pow2(M)) begin : g_pow2
    assign p = a * b;                   // keeps the W low bits of the product
  end else begin : g_generic
    logic [2*W-1:0] prod;
    assign prod = a * b;
    assign p    = W'(prod % (2*W)'(M));
  end
endmodule
