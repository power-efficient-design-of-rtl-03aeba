// iso_mult_sub -- isomorphic modular multiplier with the index addition
// itself done in RNS, p = <a * b>_M for a prime modulus M.
//
// M-1 is not prime for M > 3, so it splits into co-prime prime-power factors
// q_1 .. q_n (for M = 11: 10 = 2 x 5; for M = 31: 30 = 2 x 3 x 5). Instead of
// one index k, each operand is mapped by a Direct Isomorphic Submodular Index
// Transformation table (DISIT) straight to the n residues <k>_q_i. The n
// small adders <ka + kb>_q_i run in parallel, and one Inverse Isomorphic
// Submodular Index Transformation table (IISIT), addressed by the
// concatenation of the n sums, returns r^k. Zero operands force a zero
// product. Factor i occupies bits factor_off(M-1, i) upwards of the IISIT
// address; unused address codes read zero.
// Combinational; operands must be below M.
module iso_mult_sub #(
  parameter int unsigned M = 11,
  localparam int W = rns_pkg::cwi(M)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p
);
  localparam int unsigned R  = rns_pkg::prim_root(M);
  localparam int              NQ = rns_pkg::n_factors(M - 1);
  localparam int              IW = rns_pkg::factor_off(M - 1, NQ);   // IISIT address bits

  // IISIT entry for address v: the unique k in 0..M-2 whose residues match
  // the fields of v gives r^k; an address with a field out of range gives 0.
  function automatic int unsigned iisit(int unsigned v);
    for (int unsigned k = 0; k < M - 1; k++) begin
      bit match = 1'b1;
      for (int i = 0; i < NQ; i++) begin
        int unsigned q   = rns_pkg::factor(M - 1, i);
        int          off = rns_pkg::factor_off(M - 1, i);
        int          qw  = rns_pkg::cwi(q);
        int unsigned fld = (v >> off) & ((32'd1 << qw) - 1);
        if (fld != k % q) match = 1'b0;
      end
      if (match) return rns_pkg::pow_mod(R, k, M);
    end
    return 0;
  endfunction

  logic [IW-1:0] idx;
  logic [W-1:0]  iisit_rom [2**IW];

  for (genvar i = 0; i < NQ; i++) begin : g_q
    localparam int unsigned     Q   = rns_pkg::factor(M - 1, i);
    localparam int              QW  = rns_pkg::cwi(Q);
    localparam int              OFF = rns_pkg::factor_off(M - 1, i);

    logic [QW-1:0] disit_rom [2**W];
    logic [QW-1:0] ra, rb, rs;

    for (genvar v = 0; v < 2**W; v++) begin : g_disit
      assign disit_rom[v] = (v > 0 && v < M) ? QW'(rns_pkg::dlog(v, R, M) % Q) : '0;
    end

    assign ra = disit_rom[a];
    assign rb = disit_rom[b];

    mod_add #(.M(64'(Q))) u_add (.a(ra), .b(rb), .sum(rs));

    assign idx[OFF +: QW] = rs;
  end

  for (genvar v = 0; v < 2**IW; v++) begin : g_iisit
    assign iisit_rom[v] = W'(iisit(v));
  end

  assign p = ((a == '0) || (b == '0)) ? '0 : iisit_rom[idx];
endmodule
