// iso_mult_mod -- modified isomorphic modular multiplier, p = <a * b>_M for a
// prime modulus M, without a modular adder in the index path.
//
// The DIT table of operand a gives its index ka (0 .. M-2). The DIT* table of
// operand b gives kb already offset by the constant -(M-1), as a two's
// complement number. A plain binary adder forms s = ka + kb - (M-1), which lies
// in -(M-1) .. M-3. The inverse table is doubled: its IIT half (s < 0) returns
// r^(s+M-1) and its IIT* half (s >= 0) returns r^s, so the sign of s selects
// the half and the modulo (M-1) correction costs no adder delay. A zero on
// either operand forces the product to zero.
// The offset stored in DIT* is -(M-1), the modulus of the index addition.
// Combinational; operands must be below M.
module iso_mult_mod #(
  parameter int unsigned M = 11,
  localparam int W  = rns_pkg::cwi(M),
  localparam int KW = rns_pkg::cwi(M - 1),
  localparam int SW = KW + 1            // signed index sum width
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p
);
  localparam int unsigned R   = rns_pkg::prim_root(M);
  localparam longint      MN1 = longint'(M) - 64'sd1;   // modulus of the index sum

  logic [SW-1:0] dit_rom  [2**W];       // ka, zero-extended
  logic [SW-1:0] ditx_rom [2**W];       // kb - (M-1), two's complement
  logic [W-1:0]  iit_rom  [2**SW];      // indexed by the signed sum

  for (genvar v = 0; v < 2**W; v++) begin : g_dit
    localparam longint K = (v > 0 && v < M) ? longint'(rns_pkg::dlog(v, R, M)) : 64'sd0;
    assign dit_rom[v]  = SW'(K);
    assign ditx_rom[v] = SW'(K - MN1);
  end
  for (genvar s = 0; s < 2**SW; s++) begin : g_iit
    // s read as a signed SW-bit number
    localparam longint SV = (s >= 2**(SW-1)) ? longint'(s) - longint'(2**SW) : longint'(s);
    localparam longint KK = (SV < 0) ? SV + MN1 : SV;
    assign iit_rom[s] = (KK >= 0 && KK < MN1)
                        ? W'(rns_pkg::pow_mod(R, 32'(KK), M)) : '0;
  end

  logic [SW-1:0] ka, kbx, s_sum;
  logic          zero;

  assign ka    = dit_rom[a];
  assign kbx   = ditx_rom[b];
  assign s_sum = ka + kbx;              // binary adder, wraps modulo 2^SW
  assign zero  = (a == '0) || (b == '0);
  assign p     = zero ? '0 : iit_rom[s_sum];
endmodule
