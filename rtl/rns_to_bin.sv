// rns_to_bin -- output converter from the residues of y to a YW-bit two's
// complement number, by the Chinese remainder theorem.
//
// With M the product of the moduli, M_i = M / m_i and inv_i the inverse of M_i
// modulo m_i,   X = < sum_i M_i * <y_i * inv_i>_m_i >_M .
// Each term is one look-up table per modulus (address y_i, 37-bit entry
// M_i * <y_i * inv_i>_m_i, filled at elaboration); the ten terms are added by
// a tree of modulo-M adders. X in 0 .. M-1 is then read as a signed number:
// values above (M-1)/2 stand for X - M. The result is truncated to YW bits,
// so it is exact when the filter output lies in the YW-bit range; the signed
// intermediate keeps the full CW+1 bits and its bits above YW are dropped on
// purpose (a lint tool reports them as unused).
// One register stage: y is loaded from res when en is high.
module rns_to_bin #(
  parameter int YW = 36
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  rns_pkg::rns_t        res,
  output logic signed [YW-1:0] y
);
  localparam longint unsigned MT = rns_pkg::dyn_range();
  localparam int              CW = rns_pkg::cw(MT);
  localparam int              P  = rns_pkg::P;

  logic [CW-1:0] node [2*P-1];   // modulo-M adder tree, heap order

  for (genvar i = 0; i < P; i++) begin : g_term
    localparam longint unsigned MI  = 64'(rns_pkg::MODULI[i]);
    localparam longint unsigned BI  = MT / MI;
    localparam longint unsigned INV = 64'(rns_pkg::mod_inv(32'(BI % MI), rns_pkg::MODULI[i]));

    logic [CW-1:0] rom [2**rns_pkg::RW];
    for (genvar v = 0; v < 2**rns_pkg::RW; v++) begin : g_rom
      assign rom[v] = (v < MI) ? CW'(BI * ((64'(v) * INV) % MI)) : '0;
    end
    assign node[P-1+i] = rom[res[i]];
  end

  for (genvar n = 0; n < P - 1; n++) begin : g_tree
    mod_add #(.M(MT)) u_add (.a(node[2*n+1]), .b(node[2*n+2]), .sum(node[n]));
  end

  logic signed [CW:0] xs;
  always_comb begin
    if (node[0] > CW'((MT - 1) / 2)) xs = $signed({1'b0, node[0]}) - $signed((CW+1)'(MT));
    else                            xs = $signed({1'b0, node[0]});
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= YW'(xs);
  end
endmodule
