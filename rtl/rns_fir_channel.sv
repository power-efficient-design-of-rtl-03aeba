// rns_fir_channel -- the serial/parallel FIR filter of one RNS modulus M.
//
// Because addition and multiplication act on each residue independently, the
// RNS filter is P independent filters, one per modulus, each with residues of
// only ceil(log2 M) bits. This module is one of them: N_SEG TAPs (16) in
// direct form, each holding N_SER = N_TAPS/N_SEG (8) coefficients and samples
// and running N_SER serial multiply-adds per sample. The sample delay line of
// N_TAPS entries runs through the TAPs: the oldest sample of TAP_i feeds
// TAP_(i+1). After each frame the N_SEG partial sums are added by a binary
// tree of modular adders and registered in y_res on tree_en, so
//   y_res = < sum_{k=0}^{N_TAPS-1} a_k x(n-k) >_M.
// Coefficient k is written through coef_we/coef_addr/coef_res into TAP k/N_SER,
// entry k mod N_SER; only the gated clock of that TAP's file is enabled.
// Sequencing signals come from fir_ctrl, shared by all channels.
module rns_fir_channel #(
  parameter int unsigned         M      = 11,
  parameter int                  N_TAPS = 128,
  parameter int                  N_SEG  = 16,
  parameter rns_pkg::mult_arch_e ARCH   = rns_pkg::ISO_MOD,
  localparam int N_SER = N_TAPS / N_SEG,
  localparam int W     = rns_pkg::cwi(M),
  localparam int JW    = rns_pkg::cwi(N_SER),
  localparam int KW    = rns_pkg::cwi(N_TAPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_we,
  input  logic [KW-1:0] coef_addr,
  input  logic [W-1:0]  coef_res,
  input  logic          smp_load,
  input  logic [W-1:0]  x_res,
  input  logic          mac_en,
  input  logic [JW-1:0] j,
  input  logic          first,
  input  logic          last,
  input  logic          tree_en,
  output logic [W-1:0]  y_res
);
  logic [W-1:0] chain [N_SEG+1];   // chain[i]: sample entering TAP_i
  logic [W-1:0] node  [2*N_SEG-1]; // adder tree, heap order, leaves at N_SEG-1..

  assign chain[0] = x_res;

  for (genvar i = 0; i < N_SEG; i++) begin : g_tap
    logic we;
    assign we = coef_we && (int'(coef_addr) / N_SER == i);

    rns_tap #(.M(M), .N_SER(N_SER), .ARCH(ARCH)) u_tap (
      .clk      (clk),
      .rst_n    (rst_n),
      .coef_we  (we),
      .coef_idx (JW'(int'(coef_addr) % N_SER)),
      .coef_res (coef_res),
      .smp_load (smp_load),
      .smp_in   (chain[i]),
      .smp_out  (chain[i+1]),
      .mac_en   (mac_en),
      .j        (j),
      .first    (first),
      .last     (last),
      .psum     (node[N_SEG-1+i])
    );
  end

  for (genvar n = 0; n < N_SEG - 1; n++) begin : g_tree
    mod_add #(.M(64'(M))) u_add (.a(node[2*n+1]), .b(node[2*n+2]), .sum(node[n]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       y_res <= '0;
    else if (tree_en) y_res <= node[0];
  end
endmodule
