// rns_fir_top -- programmable 128-tap FIR filter in the residue number system,
// serial/parallel architecture with clock-gated register files.
//
//   y(n) = sum_{k=0}^{N_TAPS-1} a_k x(n-k),  18-bit x and a_k, 36-bit y.
//
// Datapath: the input converter (bin_to_rns) turns each two's complement
// sample into ten residues, one per modulus of {3,5,7,11,13,17,19,23,31,32}.
// Ten independent rns_fir_channel instances, one per modulus, each compute
// y(n) modulo their modulus with N_SEG = 16 TAPs of N_SER = 8 serial
// multiply-adds. The output converter (rns_to_bin) rebuilds y(n) by the
// Chinese remainder theorem. Coefficients are written one at a time through
// a second input converter; the coefficient register files are clocked only
// while being written, the sample register files only once per sample.
//
// Interface and timing (one clock domain, synchronous active-low reset):
//   coef_we/coef_addr/coef_data  write coefficient a_k, one per cycle; meant
//                                for initialisation or a change of the filter
//                                mask between samples.
//   x_in/in_valid/in_ready       sample handshake; one sample is accepted
//                                every N_SER cycles at most (20 MHz samples at
//                                a 160 MHz clock), and back-to-back samples
//                                are accepted with no gap.
//   y_out/out_valid              filter output, valid for one cycle,
//                                N_SER + 3 cycles after its sample was taken.
// Reset clears the sample delay line and the coefficients.
// MULT_ARCH chooses the isomorphic multiplier of each prime modulus (one
// entry per modulus, in the order of rns_pkg::MODULI); the default uses the
// modified multiplier with a doubled inverse table for all of them.
module rns_fir_top #(
  parameter int                  N_TAPS    = 128,
  parameter int                  N_SEG     = 16,
  parameter int                  XW        = 18,
  parameter int                  AW        = 18,
  parameter int                  YW        = 36,
  parameter rns_pkg::arch_list_t  MULT_ARCH = '{default: rns_pkg::ISO_MOD},
  localparam int N_SER = N_TAPS / N_SEG,
  localparam int KW    = rns_pkg::cwi(N_TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // coefficient (filter mask) write port
  input  logic                 coef_we,
  input  logic [KW-1:0]        coef_addr,
  input  logic signed [AW-1:0] coef_data,
  // input samples
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [XW-1:0] x_in,
  // output samples
  output logic                 out_valid,
  output logic signed [YW-1:0] y_out
);
  localparam int JW = rns_pkg::cwi(N_SER);

  rns_pkg::rns_t x_rns, a_rns, y_rns;

  logic          smp_load, mac_en, first, last, tree_en, conv_en;
  logic [JW-1:0] j;

  bin_to_rns #(.W(XW)) u_conv_x (.v(x_in),      .res(x_rns));
  bin_to_rns #(.W(AW)) u_conv_a (.v(coef_data), .res(a_rns));

  fir_ctrl #(.N_SER(N_SER)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .smp_load  (smp_load),
    .mac_en    (mac_en),
    .j         (j),
    .first     (first),
    .last      (last),
    .tree_en   (tree_en),
    .conv_en   (conv_en),
    .out_valid (out_valid)
  );

  for (genvar i = 0; i < rns_pkg::P; i++) begin : g_ch
    localparam int unsigned M = rns_pkg::MODULI[i];
    localparam int          W = rns_pkg::cwi(M);

    logic [W-1:0] y_ch;

    rns_fir_channel #(.M(M), .N_TAPS(N_TAPS), .N_SEG(N_SEG), .ARCH(MULT_ARCH[i])) u_ch (
      .clk       (clk),
      .rst_n     (rst_n),
      .coef_we   (coef_we),
      .coef_addr (coef_addr),
      .coef_res  (a_rns[i][W-1:0]),
      .smp_load  (smp_load),
      .x_res     (x_rns[i][W-1:0]),
      .mac_en    (mac_en),
      .j         (j),
      .first     (first),
      .last      (last),
      .tree_en   (tree_en),
      .y_res     (y_ch)
    );

    assign y_rns[i] = rns_pkg::RW'(y_ch);
  end

  rns_to_bin #(.YW(YW)) u_conv_y (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (conv_en),
    .res   (y_rns),
    .y     (y_out)
  );
endmodule
