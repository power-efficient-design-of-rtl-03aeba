// rns_tap -- one TAP of the serial/parallel filter for a single modulus M.
//
// The 128-tap convolution is split into 16 groups of 8 taps; TAP_i computes
// the inner sum  sum_{j=0..7} a(8i+j) * x(n-8i-j)  serially, one modular
// product per clock, so it runs at 8 times the sample rate.
//
// Storage: an N_SER-entry coefficient register file c[j] = a(8i+j) and an
// N_SER-entry sample register file s[j] = x(n-8i-j). The sample file is a
// shift register: on smp_load, s[0] takes smp_in (the new sample for TAP_0,
// the oldest sample of TAP_(i-1) otherwise) and every entry moves one place;
// s[N_SER-1] leaves on smp_out towards the next TAP. Both files sit on gated
// clocks (clock_gate): the coefficient file is clocked only when one of its
// entries is written, the sample file only on smp_load, so between loads
// neither file toggles. During reset both gates are open and both files are
// cleared, so the filter starts from an all-zero state.
//
// Multiply-accumulate: in the MAC cycle with index j the multiplier reads
// c[j] and s[j] through two multiplexers; acc takes the product when first is
// high and <acc + product>_M otherwise. In the cycle with last high the final
// sum is written to psum, where it stays for the whole next frame.
// smp_load may coincide with the last MAC cycle of the previous frame: the
// file is read before the clock edge that shifts it.
module rns_tap #(
  parameter int unsigned         M     = 11,
  parameter int                  N_SER = 8,
  parameter rns_pkg::mult_arch_e ARCH  = rns_pkg::ISO_MOD,
  localparam int W  = rns_pkg::cwi(M),
  localparam int JW = rns_pkg::cwi(N_SER)
) (
  input  logic          clk,
  input  logic          rst_n,      // synchronous, active low
  // coefficient write port
  input  logic          coef_we,
  input  logic [JW-1:0] coef_idx,
  input  logic [W-1:0]  coef_res,
  // sample delay line
  input  logic          smp_load,
  input  logic [W-1:0]  smp_in,
  output logic [W-1:0]  smp_out,
  // MAC sequencing
  input  logic          mac_en,
  input  logic [JW-1:0] j,
  input  logic          first,
  input  logic          last,
  output logic [W-1:0]  psum
);
  logic [W-1:0] coef_rf [N_SER];
  logic [W-1:0] smp_rf  [N_SER];
  logic         gclk_coef, gclk_smp;

  clock_gate u_cg_coef (.clk(clk), .en(coef_we  || !rst_n), .gclk(gclk_coef));
  clock_gate u_cg_smp  (.clk(clk), .en(smp_load || !rst_n), .gclk(gclk_smp));

  always_ff @(posedge gclk_coef) begin
    if (!rst_n) begin
      for (int k = 0; k < N_SER; k++) coef_rf[k] <= '0;
    end else begin
      coef_rf[coef_idx] <= coef_res;
    end
  end

  always_ff @(posedge gclk_smp) begin
    if (!rst_n) begin
      for (int k = 0; k < N_SER; k++) smp_rf[k] <= '0;
    end else begin
      smp_rf[0] <= smp_in;
      for (int k = 1; k < N_SER; k++) smp_rf[k] <= smp_rf[k-1];
    end
  end

  assign smp_out = smp_rf[N_SER-1];

  logic [W-1:0] prod, acc, acc_sum, acc_next;

  rns_mod_mult #(.M(M), .ARCH(ARCH)) u_mult (.a(coef_rf[j]), .b(smp_rf[j]), .p(prod));
  mod_add      #(.M(64'(M)))         u_acc  (.a(acc), .b(prod), .sum(acc_sum));

  assign acc_next = first ? prod : acc_sum;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc  <= '0;
      psum <= '0;
    end else if (mac_en) begin
      acc <= acc_next;
      if (last) psum <= acc_next;
    end
  end
endmodule
