// fir_ctrl -- sequencer of the serial/parallel filter.
//
// One input sample is processed in a frame of N_SER clock cycles (8 cycles,
// so a 160 MHz clock serves a 20 MHz sample rate). A sample is accepted
// (in_valid && in_ready) in a load cycle; this raises smp_load, which shifts
// the sample register files of all TAPs. The N_SER following cycles are MAC
// cycles with mac_en high and serial index j = 0 .. N_SER-1 (first marks
// j = 0, last marks j = N_SER-1). in_ready is high when the engine is idle
// and also in the last MAC cycle, so samples presented back to back are
// taken every N_SER cycles with no gap. Without a new sample the engine goes
// idle after the frame; then no register file is clocked.
// After the last MAC cycle, tree_en (one cycle later) captures the modular
// adder trees and conv_en (two cycles later) captures the output converter;
// out_valid marks the cycle in which the filter output is valid. Latency from
// the load cycle to out_valid is N_SER + 3 cycles.
module fir_ctrl #(
  parameter int N_SER = 8,
  localparam int JW = rns_pkg::cwi(N_SER)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          smp_load,
  output logic          mac_en,
  output logic [JW-1:0] j,
  output logic          first,
  output logic          last,
  output logic          tree_en,
  output logic          conv_en,
  output logic          out_valid
);
  logic busy;

  assign first    = busy && (j == '0);
  assign last     = busy && (j == JW'(N_SER - 1));
  assign mac_en   = busy;
  assign in_ready = !busy || last;
  assign smp_load = in_valid && in_ready && rst_n;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      j         <= '0;
      tree_en   <= 1'b0;
      conv_en   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (smp_load) begin
        busy <= 1'b1;
        j    <= '0;
      end else if (last) begin
        busy <= 1'b0;
        j    <= '0;
      end else if (busy) begin
        j <= j + 1'b1;
      end
      tree_en   <= last;
      conv_en   <= tree_en;
      out_valid <= conv_en;
    end
  end

  // a frame never starts while the previous one is still in its MAC cycles
  assert property (@(posedge clk) disable iff (!rst_n) smp_load |-> (!busy || last));
endmodule
