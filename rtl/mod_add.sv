// mod_add -- modular adder: sum = <a + b>_M for operands already reduced
// (0 <= a, b < M).
//
// A binary adder one bit wider than the operands forms a + b; a single
// conditional subtraction of M brings the result back into 0 .. M-1. The same
// unit serves as the modulo (m-1) index adder of the basic isomorphic
// multiplier, as the accumulator adder of each TAP and as a node of the adder
// trees. It is purely combinational. M is a 64-bit parameter so that the
// output converter can reuse it for the full dynamic range of the base.
module mod_add #(
  parameter longint unsigned M = 64'd11,
  localparam int W = rns_pkg::cw(M)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  logic [W:0] s;

  always_comb begin
    s = {1'b0, a} + {1'b0, b};
    if (s >= (W+1)'(M)) sum = W'(s - (W+1)'(M));
    else                sum = W'(s);
  end
endmodule
