// Multiplier-bit selector of the BZ-FAD multiplier.
//
// The multiplier operand B is never shifted. Instead this N:1 multiplexer
// picks bit B(i) out of the stationary B register, its select being the
// one-hot ring counter (sel[i] = 1 in step i). It is an AND-OR multiplexer:
// bit_o = OR over i of (b[i] AND sel[i]). Purely combinational.
//
// Replacing the shift of B by a ring-counter-driven multiplexer follows the
// BZ-FAD architecture; the AND-OR form is this design's choice.
module b_bit_mux #(
  parameter int unsigned N = bzfad_pkg::BZ_N
) (
  input  logic [N-1:0] b,
  input  logic [N-1:0] sel,
  output logic         bit_o
);
  assign bit_o = |(b & sel);
endmodule
