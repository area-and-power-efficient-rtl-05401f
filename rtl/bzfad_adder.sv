// Adder of the BZ-FAD multiplier: sum = x + y, N bits plus carry out.
//
// In BZ-FAD the multiplicand A is wired straight to one adder input (no
// 0/A multiplexer in front of it) and the high half of the partial product
// to the other; when the current bit of B is 0 the adder's result is simply
// not used (bypassed). The adder is a ripple chain of full adders, the
// smallest adder for a multiplier whose goal is low area and power rather
// than speed; the adder type is this design's choice. Purely combinational.
module bzfad_adder #(
  parameter int unsigned N = bzfad_pkg::BZ_N
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   sum
);
  logic [N:0] c;

  assign c[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_fa
    assign sum[i] = x[i] ^ y[i] ^ c[i];
    assign c[i+1] = (x[i] & y[i]) | (c[i] & (x[i] ^ y[i]));
  end
  assign sum[N] = c[N];
endmodule
