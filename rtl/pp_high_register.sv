// High half of the BZ-FAD partial product, with the adder bypass.
//
// Each step either adds the multiplicand (selected bit of B is 1) or skips
// the adder (bit is 0): the bypass multiplexer then feeds the register back to
// itself, shifted, so no addition result is used. In both cases the register
// moves right by one place and the bit that drops out of its bottom is a
// finished product bit, sent out on low_bit to the low-order latches:
//   add = 1: pph <= sum[N:1],       low_bit = sum[0]
//   add = 0: pph <= {1'b0, pph[N-1:1]}, low_bit = pph[0]
// Interface: clear zeroes the register (start of a multiplication), step
// performs one step on the rising edge; rst_n is asynchronous, active low.
// low_bit is combinational and valid during the step cycle.
//
// The bypass follows the BZ-FAD architecture; keeping the right shift in the
// high half (only the low half stops shifting) is this design's reading.
module pp_high_register #(
  parameter int unsigned N = bzfad_pkg::BZ_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         step,
  input  logic         add,
  input  logic [N:0]   sum,
  output logic [N-1:0] pph,
  output logic         low_bit
);
  logic [N:0] nxt;  // {next register value, finished bit}

  // Bypass multiplexer.
  assign nxt     = add ? sum : {1'b0, pph};
  assign low_bit = nxt[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      pph <= '0;
    else if (clear)
      pph <= '0;
    else if (step)
      pph <= nxt[N:1];
  end
endmodule
