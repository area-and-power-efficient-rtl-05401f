// Low-order product latches (Plow) of the BZ-FAD multiplier.
//
// A conventional shift-and-add multiplier shifts the low half of its partial
// product register on every step. Here each finished product bit is written
// once, in place: latch i is opened only in step i, selected by bit i of the
// one-hot ring counter, and holds its bit for the rest of the multiplication
// and afterwards. Replacing the shifted register by latches addressed by the
// ring counter follows the BZ-FAD architecture.
//
// Timing: latch i is transparent while clk is low, en is high and sel[i] is
// high, so it closes at the rising edge that ends the step, the same edge at
// which d and sel change. d must be stable during the low phase of the step.
// The clock phase and the absence of a reset are this design's choices.
//
// The latches are intentional: they are the storage this architecture uses.
module plow_latches #(
  parameter int unsigned N = bzfad_pkg::BZ_N
) (
  input  logic         clk,
  input  logic         en,
  input  logic [N-1:0] sel,
  input  logic         d,
  output logic [N-1:0] plow
);
  logic [N-1:0] open_l;

  assign open_l = sel & {N{en & ~clk}};

  for (genvar i = 0; i < N; i++) begin : g_lat
    always_latch begin
      if (open_l[i])
        plow[i] = d;
    end
  end
endmodule
