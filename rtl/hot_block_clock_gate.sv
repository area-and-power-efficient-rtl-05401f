// Clock gating cell of one block of the hot-block ring counter.
//
// A ring counter has exactly one hot flip-flop, so most of its blocks have
// nothing to do in a given cycle. This cell lets the clock through to a block
// only while the block holds the hot bit (block_hot) or is about to receive it
// from the last flip-flop of the previous block (prev_last), and only while
// the counter is told to run.
//
// It has the three parts of the hot-block gating structure: a 2:1
// multiplexer that forms the enable (1 when the block is hot, prev_last
// otherwise), a resettable latch that holds the enable while clk is high so
// the gated clock cannot glitch, and a NAND gate that combines clk with the
// latched enable. The NAND output is inverted here so that the gated clock is
// in phase with clk and the block's flip-flops use the rising edge like the
// rest of the design; the exact wiring of the three parts, the run input and
// that inversion are this design's choices.
//
// Timing: the enable is sampled while clk is low; gclk follows clk during the
// following high phase. rst_n (asynchronous, active low) clears the latch.
//
// The latch is intentional (it is the gating latch of the cell).
module hot_block_clock_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic block_hot,
  input  logic prev_last,
  input  logic run,
  output logic gclk
);
  logic en_mux;
  logic en_lat;
  logic nand_o;

  // Enable multiplexer: a hot block keeps its clock, a cold one is woken by
  // the hot bit waiting at the end of the previous block.
  assign en_mux = run & (block_hot ? 1'b1 : prev_last);

  // Resettable latch, transparent while clk is low.
  always_latch begin
    if (!rst_n)
      en_lat = 1'b0;
    else if (!clk)
      en_lat = en_mux;
  end

  assign nand_o = ~(clk & en_lat);
  assign gclk   = ~nand_o;
endmodule
