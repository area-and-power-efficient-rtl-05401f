// Hot-block ring counter: a one-hot counter whose flip-flops are split into
// blocks of BLOCK flip-flops, each block clocked through its own gating cell.
//
// In a plain ring counter every flip-flop is clocked every cycle although only
// two of them change. Here a block's clock runs only while the block holds the
// hot bit or the hot bit sits in the last flip-flop of the previous block and
// will enter it on the next edge; all other blocks see no clock edge at all.
// The gating cell is the same whatever BLOCK is.
//
// Interface: shift advances the hot bit by one position (bit i to bit i+1,
// the last bit to bit 0) on the rising edge of clk; with shift low the state
// holds. ring is the one-hot state. rst_n (asynchronous, active low) puts the
// hot bit on bit 0.
//
// Partitioning into clock-gated blocks follows the hot-block architecture; the
// shift input, the reset state and the enable rule are this design's choices.
// WIDTH must be a multiple of BLOCK.
module hot_block_ring_counter #(
  parameter int unsigned WIDTH = bzfad_pkg::BZ_N,
  parameter int unsigned BLOCK = bzfad_pkg::BZ_BLOCK
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  output logic [WIDTH-1:0] ring
);
  localparam int unsigned NBLK = WIDTH / BLOCK;

  logic [NBLK-1:0] gclk;
  logic [NBLK-1:0] blk_hot;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO   = k * BLOCK;
    localparam int unsigned HI   = LO + BLOCK - 1;
    localparam int unsigned PREV = (LO == 0) ? WIDTH - 1 : LO - 1;

    logic [BLOCK-1:0] q;

    assign blk_hot[k]  = |q;
    assign ring[HI:LO] = q;

    hot_block_clock_gate u_cg (
      .clk      (clk),
      .rst_n    (rst_n),
      .block_hot(blk_hot[k]),
      .prev_last(ring[PREV]),
      .run      (shift),
      .gclk     (gclk[k])
    );

    // The block's flip-flops: each takes the bit below it, the first one the
    // last bit of the previous block.
    always_ff @(posedge gclk[k] or negedge rst_n) begin
      if (!rst_n)
        q <= (k == 0) ? BLOCK'(1) : '0;
      else
        q <= {q[BLOCK-2:0], ring[PREV]};
    end
  end

  initial begin
    assert (WIDTH % BLOCK == 0 && BLOCK >= 2)
      else $error("WIDTH must be a multiple of BLOCK, BLOCK at least 2");
  end
endmodule
