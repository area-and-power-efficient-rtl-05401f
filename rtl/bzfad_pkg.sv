// Shared constants and types of the BZ-FAD shift-and-add multiplier.
//
// BZ_N is the operand width of the multiplier (16 bits, the size evaluated
// for this architecture) and BZ_BLOCK the number of ring-counter flip-flops
// that share one gated clock (4, the block size that gives the lowest ring
// counter power). The controller state type is also defined here.
package bzfad_pkg;
  localparam int unsigned BZ_N     = 16;
  localparam int unsigned BZ_BLOCK = 4;

  // Sequencer states: waiting for start, or stepping through the bits of B.
  typedef enum logic {
    ST_IDLE = 1'b0,
    ST_RUN  = 1'b1
  } bz_state_e;
endpackage
