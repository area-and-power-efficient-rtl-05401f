// BZ-FAD (Bypass Zero, Feed A Directly) low-power shift-and-add multiplier,
// unsigned N x N -> 2N bits, one bit of the multiplier B per clock.
//
// It is a shift-and-add multiplier with the switching sources of the
// conventional version removed or reduced:
//   * B is loaded once and never shifted; b_bit_mux picks bit B(i) with the
//     one-hot ring counter as select.
//   * A is wired straight to the adder (no 0/A multiplexer).
//   * When B(i) is 0 the adder is bypassed: pp_high_register just shifts.
//   * The step counter is a hot-block ring counter (clock-gated blocks of
//     BLOCK flip-flops) instead of a binary counter; its last bit also ends
//     the multiplication.
//   * The low half of the product is not shifted: bit i is written once into
//     latch i of plow_latches, opened by ring-counter bit i.
// product = {pph, plow}.
//
// Interface and timing: while busy is low, start on a rising edge captures a
// and b (edge t). Steps run on edges t+1 .. t+N, busy high meanwhile; done
// is high for the one clock after edge t+N and product then holds A*B until
// the next start. rst_n is asynchronous, active low.
//
// The list of modifications follows the BZ-FAD architecture; the handshake,
// unsigned operands, ripple adder and the exact wiring are this design's own.
module bzfad_multiplier #(
  parameter int unsigned N     = bzfad_pkg::BZ_N,
  parameter int unsigned BLOCK = bzfad_pkg::BZ_BLOCK
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product
);
  logic [N-1:0] a_q, b_q;
  logic [N-1:0] ring;
  logic         load;
  logic         b_bit;
  logic [N:0]   sum;
  logic [N-1:0] pph;
  logic         low_bit;
  logic [N-1:0] plow;

  // Operand registers, loaded once per multiplication.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (load) begin
      a_q <= a;
      b_q <= b;
    end
  end

  bzfad_controller u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .last (ring[N-1]),
    .load (load),
    .busy (busy),
    .done (done)
  );

  hot_block_ring_counter #(.WIDTH(N), .BLOCK(BLOCK)) u_ring (
    .clk  (clk),
    .rst_n(rst_n),
    .shift(busy),
    .ring (ring)
  );

  b_bit_mux #(.N(N)) u_bmux (
    .b    (b_q),
    .sel  (ring),
    .bit_o(b_bit)
  );

  bzfad_adder #(.N(N)) u_add (
    .x  (a_q),
    .y  (pph),
    .sum(sum)
  );

  pp_high_register #(.N(N)) u_pph (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (load),
    .step   (busy),
    .add    (b_bit),
    .sum    (sum),
    .pph    (pph),
    .low_bit(low_bit)
  );

  plow_latches #(.N(N)) u_plow (
    .clk (clk),
    .en  (busy),
    .sel (ring),
    .d   (low_bit),
    .plow(plow)
  );

  assign product = {pph, plow};

  // The ring counter must stay one-hot, and be back at bit 0 when idle.
  a_ring_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ring));
  a_ring_home:   assert property (@(posedge clk) disable iff (!rst_n) !busy |-> ring[0]);
endmodule
