// Self-checking testbench of hot_block_ring_counter at two sizes: the
// multiplier's 16 bits and the 64-bit counter with blocks of 4 flip-flops
// (the size at which the hot-block scheme saves most). Random shift requests;
// the state is compared every cycle with a reference one-hot ring, and the
// gated clock edges of each block are counted to check that only the one or
// two blocks that hold or receive the hot bit are clocked.
module tb_hot_block_ring_counter;
  localparam int W1 = 16, B1 = 4;
  localparam int W2 = 64, B2 = 4;
  logic clk = 0, rst_n = 1, shift = 0;
  logic [W1-1:0] ring1, m1;
  logic [W2-1:0] ring2, m2;
  int   gedges;
  int checks = 0, failures = 0, n_shift = 0, n_wrap = 0, n_cross = 0;

  hot_block_ring_counter #(.WIDTH(W1), .BLOCK(B1)) dut1 (.clk(clk), .rst_n(rst_n), .shift(shift), .ring(ring1));
  hot_block_ring_counter #(.WIDTH(W2), .BLOCK(B2)) dut2 (.clk(clk), .rst_n(rst_n), .shift(shift), .ring(ring2));

  always #10 clk = ~clk;
  initial #3 rst_n = 0;  // a falling edge, so the asynchronous reset acts
  always @(negedge clk) gedges = 0;
  for (genvar k = 0; k < W2 / B2; k++) begin : g_cnt
    always @(posedge dut2.gclk[k]) gedges++;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m1 = W1'(1);
    m2 = W2'(1);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (ring1 !== m1 || ring2 !== m2) begin
        failures++;
        $display("FAIL t=%0d ring1=%h exp %h ring2=%h exp %h", t, ring1, m1, ring2, m2);
      end
      shift = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      #1;
      // Blocks clocked this edge in the 64-bit counter: two when the hot bit
      // left a block, one otherwise, none when not shifting.
      checks++;
      if (gedges != (!shift ? 0 : ((m2 & {W2/B2{B2'(1) << (B2-1)}}) != 0 ? 2 : 1))) begin
        failures++;
        $display("FAIL t=%0d gated edges %0d", t, gedges);
      end
      if (shift) begin
        n_shift++;
        if (m1[W1-1]) n_wrap++;
        if ((m2 & {W2/B2{B2'(1) << (B2-1)}}) != 0) n_cross++;
        m1 = {m1[W1-2:0], m1[W1-1]};
        m2 = {m2[W2-2:0], m2[W2-1]};
      end
    end
    if (n_shift == 0 || n_wrap == 0 || n_cross == 0) failures++;
    $display("shifts %0d, 16-bit wraps %0d, 64-bit block crossings %0d", n_shift, n_wrap, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
