// Size sweep of the hot-block ring counter: widths 16, 32, 48 and 64 bits,
// each with blocks of 2, 4, 8 and 16 flip-flops, all shifting every clock.
// Every counter is compared each clock with a reference one-hot ring, and the
// flip-flop clock edges that reach each counter (gated-clock edges times the
// block size) are counted and reported next to a plain ring counter, which
// clocks all of its flip-flops every cycle. Each shift clocks the BLOCK
// flip-flops of the block holding the hot bit, and, when the hot bit leaves
// that block, the BLOCK flip-flops of the next one as well: on average
// BLOCK + 1 clocked flip-flops per shift against WIDTH for the plain counter.
// That count is checked exactly for every counter.
module tb_ring_counter_sizes;
  localparam int NW = 4, NB = 4;
  localparam int WIDTHS [NW] = '{16, 32, 48, 64};
  localparam int BLOCKS [NB] = '{2, 4, 8, 16};
  localparam int CYCLES = 64 * 3;   // a multiple of every width

  logic clk = 0, rst_n = 1;
  int checks = 0, failures = 0;
  longint ff_edges [NW][NB];

  always #10 clk = ~clk;
  initial #3 rst_n = 0;  // a falling edge, so the asynchronous reset acts

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic   run = 0;
  longint expv;

  for (genvar w = 0; w < NW; w++) begin : g_w
    for (genvar bk = 0; bk < NB; bk++) begin : g_b
      localparam int W = WIDTHS[w];
      localparam int B = BLOCKS[bk];
      logic [W-1:0] ring, model;

      hot_block_ring_counter #(.WIDTH(W), .BLOCK(B)) dut (
        .clk(clk), .rst_n(rst_n), .shift(run), .ring(ring));

      for (genvar k = 0; k < W / B; k++) begin : g_k
        always @(posedge dut.gclk[k]) ff_edges[w][bk] += B;
      end

      initial model = W'(1);
      always @(negedge clk) if (rst_n && run) begin
        checks++;
        if (ring !== model) begin
          failures++;
          $display("FAIL W=%0d B=%0d ring=%h expected %h", W, B, ring, model);
        end
      end
      always @(posedge clk) if (rst_n && run) model <= {model[W-2:0], model[W-1]};
    end
  end

  initial begin
    foreach (ff_edges[i, j]) ff_edges[i][j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run = 1;
    repeat (CYCLES) @(negedge clk);
    run = 0;
    @(negedge clk);
    for (int i = 0; i < NW; i++) begin
      for (int j = 0; j < NB; j++) begin
        // Each shift clocks the block holding the hot bit (BLOCK flip-flops)
        // and, once per block pass, the next block too.
        // With a single block the next block is the same one.
        expv = longint'(CYCLES) * BLOCKS[j];
        if (WIDTHS[i] != BLOCKS[j]) expv += longint'(CYCLES / BLOCKS[j]) * BLOCKS[j];
        checks++;
        if (ff_edges[i][j] != expv) begin
          failures++;
          $display("FAIL W=%0d B=%0d clocked flip-flops %0d expected %0d",
                   WIDTHS[i], BLOCKS[j], ff_edges[i][j], expv);
        end
        $display("W=%0d block=%0d: clocked flip-flop edges %0d, plain ring counter %0d (%0d%%)",
                 WIDTHS[i], BLOCKS[j], ff_edges[i][j], longint'(CYCLES) * WIDTHS[i],
                 100 * ff_edges[i][j] / (longint'(CYCLES) * WIDTHS[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
