// Self-checking testbench of hot_block_clock_gate: drives random enable
// inputs (changed right after each rising edge, as flip-flop outputs would)
// and counts the rising edges of the gated clock in every cycle: exactly one
// when run and (block_hot or prev_last) held during the low phase before the
// edge, none otherwise. Also checks that reset stops the clock.
module tb_hot_block_clock_gate;
  logic clk = 0, rst_n = 1, block_hot = 0, prev_last = 0, run = 0;
  logic gclk;
  logic expect_edge;
  int   edges = 0;
  int checks = 0, failures = 0, n_on = 0, n_off = 0;

  hot_block_clock_gate dut (.*);

  always #10 clk = ~clk;
  initial #3 rst_n = 0;  // a falling edge, so the asynchronous reset acts
  always @(posedge gclk) edges++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    checks++;
    if (edges != 0) begin failures++; $display("FAIL clock in reset"); end
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk);
      #1;
      block_hot = $urandom_range(0, 1);
      prev_last = $urandom_range(0, 1);
      run       = ($urandom_range(0, 3) != 0);
      expect_edge = run && (block_hot || prev_last);
      edges = 0;
      @(posedge clk);
      #1;
      checks++;
      if (edges != (expect_edge ? 1 : 0)) begin
        failures++;
        $display("FAIL t=%0d hot=%b prev=%b run=%b edges=%0d", t, block_hot, prev_last, run, edges);
      end
      if (expect_edge) n_on++; else n_off++;
      // Change the inputs during the high phase: must not make a glitch.
      block_hot = ~block_hot;
      prev_last = ~prev_last;
      run       = ~run;
      #1;
      checks++;
      if (edges > (expect_edge ? 1 : 0)) begin
        failures++;
        $display("FAIL glitch t=%0d", t);
      end
      block_hot = ~block_hot;
      prev_last = ~prev_last;
      run       = ~run;
    end
    if (n_on == 0 || n_off == 0) failures++;
    $display("gated-on cycles %0d, gated-off cycles %0d", n_on, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
