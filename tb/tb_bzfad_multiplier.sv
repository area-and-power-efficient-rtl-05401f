// End-to-end, self-checking testbench of the BZ-FAD multiplier at its default
// size (16 x 16 bits, ring counter blocks of 4).
//
// It runs corner operands, 100 random operand pairs and further random pairs,
// with starts issued back to back and also while the multiplier is busy
// (they must be ignored). Every product is compared with A*B computed here,
// and the time from the start edge to done must be N clocks.
//
// It counts how often each mechanism of the design happened and fails if one
// never did: an add step (bit of B is 1), an adder bypass (bit is 0), a
// gated-clock block hand-over in the ring counter, the ring counter ending a
// multiplication by wrapping to bit 0, a start ignored while busy, and a start
// accepted in the clock right after done.
//
// For the 100-pair run it also reports per-cycle bit transition counts of the
// low-order product storage, the adder output, the multiplexers and the step
// counter, next to the same counts for a conventional shift-and-add multiplier
// modelled in this testbench (shifting B/low-product register, 0/A
// multiplexer in front of the adder, binary step counter). The counts are
// reported, not checked.
module tb_bzfad_multiplier;
  import bzfad_pkg::*;
  localparam int N = BZ_N;
  localparam int B = BZ_BLOCK;

  logic           clk = 0, rst_n = 1, start = 0;
  logic [N-1:0]   a = '0, b = '0;
  logic           busy, done;
  logic [2*N-1:0] product;

  int checks = 0, failures = 0;
  int n_add = 0, n_bypass = 0, n_handover = 0, n_wrap = 0, n_ignored = 0, n_b2b = 0;

  bzfad_multiplier dut (.*);

  always #10 clk = ~clk;
  initial #3 rst_n = 0;  // a falling edge, so the asynchronous reset acts

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled in the middle of each step.
  always @(negedge clk) if (rst_n && busy) begin
    if (dut.b_bit) n_add++; else n_bypass++;
    if ((dut.ring & {N/B{B'(1) << (B-1)}}) != 0) n_handover++;
    if (dut.ring[N-1]) n_wrap++;
  end

  // Transition counting (enabled during the 100-pair run).
  logic           count_on = 0;
  longint         t_low = 0, t_add = 0, t_mux = 0, t_cnt = 0;
  longint         c_low = 0, c_add = 0, c_mux = 0, c_cnt = 0;
  logic [N-1:0]   p_plow;
  logic [N:0]     p_sum;
  logic [N:0]     p_mux;
  logic [N-1:0]   p_ring;
  // Conventional multiplier model state.
  logic [N-1:0]   cv_a, cv_b, cv_ph, cv_mux, p_cv_b, p_cv_mux;
  logic [N:0]     cv_sum, p_cv_sum;
  logic [4:0]     cv_cnt, p_cv_cnt;
  logic           cv_run = 0;
  logic [N-1:0]   b2b_a, b2b_b;

  always @(negedge clk) begin
    if (count_on) begin
      t_low += $countones(dut.plow ^ p_plow);
      t_add += $countones(dut.sum ^ p_sum);
      t_mux += $countones({dut.b_bit, dut.u_pph.nxt[N:1]} ^ p_mux);
      t_cnt += $countones(dut.ring ^ p_ring);
      c_low += $countones(cv_b ^ p_cv_b);
      c_add += $countones(cv_sum ^ p_cv_sum);
      c_mux += $countones(cv_mux ^ p_cv_mux);
      c_cnt += $countones(cv_cnt ^ p_cv_cnt);
    end
    p_plow = dut.plow;
    p_sum = dut.sum;
    p_mux = {dut.b_bit, dut.u_pph.nxt[N:1]};
    p_ring = dut.ring;
    p_cv_b = cv_b; p_cv_sum = cv_sum; p_cv_mux = cv_mux; p_cv_cnt = cv_cnt;
  end

  // Conventional shift-and-add model, started with the DUT.
  always_comb begin
    cv_mux = cv_b[0] ? cv_a : '0;
    cv_sum = {1'b0, cv_ph} + {1'b0, cv_mux};
  end
  always @(posedge clk) begin
    if (dut.load) begin
      cv_a <= a; cv_b <= b; cv_ph <= '0; cv_cnt <= '0; cv_run <= 1;
    end else if (cv_run) begin
      {cv_ph, cv_b} <= {cv_sum, cv_b[N-1:1]};
      cv_cnt <= cv_cnt + 1'b1;
      if (cv_cnt == 5'(N - 1)) cv_run <= 0;
    end
  end

  // One multiplication: start, wait for done, check latency and product.
  // With junk_start, start is also raised during the busy period.
  task automatic mult(input logic [N-1:0] av, input logic [N-1:0] bv, input bit junk_start);
    int cyc;
    logic [2*N-1:0] exp;
    @(negedge clk);
    start = 1; a = av; b = bv;
    @(posedge clk);
    #1;
    start = 0;
    a = N'($urandom); b = N'($urandom);   // operands may change once loaded
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      cyc++;
      #1;
      if (junk_start && busy && !done && $urandom_range(0, 3) == 0) begin
        start = 1;
        @(posedge clk);
        cyc++;
        n_ignored++;
        #1;
        start = 0;
      end
      if (cyc > 4 * N) break;
    end
    exp = {{N{1'b0}}, av} * {{N{1'b0}}, bv};
    checks++;
    if (!done || product !== exp) begin
      failures++;
      $display("FAIL %h * %h: got %h expected %h", av, bv, product, exp);
    end
    checks++;
    if (cyc != N) begin
      failures++;
      $display("FAIL latency %0d clocks, expected %0d", cyc, N);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Corner operands.
    mult('0, '0, 0);
    mult('1, '1, 0);
    mult('1, '0, 0);
    mult('0, '1, 0);
    mult(16'h0001, 16'h0001, 0);
    mult(16'h8000, 16'h8000, 0);
    mult(16'hAAAA, 16'h5555, 0);
    mult(16'h1234, 16'h8001, 1);
    // 100 random operand pairs with transition counting.
    count_on = 1;
    for (int t = 0; t < 100; t++) mult(N'($urandom), N'($urandom), 0);
    count_on = 0;
    // Back-to-back: start raised in the clock right after done.
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      start = 1; a = N'($urandom); b = N'($urandom);
      while (!done) @(negedge clk);
      // start still high: accepted now.
      n_b2b++;
      begin
        b2b_a = a;
        b2b_b = b;
        @(posedge clk);
        #1;
        checks++;
        if (!busy) begin failures++; $display("FAIL back-to-back start not taken"); end
        start = 0;
        while (!done) @(posedge clk);
        #1;
        checks++;
        if (product !== {{N{1'b0}}, b2b_a} * {{N{1'b0}}, b2b_b}) begin
          failures++;
          $display("FAIL back-to-back %h * %h got %h", b2b_a, b2b_b, product);
        end
      end
    end
    // Further random pairs, some with ignored starts.
    for (int t = 0; t < 2000; t++) mult(N'($urandom), N'($urandom), t % 4 == 0);

    $display("mechanisms: add %0d, bypass %0d, ring block hand-over %0d, ring wrap %0d, ignored start %0d, back-to-back %0d",
             n_add, n_bypass, n_handover, n_wrap, n_ignored, n_b2b);
    if (n_add == 0 || n_bypass == 0 || n_handover == 0 || n_wrap == 0 || n_ignored == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("transitions over 100 pairs (this design / conventional model):");
    $display("  low-order product storage %0d / %0d", t_low, c_low);
    $display("  adder output              %0d / %0d", t_add, c_add);
    $display("  multiplexers              %0d / %0d", t_mux, c_mux);
    $display("  step counter              %0d / %0d", t_cnt, c_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
