// Self-checking testbench of plow_latches: walks the one-hot select over all
// positions as the multiplier does, writing a random bit per step, and checks
// that each latch took its own bit, that bits already written are not
// disturbed by later steps or by d changing in the high clock phase, and that
// nothing is written while en is low.
module tb_plow_latches;
  localparam int N = 16;
  logic         clk = 0, en = 0, d = 0;
  logic [N-1:0] sel = '0;
  logic [N-1:0] plow;
  logic [N-1:0] exp_v;
  int checks = 0, failures = 0;

  plow_latches #(.N(N)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      exp_v = N'($urandom);
      // Changes happen right after the rising edge, as in the multiplier.
      for (int i = 0; i < N; i++) begin
        @(posedge clk);
        #1;
        en  = 1;
        sel = N'(1) << i;
        d   = exp_v[i];
      end
      @(posedge clk);
      #1;
      en = 0;
      sel = '0;
      d = ~d;
      checks++;
      if (plow !== exp_v) begin
        failures++;
        $display("FAIL round %0d got %h expected %h", r, plow, exp_v);
      end
      // Idle for a while with d and sel toggling but en low: no change.
      repeat (3) begin
        @(posedge clk);
        #1;
        sel = N'($urandom);
        d   = ~d;
      end
      @(negedge clk);
      #1;
      checks++;
      if (plow !== exp_v) begin
        failures++;
        $display("FAIL hold round %0d got %h expected %h", r, plow, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
