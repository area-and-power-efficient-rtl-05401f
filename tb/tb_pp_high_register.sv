// Self-checking testbench of pp_high_register: random add/bypass steps with
// random adder results, checked against a reference model of the register
// (add: take sum[N:1], bypass: shift right) and of the finished bit, plus
// clear and hold (step low).
module tb_pp_high_register;
  localparam int N = 16;
  logic         clk = 0, rst_n = 1, clear = 0, step = 0, add = 0;
  logic [N:0]   sum = '0;
  logic [N-1:0] pph;
  logic         low_bit;
  logic [N-1:0] model = '0;
  logic         exp_bit;
  int checks = 0, failures = 0, n_add = 0, n_bypass = 0;

  pp_high_register #(.N(N)) dut (.*);

  always #10 clk = ~clk;
  initial #3 rst_n = 0;  // a falling edge, so the asynchronous reset acts

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 40) == 0);
      step  = ($urandom_range(0, 5) != 0);
      add   = $urandom_range(0, 1);
      sum   = (N+1)'({$urandom, $urandom});
      #1;
      exp_bit = add ? sum[0] : model[0];
      checks++;
      if (low_bit !== exp_bit) begin
        failures++;
        $display("FAIL low_bit t=%0d", t);
      end
      if (clear) model = '0;
      else if (step) begin
        if (add) begin model = sum[N:1]; n_add++; end
        else begin model = model >> 1; n_bypass++; end
      end
      @(posedge clk);
      #1;
      checks++;
      if (pph !== model) begin
        failures++;
        $display("FAIL pph t=%0d got %h expected %h", t, pph, model);
      end
    end
    if (n_add == 0 || n_bypass == 0) failures++;
    $display("add steps %0d, bypass steps %0d", n_add, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
