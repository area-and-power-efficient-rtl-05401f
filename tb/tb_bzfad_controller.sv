// Self-checking testbench of bzfad_controller: random start requests and a
// modelled ring counter whose last bit comes after a random number of steps;
// checks load, busy and done against a reference state machine, and that
// start is ignored while busy.
module tb_bzfad_controller;
  logic clk = 0, rst_n = 1, start = 0, last = 0;
  logic load, busy, done;
  logic m_busy = 0, m_done = 0;
  int   steps = 0, len = 4;
  int checks = 0, failures = 0, n_done = 0, n_ignored = 0;

  bzfad_controller dut (.*);

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
      start = ($urandom_range(0, 3) == 0);
      last  = m_busy && (steps == len - 1);
      if (start && m_busy) n_ignored++;
      #1;
      checks++;
      if (load !== (!m_busy && start) || busy !== m_busy || done !== m_done) begin
        failures++;
        $display("FAIL t=%0d load=%b busy=%b done=%b exp busy=%b done=%b",
                 t, load, busy, done, m_busy, m_done);
      end
      @(posedge clk);
      m_done = 0;
      if (!m_busy) begin
        if (start) begin m_busy = 1; steps = 0; len = $urandom_range(1, 8); end
      end else if (last) begin
        m_busy = 0; m_done = 1; n_done++;
      end else steps++;
    end
    if (n_done == 0 || n_ignored == 0) failures++;
    $display("completed %0d, ignored starts %0d", n_done, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
