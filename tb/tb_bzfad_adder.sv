// Self-checking testbench of bzfad_adder: corner cases (carry through all
// bits, all ones) and random operands, compared with a 17-bit sum computed
// in the testbench.
module tb_bzfad_adder;
  localparam int N = 16;
  logic [N-1:0] x, y;
  logic [N:0]   sum;
  int checks = 0, failures = 0;

  bzfad_adder #(.N(N)) dut (.x(x), .y(y), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] xv, input logic [N-1:0] yv);
    logic [N:0] exp;
    x = xv; y = yv;
    #1;
    exp = {1'b0, xv} + {1'b0, yv};
    checks++;
    if (sum !== exp) begin
      failures++;
      $display("FAIL %h + %h: got %h expected %h", xv, yv, sum, exp);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, 16'd1);
    check('1, '1);
    check(16'h8000, 16'h8000);
    check(16'h7FFF, 16'h0001);
    for (int t = 0; t < 2000; t++) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
