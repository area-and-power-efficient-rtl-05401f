// Self-checking testbench of b_bit_mux: for random and corner values of B,
// walks the one-hot select over every position and checks that the output is
// the selected bit of B.
module tb_b_bit_mux;
  localparam int N = 16;
  logic [N-1:0] b, sel;
  logic         bit_o;
  int checks = 0, failures = 0;

  b_bit_mux #(.N(N)) dut (.b(b), .sel(sel), .bit_o(bit_o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      case (t)
        0:       b = '0;
        1:       b = '1;
        2:       b = 16'hAAAA;
        default: b = N'($urandom);
      endcase
      for (int i = 0; i < N; i++) begin
        sel = N'(1) << i;
        #1;
        checks++;
        if (bit_o !== b[i]) begin
          failures++;
          $display("FAIL b=%h i=%0d got %b", b, i, bit_o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
