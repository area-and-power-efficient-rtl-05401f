// Sequencer of the BZ-FAD multiplier.
//
// Two states. In IDLE a start request loads the operands (load pulse) and
// moves to RUN. In RUN one bit of B is processed per clock (busy high) while
// the ring counter shifts; there is no binary step counter: the multiplication
// ends on the step in which the ring counter's last bit is hot (last), after
// which done pulses for one clock and the controller is idle again.
//
// Timing: start sampled on rising edge t; steps on edges t+1 .. t+N; done is
// high in the clock after edge t+N. rst_n is asynchronous, active low.
// Using the ring counter as the step counter follows the BZ-FAD architecture;
// the start/busy/done handshake is this design's choice.
module bzfad_controller
  import bzfad_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic last,
  output logic load,
  output logic busy,
  output logic done
);
  bz_state_e state;

  assign load = (state == ST_IDLE) && start;
  assign busy = (state == ST_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) state <= ST_RUN;
        ST_RUN:  if (last) begin
                   state <= ST_IDLE;
                   done  <= 1'b1;
                 end
        default: state <= ST_IDLE;
      endcase
    end
  end
endmodule
