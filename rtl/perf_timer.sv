// perf_timer: time-measurement controller with a start and an end trigger.
//
// 'clear' zeroes the count and arms the controller. The first start_trig
// after that starts counting clock cycles; end_trig stops it and raises
// 'done'. Later triggers are ignored until the next clear. 'cycles' is the
// number of clock edges from the start trigger up to and including the end
// trigger (a start and end in the same cycle give 1; an end one cycle after
// the start gives 2). At 125 MHz one cycle is 8 ns. The document describes
// controllers with two triggers measuring compression and transmission time;
// the counter width is this design's own.
module perf_timer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         start_trig,
  input  logic         end_trig,
  output logic [W-1:0] cycles,
  output logic         running,
  output logic         done
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycles <= '0; running <= 1'b0; done <= 1'b0;
    end else if (clear) begin
      cycles <= '0; running <= 1'b0; done <= 1'b0;
    end else if (!done) begin
      if (running || start_trig) begin
        cycles <= cycles + 1'b1;
        if (end_trig) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          running <= 1'b1;
        end
      end
    end
  end
endmodule
