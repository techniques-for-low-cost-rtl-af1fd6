// stat_sample_counter - counts the samples summed by the Stat corrector.
//
// The state machine clears the counter when a summing step begins; every
// sample accepted into the running sums (inc high) then adds one. When the
// sample that brings the count to `target` is counted, `done` pulses for one
// clock and the counter holds until it is cleared again, so exactly `target`
// samples are summed in each step.
//
// Interface / timing: synchronous clear; count and done are registered;
// full is high whenever count equals target, so the caller can stop adding.
// target is the number of samples per step (1 .. 2^CNT_W-1); the design this
// follows found about 150,000 samples sufficient, which fits the 18-bit count.
//
// The counter's role follows the design this is based on; its width, clear
// and handshake are this design's choices.
module stat_sample_counter
  import decimator_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             inc,
  input  logic [CNT_W-1:0] target,
  output logic [CNT_W-1:0] count,
  output logic             full,
  output logic             done
);

  logic reached;

  assign reached = (count == target);
  assign full    = reached;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      done  <= 1'b0;
    end else if (clear) begin
      count <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (inc && !reached) begin
        count <= count + 1'b1;
        done  <= (count + 1'b1 == target);
      end
    end
  end

endmodule
