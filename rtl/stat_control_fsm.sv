// stat_control_fsm - sequencer of the Stat coefficient-finding cycle.
//
// The coefficients themselves are computed by the host microcontroller; this
// state machine only decides what the multiply-accumulate block sums and when
// the sums are handed over. The cycle, as the design this follows describes
// it, runs:
//   ST_IDLE       correction runs with the coefficients held; calc_new_coeffs
//                 starts a new cycle.
//   ST_GAIN_SUM   raw samples are summed until the sample counter is done.
//   ST_GAIN_WAIT  sums_ready is raised; the microcontroller reads the sums and
//                 writes the new gain coefficient (gain_coef_wr), which
//                 advances the cycle.
//   ST_PHASE_SUM  gain-corrected samples are summed until the counter is done.
//   ST_PHASE_WAIT sums_ready is raised; writing the phase coefficient
//                 (phase_coef_wr) ends the cycle.
// Every state decodes all inputs and every output has a default, so no latch
// is inferred. calc_new_coeffs outside ST_IDLE is ignored, as are coefficient
// writes that do not advance the current state (they still update the
// coefficient registers outside this module).
//
// Interface / timing: Moore outputs; clear_sums (clears the sums and the
// sample counter) is a one-clock pulse on entry to a summing state.
module stat_control_fsm
  import decimator_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        calc_new_coeffs,
  input  logic        gain_coef_wr,
  input  logic        phase_coef_wr,
  input  logic        cnt_done,
  output stat_state_e state,
  output logic        clear_sums,   // clear MAC and counter
  output logic        summing,      // a summing state is active
  output logic        phase_step,   // sum gain-corrected data
  output logic        sums_ready
);

  stat_state_e next;
  logic        clear_next;

  always_comb begin
    next       = state;
    clear_next = 1'b0;
    unique case (state)
      ST_IDLE: begin
        if (calc_new_coeffs) begin
          next       = ST_GAIN_SUM;
          clear_next = 1'b1;
        end
      end
      ST_GAIN_SUM:   if (cnt_done) next = ST_GAIN_WAIT;
      ST_GAIN_WAIT: begin
        if (gain_coef_wr) begin
          next       = ST_PHASE_SUM;
          clear_next = 1'b1;
        end
      end
      ST_PHASE_SUM:  if (cnt_done) next = ST_PHASE_WAIT;
      ST_PHASE_WAIT: if (phase_coef_wr) next = ST_IDLE;
      default:       next = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      clear_sums <= 1'b0;
    end else begin
      state      <= next;
      clear_sums <= clear_next;
    end
  end

  always_comb begin
    summing    = (state == ST_GAIN_SUM) || (state == ST_PHASE_SUM);
    phase_step = (state == ST_PHASE_SUM) || (state == ST_PHASE_WAIT);
    sums_ready = (state == ST_GAIN_WAIT) || (state == ST_PHASE_WAIT);
  end

endmodule
