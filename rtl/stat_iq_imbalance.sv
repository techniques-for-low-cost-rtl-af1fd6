// stat_iq_imbalance - "Stat" blind I/Q imbalance estimator and corrector.
//
// A direct-conversion receiver gives its I and Q branches slightly different
// gains (epsilon) and a phase skew (phi). Stat assumes the transmitted I and Q
// are independent and of equal power, so any power difference or correlation
// seen at the receiver is imbalance. The FPGA part, built here, does the
// per-sample work; the host microcontroller turns the sums into coefficients:
//     eps     = (sqrt(E[Q^2]) - sqrt(E[I^2])) / (sqrt(E[Q^2]) + sqrt(E[I^2]))
//     sin(phi) ~ -2 E[I*Q] / (E[I^2] + E[Q^2])   (arcsin dropped, small phi)
// the phase term being measured on gain-corrected data.
//
// Data path per sample (one sample per clock):
//   iq_channel_select -> iq_correct (2 multipliers, 1 adder) -> out_i/out_q
//   raw or gain-corrected pair -> iq_mac (3 multipliers) running sums
// stat_control_fsm with stat_sample_counter sequences gain sums, gain
// coefficient, phase sums, phase coefficient. Five multipliers in all, as in
// the design this follows.
//
// Host interface (this design's choice of encoding):
//   enable_corr       1: correct the stream, 0: pass it through unchanged
//   calc_new_coeffs   one-clock pulse, starts a coefficient cycle
//   num_samples       samples summed in each of the two summing steps
//   gain_coef_wr      writes coef_wdata to the gain coefficient (epsilon);
//                     in ST_GAIN_WAIT it also advances to the phase step
//   phase_coef_wr     writes coef_wdata to the phase coefficient (sin phi);
//                     in ST_PHASE_WAIT it also ends the cycle
//   sums_ready        the three sums are stable and may be read
//   sample_count      samples summed so far in the current step
// Coefficients reset to 0 (no correction).
//
// Timing: out_* follow in_* by one clock. The sums see the stream one clock
// later than the inputs as well; the first sample of a step is the one that
// arrives after the clear pulse.
module stat_iq_imbalance
  import decimator_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  // sample stream
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_i,
  input  logic signed [SAMPLE_W-1:0] in_q,
  output logic                       out_valid,
  output logic signed [SAMPLE_W-1:0] out_i,
  output logic signed [SAMPLE_W-1:0] out_q,
  // host control
  input  logic                       enable_corr,
  input  logic                       calc_new_coeffs,
  input  logic [CNT_W-1:0]           num_samples,
  input  logic                       gain_coef_wr,
  input  logic                       phase_coef_wr,
  input  logic signed [COEF_W-1:0]   coef_wdata,
  // host status
  output stat_state_e                state,
  output logic                       sums_ready,
  output logic [CNT_W-1:0]           sample_count,
  output logic signed [ACC_W-1:0]    sum_ii,
  output logic signed [ACC_W-1:0]    sum_qq,
  output logic signed [ACC_W-1:0]    sum_iq,
  output logic signed [COEF_W-1:0]   gain_coef,
  output logic signed [COEF_W-1:0]   phase_coef
);

  logic signed [SAMPLE_W-1:0] strong_br, weak_br;
  logic                       swap;
  logic signed [SAMPLE_W-1:0] gc_i, gc_q;
  logic signed [SAMPLE_W-1:0] raw_i_d, raw_q_d;
  logic                       clear_sums, summing, phase_step;
  logic                       cnt_full, cnt_done;
  logic                       take;
  logic signed [SAMPLE_W-1:0] mac_a, mac_b;

  // Coefficient registers written by the host.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain_coef  <= '0;
      phase_coef <= '0;
    end else begin
      if (gain_coef_wr)  gain_coef  <= coef_wdata;
      if (phase_coef_wr) phase_coef <= coef_wdata;
    end
  end

  iq_channel_select u_select (
    .in_i      (in_i),
    .in_q      (in_q),
    .gain_coef (gain_coef),
    .strong_br    (strong_br),
    .weak_br      (weak_br),
    .swap      (swap)
  );

  iq_correct u_correct (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (in_valid),
    .enable_corr (enable_corr),
    .strong_br      (strong_br),
    .weak_br        (weak_br),
    .swap        (swap),
    .gain_coef   (gain_coef),
    .phase_coef  (phase_coef),
    .out_valid   (out_valid),
    .out_i       (out_i),
    .out_q       (out_q),
    .gc_i        (gc_i),
    .gc_q        (gc_q)
  );

  // Raw samples delayed to line up with the gain-corrected ones.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_i_d <= '0;
      raw_q_d <= '0;
    end else if (in_valid) begin
      raw_i_d <= in_i;
      raw_q_d <= in_q;
    end
  end

  stat_control_fsm u_fsm (
    .clk             (clk),
    .rst_n           (rst_n),
    .calc_new_coeffs (calc_new_coeffs),
    .gain_coef_wr    (gain_coef_wr),
    .phase_coef_wr   (phase_coef_wr),
    .cnt_done        (cnt_done),
    .state           (state),
    .clear_sums      (clear_sums),
    .summing         (summing),
    .phase_step      (phase_step),
    .sums_ready      (sums_ready)
  );

  assign take  = out_valid && summing && !clear_sums && !cnt_full;
  assign mac_a = phase_step ? gc_i : raw_i_d;
  assign mac_b = phase_step ? gc_q : raw_q_d;

  stat_sample_counter u_counter (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (clear_sums),
    .inc    (take),
    .target (num_samples),
    .count  (sample_count),
    .full   (cnt_full),
    .done   (cnt_done)
  );

  iq_mac u_mac (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (clear_sums),
    .acc_en (take),
    .a      (mac_a),
    .b      (mac_b),
    .sum_aa (sum_ii),
    .sum_bb (sum_qq),
    .sum_ab (sum_iq)
  );

endmodule
