// iq_channel_select - the Channel_Select switch of the Stat I/Q imbalance
// corrector.
//
// The corrector equalises the stronger receiver branch to the weaker one, so
// only the stronger branch goes through the gain multiplier. The sign of the
// gain coefficient (epsilon, positive when Q carries more gain) tells which
// branch that is: a negative coefficient sends the real (I) branch to the gain
// correction, a positive or zero one sends the imaginary (Q) branch. The other
// branch goes on unchanged and also feeds the phase-correction multiplier.
// This routing follows the design description; treating a zero coefficient as
// "Q stronger" is this design's choice (the gain multiplier is then exactly 1).
//
// Interface: purely combinational.
//   in_i, in_q   receiver samples, 14-bit two's complement
//   gain_coef    epsilon, Q1.17 (only its sign is used here)
//   strong_br       branch routed to the gain multiplier
//   weak_br         branch passed straight on
//   swap         1 when strong_br is the I branch
module iq_channel_select
  import decimator_pkg::*;
(
  input  logic signed [SAMPLE_W-1:0] in_i,
  input  logic signed [SAMPLE_W-1:0] in_q,
  input  logic signed [COEF_W-1:0]   gain_coef,
  output logic signed [SAMPLE_W-1:0] strong_br,
  output logic signed [SAMPLE_W-1:0] weak_br,
  output logic                       swap
);

  always_comb begin
    swap = gain_coef[COEF_W-1];
    if (swap) begin
      strong_br = in_i;
      weak_br   = in_q;
    end else begin
      strong_br = in_q;
      weak_br   = in_i;
    end
  end

endmodule
