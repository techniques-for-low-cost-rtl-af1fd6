// iq_correct - gain and phase correction of the Stat I/Q imbalance corrector.
//
// Implements the simplified one-branch correction: the weak_br branch W passes
// unchanged and the strong_br branch S is replaced by
//     C_S = (1 - 2|eps|) * S + sin(phi) * W
// using two multipliers and one adder. The gain factor 1 - 2|eps| is formed
// from the gain coefficient without a multiplier and is never below 0. The
// sum is truncated (floored) from Q1.17 back to a 14-bit sample; a result
// outside the 14-bit range saturates (saturation is this design's choice).
// The gain-only result (1 - 2|eps|) * S is also brought out, in I/Q order,
// because the phase statistics are gathered on gain-corrected data.
//
// With enable_corr low the block passes its inputs through unchanged.
//
// Interface / timing: one register stage, so every output appears one clock
// after the inputs that produced it, qualified by out_valid.
//   strong_br, weak_br, swap   from iq_channel_select (swap=1: strong_br is I)
//   gain_coef            epsilon, signed Q1.17
//   phase_coef           sin(phi), signed Q1.17
//   out_i, out_q         corrected (or passed-through) samples
//   gc_i, gc_q           gain-corrected samples, phase correction not applied
//
// The structure (one branch corrected, two multipliers and an adder, result
// cut back to 14 bits) follows the design this is based on. The Q1.17
// coefficient format, the clamp and the register stage are this design's.
module iq_correct
  import decimator_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic                       enable_corr,
  input  logic signed [SAMPLE_W-1:0] strong_br,
  input  logic signed [SAMPLE_W-1:0] weak_br,
  input  logic                       swap,
  input  logic signed [COEF_W-1:0]   gain_coef,
  input  logic signed [COEF_W-1:0]   phase_coef,
  output logic                       out_valid,
  output logic signed [SAMPLE_W-1:0] out_i,
  output logic signed [SAMPLE_W-1:0] out_q,
  output logic signed [SAMPLE_W-1:0] gc_i,
  output logic signed [SAMPLE_W-1:0] gc_q
);

  localparam int unsigned M_W = COEF_W + 1;  // gain factor, signed, 0 .. 1.0

  logic        [COEF_W-1:0]        eps_abs;
  logic signed [M_W+1:0]           m_wide;
  logic signed [M_W-1:0]           gain_mult;
  logic signed [SAMPLE_W+M_W-1:0]  prod_gain;
  logic signed [SAMPLE_W+COEF_W-1:0] prod_phase;
  logic signed [47:0]              sum_full;
  logic signed [47:0]              gain_only;
  logic signed [SAMPLE_W-1:0]      c_strong, g_strong;

  always_comb begin
    eps_abs   = gain_coef[COEF_W-1] ? COEF_W'(-gain_coef) : COEF_W'(gain_coef);
    m_wide    = (M_W+2)'(1 << COEF_FRAC) - (M_W+2)'({eps_abs, 1'b0});
    gain_mult = (m_wide < 0) ? '0 : m_wide[M_W-1:0];
    prod_gain  = strong_br * gain_mult;
    prod_phase = weak_br * phase_coef;
    sum_full   = 48'(prod_gain) + 48'(prod_phase);
    gain_only  = 48'(prod_gain) >>> COEF_FRAC;
    c_strong   = sat_sample(sum_full >>> COEF_FRAC);
    g_strong   = sat_sample(gain_only);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      gc_i      <= '0;
      gc_q      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (swap) begin
          gc_i <= g_strong;
          gc_q <= weak_br;
        end else begin
          gc_i <= weak_br;
          gc_q <= g_strong;
        end
        if (!enable_corr) begin
          out_i <= swap ? strong_br : weak_br;
          out_q <= swap ? weak_br   : strong_br;
        end else if (swap) begin
          out_i <= c_strong;
          out_q <= weak_br;
        end else begin
          out_i <= weak_br;
          out_q <= c_strong;
        end
      end
    end
  end

endmodule
