// iq_mac - the multiply-accumulate block of the Stat I/Q imbalance corrector.
//
// Keeps three running sums over the samples it is given: the sum of squares
// of each branch and the sum of their products,
//     sum_aa = sum(a*a), sum_bb = sum(b*b), sum_ab = sum(a*b).
// From these the coefficient computation (done outside this logic) forms the
// mean-square powers E[I^2], E[Q^2] and the cross term E[I*Q]. Three
// multipliers work every clock, so the block keeps up with one sample per
// clock at the receiver rate.
//
// Interface / timing: clear zeroes all sums on the next edge (and wins over
// acc_en); with acc_en high the sample pair on a, b is added on the next edge.
// Sums are 48-bit signed: a 14-bit square is below 2^26, so up to 2^21
// samples add without overflow. The widths are this design's choice.
//
// Forming the sums in logic and leaving the division and roots to the
// microcontroller follows the design this is based on.
module iq_mac
  import decimator_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       acc_en,
  input  logic signed [SAMPLE_W-1:0] a,
  input  logic signed [SAMPLE_W-1:0] b,
  output logic signed [ACC_W-1:0]    sum_aa,
  output logic signed [ACC_W-1:0]    sum_bb,
  output logic signed [ACC_W-1:0]    sum_ab
);

  logic signed [2*SAMPLE_W-1:0] p_aa, p_bb, p_ab;

  always_comb begin
    p_aa = a * a;
    p_bb = b * b;
    p_ab = a * b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_aa <= '0;
      sum_bb <= '0;
      sum_ab <= '0;
    end else if (clear) begin
      sum_aa <= '0;
      sum_bb <= '0;
      sum_ab <= '0;
    end else if (acc_en) begin
      sum_aa <= sum_aa + ACC_W'(p_aa);
      sum_bb <= sum_bb + ACC_W'(p_bb);
      sum_ab <= sum_ab + ACC_W'(p_ab);
    end
  end

endmodule
