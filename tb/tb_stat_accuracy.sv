// tb_stat_accuracy - how well the Stat corrector's sums estimate the receiver
// imbalance, as a function of the number of samples summed per step.
//
// Scenario: independent, equal-power random I and Q (uniform, +-6000) pass
// through the receiver imbalance model
//     R_I = (1-eps)(S_I cos(phi/2) - S_Q sin(phi/2))
//     R_Q = (1+eps)(S_Q cos(phi/2) - S_I sin(phi/2))
// with a gain imbalance of 0.608 dB (eps = 0.035) and a phase error of 4
// degrees. For 10,000, 50,000, 100,000, 154,354 and 200,000 samples per step
// the test runs complete coefficient cycles on stat_iq_imbalance at its
// default widths, acting as the host:
//     eps^      = (sqrt(Sqq)-sqrt(Sii)) / (sqrt(Sqq)+sqrt(Sii))   (gain step)
//     sin(phi)^ = -2 Siq / (Sii+Sqq)                              (phase step,
//                                                 on gain-corrected samples)
// It reports the estimate errors in dB and degrees (154,354 samples is
// averaged over four independent runs), and checks:
//   * every hardware sum equals the sum kept here, bit for bit, and the
//     sample counter reaches the requested count (200,000 needs all 18 bits);
//   * the sums become ready exactly num_samples+1 clocks after the first
//     sample of the step when a sample arrives every clock;
//   * from 100,000 samples on, the gain estimate is within 0.1 dB and the
//     phase estimate within 0.5 degree of the truth.
// The sample counts and the imbalance are those of the evaluation of the
// reference design; the data, the limits and the number of runs are this
// test's own choices.
`timescale 1ns/1ps
module tb_stat_accuracy;
  import decimator_pkg::*;

  localparam real PI    = 3.14159265358979323846;
  localparam real EPS_T = 0.035;
  localparam real PHI_T = 4.0 * PI / 180.0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [SAMPLE_W-1:0] in_i = '0, in_q = '0;
  logic out_valid;
  logic signed [SAMPLE_W-1:0] out_i, out_q;
  logic enable_corr = 1, calc_new_coeffs = 0, gain_coef_wr = 0, phase_coef_wr = 0;
  logic [CNT_W-1:0] num_samples = '0;
  logic signed [COEF_W-1:0] coef_wdata = '0;
  stat_state_e state;
  logic sums_ready;
  logic [CNT_W-1:0] sample_count;
  logic signed [ACC_W-1:0] sum_ii, sum_qq, sum_iq;
  logic signed [COEF_W-1:0] gain_coef, phase_coef;

  int checks = 0, failures = 0;

  stat_iq_imbalance dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // one imbalanced receiver sample
  task automatic gen(output int ri, output int rq);
    real si, sq, c, s;
    si = real'(int'($urandom_range(0, 12000)) - 6000);
    sq = real'(int'($urandom_range(0, 12000)) - 6000);
    c  = $cos(PHI_T / 2.0);
    s  = $sin(PHI_T / 2.0);
    ri = int'($floor((1.0 - EPS_T) * (si * c - sq * s)));
    rq = int'($floor((1.0 + EPS_T) * (sq * c - si * s)));
  endtask

  // the gain multiplier as the hardware applies it: floor((1-2|g|/2^17) * v)
  function automatic int gmodel(int v, int g);
    real m;
    m = 1.0 - 2.0 * absr(real'(g)) / 131072.0;
    return int'($floor(m * real'(v)));
  endfunction

  // feed n samples, one per clock, keeping the expected sums; g is the gain
  // coefficient that the hardware applies to the samples it sums (0 = raw)
  task automatic sum_step(input int n, input bit corrected, input int g, input string name);
    longint xii, xqq, xiq;
    int ri, rq, a, b, clocks;
    xii = 0; xqq = 0; xiq = 0; clocks = 0;
    for (int k = 0; k < n; k++) begin
      gen(ri, rq);
      a = ri; b = rq;
      if (corrected) begin
        if (g < 0) a = gmodel(ri, g);
        else       b = gmodel(rq, g);
      end
      xii += longint'(a) * a;
      xqq += longint'(b) * b;
      xiq += longint'(a) * b;
      in_valid = 1;
      in_i = SAMPLE_W'(ri);
      in_q = SAMPLE_W'(rq);
      @(negedge clk);
      if (!sums_ready) clocks++;
    end
    while (!sums_ready && clocks < n + 10) begin
      @(negedge clk);
      if (!sums_ready) clocks++;
    end
    in_valid = 0;
    // clocks counts the clock edges after the first sample until sums_ready
    chk(clocks == n + 1, $sformatf("%s: sums ready %0d clocks after the first sample, expected %0d",
                                   name, clocks, n + 1));
    chk(sample_count == CNT_W'(n), $sformatf("%s: %0d samples counted", name, sample_count));
    chk(sum_ii == ACC_W'(xii) && sum_qq == ACC_W'(xqq) && sum_iq == ACC_W'(xiq),
        {name, ": sums exact"});
  endtask

  // one complete coefficient cycle; returns the estimate errors
  task automatic cycle(input int n, input string name, output real gerr_db, output real perr_deg);
    real eh, p, true_db, est_db;
    int g;
    num_samples = CNT_W'(n);
    @(negedge clk);
    calc_new_coeffs = 1;
    @(negedge clk);
    calc_new_coeffs = 0;
    @(negedge clk);
    chk(state == ST_GAIN_SUM, {name, ": gain step started"});
    sum_step(n, 1'b0, 0, {name, " gain"});
    eh = ($sqrt(real'(sum_qq)) - $sqrt(real'(sum_ii))) / ($sqrt(real'(sum_qq)) + $sqrt(real'(sum_ii)));
    g = int'($floor(eh * 131072.0 + 0.5));
    coef_wdata = COEF_W'(g);
    gain_coef_wr = 1;
    @(negedge clk);
    gain_coef_wr = 0;
    @(negedge clk);
    chk(state == ST_PHASE_SUM, {name, ": phase step started"});
    sum_step(n, 1'b1, g, {name, " phase"});
    p = -2.0 * real'(sum_iq) / (real'(sum_ii) + real'(sum_qq));
    coef_wdata = COEF_W'(int'($floor(p * 131072.0 + 0.5)));
    phase_coef_wr = 1;
    @(negedge clk);
    phase_coef_wr = 0;
    @(negedge clk);
    chk(state == ST_IDLE, {name, ": cycle complete"});
    true_db  = 20.0 * $log10((1.0 + EPS_T) / (1.0 - EPS_T));
    est_db   = 20.0 * $log10((1.0 + eh) / (1.0 - eh));
    gerr_db  = absr(est_db - true_db);
    perr_deg = absr(p - PHI_T) * 180.0 / PI;     // Eq. without arcsin: phi ~ p
  endtask

  initial begin
    int sizes[5];
    real ge, pe, gsum, psum;
    sizes = '{10000, 50000, 100000, 154354, 200000};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    foreach (sizes[s]) begin
      int runs;
      runs = (sizes[s] == 154354) ? 4 : 1;
      gsum = 0.0; psum = 0.0;
      for (int r = 0; r < runs; r++) begin
        cycle(sizes[s], $sformatf("N=%0d run %0d", sizes[s], r), ge, pe);
        gsum += ge; psum += pe;
      end
      ge = gsum / real'(runs);
      pe = psum / real'(runs);
      $display("samples per step %6d (%0d run%s): gain estimate error %8.5f dB, phase estimate error %8.5f deg",
               sizes[s], runs, runs > 1 ? "s" : "", ge, pe);
      if (sizes[s] >= 100000) begin
        chk(ge < 0.1, $sformatf("N=%0d gain estimate error %f dB", sizes[s], ge));
        chk(pe < 0.5, $sformatf("N=%0d phase estimate error %f deg", sizes[s], pe));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
