// tb_decimator_dsp_top - end-to-end test of the whole signal chain at its
// default size (frames up to 8192 points, 154,354 samples per Stat step).
//
// The ADC is modelled as a continuous stream of a complex tone, exactly on an
// FFT bin, plus small noise, passed through the receiver imbalance model
//     R_I = (1-eps)(S_I cos(phi/2) - S_Q sin(phi/2))
//     R_Q = (1+eps)(S_Q cos(phi/2) - S_I sin(phi/2)).
// The imbalance puts an image of the tone at the mirrored bin. The test:
//   1. loads a Hann window into the coefficient RAM (host model);
//   2. takes a 512-point spectrum with correction off and checks all bins
//      against a double-precision DFT of the windowed samples, and that the
//      image is visible;
//   3. runs a complete Stat cycle (gain sums, gain coefficient, phase sums,
//      phase coefficient) with a host model computing the coefficients;
//   4. takes an 8192-point spectrum with correction on, checks the tone,
//      image and random bins against the reference, and that the image fell;
//   5. changes the imbalance so that I is the stronger branch, repeats the
//      Stat cycle and a corrected 512-point spectrum;
//   6. checks that frame_start is refused while a frame is in progress.
// Each mechanism (pass-through, gain step, phase step, Q-strong and I-strong
// correction, BFP scaling, frame refusal) is counted and must occur.
//
// The imbalance model and the 0.608 dB / 4 degree test case follow the
// reference design's evaluation; tone, noise and limits are this test's own.
// Runs at the top's default parameters, guarded by a 3,000,000-clock
// watchdog.
`timescale 1ns/1ps
module tb_decimator_dsp_top;
  import decimator_pkg::*;

  localparam real PI   = 3.14159265358979323846;
  localparam int  MAXL = 13;
  localparam int  NSUM = 154354;
  localparam int  K0   = 37;           // tone bin in a 512-point frame

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic signed [SAMPLE_W-1:0] adc_i = '0, adc_q = '0;
  logic enable_corr = 0, calc_new_coeffs = 0, gain_coef_wr = 0, phase_coef_wr = 0;
  logic [CNT_W-1:0] num_samples = CNT_W'(NSUM);
  logic signed [COEF_W-1:0] coef_wdata = '0;
  stat_state_e stat_state;
  logic sums_ready;
  logic [CNT_W-1:0] sample_count;
  logic signed [ACC_W-1:0] sum_ii, sum_qq, sum_iq;
  logic signed [COEF_W-1:0] gain_coef, phase_coef;
  logic time_valid;
  logic signed [SAMPLE_W-1:0] time_i, time_q;
  logic wcoef_wr_en = 0;
  logic [MAXL-1:0] wcoef_wr_addr = '0;
  logic [WCOEF_W-1:0] wcoef_wr_data = '0;
  logic frame_start = 0;
  logic [3:0] nfft_log2 = 4'd9;
  logic frame_ready, window_busy, window_done, fft_busy, fft_done;
  logic bin_valid, bin_last;
  cplx16_t bin_data;
  logic [MAXL-1:0] bin_index;
  logic [4:0] blk_exp;

  decimator_dsp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_pass = 0, m_gain = 0, m_phase = 0, m_qstrong = 0, m_istrong = 0, m_bfp = 0, m_refuse = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- ADC model: continuous imbalanced tone ----------------
  real eps_t = 0.035, phi_t = 4.0 * PI / 180.0;
  longint n_adc = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      real a, si, sq, c, s;
      a  = 2.0 * PI * real'(K0) * real'(n_adc % 512) / 512.0;
      si = 6000.0 * $cos(a) + real'(int'($urandom_range(0, 400)) - 200);
      sq = 6000.0 * $sin(a) + real'(int'($urandom_range(0, 400)) - 200);
      c  = $cos(phi_t / 2.0);
      s  = $sin(phi_t / 2.0);
      adc_valid = 1;
      adc_i = SAMPLE_W'(int'($floor((1.0 - eps_t) * (si * c - sq * s))));
      adc_q = SAMPLE_W'(int'($floor((1.0 + eps_t) * (sq * c - si * s))));
      n_adc++;
    end
  end

  // ---------------- capture of what the window takes ----------------
  int cap_i[1 << MAXL], cap_q[1 << MAXL];
  int wcoef[1 << MAXL];
  int ncap = 0;
  int bin_r[1 << MAXL], bin_q[1 << MAXL];
  int nbins = 0;
  always @(posedge clk) begin
    if (window_busy && time_valid && ncap < (1 << MAXL)) begin
      cap_i[ncap] = int'(time_i);
      cap_q[ncap] = int'(time_q);
      ncap++;
    end
    if (bin_valid) begin
      bin_r[bin_index] = int'(bin_data.re);
      bin_q[bin_index] = int'(bin_data.im);
      nbins++;
    end
  end

  task automatic load_hann(input int n);
    for (int a = 0; a < n; a++) begin
      wcoef[a] = int'($floor(16384.0 * 0.5 * (1.0 - $cos(2.0 * PI * real'(a) / real'(n))) + 0.5));
      @(negedge clk);
      wcoef_wr_en = 1; wcoef_wr_addr = MAXL'(a); wcoef_wr_data = WCOEF_W'(wcoef[a]);
    end
    @(negedge clk);
    wcoef_wr_en = 0;
  endtask

  // reference bin k of the windowed frame
  task automatic ref_bin(input int n, input int k, output real rr, output real ri);
    rr = 0.0; ri = 0.0;
    for (int m = 0; m < n; m++) begin
      real xr, xi, ang;
      xr = $floor(real'(cap_i[m] * 4) * real'(wcoef[m]) / 16384.0);
      xi = $floor(real'(cap_q[m] * 4) * real'(wcoef[m]) / 16384.0);
      ang = -2.0 * PI * real'((longint'(k) * m) % n) / real'(n);
      rr += xr * $cos(ang) - xi * $sin(ang);
      ri += xr * $sin(ang) + xi * $cos(ang);
    end
  endtask

  function automatic real mag(int k);
    return $sqrt(real'(bin_r[k]) * real'(bin_r[k]) + real'(bin_q[k]) * real'(bin_q[k]));
  endfunction

  // run one frame; returns image-to-tone ratio in dB
  task automatic frame(input int l, input bit all_bins, input string name, output real irr_db);
    int n, k_tone, k_img, cyc0, cyc;
    real rr, ri, er, dr, di, maxmag, maxerr, sc, tol;
    n = 1 << l;
    k_tone = K0 * (n / 512);
    k_img  = n - k_tone;
    ncap = 0; nbins = 0;
    @(negedge clk);
    nfft_log2 = 4'(l);
    chk(frame_ready, {name, " frame_ready before start"});
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    // a second request while the frame runs must be refused
    repeat (n / 2) @(negedge clk);
    chk(!frame_ready && window_busy, {name, " busy while loading"});
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    m_refuse++;
    cyc0 = 0;
    while (!fft_done) begin @(negedge clk); cyc0++; end
    chk(nbins == n, $sformatf("%s %0d bins", name, nbins));
    chk(ncap == n, $sformatf("%s %0d samples windowed", name, ncap));
    chk(cyc0 > l * (n + 2) && cyc0 < l * (n + 2) + 2 * n, $sformatf("%s frame time %0d clocks", name, cyc0));
    repeat (5) @(negedge clk);
    chk(!window_busy && !fft_busy && frame_ready, {name, " second request was refused"});
    sc = real'(32'd1 << blk_exp);
    if (blk_exp > 0) m_bfp++;
    maxmag = 0.0; maxerr = 0.0;
    for (int t = 0; t < (all_bins ? n : 24); t++) begin
      int k;
      k = all_bins ? t : (t == 0 ? k_tone : t == 1 ? k_img : int'($urandom_range(0, n - 1)));
      ref_bin(n, k, rr, ri);
      dr = real'(bin_r[k]) * sc - rr;
      di = real'(bin_q[k]) * sc - ri;
      er = $sqrt(dr * dr + di * di);
      if ($sqrt(rr * rr + ri * ri) > maxmag) maxmag = $sqrt(rr * rr + ri * ri);
      if (er > maxerr) maxerr = er;
    end
    tol = 0.001 * maxmag + 8.0 * real'(l + 1) * sc;
    chk(maxerr <= tol, $sformatf("%s bins vs reference: max err %f tol %f", name, maxerr, tol));
    for (int k = 0; k < n; k++)
      if (k != k_tone && (k < k_tone - 2 || k > k_tone + 2) && mag(k) > mag(k_tone)) begin
        chk(0, $sformatf("%s bin %0d above the tone", name, k));
        break;
      end
    irr_db = 20.0 * $log10((mag(k_img) + 0.5) / mag(k_tone));
    $display("%s: N=%0d blk_exp=%0d image/tone=%f dB max err=%f (tol %f)", name, n, blk_exp, irr_db, maxerr, tol);
  endtask

  // complete Stat coefficient cycle with a host model
  task automatic stat_cycle(input string name);
    real eh, p;
    @(negedge clk);
    calc_new_coeffs = 1;
    @(negedge clk);
    calc_new_coeffs = 0;
    while (!sums_ready) @(negedge clk);
    chk(stat_state == ST_GAIN_WAIT && sample_count == CNT_W'(NSUM), {name, " gain sums"});
    m_gain++;
    eh = ($sqrt(real'(sum_qq)) - $sqrt(real'(sum_ii))) / ($sqrt(real'(sum_qq)) + $sqrt(real'(sum_ii)));
    chk((eh - eps_t) < 0.005 && (eps_t - eh) < 0.005, $sformatf("%s eps estimate %f vs %f", name, eh, eps_t));
    coef_wdata = COEF_W'(int'($floor(eh * 131072.0 + 0.5)));
    gain_coef_wr = 1;
    @(negedge clk);
    gain_coef_wr = 0;
    @(negedge clk);
    while (!sums_ready) @(negedge clk);
    chk(stat_state == ST_PHASE_WAIT && sample_count == CNT_W'(NSUM), {name, " phase sums"});
    m_phase++;
    p = -2.0 * real'(sum_iq) / (real'(sum_ii) + real'(sum_qq));
    chk((p - $sin(phi_t)) < 0.005 && ($sin(phi_t) - p) < 0.005, $sformatf("%s sin(phi) estimate %f vs %f", name, p, $sin(phi_t)));
    coef_wdata = COEF_W'(int'($floor(p * 131072.0 + 0.5)));
    phase_coef_wr = 1;
    @(negedge clk);
    phase_coef_wr = 0;
    @(negedge clk);
    chk(stat_state == ST_IDLE, {name, " cycle ends"});
  endtask

  initial begin
    real irr0, irr1, irr2;
    repeat (3) @(negedge clk);
    rst_n = 1;

    load_hann(512);
    enable_corr = 0;
    frame(9, 1'b1, "uncorrected-512", irr0);
    m_pass++;
    chk(irr0 > -35.0, $sformatf("image visible before correction (%f dB)", irr0));

    stat_cycle("Q-strong");
    chk(!gain_coef[COEF_W-1], "Q-strong: gain coefficient positive");
    enable_corr = 1;
    load_hann(1 << MAXL);
    frame(MAXL, 1'b0, "corrected-8192", irr1);
    m_qstrong++;
    chk(irr1 < irr0 - 15.0, $sformatf("image reduced: %f -> %f dB", irr0, irr1));

    eps_t = -0.03; phi_t = -3.0 * PI / 180.0;
    stat_cycle("I-strong");
    chk(gain_coef[COEF_W-1], "I-strong: gain coefficient negative");
    load_hann(512);
    frame(9, 1'b1, "corrected-512-I-strong", irr2);
    m_istrong++;
    chk(irr2 < -45.0, $sformatf("image suppressed with I stronger (%f dB)", irr2));

    $display("mechanisms: pass-through=%0d gain-step=%0d phase-step=%0d Q-strong=%0d I-strong=%0d bfp-scaling=%0d refused-start=%0d",
             m_pass, m_gain, m_phase, m_qstrong, m_istrong, m_bfp, m_refuse);
    chk(m_pass > 0,    "pass-through exercised");
    chk(m_gain > 0,    "gain step exercised");
    chk(m_phase > 0,   "phase step exercised");
    chk(m_qstrong > 0, "Q-strong correction exercised");
    chk(m_istrong > 0, "I-strong correction exercised");
    chk(m_bfp > 0,     "BFP scaling exercised");
    chk(m_refuse > 0,  "refused frame start exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
