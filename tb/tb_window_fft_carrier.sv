// tb_window_fft_carrier - accuracy of the frequency-domain path (window
// filter + block-floating-point FFT) against double-precision arithmetic,
// run through the whole top at its default size.
//
// Scenario: the receiver delivers a complex carrier 15 MHz above the centre
// frequency at 65 Msample/s, amplitude about half of the 14-bit range plus a
// little noise. Imbalance correction is switched off, so the samples reach the
// window unchanged (times 4). For every window (rectangular, Hamming, Hann,
// Blackman-Harris, flat-top) and every length (512, 2048, 8192) the test:
//   * writes the window into the coefficient RAM, rounded to Q2.14;
//   * runs one frame and collects the bins and the block exponent;
//   * computes the reference spectrum: a double-precision DFT of the same
//     input samples multiplied by the unrounded window;
//   * scales the hardware bins by 2^blk_exp and measures, relative to the
//     reference carrier peak, the error of the peak bin's magnitude, the mean
//     magnitude error over all bins, and the largest complex error of any bin.
// Checks: the peak lands in the same bin as the reference, the three errors
// stay below fixed limits (chosen for 16-bit data and truncating arithmetic),
// and the FFT delivers its first bin exactly log2(N)*(N+2)+2 clocks after the
// window filter's done pulse (N+2 clocks per radix-2 stage; done
// follows the last windowed sample by one clock, and the first bin needs one
// clock to read). The window formulas are the standard periodic definitions.
// The carrier, sample rate, windows and lengths are those of the evaluation
// of the reference architecture; the error limits, the input amplitude and
// the noise are this test's own choices.
`timescale 1ns/1ps
module tb_window_fft_carrier;
  import decimator_pkg::*;

  localparam real PI   = 3.14159265358979323846;
  localparam int  MAXL = 13;
  localparam real FS   = 65.0e6;
  localparam real FC   = 15.0e6;

  // limits, in dB relative to the reference carrier peak
  localparam real PEAK_LIM = -75.0;
  localparam real MEAN_LIM = -85.0;
  localparam real MAX_LIM  = -65.0;

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic signed [SAMPLE_W-1:0] adc_i = '0, adc_q = '0;
  logic enable_corr = 0, calc_new_coeffs = 0, gain_coef_wr = 0, phase_coef_wr = 0;
  logic [CNT_W-1:0] num_samples = CNT_W'(1000);
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
  int frames_run = 0, bfp_frames = 0;

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

  // ---------------- ADC model: carrier at +15 MHz ----------------
  longint n_adc = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      real a;
      a = 2.0 * PI * FC / FS * real'(n_adc);
      adc_valid = 1;
      adc_i = SAMPLE_W'(int'($floor(4000.0 * $cos(a) + real'(int'($urandom_range(0, 40)) - 20))));
      adc_q = SAMPLE_W'(int'($floor(4000.0 * $sin(a) + real'(int'($urandom_range(0, 40)) - 20))));
      n_adc++;
    end
  end

  // ---------------- capture ----------------
  real xr[1 << MAXL], xi[1 << MAXL];      // window input (16-bit scale)
  real wv[1 << MAXL];                     // unrounded window
  real ct[1 << MAXL], st[1 << MAXL];      // cos/sin table of the frame length
  int  bin_r[1 << MAXL], bin_q[1 << MAXL];
  int  ncap = 0, nbins = 0;
  longint cyc = 0, t_wdone = 0, t_bin0 = 0;
  always @(posedge clk) begin
    cyc++;
    if (window_busy && time_valid && ncap < (1 << MAXL)) begin
      xr[ncap] = real'(int'(time_i) * 4);
      xi[ncap] = real'(int'(time_q) * 4);
      ncap++;
    end
    if (window_done) t_wdone = cyc;
    if (bin_valid) begin
      if (nbins == 0) t_bin0 = cyc;
      bin_r[bin_index] = int'(bin_data.re);
      bin_q[bin_index] = int'(bin_data.im);
      nbins++;
    end
  end

  function automatic real window_value(input int kind, input int a, input int n);
    real x;
    x = 2.0 * PI * real'(a) / real'(n);
    case (kind)
      0: return 1.0;
      1: return 0.54 - 0.46 * $cos(x);
      2: return 0.5 - 0.5 * $cos(x);
      3: return 0.35875 - 0.48829 * $cos(x) + 0.14128 * $cos(2.0 * x) - 0.01168 * $cos(3.0 * x);
      default: return 0.21557895 - 0.41663158 * $cos(x) + 0.277263158 * $cos(2.0 * x)
                      - 0.083578947 * $cos(3.0 * x) + 0.006947368 * $cos(4.0 * x);
    endcase
  endfunction

  task automatic load_window(input int kind, input int n);
    for (int a = 0; a < n; a++) begin
      wv[a] = window_value(kind, a, n);
      @(negedge clk);
      wcoef_wr_en = 1;
      wcoef_wr_addr = MAXL'(a);
      wcoef_wr_data = WCOEF_W'(int'($floor(16384.0 * wv[a] + 0.5)));
    end
    @(negedge clk);
    wcoef_wr_en = 0;
  endtask

  task automatic run_case(input int kind, input int l, input string wname);
    int n, kp_hw, kp_ref;
    real sc, pk_ref, pk_hw, sum_err, max_err, peak_db, mean_db, max_db;
    n = 1 << l;
    load_window(kind, n);
    for (int m = 0; m < n; m++) begin
      ct[m] = $cos(2.0 * PI * real'(m) / real'(n));
      st[m] = $sin(2.0 * PI * real'(m) / real'(n));
    end
    ncap = 0; nbins = 0;
    @(negedge clk);
    nfft_log2 = 4'(l);
    chk(frame_ready, $sformatf("%s-%0d frame_ready", wname, n));
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    while (!fft_done) @(negedge clk);
    frames_run++;
    if (blk_exp > 0) bfp_frames++;
    chk(ncap == n && nbins == n, $sformatf("%s-%0d: %0d samples, %0d bins", wname, n, ncap, nbins));
    chk(t_bin0 - t_wdone == longint'(l * (n + 2) + 2),
        $sformatf("%s-%0d: first bin %0d clocks after window done, expected %0d", wname, n,
                  t_bin0 - t_wdone, l * (n + 2) + 2));
    sc = real'(32'd1 << blk_exp);
    pk_ref = 0.0; pk_hw = 0.0; kp_ref = 0; kp_hw = 0;
    sum_err = 0.0; max_err = 0.0;
    begin
      real rr[], ri[], hm[];
      rr = new[n]; ri = new[n]; hm = new[n];
      for (int k = 0; k < n; k++) begin
        real ar, ai, dr, di, e, rm;
        ar = 0.0; ai = 0.0;
        for (int m = 0; m < n; m++) begin
          int idx;
          real yr, yi;
          idx = (k * m) & (n - 1);
          yr = xr[m] * wv[m];
          yi = xi[m] * wv[m];
          ar += yr * ct[idx] + yi * st[idx];
          ai += yi * ct[idx] - yr * st[idx];
        end
        rr[k] = ar; ri[k] = ai;
        hm[k] = sc * $sqrt(real'(bin_r[k]) * real'(bin_r[k]) + real'(bin_q[k]) * real'(bin_q[k]));
        rm = $sqrt(ar * ar + ai * ai);
        if (rm > pk_ref) begin pk_ref = rm; kp_ref = k; end
        if (hm[k] > pk_hw) begin pk_hw = hm[k]; kp_hw = k; end
        sum_err += (hm[k] > rm) ? hm[k] - rm : rm - hm[k];
        dr = real'(bin_r[k]) * sc - ar;
        di = real'(bin_q[k]) * sc - ai;
        e = $sqrt(dr * dr + di * di);
        if (e > max_err) max_err = e;
      end
      peak_db = 20.0 * $log10(((hm[kp_ref] > pk_ref) ? hm[kp_ref] - pk_ref : pk_ref - hm[kp_ref]) / pk_ref + 1.0e-12);
    end
    mean_db = 20.0 * $log10(sum_err / real'(n) / pk_ref + 1.0e-12);
    max_db  = 20.0 * $log10(max_err / pk_ref + 1.0e-12);
    $display("%-15s N=%4d blk_exp=%2d peak bin %4d (expected near %7.1f)  peak err %7.1f dB  mean err %7.1f dB  max err %7.1f dB",
             wname, n, blk_exp, kp_hw, FC / FS * real'(n), peak_db, mean_db, max_db);
    chk(kp_hw == kp_ref, $sformatf("%s-%0d: peak bin %0d, reference %0d", wname, n, kp_hw, kp_ref));
    chk(peak_db < PEAK_LIM, $sformatf("%s-%0d: peak error %f dB", wname, n, peak_db));
    chk(mean_db < MEAN_LIM, $sformatf("%s-%0d: mean error %f dB", wname, n, mean_db));
    chk(max_db < MAX_LIM, $sformatf("%s-%0d: largest bin error %f dB", wname, n, max_db));
    repeat (3) @(negedge clk);
  endtask

  initial begin
    string names[5];
    names = '{"rectangular", "Hamming", "Hann", "Blackman-Harris", "flat-top"};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    foreach (names[w])
      for (int l = 9; l <= MAXL; l += 2)
        run_case(w, l, names[w]);
    chk(frames_run == 15, $sformatf("%0d frames run", frames_run));
    chk(bfp_frames == 15, $sformatf("block exponent used in %0d of 15 frames", bfp_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
