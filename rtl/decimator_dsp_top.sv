// decimator_dsp_top - FPGA signal chain of a low-cost direct-conversion
// spectrum analyser: I/Q imbalance correction followed by windowing and FFT.
//
// Baseband I/Q samples from the receiver's A/D converter (14 bits, one pair
// per clock when adc_valid is high) first pass the Stat imbalance corrector
// (stat_iq_imbalance). Its corrected stream is the time-domain output
// (time_*), and it also feeds the frequency-domain path: window_filter
// multiplies one frame by coefficients the host keeps in window_coef_ram, and
// fft_bfp transforms the windowed frame with block floating point. The host
// microcontroller is outside: it computes the Stat coefficients from the
// sums, generates the window, and turns FFT bins into magnitudes.
//
// Joining the blocks is this design's choice: the 14-bit corrected samples are
// placed in the upper bits of the 16-bit window input (multiplied by 4), and
// one frame_start pulse arms the window filter and the FFT together, accepted
// only while frame_ready is high (both idle).
//
// Interface / timing: single clock (the receiver runs at 65 MHz). Corrected
// samples appear one clock after the ADC sample, windowed samples two clocks
// later; FFT bins follow log2(N)*(N+2) clocks after the frame's last sample.
//
// Lint note: the assertion below is disabled during reset with
// "disable iff (!rst_n)". A linter may report rst_n as used both as an
// asynchronous reset and as a synchronous signal. That use is only in the
// assertion, which is not hardware, so the warning stands.
module decimator_dsp_top
  import decimator_pkg::*;
#(
  parameter int unsigned MAX_LOG2 = 13   // largest frame 2^13 = 8192 points
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // A/D converter samples
  input  logic                       adc_valid,
  input  logic signed [SAMPLE_W-1:0] adc_i,
  input  logic signed [SAMPLE_W-1:0] adc_q,
  // Stat host interface
  input  logic                       enable_corr,
  input  logic                       calc_new_coeffs,
  input  logic [CNT_W-1:0]           num_samples,
  input  logic                       gain_coef_wr,
  input  logic                       phase_coef_wr,
  input  logic signed [COEF_W-1:0]   coef_wdata,
  output stat_state_e                stat_state,
  output logic                       sums_ready,
  output logic [CNT_W-1:0]           sample_count,
  output logic signed [ACC_W-1:0]    sum_ii,
  output logic signed [ACC_W-1:0]    sum_qq,
  output logic signed [ACC_W-1:0]    sum_iq,
  output logic signed [COEF_W-1:0]   gain_coef,
  output logic signed [COEF_W-1:0]   phase_coef,
  // corrected stream to the time-domain calculations
  output logic                       time_valid,
  output logic signed [SAMPLE_W-1:0] time_i,
  output logic signed [SAMPLE_W-1:0] time_q,
  // window coefficient RAM, host write port
  input  logic                       wcoef_wr_en,
  input  logic [MAX_LOG2-1:0]        wcoef_wr_addr,
  input  logic [WCOEF_W-1:0]         wcoef_wr_data,
  // frame control and status
  input  logic                       frame_start,
  input  logic [3:0]                 nfft_log2,
  output logic                       frame_ready,
  output logic                       window_busy,
  output logic                       window_done,
  output logic                       fft_busy,
  output logic                       fft_done,
  // spectral output
  output logic                       bin_valid,
  output cplx16_t                    bin_data,
  output logic [MAX_LOG2-1:0]        bin_index,
  output logic                       bin_last,
  output logic [4:0]                 blk_exp
);

  cplx16_t                   win_in, win_out;
  logic                      win_out_valid, win_out_last;
  logic                      coef_rd_en;
  logic [MAX_LOG2-1:0]       coef_rd_addr;
  logic [WCOEF_W-1:0]        coef_rd_data;
  logic                      go;

  stat_iq_imbalance u_stat (
    .clk             (clk),
    .rst_n           (rst_n),
    .in_valid        (adc_valid),
    .in_i            (adc_i),
    .in_q            (adc_q),
    .out_valid       (time_valid),
    .out_i           (time_i),
    .out_q           (time_q),
    .enable_corr     (enable_corr),
    .calc_new_coeffs (calc_new_coeffs),
    .num_samples     (num_samples),
    .gain_coef_wr    (gain_coef_wr),
    .phase_coef_wr   (phase_coef_wr),
    .coef_wdata      (coef_wdata),
    .state           (stat_state),
    .sums_ready      (sums_ready),
    .sample_count    (sample_count),
    .sum_ii          (sum_ii),
    .sum_qq          (sum_qq),
    .sum_iq          (sum_iq),
    .gain_coef       (gain_coef),
    .phase_coef      (phase_coef)
  );

  assign win_in.re   = {time_i, 2'b00};
  assign win_in.im   = {time_q, 2'b00};
  assign frame_ready = !window_busy && !fft_busy;
  assign go          = frame_start && frame_ready;

  window_coef_ram #(.DEPTH(1 << MAX_LOG2)) u_wram (
    .clk     (clk),
    .wr_en   (wcoef_wr_en),
    .wr_addr (wcoef_wr_addr),
    .wr_data (wcoef_wr_data),
    .rd_en   (coef_rd_en),
    .rd_addr (coef_rd_addr),
    .rd_data (coef_rd_data)
  );

  window_filter #(.MAX_LOG2(MAX_LOG2)) u_window (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (go),
    .nfft_log2    (nfft_log2),
    .in_valid     (time_valid),
    .in_data      (win_in),
    .coef_rd_en   (coef_rd_en),
    .coef_rd_addr (coef_rd_addr),
    .coef_data    (coef_rd_data),
    .out_valid    (win_out_valid),
    .out_data     (win_out),
    .out_last     (win_out_last),
    .busy         (window_busy),
    .done         (window_done)
  );

  fft_bfp #(.MAX_LOG2(MAX_LOG2)) u_fft (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (go),
    .nfft_log2 (nfft_log2),
    .in_valid  (win_out_valid),
    .in_data   (win_out),
    .out_valid (bin_valid),
    .out_data  (bin_data),
    .out_index (bin_index),
    .out_last  (bin_last),
    .blk_exp   (blk_exp),
    .busy      (fft_busy),
    .done      (fft_done)
  );

  // The window's last sample is the frame's last sample for the FFT.
  assert property (@(posedge clk) disable iff (!rst_n) win_out_last |-> win_out_valid);

endmodule
