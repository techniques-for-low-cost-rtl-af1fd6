// tb_fft_bfp - self-checking test of the block-floating-point FFT.
//
// Runs several frames through fft_bfp (largest frame 1024 points to keep the
// simulation short) and compares every bin, scaled back by 2^blk_exp, with a
// direct DFT computed here in double precision from the same input. Frames:
// an impulse, small random data (no scaling expected), a full-scale tone and
// full-scale random data (scaling expected), at several lengths. Also checked:
// bins come out in natural order, blk_exp is 0 for the small frame and above 0
// for full-scale ones, and the compute time is log2(N)*(N+2) clocks.
//
// The BFP behaviour checked (16-bit output, bins = out * 2^blk_exp) is that
// of the reference design's FFT; the frames and tolerances are this test's.
// Runs the FFT at 1024 points maximum to keep the direct DFT short.
`timescale 1ns/1ps
module tb_fft_bfp;
  import decimator_pkg::*;

  localparam int unsigned MAXL = 10;
  localparam int unsigned NMAX = 1 << MAXL;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [3:0] nfft_log2 = 4'd3;
  logic in_valid = 1'b0;
  cplx16_t in_data = '0;
  logic out_valid, out_last, busy, done;
  cplx16_t out_data;
  logic [MAXL-1:0] out_index;
  logic [4:0] blk_exp;

  int checks = 0;
  int failures = 0;

  fft_bfp #(.MAX_LOG2(MAXL)) dut (
    .clk, .rst_n, .start, .nfft_log2, .in_valid, .in_data,
    .out_valid, .out_data, .out_index, .out_last, .blk_exp, .busy, .done
  );

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr[NMAX], xi[NMAX];
  int yr[NMAX], yi[NMAX];
  int got_exp;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_frame(input int l, input string name, output int exp_out);
    int n, first_out_cycle, last_in_cycle, cyc, nout;
    real maxmag, err, maxerr, tol, er, ei, ang;
    n = 1 << l;
    @(negedge clk);
    nfft_log2 = 4'(l);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    for (int i = 0; i < n; i++) begin
      in_valid   = 1'b1;
      in_data.re = 16'(xr[i]);
      in_data.im = 16'(xi[i]);
      @(negedge clk);
    end
    in_valid = 1'b0;
    last_in_cycle = 0;
    first_out_cycle = -1;
    nout = 0;
    // collect output
    while (nout < n) begin
      @(posedge clk);
      #1;
      cyc++;
      if (out_valid) begin
        if (first_out_cycle < 0) first_out_cycle = cyc;
        check(out_index == MAXL'(nout), $sformatf("%s bin order %0d got %0d", name, nout, out_index));
        yr[nout] = int'(out_data.re);
        yi[nout] = int'(out_data.im);
        if (nout == n - 1) check(out_last == 1'b1, {name, " out_last"});
        nout++;
      end
    end
    exp_out = int'(blk_exp);
    // compute latency: last sample taken on the posedge before cycle 1
    check(first_out_cycle == l * (n + 2) + 1,
          $sformatf("%s latency %0d expected %0d", name, first_out_cycle, l * (n + 2) + 1));
    // reference DFT
    maxmag = 0.0;
    maxerr = 0.0;
    for (int k = 0; k < n; k++) begin
      real rr, ri, ar;
      rr = 0.0; ri = 0.0;
      for (int m = 0; m < n; m++) begin
        ang = -2.0 * PI * real'((k * m) % n) / real'(n);
        rr += real'(xr[m]) * $cos(ang) - real'(xi[m]) * $sin(ang);
        ri += real'(xr[m]) * $sin(ang) + real'(xi[m]) * $cos(ang);
      end
      er = real'(yr[k]) * (2.0 ** exp_out) - rr;
      ei = real'(yi[k]) * (2.0 ** exp_out) - ri;
      err = (er < 0 ? -er : er) + (ei < 0 ? -ei : ei);
      ar = (rr < 0 ? -rr : rr) + (ri < 0 ? -ri : ri);
      if (ar > maxmag) maxmag = ar;
      if (err > maxerr) maxerr = err;
    end
    tol = 0.004 * maxmag + 4.0 * real'(l + 1) * (2.0 ** exp_out);
    check(maxerr <= tol, $sformatf("%s max error %f > tol %f (blk_exp %0d)", name, maxerr, tol, exp_out));
    $display("%s: N=%0d blk_exp=%0d max|X|=%f max err=%f tol=%f", name, n, exp_out, maxmag, maxerr, tol);
    @(posedge done);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1: impulse at n=0, N=8 -> flat spectrum, no growth beyond 16 bits
    for (int i = 0; i < NMAX; i++) begin xr[i] = 0; xi[i] = 0; end
    xr[0] = 1000;
    run_frame(3, "impulse8", got_exp);
    check(got_exp == 0, "impulse8 blk_exp 0");
    for (int k = 0; k < 8; k++) check(yr[k] == 1000 && yi[k] == 0, $sformatf("impulse bin %0d", k));

    // 2: small random data, N=64 -> no scaling needed
    for (int i = 0; i < 64; i++) begin
      xr[i] = int'($urandom_range(0, 30)) - 15;
      xi[i] = int'($urandom_range(0, 30)) - 15;
    end
    run_frame(6, "small64", got_exp);
    check(got_exp == 0, "small64 blk_exp 0");

    // 3: full-scale complex tone at bin 37, N=1024
    for (int i = 0; i < 1024; i++) begin
      real a;
      a = 2.0 * PI * 37.0 * real'(i) / 1024.0;
      xr[i] = int'($floor(32000.0 * $cos(a)));
      xi[i] = int'($floor(32000.0 * $sin(a)));
    end
    run_frame(10, "tone1024", got_exp);
    check(got_exp >= 9, $sformatf("tone1024 blk_exp %0d >= 9", got_exp));

    // 4: full-scale random data, N=256
    for (int i = 0; i < 256; i++) begin
      xr[i] = int'($urandom_range(0, 65535)) - 32768;
      xi[i] = int'($urandom_range(0, 65535)) - 32768;
    end
    run_frame(8, "rand256", got_exp);
    check(got_exp > 0, "rand256 blk_exp > 0");

    // 5: real-only two tones, N=512
    for (int i = 0; i < 512; i++) begin
      xr[i] = int'($floor(12000.0 * $cos(2.0 * PI * 5.0 * real'(i) / 512.0)
                 + 3000.0 * $sin(2.0 * PI * 100.0 * real'(i) / 512.0)));
      xi[i] = 0;
    end
    run_frame(9, "real512", got_exp);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
