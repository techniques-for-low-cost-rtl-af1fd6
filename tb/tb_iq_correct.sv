// tb_iq_correct - checks the gain/phase correction against a real-number
// model: C_S = floor((1-2|eps|)*S + sin(phi)*W) with 14-bit saturation, the
// weak branch unchanged, I/Q order restored, the gain-only outputs, the
// pass-through mode and the one-clock latency.
//
// The correction formula is the reference design's; the expected values use
// this design's Q1.17 coefficients and floor/saturate rules.
`timescale 1ns/1ps
module tb_iq_correct;
  import decimator_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, enable_corr = 0, swap = 0;
  logic signed [SAMPLE_W-1:0] strong_br = '0, weak_br = '0;
  logic signed [COEF_W-1:0]   gain_coef = '0, phase_coef = '0;
  logic out_valid;
  logic signed [SAMPLE_W-1:0] out_i, out_q, gc_i, gc_q;
  int checks = 0, failures = 0, n_sat = 0;

  iq_correct dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_c(int s, int w, int g, int p);
    real m, v;
    int r;
    m = 1.0 - 2.0 * ((g < 0) ? -real'(g) : real'(g)) / 131072.0;
    if (m < 0.0) m = 0.0;
    v = $floor(m * real'(s) + real'(p) / 131072.0 * real'(w));
    r = int'(v);
    if (r > 8191) r = 8191;
    if (r < -8192) r = -8192;
    return r;
  endfunction

  function automatic int model_g(int s, int g);
    real m;
    m = 1.0 - 2.0 * ((g < 0) ? -real'(g) : real'(g)) / 131072.0;
    if (m < 0.0) m = 0.0;
    return int'($floor(m * real'(s)));
  endfunction

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int s, w, g, p, ec, ci, cq;
      logic sw;
      s  = int'($urandom_range(0, 16383)) - 8192;
      w  = int'($urandom_range(0, 16383)) - 8192;
      g  = (t < 200) ? int'($urandom_range(0, 262143)) - 131072 : int'($urandom_range(0, 20000)) - 10000;
      p  = (t % 7 == 0) ? int'($urandom_range(0, 262143)) - 131072 : int'($urandom_range(0, 20000)) - 10000;
      sw = logic'($urandom_range(0, 1));
      ec = (t % 5 == 0) ? 0 : 1;
      @(negedge clk);
      strong_br = SAMPLE_W'(s); weak_br = SAMPLE_W'(w);
      gain_coef = COEF_W'(g);   phase_coef = COEF_W'(p);
      swap = sw; enable_corr = ec[0]; in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      chk(out_valid, "out_valid one clock after in_valid");
      if (ec == 0) begin
        chk(sw ? (out_i == s && out_q == w) : (out_i == w && out_q == s), "pass-through");
      end else begin
        ci = model_c(s, w, g, p);
        if (ci == 8191 || ci == -8192) n_sat++;
        if (sw) chk(out_i == ci && out_q == w, $sformatf("corr swap s=%0d w=%0d g=%0d p=%0d got %0d exp %0d", s, w, g, p, out_i, ci));
        else    chk(out_q == ci && out_i == w, $sformatf("corr s=%0d w=%0d g=%0d p=%0d got %0d exp %0d", s, w, g, p, out_q, ci));
      end
      cq = model_g(s, g);
      if (sw) chk(gc_i == cq && gc_q == w, "gain-only swap");
      else    chk(gc_q == cq && gc_i == w, "gain-only");
      @(negedge clk);
      chk(!out_valid, "out_valid drops");
    end
    chk(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
