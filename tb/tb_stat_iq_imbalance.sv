// tb_stat_iq_imbalance - end-to-end test of the Stat corrector with a model
// of the host microcontroller.
//
// Independent, equal-power random I/Q data is passed through the receiver
// imbalance model
//     R_I = (1-eps)(S_I cos(phi/2) - S_Q sin(phi/2))
//     R_Q = (1+eps)(S_Q cos(phi/2) - S_I sin(phi/2))
// first with eps = 0.035 (0.608 dB) and phi = 4 degrees (Q stronger), then
// with eps = -0.02 and phi = -2 degrees (I stronger). For each, one complete
// coefficient cycle is run: the sums of both steps are compared exactly with
// sums kept here (raw samples, then gain-corrected samples), the time to
// sums_ready is checked, the host model computes
//     eps^ = (sqrt(Sqq)-sqrt(Sii))/(sqrt(Sqq)+sqrt(Sii)),
//     sin(phi)^ = -2 Siq/(Sii+Sqq)
// which must be close to the true values, and the corrected stream must show
// a gain mismatch under 0.1 dB and an I/Q correlation under 0.02 where the
// uncorrected stream had far more. Pass-through mode is checked as well.
//
// The imbalance model, the 0.608 dB / 4 degree case and the two-step cycle
// follow the reference design; the host protocol, the second case and the
// limits are this test's own. A 2,000,000-clock watchdog ends a hung run.
`timescale 1ns/1ps
module tb_stat_iq_imbalance;
  import decimator_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int  NS = 100000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [SAMPLE_W-1:0] in_i = '0, in_q = '0;
  logic out_valid;
  logic signed [SAMPLE_W-1:0] out_i, out_q;
  logic enable_corr = 0, calc_new_coeffs = 0, gain_coef_wr = 0, phase_coef_wr = 0;
  logic [CNT_W-1:0] num_samples = CNT_W'(NS);
  logic signed [COEF_W-1:0] coef_wdata = '0;
  stat_state_e state;
  logic sums_ready;
  logic [CNT_W-1:0] sample_count;
  logic signed [ACC_W-1:0] sum_ii, sum_qq, sum_iq;
  logic signed [COEF_W-1:0] gain_coef, phase_coef;

  int checks = 0, failures = 0;
  real eps_t, phi_t;

  stat_iq_imbalance dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one imbalanced receiver sample
  task automatic gen(output int ri, output int rq);
    real si, sq, c, s;
    si = real'(int'($urandom_range(0, 12000)) - 6000);
    sq = real'(int'($urandom_range(0, 12000)) - 6000);
    c  = $cos(phi_t / 2.0);
    s  = $sin(phi_t / 2.0);
    ri = int'($floor((1.0 - eps_t) * (si * c - sq * s)));
    rq = int'($floor((1.0 + eps_t) * (sq * c - si * s)));
  endtask

  function automatic int gmodel(int v, int g);
    real m;
    m = 1.0 - 2.0 * ((g < 0) ? -real'(g) : real'(g)) / 131072.0;
    return int'($floor(m * real'(v)));
  endfunction

  // measure imbalance of a stream: returns gain mismatch (dB) and correlation
  task automatic measure(input bit corr, output real gdb, output real rho);
    real pii, pqq, piq;
    int ri, rq, n;
    enable_corr = corr;
    pii = 0; pqq = 0; piq = 0; n = 0;
    fork
      begin
        for (int k = 0; k < NS; k++) begin
          gen(ri, rq);
          @(negedge clk);
          in_valid = 1; in_i = SAMPLE_W'(ri); in_q = SAMPLE_W'(rq);
        end
        @(negedge clk);
        in_valid = 0;
      end
      begin
        while (n < NS) begin
          @(posedge clk);
          #1;
          if (out_valid) begin
            pii += real'(out_i) * real'(out_i);
            pqq += real'(out_q) * real'(out_q);
            piq += real'(out_i) * real'(out_q);
            n++;
          end
        end
      end
    join
    gdb = 10.0 * $log10(pqq / pii);
    rho = piq / $sqrt(pii * pqq);
  endtask

  task automatic cycle(input real e, input real ph, input string name);
    int ri[NS], rq[NS];
    longint xii, xqq, xiq;
    real eh, ph_h, gdb0, rho0, gdb1, rho1, p;
    int gq, edges, g;
    eps_t = e; phi_t = ph;

    measure(1'b0, gdb0, rho0);
    $display("%s uncorrected: gain %f dB, correlation %f", name, gdb0, rho0);

    // ---- gain step: raw samples ----
    @(negedge clk);
    calc_new_coeffs = 1;
    @(negedge clk);
    calc_new_coeffs = 0;
    repeat (3) @(negedge clk);
    chk(state == ST_GAIN_SUM, {name, " in gain sum"});
    xii = 0; xqq = 0; xiq = 0;
    for (int k = 0; k < NS; k++) begin
      gen(ri[k], rq[k]);
      xii += longint'(ri[k]) * ri[k];
      xqq += longint'(rq[k]) * rq[k];
      xiq += longint'(ri[k]) * rq[k];
    end
    edges = 0;
    for (int k = 0; k < NS + 10; k++) begin
      in_valid = 1;
      in_i = SAMPLE_W'(ri[k % NS]);
      in_q = SAMPLE_W'(rq[k % NS]);
      @(negedge clk);
      if (!sums_ready) edges++;
    end
    in_valid = 0;
    chk(edges == NS + 1, $sformatf("%s gain sums ready after %0d clocks, expected %0d", name, edges, NS + 1));
    chk(sums_ready && state == ST_GAIN_WAIT, {name, " gain sums ready"});
    chk(sample_count == CNT_W'(NS), {name, " gain sample count"});
    chk(sum_ii == ACC_W'(xii) && sum_qq == ACC_W'(xqq) && sum_iq == ACC_W'(xiq), {name, " gain sums exact"});
    eh = ($sqrt(real'(sum_qq)) - $sqrt(real'(sum_ii))) / ($sqrt(real'(sum_qq)) + $sqrt(real'(sum_ii)));
    chk((eh - e) < 0.006 && (e - eh) < 0.006, $sformatf("%s eps estimate %f vs %f", name, eh, e));
    g = int'($floor(eh * 131072.0 + 0.5));
    coef_wdata = COEF_W'(g);
    gain_coef_wr = 1;
    @(negedge clk);
    gain_coef_wr = 0;
    repeat (3) @(negedge clk);
    chk(state == ST_PHASE_SUM, {name, " in phase sum"});

    // ---- phase step: gain-corrected samples ----
    xii = 0; xqq = 0; xiq = 0;
    for (int k = 0; k < NS; k++) begin
      int a, b;
      gen(ri[k], rq[k]);
      if (g < 0) begin a = gmodel(ri[k], g); b = rq[k]; end
      else       begin a = ri[k]; b = gmodel(rq[k], g); end
      xii += longint'(a) * a;
      xqq += longint'(b) * b;
      xiq += longint'(a) * b;
    end
    for (int k = 0; k < NS + 10; k++) begin
      in_valid = 1;
      in_i = SAMPLE_W'(ri[k % NS]);
      in_q = SAMPLE_W'(rq[k % NS]);
      @(negedge clk);
    end
    in_valid = 0;
    chk(sums_ready && state == ST_PHASE_WAIT, {name, " phase sums ready"});
    chk(sum_ii == ACC_W'(xii) && sum_qq == ACC_W'(xqq) && sum_iq == ACC_W'(xiq), {name, " phase sums exact"});
    p = -2.0 * real'(sum_iq) / (real'(sum_ii) + real'(sum_qq));
    chk((p - $sin(ph)) < 0.006 && ($sin(ph) - p) < 0.006, $sformatf("%s sin(phi) estimate %f vs %f", name, p, $sin(ph)));
    coef_wdata = COEF_W'(int'($floor(p * 131072.0 + 0.5)));
    phase_coef_wr = 1;
    @(negedge clk);
    phase_coef_wr = 0;
    @(negedge clk);
    chk(state == ST_IDLE, {name, " cycle complete"});

    // ---- corrected stream ----
    measure(1'b1, gdb1, rho1);
    $display("%s corrected:   gain %f dB, correlation %f", name, gdb1, rho1);
    chk(gdb1 < 0.1 && gdb1 > -0.1, $sformatf("%s residual gain %f dB", name, gdb1));
    chk(rho1 < 0.02 && rho1 > -0.02, $sformatf("%s residual correlation %f", name, rho1));
    chk((gdb0 > 0.3 || gdb0 < -0.3) && (rho0 > 0.025 || rho0 < -0.025), $sformatf("%s imbalance was visible", name));

    // pass-through still passes through
    measure(1'b0, gdb1, rho1);
    chk((gdb1 - gdb0) < 0.1 && (gdb0 - gdb1) < 0.1, $sformatf("%s pass-through unchanged", name));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    cycle(0.035, 4.0 * PI / 180.0, "Q-strong");
    cycle(-0.02, -2.0 * PI / 180.0, "I-strong");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
