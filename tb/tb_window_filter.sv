// tb_window_filter - applies Hann and rectangular windows held in a
// window_coef_ram to frames of random samples and checks every output
// against floor(sample * coef / 2^14) computed here, together with the
// frame length, out_last, done, busy, the latency and gaps in in_valid.
//
// The 16 x 16 multiply with truncation to 16 bits is the reference
// design's; the Q2.14 scaling checked is this design's. Frames up to 1024
// points keep the run short.
`timescale 1ns/1ps
module tb_window_filter;
  import decimator_pkg::*;

  localparam int MAXL = 10;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic start = 0, in_valid = 0;
  logic [3:0] nfft_log2 = 4'd3;
  cplx16_t in_data = '0, out_data;
  logic coef_rd_en;
  logic [MAXL-1:0] coef_rd_addr;
  logic [WCOEF_W-1:0] coef_data;
  logic out_valid, out_last, busy, done;
  logic wr_en = 0;
  logic [MAXL-1:0] wr_addr = '0;
  logic [WCOEF_W-1:0] wr_data = '0;
  int coef[1 << MAXL];
  int checks = 0, failures = 0;

  window_coef_ram #(.DEPTH(1 << MAXL)) u_ram (
    .clk, .wr_en, .wr_addr, .wr_data, .rd_en(coef_rd_en), .rd_addr(coef_rd_addr), .rd_data(coef_data)
  );

  window_filter #(.MAX_LOG2(MAXL)) dut (
    .clk, .rst_n, .start, .nfft_log2, .in_valid, .in_data,
    .coef_rd_en, .coef_rd_addr, .coef_data,
    .out_valid, .out_data, .out_last, .busy, .done
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int wmul(int x, int c);
    return int'($floor(real'(x) * real'(c) / 16384.0));
  endfunction

  task automatic load_window(input int n, input bit hann);
    for (int a = 0; a < n; a++) begin
      if (hann) coef[a] = int'($floor(16384.0 * 0.5 * (1.0 - $cos(2.0 * PI * real'(a) / real'(n))) + 0.5));
      else      coef[a] = 16384;
      @(negedge clk);
      wr_en = 1; wr_addr = MAXL'(a); wr_data = WCOEF_W'(coef[a]);
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic frame(input int l, input bit gaps, input string name);
    int n, xr[$], xi[$], got, lat, t0, sent, ndone;
    n = 1 << l;
    @(negedge clk);
    nfft_log2 = 4'(l); start = 1;
    @(negedge clk);
    start = 0;
    chk(busy, {name, " busy after start"});
    got = 0; sent = 0; ndone = 0; lat = -1;
    fork
      begin
        // extra samples after the frame must be ignored
        while (sent < n + 5) begin
          int r, i;
          in_valid = !gaps || ($urandom_range(0, 2) != 0);
          r = int'($urandom_range(0, 65535)) - 32768;
          i = int'($urandom_range(0, 65535)) - 32768;
          in_data.re = 16'(r); in_data.im = 16'(i);
          if (in_valid && sent < n) begin xr.push_back(r); xi.push_back(i); end
          @(negedge clk);
          if (in_valid) sent++;
          if (sent == n) chk(!busy, {name, " busy drops after last sample"});
        end
        in_valid = 0;
      end
      begin
        t0 = 0;
        while (got < n) begin
          @(posedge clk);
          #1;
          t0++;
          if (out_valid) begin
            if (got == 0) lat = t0;
            chk(out_data.re == 16'(wmul(xr[got], coef[got])) && out_data.im == 16'(wmul(xi[got], coef[got])),
                $sformatf("%s sample %0d", name, got));
            chk(out_last == (got == n - 1), {name, " out_last"});
            got++;
          end
          if (done) ndone++;
        end
        repeat (10) begin
          @(posedge clk);
          #1;
          if (out_valid) got++;
          if (done) ndone++;
        end
      end
    join
    chk(got == n, $sformatf("%s %0d outputs for %0d samples", name, got, n));
    chk(ndone == 1, $sformatf("%s one done pulse (%0d)", name, ndone));
    if (!gaps) chk(lat == 2, $sformatf("%s latency %0d", name, lat));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_window(1 << MAXL, 1'b1);
    frame(MAXL, 1'b0, "hann1024");
    frame(6, 1'b1, "hann64-gaps");
    load_window(256, 1'b0);
    frame(8, 1'b1, "rect256");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
