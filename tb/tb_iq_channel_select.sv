// tb_iq_channel_select - checks the Channel_Select routing: a negative gain
// coefficient sends I to the gain multiplier, zero or positive sends Q.
//
// The routing rule is the reference design's. Random data and coefficients,
// every third coefficient zero; combinational, so no clocking is checked.
`timescale 1ns/1ps
module tb_iq_channel_select;
  import decimator_pkg::*;

  logic signed [SAMPLE_W-1:0] in_i, in_q, strong_br, weak_br;
  logic signed [COEF_W-1:0]   gain_coef;
  logic                       swap;
  int checks = 0, failures = 0;
  int n_swap = 0, n_noswap = 0;

  iq_channel_select dut (.in_i, .in_q, .gain_coef, .strong_br, .weak_br, .swap);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int c;
      in_i = SAMPLE_W'($urandom);
      in_q = SAMPLE_W'($urandom);
      c = (t % 3 == 0) ? 0 : int'($urandom_range(0, 262143)) - 131072;
      gain_coef = COEF_W'(c);
      #1;
      checks++;
      if (c < 0) begin
        n_swap++;
        if (!(swap && strong_br == in_i && weak_br == in_q)) begin
          failures++; $display("FAIL coef %0d: expected I routed to gain", c);
        end
      end else begin
        n_noswap++;
        if (!(!swap && strong_br == in_q && weak_br == in_i)) begin
          failures++; $display("FAIL coef %0d: expected Q routed to gain", c);
        end
      end
    end
    checks++;
    if (n_swap == 0 || n_noswap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
