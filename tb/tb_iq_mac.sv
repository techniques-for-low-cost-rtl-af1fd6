// tb_iq_mac - checks the three running sums (I*I, Q*Q, I*Q) against sums
// kept in the testbench, with random gaps in acc_en and a clear in between.
//
// Checks are bit-exact; the sums are updated one clock after acc_en.
`timescale 1ns/1ps
module tb_iq_mac;
  import decimator_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, acc_en = 0;
  logic signed [SAMPLE_W-1:0] a = '0, b = '0;
  logic signed [ACC_W-1:0] sum_aa, sum_bb, sum_ab;
  longint eaa, ebb, eab;
  int checks = 0, failures = 0;

  iq_mac dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      eaa = 0; ebb = 0; eab = 0;
      chk(sum_aa == 0 && sum_bb == 0 && sum_ab == 0, "cleared");
      for (int t = 0; t < 5000; t++) begin
        int x, y;
        x = (run == 2) ? -8192 : int'($urandom_range(0, 16383)) - 8192;
        y = (run == 2) ? -8192 : int'($urandom_range(0, 16383)) - 8192;
        a = SAMPLE_W'(x); b = SAMPLE_W'(y);
        acc_en = ($urandom_range(0, 3) != 0);
        if (acc_en) begin
          eaa += longint'(x) * x; ebb += longint'(y) * y; eab += longint'(x) * y;
        end
        @(negedge clk);
        if (t % 97 == 0)
          chk(sum_aa == ACC_W'(eaa) && sum_bb == ACC_W'(ebb) && sum_ab == ACC_W'(eab), $sformatf("run %0d t %0d", run, t));
      end
      acc_en = 0;
      @(negedge clk);
      chk(sum_aa == ACC_W'(eaa), "final sum_aa");
      chk(sum_bb == ACC_W'(ebb), "final sum_bb");
      chk(sum_ab == ACC_W'(eab), "final sum_ab");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
