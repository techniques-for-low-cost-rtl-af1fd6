// tb_stat_sample_counter - checks that done pulses once, on the clock after
// the target-th counted sample, that full then blocks further counting, and
// that clear restarts the count.
//
// The 154,354-sample target is the count the reference design found
// sufficient; the others are this test's own.
`timescale 1ns/1ps
module tb_stat_sample_counter;
  import decimator_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, inc = 0;
  logic [CNT_W-1:0] target = '0, count;
  logic full, done;
  int checks = 0, failures = 0;

  stat_sample_counter dut (.*);
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

  initial begin
    int tg[4] = '{1, 7, 1000, 154354};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (tg[r]) begin
      int seen, dones;
      target = CNT_W'(tg[r]);
      clear = 1;
      @(negedge clk);
      clear = 0;
      chk(count == 0 && !done, "cleared");
      seen = 0; dones = 0;
      while (seen < tg[r] + 20) begin
        inc = ($urandom_range(0, 4) != 0);
        @(negedge clk);
        if (inc) seen++;
        if (done) begin
          dones++;
          chk(count == CNT_W'(tg[r]), "done at target");
          chk(seen >= tg[r], "done not early");
        end
        if (seen <= tg[r]) begin
          chk(count == CNT_W'(seen), $sformatf("count %0d vs %0d", count, seen));
        end else begin
          chk(count == CNT_W'(tg[r]) && full, "hold at target");
        end
      end
      chk(dones == 1, $sformatf("exactly one done for target %0d (%0d)", tg[r], dones));
      inc = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
