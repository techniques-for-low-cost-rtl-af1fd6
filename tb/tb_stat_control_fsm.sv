// tb_stat_control_fsm - walks the Stat sequencer through complete cycles and
// checks every state, the clear pulses, and that stray commands (a calc
// request mid-cycle, a phase write during the gain wait, counter done while
// waiting) do not move it.
//
// The cycle follows the reference design's description; the command
// handshake checked is this design's own.
`timescale 1ns/1ps
module tb_stat_control_fsm;
  import decimator_pkg::*;

  logic clk = 0, rst_n = 0;
  logic calc_new_coeffs = 0, gain_coef_wr = 0, phase_coef_wr = 0, cnt_done = 0;
  stat_state_e state;
  logic clear_sums, summing, phase_step, sums_ready;
  int checks = 0, failures = 0;

  stat_control_fsm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (state %0d)", msg, state); end
  endtask

  task automatic pulse(ref logic s);
    s = 1;
    @(negedge clk);
    s = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(state == ST_IDLE && !summing && !sums_ready, "reset idle");
    for (int cyc = 0; cyc < 3; cyc++) begin
      pulse(gain_coef_wr);
      chk(state == ST_IDLE, "gain write in idle ignored");
      pulse(calc_new_coeffs);
      chk(state == ST_GAIN_SUM && clear_sums && summing && !phase_step, "gain sum entered with clear");
      @(negedge clk);
      chk(!clear_sums, "clear is one clock");
      pulse(calc_new_coeffs);
      pulse(phase_coef_wr);
      chk(state == ST_GAIN_SUM, "stray commands ignored in gain sum");
      repeat (5) @(negedge clk);
      pulse(cnt_done);
      chk(state == ST_GAIN_WAIT && sums_ready && !summing, "gain wait");
      pulse(phase_coef_wr);
      pulse(cnt_done);
      chk(state == ST_GAIN_WAIT, "gain wait holds");
      pulse(gain_coef_wr);
      chk(state == ST_PHASE_SUM && clear_sums && summing && phase_step, "phase sum entered with clear");
      repeat (3) @(negedge clk);
      pulse(cnt_done);
      chk(state == ST_PHASE_WAIT && sums_ready && phase_step, "phase wait");
      pulse(gain_coef_wr);
      chk(state == ST_PHASE_WAIT, "phase wait ignores gain write");
      pulse(phase_coef_wr);
      chk(state == ST_IDLE && !sums_ready, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
