// tb_window_coef_ram - writes a window table through the host port and reads
// it back through the filter port: one-clock read latency, read-before-write
// on an address collision, and rd_en holding the output.
//
// The shared-RAM role follows the reference design; the port behaviour
// checked is this design's own.
`timescale 1ns/1ps
module tb_window_coef_ram;
  import decimator_pkg::*;

  localparam int DEPTH = 8192;
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [12:0] wr_addr = '0, rd_addr = '0;
  logic [WCOEF_W-1:0] wr_data = '0, rd_data;
  logic [WCOEF_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  window_coef_ram #(.DEPTH(DEPTH)) dut (.*);
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
    // fill with a pseudo-random table
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 13'(a); wr_data = WCOEF_W'($urandom);
      ref_mem[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    // random reads
    for (int t = 0; t < 3000; t++) begin
      int a;
      a = int'($urandom_range(0, DEPTH - 1));
      rd_en = 1; rd_addr = 13'(a);
      @(negedge clk);
      chk(rd_data == ref_mem[a], $sformatf("read %0d", a));
    end
    // rd_en low holds the last word
    begin
      logic [WCOEF_W-1:0] held;
      held = rd_data;
      rd_en = 0; rd_addr = rd_addr + 1'b1;
      @(negedge clk);
      chk(rd_data == held, "rd_en low holds data");
    end
    // collision: old data returned, new data afterwards
    rd_en = 1; wr_en = 1; rd_addr = 13'd77; wr_addr = 13'd77; wr_data = ~ref_mem[77];
    @(negedge clk);
    wr_en = 0;
    chk(rd_data == ref_mem[77], "read during write returns old word");
    ref_mem[77] = ~ref_mem[77];
    @(negedge clk);
    chk(rd_data == ref_mem[77], "new word after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
