// tb_pattern_gen: checks the counter pattern source.
// A reference counter kept by the testbench must match d_rise every clock;
// d_fall must be d_rise + 1; clr restarts at 0; en low freezes the count;
// the count wraps at 2^W (W reduced to 6 here so the wrap is reached).
`timescale 1ns/1ps
module tb_pattern_gen;
  localparam int unsigned W = 6;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [W-1:0] d_rise, d_fall, ref_cnt;
  int checks = 0, failures = 0, wraps = 0;

  pattern_gen #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    ref_cnt = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    en = 1;
    ref_cnt = '0;
    @(posedge clk);
    ref_cnt = 2;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      chk(d_rise == ref_cnt, "d_rise");
      chk(d_fall == W'(ref_cnt + 1), "d_fall");
      // random controls for the next edge
      en  = ($urandom_range(0, 7) != 0);
      clr = ($urandom_range(0, 40) == 0);
      if (clr) ref_cnt = '0;
      else if (en) begin
        if (ref_cnt > W'(ref_cnt + 2)) wraps++;
        ref_cnt = W'(ref_cnt + 2);
      end
    end
    chk(wraps > 0, "wrap reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
