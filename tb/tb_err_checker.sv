// tb_err_checker: checks the y = x + 1 checker and its error counter.
// A counting stream is fed as double words with random single-word
// corruptions; the testbench works out the expected number of failed
// checks from its own copy of the stream (two per corrupted word, fewer when
// corruptions touch) and compares the count, with the counting phase
// switched on and off and cleared. Then all-bad input drives the counter to
// its 16'hFFFF saturation.
`timescale 1ns/1ps
module tb_err_checker;
  localparam int unsigned W = 25;
  logic clk = 0, rst_n = 0, clr = 0, counting = 0;
  logic [W-1:0] q_rise, q_fall;
  logic [15:0]  err_count;
  logic [1:0]   err_now;
  int checks = 0, failures = 0;
  longint expected = 0;
  logic [W-1:0] prev_f, n;
  int corrupt = 0;

  err_checker #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t: count=%0d exp=%0d", what, $time, err_count, expected); end
  endtask

  initial begin
    logic [W-1:0] r, f;
    int e;
    n = W'(1000);
    q_rise = n - 2; q_fall = n - 1; prev_f = n - 3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    prev_f = q_fall;   // checker has taken this double word as "previous"
    for (int k = 0; k < 2000; k++) begin
      // build the next double word, maybe corrupted
      r = n; f = n + 1;
      if ($urandom_range(0, 9) == 0) begin r = r ^ W'(1 << $urandom_range(0, W-1)); corrupt++; end
      if ($urandom_range(0, 9) == 0) begin f = f ^ W'(1 << $urandom_range(0, W-1)); corrupt++; end
      e = int'(f != r + 1) + int'(r != prev_f + 1);
      if (k == 500)  counting = 1;
      if (k == 1200) counting = 0;
      if (k == 1400) counting = 1;
      clr = (k == 1600);
      q_rise = r; q_fall = f;
      @(posedge clk);
      #1;
      if (clr) expected = 0;
      else if (counting) expected += e;
      chk(err_count == 16'(expected), "count");
      prev_f = f;
      n = n + 2;
      @(negedge clk);
    end
    chk(expected > 0 && corrupt > 0, "errors exercised");
    // saturation: every check fails
    counting = 1;
    clr = 0;
    for (int k = 0; k < 33000; k++) begin
      q_rise = W'($urandom); q_fall = q_rise;   // fall != rise + 1 always
      @(posedge clk);
      #1;
    end
    chk(err_count == 16'hFFFF, "saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
