// tb_rx_channel: one receive channel, with skewed lines and delay tuning.
// The testbench sends the counter pattern DDR (10 ns clock) on 25 lines,
// each through its own wire delay of 3..7 ns, so lines straddle the 5 ns
// half-period and the received words are wrong. It checks that errors are
// counted, then steps each short line's tap up by the number of 78 ps taps
// that moves it past the half-period, checks that the error count then stays
// at zero and that readback equals a counter value. Finally a few taps are
// stepped down again and errors must return.
`timescale 1ns/1ps
module tb_rx_channel;
  localparam int unsigned NSUB = 25;
  localparam real TAP_NS = 0.078, HALF = 5.0;
  logic clk = 0, rst_n = 0, clr = 0, counting = 0, dly_rst = 0;
  logic [NSUB-1:0] inc = '0, dec = '0, rx, readback, tx;
  logic [15:0] err_count;
  logic [1:0]  err_now;
  logic [NSUB-1:0][5:0] tap;
  logic [NSUB-1:0] cnt = '0;
  real wire_ns [NSUB];
  int  need    [NSUB];
  int checks = 0, failures = 0;

  rx_channel #(.NSUB(NSUB), .NTAPS(64), .TAP_NS(TAP_NS)) dut (.*);

  always #5 clk = ~clk;

  // DDR counter source: value n while clk high, n+1 while low
  always @(posedge clk) cnt <= cnt + NSUB'(2);
  assign tx = clk ? cnt : cnt + NSUB'(1);

  // backplane: per-line transport delays
  for (genvar i = 0; i < NSUB; i++) begin : g_wire
    bp_wire u_wire (.a(tx[i]), .delay_ns(wire_ns[i]), .glitch_in(1'b0), .y(rx[i]));
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t (count=%0d)", what, $time, err_count); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int max_need;
    for (int i = 0; i < NSUB; i++) begin
      wire_ns[i] = 3.0 + 4.0 * real'($urandom_range(0, 1000)) / 1000.0;
      // taps that bring a short line past the half period, with margin
      need[i] = (wire_ns[i] < HALF + 0.2) ? int'((HALF + 0.4 - wire_ns[i]) / TAP_NS) + 1 : 0;
    end
    wire_ns[0] = 3.2;  need[0] = int'((HALF + 0.4 - 3.2) / TAP_NS) + 1;   // at least one short
    wire_ns[1] = 6.5;  need[1] = 0;                                       // and one long line
    rx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); dly_rst = 1; @(negedge clk); dly_rst = 0;
    repeat (10) @(posedge clk);
    @(negedge clk); counting = 1;
    repeat (50) @(posedge clk);
    #1 chk(err_count > 16'd50, "skewed lines give errors");

    // tune: one step per clock on every line that still needs one
    max_need = 0;
    foreach (need[i]) if (need[i] > max_need) max_need = need[i];
    @(negedge clk); counting = 0; clr = 1;
    for (int s = 0; s < max_need; s++) begin
      @(negedge clk);
      clr = 0;
      for (int i = 0; i < NSUB; i++) inc[i] = (s < need[i]);
    end
    @(negedge clk); inc = '0;
    for (int i = 0; i < NSUB; i++) chk(tap[i] == 6'(need[i]), "tap value");
    repeat (10) @(posedge clk);
    @(negedge clk); chk(err_count == 0, "cleared"); counting = 1;
    repeat (200) @(posedge clk);
    #1 chk(err_count == 0, "no errors after tuning");
    // readback is one counter value: all lines agree on the same word
    begin
      logic [NSUB-1:0] r1;
      @(posedge clk); #1 r1 = readback;
      @(posedge clk); #1 chk(readback == r1 + NSUB'(2), "readback counts by 2 per clock");
    end

    // step line 0 back down below the half period: errors return
    for (int s = 0; s < need[0]; s++) begin
      @(negedge clk); dec[0] = 1;
    end
    @(negedge clk); dec = '0;
    chk(tap[0] == 0, "tap stepped down");
    repeat (20) @(posedge clk);
    #1 chk(err_count > 0, "errors after detuning");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
