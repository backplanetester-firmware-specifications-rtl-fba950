// tb_iodelay_model: checks the input delay model.
// Steps the tap up and down with CE/INC pulses and measures, for each tap,
// the time from an input edge to the output edge, which must be
// tap * 78 ps. Also checks wrap-around at both ends and RST.
`timescale 1ns/1ps
module tb_iodelay_model;
  localparam int unsigned NTAPS = 64;
  localparam real TAP_NS = 0.078;
  logic IDATAIN = 0, DATAOUT, C = 0, CE = 0, INC = 0, RST = 0;
  logic [5:0] TAP;
  int checks = 0, failures = 0;
  int exp_tap = 0;

  iodelay_model #(.NTAPS(NTAPS), .TAP_NS(TAP_NS)) dut (.*);

  always #5 C = ~C;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic up);
    @(negedge C); CE = 1; INC = up;
    @(negedge C); CE = 0;
    exp_tap = up ? (exp_tap + 1) % NTAPS : (exp_tap + NTAPS - 1) % NTAPS;
  endtask

  task automatic measure();
    realtime t0, t1;
    @(negedge C);
    #0.5 IDATAIN = ~IDATAIN;
    t0 = $realtime;
    if (DATAOUT !== IDATAIN) @(DATAOUT);
    t1 = $realtime;
    checks++;
    if (TAP != 6'(exp_tap) || (t1 - t0) < exp_tap * TAP_NS - 0.002 || (t1 - t0) > exp_tap * TAP_NS + 0.002) begin
      failures++;
      $display("FAIL tap=%0d exp %0d delay=%f", TAP, exp_tap, t1 - t0);
    end
  endtask

  initial begin
    @(negedge C); RST = 1; @(negedge C); RST = 0;
    measure();
    for (int k = 0; k < 40; k++) begin step(1); measure(); end
    for (int k = 0; k < 50; k++) begin step(0); measure(); end   // passes 0, wraps to 63
    for (int k = 0; k < 15; k++) begin step(1); measure(); end   // wraps 63 -> 0
    @(negedge C); RST = 1; @(negedge C); RST = 0;
    exp_tap = 0;
    measure();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
