// tb_idelayctrl_model: checks the reference clock ready flag.
// RDY must stay low under RST and for the first edges of a 200 MHz REFCLK,
// be high while REFCLK runs, and drop when REFCLK stops.
`timescale 1ns/1ps
module tb_idelayctrl_model;
  logic REFCLK = 0, RST = 1, RDY;
  logic run = 1;
  int checks = 0, failures = 0;

  idelayctrl_model dut (.*);

  always #2.5 if (run) REFCLK = ~REFCLK; else REFCLK = 1'b0;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;  chk(!RDY, "low in reset");
    RST = 0;
    repeat (8) @(posedge REFCLK);
    #1;    chk(!RDY, "low before lock");
    #200;  chk(RDY, "high after lock");
    #500;  chk(RDY, "stays high");
    run = 0;
    #200;  chk(!RDY, "low after REFCLK loss");
    run = 1;
    #300;  chk(RDY, "high again");
    RST = 1;
    #1;    chk(!RDY, "low on RST");
    RST = 0;
    #300;  chk(RDY, "high after RST released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
