// tb_ddr_capture: checks double data rate capture.
// A new random word is driven 1 ns after every clock edge; the word present
// at a rising edge must come out on q_rise, and the word present at the
// following falling edge on q_fall, both after the next rising edge.
`timescale 1ns/1ps
module tb_ddr_capture;
  localparam int unsigned W = 25;
  logic clk = 0;
  logic [W-1:0] d, q_rise, q_fall;
  logic [W-1:0] at_rise[$], at_fall[$];
  int checks = 0, failures = 0;

  ddr_capture #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver: change 1 ns after each edge, remember what each edge saw
  initial begin
    d = '0;
    forever begin
      @(clk);
      if (clk) at_rise.push_back(d); else at_fall.push_back(d);
      #1 d = W'($urandom);
    end
  end

  initial begin
    logic [W-1:0] er, ef;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      @(posedge clk);
      #0.5;
      // at this rising edge k+3, outputs hold samples of edge k+2 and k+2.5
      er = at_rise[at_rise.size() - 2];
      ef = at_fall[at_fall.size() - 1];
      checks++;
      if (q_rise !== er || q_fall !== ef) begin
        failures++;
        $display("FAIL %0t q_rise=%h exp %h q_fall=%h exp %h", $time, q_rise, er, q_fall, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
