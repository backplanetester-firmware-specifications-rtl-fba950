// tb_oddr_model: checks the DDR output register model.
// D1/D2 taken at a rising edge must appear on Q in the following high and
// low clock phases; R must clear the output.
`timescale 1ns/1ps
module tb_oddr_model;
  logic C = 0, R = 1, D1 = 0, D2 = 0, Q;
  int checks = 0, failures = 0;

  oddr_model dut (.*);

  always #5 C = ~C;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b;
    @(posedge C); #1;
    checks++; if (Q !== 1'b0) failures++;
    R = 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge C);
      a = 1'($urandom); b = 1'($urandom);
      D1 = a; D2 = b;
      @(posedge C); #2;
      checks++; if (Q !== a) begin failures++; $display("FAIL high phase %0t", $time); end
      @(negedge C); #2;
      checks++; if (Q !== b) begin failures++; $display("FAIL low phase %0t", $time); end
      D1 = ~a; D2 = ~b;   // changes in the low phase must not show early
      #2;
      checks++; if (Q !== b) begin failures++; $display("FAIL hold %0t", $time); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
