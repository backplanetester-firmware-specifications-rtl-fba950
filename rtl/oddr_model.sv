// oddr_model: behavioural model of an FPGA DDR output register
// (simulation model of a vendor primitive, not synthesizable as written).
//
// At each rising edge of C it takes D1 and D2 ("same edge" mode). Q shows D1
// while C is high and D2 while C is low, so one bit leaves per clock edge.
// R clears both halves synchronously. No clock-to-out delay is modelled;
// wire delay belongs to the backplane model of the testbench. The pin names
// follow the usual primitive; the specification only asks for DDR output.
`timescale 1ns/1ps
module oddr_model (
  input  logic C,
  input  logic R,
  input  logic D1,
  input  logic D2,
  output logic Q
);
  logic q1, q2;

  always_ff @(posedge C) begin
    if (R) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else begin
      q1 <= D1;
      q2 <= D2;
    end
  end

  assign Q = C ? q1 : q2;
endmodule
