// ddr_capture: double data rate input capture, one bit per line.
//
// Each line is sampled on the rising edge (into r_rise) and on the following
// falling edge (into r_fall). At the next rising edge both samples move
// together to q_rise / q_fall, so the logic behind sees one double-width
// word per clock (the specification's picture of 16-bit DDR words becoming
// 32-bit words per clock). Latency: a value sampled at rising edge k appears
// on q_rise after rising edge k+1; the falling sample between k and k+1
// appears on q_fall at the same time. This mirrors a "same edge, pipelined"
// input DDR register; there is no reset, as in the FPGA primitive, so the
// first two outputs after power-up are whatever was on the lines.
`timescale 1ns/1ps
module ddr_capture #(
  parameter int unsigned W = 25
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q_rise,
  output logic [W-1:0] q_fall
);
  logic [W-1:0] r_rise, r_fall;

  always_ff @(posedge clk) r_rise <= d;
  always_ff @(negedge clk) r_fall <= d;

  always_ff @(posedge clk) begin
    q_rise <= r_rise;
    q_fall <= r_fall;
  end
endmodule
