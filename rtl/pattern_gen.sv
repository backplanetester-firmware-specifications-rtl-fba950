// pattern_gen: counter pattern source for the backplane test.
//
// Every rising clock edge it presents two consecutive counter values, d_rise
// (value n, sent while the clock is high) and d_fall (value n+1, sent while
// the clock is low); the next clock gives n+2 and n+3. Downstream a DDR
// output register puts them on the lines, so the wire sees one counter step
// per clock edge. The counter is W bits wide, one bit per sub channel of a
// channel, and wraps. A synchronous clear (counter reset or global reset
// from the control register) restarts it at 0; enable stops it in place.
// Sending a simple counter is what the specification asks for first; the
// bit-per-sub-channel mapping and the clear/enable inputs are this design's
// choices.
`timescale 1ns/1ps
module pattern_gen #(
  parameter int unsigned W = 25
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, active low
  input  logic         clr,     // synchronous restart at 0
  input  logic         en,
  output logic [W-1:0] d_rise,
  output logic [W-1:0] d_fall
);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cnt <= '0;
    else if (clr)    cnt <= '0;
    else if (en)     cnt <= cnt + W'(2);
  end

  assign d_rise = cnt;
  assign d_fall = cnt + W'(1);
endmodule
