// err_checker: counter-pattern checker and error counter of one channel.
//
// Input each clock is a double word from the DDR capture: q_rise (earlier
// sample) and q_fall (later sample). The received stream must count up by
// one per clock edge, so two checks are made per clock:
//   inside the double word   q_fall == q_rise + 1
//   across double words      q_rise == previous q_fall + 1
// A word that is wrong in one place therefore fails two checks, the one
// into it and the one out of it. While 'counting' is high the number of
// failed checks (0, 1 or 2) is added to the 16-bit error count, which
// stops at 16'hFFFF instead of wrapping. 'clr' (counter reset or global
// reset) sets the count to 0. The previous word is tracked whether or not
// counting is on, so the first clock of a counting phase is checked too.
// The y = x + 1 rule and a per-channel 16-bit count follow the
// specification; saturation and the register stage are this design's own.
// Timing: the count reflects a double word one clock after it arrives.
`timescale 1ns/1ps
module err_checker #(
  parameter int unsigned W = 25
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         counting,
  input  logic [W-1:0] q_rise,
  input  logic [W-1:0] q_fall,
  output logic [15:0]  err_count,
  output logic [1:0]   err_now     // failed checks this clock (for observation)
);
  logic [W-1:0] prev_fall;
  logic         bad_in, bad_across;
  logic [16:0]  sum;

  always_comb begin
    bad_in     = (q_fall != q_rise + W'(1));
    bad_across = (q_rise != prev_fall + W'(1));
    err_now    = 2'(bad_in) + 2'(bad_across);
    sum        = {1'b0, err_count} + 17'(err_now);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_fall <= '0;
      err_count <= '0;
    end else begin
      prev_fall <= q_fall;
      if (clr)           err_count <= '0;
      else if (counting) err_count <= sum[16] ? 16'hFFFF : sum[15:0];
    end
  end
endmodule
