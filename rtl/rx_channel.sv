// rx_channel: receive path of one backplane channel (24+1 sub channels).
//
// Each sub channel line rx[i] passes an adjustable input delay, whose tap is
// stepped up by inc[i] or down by dec[i] (one step per clock the pulse is
// high) and reset to zero by dly_rst. The delayed lines are captured on both
// clock edges (ddr_capture) and the resulting double word is checked for the
// counter pattern by err_checker, which also keeps the channel's error count.
// readback is the rising-edge sample of the delayed lines, i.e. the data
// behind the delays as the register file shows it. Latency from a line to
// err_count is three rising edges. The chain delay -> DDR capture -> check
// follows the specification; the signal names are this design's.
`timescale 1ns/1ps
module rx_channel #(
  parameter int unsigned NSUB   = 25,
  parameter int unsigned NTAPS  = 64,
  parameter real         TAP_NS = 0.078
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,       // clear the error count
  input  logic            counting,  // counting phase active
  input  logic            dly_rst,   // all taps back to zero
  input  logic [NSUB-1:0] inc,
  input  logic [NSUB-1:0] dec,
  input  logic [NSUB-1:0] rx,
  output logic [NSUB-1:0] readback,
  output logic [15:0]     err_count,
  output logic [1:0]      err_now,
  output logic [NSUB-1:0][$clog2(NTAPS)-1:0] tap
);
  logic [NSUB-1:0] dly;
  logic [NSUB-1:0] q_rise, q_fall;

  for (genvar i = 0; i < NSUB; i++) begin : g_line
    iodelay_model #(.NTAPS(NTAPS), .TAP_NS(TAP_NS), .IDELAY_VALUE(0)) u_dly (
      .IDATAIN (rx[i]),
      .DATAOUT (dly[i]),
      .C       (clk),
      .CE      (inc[i] | dec[i]),
      .INC     (inc[i]),
      .RST     (dly_rst),
      .TAP     (tap[i])
    );
  end

  ddr_capture #(.W(NSUB)) u_cap (
    .clk    (clk),
    .d      (dly),
    .q_rise (q_rise),
    .q_fall (q_fall)
  );

  err_checker #(.W(NSUB)) u_chk (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (clr),
    .counting  (counting),
    .q_rise    (q_rise),
    .q_fall    (q_fall),
    .err_count (err_count),
    .err_now   (err_now)
  );

  assign readback = q_rise;
endmodule
