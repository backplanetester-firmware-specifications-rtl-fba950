// iodelay_model: behavioural model of an FPGA input delay element
// (simulation model of a vendor primitive; uses timing controls).
//
// DATAOUT follows IDATAIN after tap * TAP_NS nanoseconds (transport delay,
// the tap in force when the input changes sets that change's delay).
// The tap value starts at IDELAY_VALUE, is reloaded by RST and moves by one
// at a rising edge of C when CE is high: up when INC is 1, down when INC is
// 0, wrapping round at both ends of the NTAPS range as the real part does.
// The control pins are synchronous to C. Defaults (64 taps of 78 ps with a
// 200 MHz reference clock) are those of the Virtex-5 class of parts; the
// specification names the IDELAY, its step up / step down control and the
// 200 MHz reference, not the tap size.
`timescale 1ns/1ps
module iodelay_model #(
  parameter int unsigned NTAPS        = 64,
  parameter real         TAP_NS       = 0.078,
  parameter int unsigned IDELAY_VALUE = 0
) (
  input  logic                     IDATAIN,
  output logic                     DATAOUT,
  input  logic                     C,
  input  logic                     CE,
  input  logic                     INC,
  input  logic                     RST,
  output logic [$clog2(NTAPS)-1:0] TAP    // current tap, for observation
);
  localparam int unsigned TW = $clog2(NTAPS);

  logic [TW-1:0] tap  = TW'(IDELAY_VALUE);
  logic          dout = 1'b0;

  always_ff @(posedge C) begin
    if (RST)
      tap <= TW'(IDELAY_VALUE);
    else if (CE && INC)
      tap <= (tap == TW'(NTAPS - 1)) ? '0 : tap + 1'b1;
    else if (CE)
      tap <= (tap == '0) ? TW'(NTAPS - 1) : tap - 1'b1;
  end

  // transport delay: each input change travels in its own process, so
  // changes closer together than the delay are all kept
  always @(IDATAIN) begin
    automatic logic v = IDATAIN;
    automatic real  d = tap * TAP_NS;
    fork
      begin
        #(d);
        dout = v;
      end
    join_none
  end

  assign DATAOUT = dout;
  assign TAP     = tap;
endmodule
