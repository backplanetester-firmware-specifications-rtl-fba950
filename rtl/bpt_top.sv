// bpt_top: backplane tester firmware.
//
// One counter pattern (pattern_gen) is sent DDR on all NCH x NSUB transmit
// lines tx, sub channel i carrying bit i of the count, so each line changes
// with every clock edge as the count steps by one. The lines come back from
// the backplane on rx, and each channel (rx_channel) delays every line by
// its own adjustable tap count to undo cable length differences, captures
// it on both clock edges and checks that consecutive words count up by
// one. Failed checks are counted per channel while the counting phase is
// on. Everything is controlled through the VME register file (vme_regs); a
// VME slave that turns bus cycles into bus_we / bus_re strobes sits outside
// this module. The idelayctrl calibrates the delays from the 200 MHz
// refclk and its ready flag is the "REFCLK valid" status bit.
// Global reset (control bit 0) restarts the pattern, clears the error
// counts and taps and resets the delay controller (rst_n does the same);
// counter reset (bit 1)
// restarts the pattern and clears the error counts.
// Timing: clk drives the pattern, the capture and the register bus; tx
// changes at both edges of clk.
`timescale 1ns/1ps
module bpt_top
  import bpt_pkg::*;
#(
  parameter int unsigned NCH     = NCH_DEF,
  parameter int unsigned NSUB    = NSUB_DEF,
  parameter logic [15:0] VERSION = 16'h0001,
  parameter int unsigned NTAPS   = 64,
  parameter real         TAP_NS  = 0.078
) (
  input  logic                      clk,
  input  logic                      refclk,
  input  logic                      rst_n,
  input  logic [15:0]               bus_addr,
  input  logic [15:0]               bus_wdata,
  input  logic                      bus_we,
  input  logic                      bus_re,
  output logic [15:0]               bus_rdata,
  output logic                      bus_rvalid,
  output logic [NCH-1:0][NSUB-1:0]  tx,
  input  logic [NCH-1:0][NSUB-1:0]  rx,
  output logic [NCH-1:0][1:0]       err_now    // failed checks per clock, for monitoring
);
  logic                     global_rst, count_rst, counting, refclk_ok;
  logic [NCH-1:0][NSUB-1:0] dly_inc, dly_dec, readback;
  logic [NCH-1:0][15:0]     err_count;
  logic [NSUB-1:0]          d_rise, d_fall;

  vme_regs #(.NCH(NCH), .NSUB(NSUB), .VERSION(VERSION)) u_regs (
    .clk        (clk),
    .rst_n      (rst_n),
    .bus_addr   (bus_addr),
    .bus_wdata  (bus_wdata),
    .bus_we     (bus_we),
    .bus_re     (bus_re),
    .bus_rdata  (bus_rdata),
    .bus_rvalid (bus_rvalid),
    .refclk_ok  (refclk_ok),
    .err_count  (err_count),
    .readback   (readback),
    .global_rst (global_rst),
    .count_rst  (count_rst),
    .counting   (counting),
    .dly_inc    (dly_inc),
    .dly_dec    (dly_dec)
  );

  idelayctrl_model u_dlyctrl (
    .REFCLK (refclk),
    .RST    (global_rst | !rst_n),
    .RDY    (refclk_ok)
  );

  pattern_gen #(.W(NSUB)) u_pat (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (count_rst),
    .en     (1'b1),
    .d_rise (d_rise),
    .d_fall (d_fall)
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    for (genvar i = 0; i < NSUB; i++) begin : g_tx
      oddr_model u_oddr (
        .C  (clk),
        .R  (1'b0),
        .D1 (d_rise[i]),
        .D2 (d_fall[i]),
        .Q  (tx[c][i])
      );
    end

    rx_channel #(.NSUB(NSUB), .NTAPS(NTAPS), .TAP_NS(TAP_NS)) u_rx (
      .clk       (clk),
      .rst_n     (rst_n),
      .clr       (count_rst),
      .counting  (counting),
      .dly_rst   (global_rst | !rst_n),
      .inc       (dly_inc[c]),
      .dec       (dly_dec[c]),
      .rx        (rx[c]),
      .readback  (readback[c]),
      .err_count (err_count[c]),
      .err_now   (err_now[c]),
      .tap       ()
    );
  end
endmodule
