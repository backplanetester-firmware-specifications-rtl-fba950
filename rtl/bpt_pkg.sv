// bpt_pkg: constants shared by the backplane tester firmware.
//
// Holds the array sizes (16 channels of 24+1 sub channels), the 16-bit
// register address map seen from the VME side and the control / status bit
// positions. Addresses are byte addresses of 16-bit registers, so bit 0 of
// an address is always 0. The map and the bit meanings follow the
// specification tables; the readback interleave (A/B per channel) is this
// design's own choice, made to mirror the delay register interleave.
`timescale 1ns/1ps
package bpt_pkg;
  localparam int unsigned NCH_DEF  = 16;   // channels
  localparam int unsigned NSUB_DEF = 25;   // sub channels per channel (24+1)
  localparam int unsigned NLO      = 12;   // sub channels 0..11  ("low" half)

  // Register addresses
  localparam logic [15:0] A_VERSION  = 16'h0000;
  localparam logic [15:0] A_STATUS   = 16'h0002;
  localparam logic [15:0] A_CONTROL  = 16'h0004;
  localparam logic [15:0] A_PULSE    = 16'h0006;
  localparam logic [15:0] A_ERR_BASE = 16'h0100;  // + 2*ch,          ch 0..15
  localparam logic [15:0] A_DLY_BASE = 16'h0200;  // + 8*ch + 2*{A,B,C,D}
  localparam logic [15:0] A_RB_BASE  = 16'h0400;  // + 4*ch + 2*{A,B}

  // controlreg bits
  localparam int unsigned C_GLOBAL_RST = 0;
  localparam int unsigned C_COUNT_RST  = 1;
  localparam int unsigned C_START      = 2;
  localparam int unsigned C_STOP       = 3;

  // statusreg bits
  localparam int unsigned S_REFCLK_OK  = 0;
  localparam int unsigned S_COUNTING   = 1;

  // Which delay register of a channel: A/B step up, C/D step down;
  // A/C act on sub channels 12..24, B/D on sub channels 0..11.
  typedef enum logic [1:0] {DLY_A = 2'd0, DLY_B = 2'd1, DLY_C = 2'd2, DLY_D = 2'd3} dly_sel_e;
endpackage
