// vme_regs: 16-bit register file of the backplane tester, as seen from VME.
//
// Sits behind the VME slave on a simple synchronous bus: a one-cycle
// bus_we writes bus_wdata to bus_addr; a one-cycle bus_re returns the
// register on bus_rdata with bus_rvalid one clock later. Addresses are byte
// addresses of 16-bit registers:
//   0x0000 versionreg   read only, VERSION (0x0001 = first hardware test version)
//   0x0002 statusreg    bit 0 REFCLK valid, bit 1 counting phase active
//   0x0004 controlreg   bit 0 global reset, bit 1 counter reset (both held
//                       while the bit is 1), bit 2 start counting, bit 3 stop
//                       counting (commands, act on the write, read back 0)
//   0x0006 pulsereg     read/write, no function assigned
//   0x0100+2*ch         errorcount[ch], read only
//   0x0200+8*ch+2*k     delayreg k = A,B,C,D of channel ch
//   0x0400+4*ch+2*k     readbackreg k = A,B of channel ch, read only
// Writing a delay register sends, one clock later, a one-clock step pulse to
// the delay of every sub channel whose bit is 1: A steps sub channels 12..24
// up (bits 0..12), B steps 0..11 up (bits 0..11), C and D step the same
// lines down. The written value stays readable. readbackreg A shows the
// delayed data of sub channels 0..11 in bits 0..11, B that of sub channels
// 12..24 in bits 0..12. Writes to read-only or unmapped addresses are
// ignored; unmapped reads return 0. Start and stop in one write: stop wins.
// Global reset also ends the counting phase.
// The map, the bit meanings and the A..D roles follow the specification;
// the bus, the pulse timing, 13-bit use of the A/B registers and the
// readback interleave are this design's own.
`timescale 1ns/1ps
module vme_regs
  import bpt_pkg::*;
#(
  parameter int unsigned NCH     = 16,
  parameter int unsigned NSUB    = 25,
  parameter logic [15:0] VERSION = 16'h0001
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // register bus from the VME slave
  input  logic [15:0]                bus_addr,
  input  logic [15:0]                bus_wdata,
  input  logic                       bus_we,
  input  logic                       bus_re,
  output logic [15:0]                bus_rdata,
  output logic                       bus_rvalid,
  // design side
  input  logic                       refclk_ok,
  input  logic [NCH-1:0][15:0]       err_count,
  input  logic [NCH-1:0][NSUB-1:0]   readback,
  output logic                       global_rst,
  output logic                       count_rst,
  output logic                       counting,
  output logic [NCH-1:0][NSUB-1:0]   dly_inc,
  output logic [NCH-1:0][NSUB-1:0]   dly_dec
);
  localparam int unsigned NHI = NSUB - NLO;   // sub channels 12..24

  logic [1:0]            ctrl;                 // held control bits 1:0
  logic [15:0]           pulse_q;
  logic [NCH-1:0][3:0][15:0] dly_q;
  logic [1:0]            refclk_sync;

  // address decode
  logic [15:0] off_err, off_dly, off_rb;
  logic        hit_err, hit_dly, hit_rb;
  logic [7:0]  ch_err, ch_dly, ch_rb;
  logic [1:0]  k_dly;
  logic        k_rb;

  always_comb begin
    off_err = bus_addr - A_ERR_BASE;
    off_dly = bus_addr - A_DLY_BASE;
    off_rb  = bus_addr - A_RB_BASE;
    hit_err = (bus_addr >= A_ERR_BASE) && (off_err < 16'(2 * NCH)) && !bus_addr[0];
    hit_dly = (bus_addr >= A_DLY_BASE) && (off_dly < 16'(8 * NCH)) && !bus_addr[0];
    hit_rb  = (bus_addr >= A_RB_BASE)  && (off_rb  < 16'(4 * NCH)) && !bus_addr[0];
    ch_err  = off_err[8:1];
    ch_dly  = off_dly[10:3];
    k_dly   = off_dly[2:1];
    ch_rb   = off_rb[9:2];
    k_rb    = off_rb[1];
  end

  // registers and step pulses
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl        <= '0;
      counting    <= 1'b0;
      pulse_q     <= '0;
      dly_q       <= '0;
      dly_inc     <= '0;
      dly_dec     <= '0;
      refclk_sync <= '0;
    end else begin
      refclk_sync <= {refclk_sync[0], refclk_ok};
      dly_inc     <= '0;
      dly_dec     <= '0;
      if (ctrl[C_GLOBAL_RST]) counting <= 1'b0;
      if (bus_we) begin
        if (bus_addr == A_CONTROL) begin
          ctrl <= bus_wdata[1:0];
          if (bus_wdata[C_STOP])       counting <= 1'b0;
          else if (bus_wdata[C_START]) counting <= 1'b1;
        end
        if (bus_addr == A_PULSE) pulse_q <= bus_wdata;
        if (hit_dly && ch_dly < 8'(NCH)) begin
          dly_q[ch_dly][k_dly] <= bus_wdata;
          unique case (dly_sel_e'(k_dly))
            DLY_A: dly_inc[ch_dly][NSUB-1:NLO] <= bus_wdata[NHI-1:0];
            DLY_B: dly_inc[ch_dly][NLO-1:0]    <= bus_wdata[NLO-1:0];
            DLY_C: dly_dec[ch_dly][NSUB-1:NLO] <= bus_wdata[NHI-1:0];
            DLY_D: dly_dec[ch_dly][NLO-1:0]    <= bus_wdata[NLO-1:0];
          endcase
        end
      end
    end
  end

  assign global_rst = ctrl[C_GLOBAL_RST];
  assign count_rst  = ctrl[C_COUNT_RST] | ctrl[C_GLOBAL_RST];

  // read mux
  logic [15:0] rd;
  always_comb begin
    rd = '0;
    if (bus_addr == A_VERSION) rd = VERSION;
    else if (bus_addr == A_STATUS) begin
      rd[S_REFCLK_OK] = refclk_sync[1];
      rd[S_COUNTING]  = counting;
    end
    else if (bus_addr == A_CONTROL) rd = {14'd0, ctrl};
    else if (bus_addr == A_PULSE)   rd = pulse_q;
    else if (hit_err && ch_err < 8'(NCH)) rd = err_count[ch_err];
    else if (hit_dly && ch_dly < 8'(NCH)) rd = dly_q[ch_dly][k_dly];
    else if (hit_rb  && ch_rb  < 8'(NCH)) begin
      if (!k_rb) rd[NLO-1:0] = readback[ch_rb][NLO-1:0];
      else       rd[NHI-1:0] = readback[ch_rb][NSUB-1:NLO];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata  <= '0;
      bus_rvalid <= 1'b0;
    end else begin
      bus_rvalid <= bus_re;
      if (bus_re) bus_rdata <= rd;
    end
  end

  // a bus access is either a read or a write
  a_rw_excl: assert property (@(posedge clk) disable iff (!rst_n) !(bus_we && bus_re));
endmodule
