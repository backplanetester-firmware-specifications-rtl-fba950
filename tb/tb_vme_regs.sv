// tb_vme_regs: checks the register map and its side effects.
// Reads version, status, error counters and readback registers against
// values the testbench drives; writes control, pulse and delay registers
// and checks the reset levels, the counting phase and the one-clock step
// pulses (right channel, right sub channels, up or down) they produce.
`timescale 1ns/1ps
module tb_vme_regs;
  localparam int unsigned NCH = 16, NSUB = 25;
  logic clk = 0, rst_n = 0;
  logic [15:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  logic bus_we = 0, bus_re = 0, bus_rvalid;
  logic refclk_ok = 0;
  logic [NCH-1:0][15:0] err_count;
  logic [NCH-1:0][NSUB-1:0] readback;
  logic global_rst, count_rst, counting;
  logic [NCH-1:0][NSUB-1:0] dly_inc, dly_dec;
  int checks = 0, failures = 0;

  vme_regs #(.NCH(NCH), .NSUB(NSUB), .VERSION(16'h0001)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); bus_addr = a; bus_re = 1;
    @(negedge clk); bus_re = 0;
    chk(bus_rvalid, "rvalid");
    d = bus_rdata;
  endtask

  // Write a delay register and check the pulse pattern the clock after.
  task automatic dly_write(input int ch, input int k, input logic [15:0] d);
    logic [NCH-1:0][NSUB-1:0] exp_inc, exp_dec;
    logic [15:0] r;
    exp_inc = '0; exp_dec = '0;
    for (int i = 0; i < NSUB; i++) begin
      // k: 0=A up 12..24, 1=B up 0..11, 2=C down 12..24, 3=D down 0..11
      if (i >= 12 && (k == 0 || k == 2) && d[i-12]) begin
        if (k == 0) exp_inc[ch][i] = 1; else exp_dec[ch][i] = 1;
      end
      if (i < 12 && (k == 1 || k == 3) && d[i]) begin
        if (k == 1) exp_inc[ch][i] = 1; else exp_dec[ch][i] = 1;
      end
    end
    @(negedge clk); bus_addr = 16'h0200 + 16'(8 * ch + 2 * k); bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
    chk(dly_inc == exp_inc && dly_dec == exp_dec, "step pulse pattern");
    @(negedge clk);
    chk(dly_inc == '0 && dly_dec == '0, "step pulse is one clock");
    rd(16'h0200 + 16'(8 * ch + 2 * k), r);
    chk(r == d, "delay register read back");
  endtask

  initial begin
    logic [15:0] r;
    for (int c = 0; c < NCH; c++) begin
      err_count[c] = 16'($urandom);
      readback[c]  = NSUB'($urandom);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk(!global_rst && !count_rst && !counting && dly_inc == '0, "reset state");

    rd(16'h0000, r); chk(r == 16'h0001, "version");
    rd(16'h0002, r); chk(r == 16'h0000, "status idle");
    refclk_ok = 1;
    repeat (3) @(posedge clk);
    rd(16'h0002, r); chk(r == 16'h0001, "status refclk ok");

    // counting phase
    wr(16'h0004, 16'h0004);
    chk(counting, "start counting");
    rd(16'h0002, r); chk(r == 16'h0003, "status counting");
    rd(16'h0004, r); chk(r == 16'h0000, "command bits read 0");
    wr(16'h0004, 16'h0008);
    chk(!counting, "stop counting");
    wr(16'h0004, 16'h000C);
    chk(!counting, "stop wins over start");
    wr(16'h0004, 16'h0004);
    chk(counting, "restart counting");

    // resets
    wr(16'h0004, 16'h0002);
    chk(count_rst && !global_rst && counting, "counter reset level");
    rd(16'h0004, r); chk(r == 16'h0002, "control read");
    wr(16'h0004, 16'h0001);
    @(negedge clk);
    chk(count_rst && global_rst && !counting, "global reset level");
    wr(16'h0004, 16'h0000);
    chk(!count_rst && !global_rst, "resets released");

    // pulse register
    wr(16'h0006, 16'hA5C3);
    rd(16'h0006, r); chk(r == 16'hA5C3, "pulsereg");

    // error counters and readback
    for (int c = 0; c < NCH; c++) begin
      rd(16'h0100 + 16'(2 * c), r); chk(r == err_count[c], "errorcount");
      rd(16'h0400 + 16'(4 * c), r); chk(r == {4'd0, readback[c][11:0]}, "readback A");
      rd(16'h0402 + 16'(4 * c), r); chk(r == {3'd0, readback[c][24:12]}, "readback B");
    end
    wr(16'h0100, 16'h1234);
    rd(16'h0100, r); chk(r == err_count[0], "errorcount read only");

    // unmapped
    rd(16'h0120, r); chk(r == 16'h0000, "unmapped 0x0120");
    rd(16'h0280, r); chk(r == 16'h0000, "unmapped 0x0280");
    rd(16'h0440, r); chk(r == 16'h0000, "unmapped 0x0440");

    // delay registers
    for (int c = 0; c < NCH; c++)
      for (int k = 0; k < 4; k++)
        dly_write(c, k, 16'($urandom) & 16'h1FFF);
    dly_write(5, 0, 16'h1FFF);
    dly_write(9, 3, 16'h0FFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
