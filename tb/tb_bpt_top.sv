// tb_bpt_top: end-to-end test of the backplane tester at full size
// (16 channels x 25 sub channels, all top-level parameters at default).
//
// The testbench plays the PC on the register bus and models the backplane:
// every transmit line reaches its receive line through its own wire delay of
// 3..7 ns (10 ns clock), so on every channel some lines arrive before and
// some after the 5 ns half period and the received words are wrong. The run:
//   1. reset, version and REFCLK-valid status
//   2. counting phase with the untuned delays: every channel counts errors
//   3. stop counting: counts freeze; counter reset: counts clear
//   4. tune: the "Bit Up" registers (A, B) are written repeatedly, one tap
//      step per write, until every short line is past the half period
//   5. counting phase: no errors; readback registers of all channels show
//      the same counter word, one fixed latency behind the pattern source
//   6. a one-half-period glitch on one line gives exactly two errors
//   7. "Bit Down" registers (C, D) detune one channel: only it counts errors
//   8. global reset: taps, counts and counting phase cleared, REFCLK status
//      drops during the reset; errors return as the taps are back at 0
//   9. REFCLK stops: the status bit drops
// Each mechanism is counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_bpt_top;
  localparam int unsigned NCH = 16, NSUB = 25;
  localparam real TAP_NS = 0.078, HALF = 5.0;

  logic clk = 0, refclk = 0, rst_n = 0, refclk_run = 1;
  logic [15:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  logic bus_we = 0, bus_re = 0, bus_rvalid;
  logic [NCH-1:0][NSUB-1:0] tx, rx, inj = '0;
  logic [NCH-1:0][1:0] err_now;
  real wire_ns [NCH][NSUB];
  int  need    [NCH][NSUB];
  int checks = 0, failures = 0;
  int n_skew_err = 0, n_freeze = 0, n_cnt_rst = 0, n_tune_up = 0, n_clean = 0,
      n_readback = 0, n_glitch = 0, n_tune_down = 0, n_global_rst = 0,
      n_refclk_loss = 0;
  logic [NSUB-1:0] snap;

  bpt_top dut (.*);

  always #5 clk = ~clk;
  always #2.5 refclk = refclk_run ? ~refclk : 1'b0;

  // backplane model
  for (genvar c = 0; c < NCH; c++) begin : g_bp_ch
    for (genvar i = 0; i < NSUB; i++) begin : g_bp_line
      bp_wire u_wire (.a(tx[c][i]), .delay_ns(wire_ns[c][i]), .glitch_in(inj[c][i]), .y(rx[c][i]));
    end
  end

  // tap values inside the design, for checking only
  logic [NCH-1:0][NSUB-1:0][5:0] tap;
  for (genvar c = 0; c < NCH; c++) begin : g_tap
    assign tap[c] = dut.g_ch[c].u_rx.tap;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic chk_v(input logic c, input string what, input int v);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t (value %0d)", what, $time, v); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask

  // read; snap = pattern word on the lines' source during the read clock
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); bus_addr = a; bus_re = 1; snap = dut.u_pat.d_rise;
    @(negedge clk); bus_re = 0;
    chk(bus_rvalid, "rvalid");
    d = bus_rdata;
  endtask

  task automatic read_errs(output logic [15:0] e [NCH]);
    for (int c = 0; c < NCH; c++) rd(16'h0100 + 16'(2 * c), e[c]);
  endtask

  task automatic count_for(input int cycles);
    wr(16'h0004, 16'h0004);
    repeat (cycles) @(posedge clk);
    wr(16'h0004, 16'h0008);
  endtask

  // step every line that still needs it, one tap per register write
  task automatic tune_up();
    int mx = 0;
    foreach (need[c, i]) if (need[c][i] > mx) mx = need[c][i];
    for (int s = 0; s < mx; s++)
      for (int c = 0; c < NCH; c++) begin
        logic [15:0] ma, mb;
        ma = '0; mb = '0;
        for (int i = 0; i < 12; i++)  mb[i]      = (need[c][i] > s);
        for (int i = 12; i < 25; i++) ma[i - 12] = (need[c][i] > s);
        if (ma != 0) wr(16'h0200 + 16'(8 * c), ma);      // delayreg_A
        if (mb != 0) wr(16'h0202 + 16'(8 * c), mb);      // delayreg_B
      end
    repeat (2) @(posedge clk);   // last step reaches the delays
    n_tune_up++;
  endtask

  initial begin
    logic [15:0] r, e [NCH], e2 [NCH];
    logic [NSUB-1:0] off;
    int total;

    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < NSUB; i++) begin
        wire_ns[c][i] = 3.0 + 4.0 * real'($urandom_range(0, 1000)) / 1000.0;
        if (i == 0) wire_ns[c][i] = 6.0 + 0.05 * c;    // bit 0 arrives late ...
        if (i == 1) wire_ns[c][i] = 3.1 + 0.1 * c;     // ... bit 1 early, on every channel
        need[c][i] = (wire_ns[c][i] < HALF + 0.2) ? int'((HALF + 0.4 - wire_ns[c][i]) / TAP_NS) + 1 : 0;
      end

    // 1. reset
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (20) @(posedge clk);
    rd(16'h0000, r); chk(r == 16'h0001, "version");
    rd(16'h0002, r); chk(r == 16'h0001, "status: REFCLK valid, not counting");

    // 2. untuned lines count errors
    wr(16'h0004, 16'h0004);
    rd(16'h0002, r); chk(r == 16'h0003, "status: counting");
    repeat (100) @(posedge clk);
    wr(16'h0004, 16'h0008);
    rd(16'h0002, r); chk(r == 16'h0001, "status: stopped");
    read_errs(e);
    for (int c = 0; c < NCH; c++) begin
      chk_v(e[c] > 16'd50, "untuned channel counts errors", int'(e[c]));
      if (e[c] > 0) n_skew_err++;
    end

    // 3. freeze and counter reset
    repeat (50) @(posedge clk);
    read_errs(e2);
    for (int c = 0; c < NCH; c++) chk(e2[c] == e[c], "count frozen after stop");
    n_freeze++;
    wr(16'h0004, 16'h0002);
    wr(16'h0004, 16'h0000);
    read_errs(e);
    for (int c = 0; c < NCH; c++) chk(e[c] == 0, "counter reset clears");
    n_cnt_rst++;

    // 4. tune, 5. clean run
    tune_up();
    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < NSUB; i++)
        chk_v(tap[c][i] == 6'(need[c][i]), "tap value after tuning", c * 100 + i);
    count_for(500);
    read_errs(e);
    for (int c = 0; c < NCH; c++) chk(e[c] == 0, "no errors after tuning");
    n_clean++;
    // readback: the same word on all channels, a fixed latency behind
    rd(16'h0400, r);
    off = NSUB'(snap - NSUB'(r[11:0]));
    off[NSUB-1:12] = '0;
    for (int c = 0; c < NCH; c++) begin
      logic [NSUB-1:0] w;
      rd(16'h0400 + 16'(4 * c), r);
      w = snap - off;
      chk(r == {4'd0, w[11:0]}, "readback A");
      rd(16'h0402 + 16'(4 * c), r);
      w = snap - off;
      chk(r == {3'd0, w[24:12]}, "readback B");
      n_readback++;
    end
    chk(off > 0 && off < 16, "readback latency small");

    // 6. glitch on channel 3, line 7, covering one falling-edge sample
    wr(16'h0004, 16'h0004);
    repeat (20) @(posedge clk);
    #2.5 inj[3][7] = 1;
    #5.0 inj[3][7] = 0;
    repeat (20) @(posedge clk);
    wr(16'h0004, 16'h0008);
    read_errs(e);
    for (int c = 0; c < NCH; c++) chk_v(e[c] == ((c == 3) ? 16'd2 : 16'd0), "glitch gives two errors", int'(e[c]));
    if (e[3] == 2) n_glitch++;

    // 7. detune channel 9 line 1 with delayreg_D (Bit Down, sub channels 0..11)
    wr(16'h0004, 16'h0002); wr(16'h0004, 16'h0000);
    for (int s = 0; s < need[9][1]; s++) wr(16'h0206 + 16'(8 * 9), 16'h0002);
    repeat (2) @(posedge clk);
    chk(tap[9][1] == 0, "tap stepped down");
    count_for(100);
    read_errs(e);
    for (int c = 0; c < NCH; c++) chk_v((e[c] > 0) == (c == 9), "only detuned channel errs", int'(e[c]));
    if (e[9] > 0) n_tune_down++;
    // and back up with delayreg_B
    for (int s = 0; s < need[9][1]; s++) wr(16'h0202 + 16'(8 * 9), 16'h0002);

    // 8. global reset
    wr(16'h0004, 16'h0004);
    wr(16'h0004, 16'h0001);
    repeat (3) @(posedge clk);
    rd(16'h0002, r); chk(r == 16'h0000, "status during global reset");
    wr(16'h0004, 16'h0000);
    read_errs(e);
    for (int c = 0; c < NCH; c++) chk(e[c] == 0, "global reset clears counts");
    chk(tap[0][1] == 0, "global reset clears taps");
    repeat (30) @(posedge clk);
    rd(16'h0002, r); chk(r == 16'h0001, "REFCLK valid again, not counting");
    n_global_rst++;

    // 9. REFCLK loss
    refclk_run = 0;
    #300;
    rd(16'h0002, r); chk(r[0] == 1'b0, "REFCLK loss shown");
    if (r[0] == 1'b0) n_refclk_loss++;
    refclk_run = 1;
    #300;
    rd(16'h0002, r); chk(r[0] == 1'b1, "REFCLK back");

    $display("mechanisms: skew_err=%0d freeze=%0d cnt_rst=%0d tune_up=%0d clean=%0d readback=%0d glitch=%0d tune_down=%0d global_rst=%0d refclk_loss=%0d",
             n_skew_err, n_freeze, n_cnt_rst, n_tune_up, n_clean, n_readback, n_glitch,
             n_tune_down, n_global_rst, n_refclk_loss);
    chk(n_skew_err > 0,  "mechanism skew errors");
    chk(n_freeze > 0,    "mechanism stop/freeze");
    chk(n_cnt_rst > 0,   "mechanism counter reset");
    chk(n_tune_up > 0,   "mechanism bit up");
    chk(n_clean > 0,     "mechanism clean after tuning");
    chk(n_readback > 0,  "mechanism readback");
    chk(n_glitch > 0,    "mechanism glitch");
    chk(n_tune_down > 0, "mechanism bit down");
    chk(n_global_rst > 0, "mechanism global reset");
    chk(n_refclk_loss > 0, "mechanism REFCLK loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
