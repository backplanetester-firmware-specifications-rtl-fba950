// idelayctrl_model: behavioural model of the FPGA delay calibration block
// (simulation model of a vendor primitive; uses timing controls).
//
// RDY reports a valid reference clock: it rises once LOCK_EDGES rising edges
// of REFCLK have been seen after RST, and falls again when RST is asserted
// or when no REFCLK edge arrives within a LOSS_NS window. The specification
// only says that the status register shows whether the 200 MHz REFCLK is
// valid; edge count and loss window are this model's own values.
`timescale 1ns/1ps
module idelayctrl_model #(
  parameter int unsigned LOCK_EDGES = 16,
  parameter real         LOSS_NS    = 50.0
) (
  input  logic REFCLK,
  input  logic RST,
  output logic RDY
);
  logic [7:0]  nedge = '0;  // edges since reset, saturating at LOCK_EDGES
  logic [15:0] tick  = '0;  // free-running edge counter, watched for loss
  logic [15:0] tick_seen;
  logic        lost;

  always @(posedge REFCLK or posedge RST) begin
    if (RST) nedge <= '0;
    else if (nedge < 8'(LOCK_EDGES)) nedge <= nedge + 1'b1;
  end

  always @(posedge REFCLK) tick <= tick + 1'b1;

  initial begin
    lost      = 1'b1;
    tick_seen = '0;
    forever begin
      #(LOSS_NS);
      lost      = (tick == tick_seen);
      tick_seen = tick;
    end
  end

  assign RDY = !RST && !lost && (nedge >= 8'(LOCK_EDGES));
endmodule
