// bp_wire: testbench model of one backplane wire, a pure transport delay.
// y follows a after delay_ns nanoseconds, even when a changes again before
// the earlier change has arrived (each change is carried by its own
// process). glitch_in is XORed on the far end to inject a disturbance.
`timescale 1ns/1ps
module bp_wire (
  input  logic a,
  input  real  delay_ns,
  input  logic glitch_in,
  output logic y
);
  logic far = 1'b0;
  always @(a) begin
    automatic logic v = a;
    automatic real  d = delay_ns;
    fork
      begin
        #(d);
        far = v;
      end
    join_none
  end
  assign y = far ^ glitch_in;
endmodule
