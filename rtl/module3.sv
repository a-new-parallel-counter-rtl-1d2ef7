// module3 -- 2-bit counting module with count enable and look-ahead output.
//
// Each module-3 holds two bits of the counter's value. It advances
// 00 -> 01 -> 10 -> 11 -> 00 on a clock edge where its count enable ins is
// high and holds its state otherwise. Its output QEN3 = Q1 AND Q0 AND QC is
// high when this module is in 11 and QC reports that all lower bits are in
// their last state before overflow (all ones except bit 0). After one
// pipeline flip-flop, QEN3 becomes the count enable of the next module-3,
// which then sees it in the same cycle as the lower bits all reach one.
//
// Interface: clk, rst (active high, asynchronous, to state 00); ins, the count
// enable (already registered by a pipeline flip-flop outside); qc, the
// registered look-ahead signal for the lower bits; outputs q1, q0 and qen3.
// Timing: the state changes at the rising edge when ins is high; qen3 is a
// combinational AND of stored bits and qc.
//
// From the source design: the state diagram with its enable, the formula for
// QEN3 and the two CDMFF cells. Own choice: the next-state logic is written
// as toggle equations (Q0 toggles when enabled, Q1 when enabled and Q0 is 1).
module module3 (
  input  logic clk,
  input  logic rst,
  input  logic ins,
  input  logic qc,
  output logic q1,
  output logic q0,
  output logic qen3
);

  logic d1, d0;

  assign d0 = q0 ^ ins;
  assign d1 = q1 ^ (ins & q0);

  cdmff u_ff0 (.clk(clk), .rst(rst), .d(d0), .q(q0), .qbar());
  cdmff u_ff1 (.clk(clk), .rst(rst), .d(d1), .q(q1), .qbar());

  assign qen3 = q1 & q0 & qc;

endmodule
