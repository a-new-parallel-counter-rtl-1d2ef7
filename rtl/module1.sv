// module1 -- free-running 2-bit counter for the two low-order count bits.
//
// Module-1 counts on every clock edge, 00 -> 01 -> 10 -> 11 -> 00, and holds
// bits [1:0] of the counter's value. It also produces QEN1 = Q1 AND NOT Q0,
// which is high in state 10, one clock before the state 11 that makes the
// next 2-bit module advance. A pipeline flip-flop outside this module
// registers QEN1, so the next module sees its enable in state 11 without any
// carry logic between the two.
//
// Interface: clk, rst (active high, asynchronous, to state 00); outputs q1,
// q0 (count bits 1 and 0) and qen1. Timing: one state per rising clock edge;
// qen1 is a combinational decode of the stored state.
//
// From the source design: the state sequence, the outputs Q1, Q0 and the
// formula for QEN1, two CDMFF cells. Own choice: the next-state logic is
// written as the usual toggle equations (Q0 toggles every clock, Q1 toggles
// when Q0 is 1), since the gate-level drawing cannot be traced reliably.
module module1 (
  input  logic clk,
  input  logic rst,
  output logic q1,
  output logic q0,
  output logic qen1
);

  logic q0_n;
  logic d1, d0;

  // Next state of a 2-bit up counter.
  assign d0 = q0_n;          // Q0 toggles on every clock
  assign d1 = q1 ^ q0;       // Q1 toggles when Q0 is 1

  cdmff u_ff0 (.clk(clk), .rst(rst), .d(d0), .q(q0), .qbar(q0_n));
  cdmff u_ff1 (.clk(clk), .rst(rst), .d(d1), .q(q1), .qbar());

  // Look-ahead enable: state 10, one clock before the overflow state 11.
  assign qen1 = q1 & q0_n;

endmodule
