// state_decoder -- decodes one state of a 2-bit counting module.
//
// The output match is high when the module's stored bits {q1, q0} equal the
// parameter STATE and the qualifier input qual is high. The counter uses two
// of these in its look-ahead logic: one finds module-1 in state 01 (qual tied
// high), one finds a module-3 in state 11 while the lower bits are in their
// matching pre-overflow state (qual from the previous look-ahead stage). A
// pipeline flip-flop registers the output, so the decoded value is used one
// clock later. Purely combinational.
//
// Interface: q1, q0 (the decoded module's bits), qual; output match.
// Parameter STATE: the 2-bit state to find, default 2'b01 (the state module-1
// is in two clocks before its overflow state).
// The source design names a "states decoder" in its component list and shows
// it as inverters and an AND gate before a flip-flop; the states it decodes
// and the qualifier input are this design's own choice.
module state_decoder #(
  parameter logic [1:0] STATE = 2'b01
) (
  input  logic q1,
  input  logic q0,
  input  logic qual,
  output logic match
);

  assign match = qual & ({q1, q0} == STATE);

endmodule
