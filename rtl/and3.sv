// and3 -- three-input AND gate of the counter's look-ahead logic.
//
// In the counter it combines the two bits of the first module-3 with the
// decoded "module-1 is in state 01" signal, so its output is high exactly
// when the low four count bits are 1101, two clocks before the second
// module-3 must see its enable. Purely combinational.
//
// Interface: inputs a, b, c; output y = a & b & c.
// The gate and its place in the look-ahead path follow the source design's
// component list; which signals it combines is this design's own reading.
module and3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  assign y = a & b & c;

endmodule
