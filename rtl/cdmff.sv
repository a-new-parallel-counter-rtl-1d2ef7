// cdmff -- conditional data mapping D flip-flop with reset.
//
// This is the storage cell the whole counter is built from: two of them sit
// inside every 2-bit counting module, and six more form the pipeline
// registers ("module-2") that carry the enables and look-ahead signals
// between modules. The transistor-level cell saves power by letting the clock
// act on the internal nodes only when the input differs from the stored bit;
// in RTL that appears as a register that is written only when d != q, which
// gives exactly the behaviour of an ordinary D flip-flop.
//
// Interface: clk, rst (active high, asynchronous, clears q), d; outputs q and
// its complement qbar, as the cell symbol in the counter schematics has.
// Timing: q takes d at the rising edge of clk; qbar is q inverted.
//
// From the source design: a D flip-flop with D, CLK, RST, Q and Qbar pins.
// Own choices: rising-edge clocking and an asynchronous active-high reset
// (the source design shows an RST pin but not its polarity or timing).
module cdmff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q,
  output logic qbar
);

  // The conditional write: an unchanged input leaves the cell untouched.
  logic load;
  assign load = (d != q);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       q <= 1'b0;
    else if (load) q <= d;
  end

  assign qbar = ~q;

endmodule
